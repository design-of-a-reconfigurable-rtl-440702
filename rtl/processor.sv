// processor: turns one raw record (|Vf|, phase theta) into the real and
// imaginary parts of the unknown impedance,
//   ZxR = Vout*Rf*VfR / (VfR^2 + VfI^2),  ZxI = Vout*Rf*VfI / (VfR^2 + VfI^2),
// with VfR = |Vf| cos(theta) and VfI = |Vf| sin(theta).
//
// A control unit (the FSM below) drives three shared units, as in the
// description's block diagram: the sine/cosine lookup table, one multiplier
// and one divider. Order of operations, following the operation flow:
//   cos/sin(theta); VfR, VfI; K = Vout*Rf; VfR^2, VfI^2, D = VfR^2 + VfI^2;
//   L = K*VfR; M = K*VfI; ZxR = L/D; ZxI = M/D.
// Sine and cosine carry 14 fraction bits; ZxR and ZxI are signed 32-bit
// numbers with Z_FRAC = 8 fraction bits, in units of Rf (Vout and |Vf| are in
// the same DAC amplitude codes). The divider works on magnitudes and the sign
// of L or M is applied afterwards. The number formats and the single shared
// multiplier/divider are this design's choices.
//
// Interface: enable_in high with raw_in, vo_in, rf_in valid starts one
// computation (inputs are latched). When it ends, final_out holds the 88-bit
// record {raw with the 'processed' flag set, ZxR, ZxI} and data_ready_out
// stays high until enable_in is lowered. error_out is set with the result if
// |Vf| is zero (division by zero) or theta is 360 or more.
// The quotient never needs more than 32 bits (|Zx| <= 255 * 255 ohm, i.e.
// below 2^25 with 8 fraction bits), so the upper half of the 64-bit divider
// result is left unused.
//
// Timing: a computation takes one clock to latch the inputs, 2 clocks for the
// lookup, 7 multiplier passes of 2 clocks and 2 divisions of 66 clocks:
// 151 clocks from enable_in to data_ready_out (3.02 us at 50 MHz).
module processor
  import bis_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable_in,
  input  raw_t              raw_in,
  input  logic [AMP_W-1:0]  vo_in,
  input  logic [7:0]        rf_in,
  output rec_t              final_out,
  output logic              data_ready_out,
  output logic              error_out
);
  localparam int unsigned SHIFT = TRIG_FRAC + Z_FRAC;   // L * 2^SHIFT / D

  typedef enum logic [3:0] {
    P_IDLE, P_LUT, P_VFR, P_VFI, P_K, P_SQR, P_SQI, P_L, P_M, P_DIVR, P_DIVI,
    P_DONE
  } pstate_t;

  pstate_t               st_q;
  raw_t                  raw_q;
  logic [AMP_W-1:0]      vo_q;
  logic [7:0]            rf_q;
  logic signed [31:0]    cos_q, sin_q, vfr_q, vfi_q, k_q;
  logic signed [63:0]    d_q, l_q, m_q;
  logic                  mul_wait_q, div_wait_q;

  // Sine/cosine lookup table
  logic               lut_en, lut_valid, lut_err;
  logic signed [15:0] lut_sin, lut_cos;
  sincos_lut u_lut (.clk, .rst_n, .en_in(lut_en), .angle_in(raw_q.phase),
                    .sin_out(lut_sin), .cos_out(lut_cos), .valid_out(lut_valid),
                    .err_out(lut_err));

  // Multiplier
  logic               mul_en, mul_done;
  logic signed [31:0] mul_a, mul_b;
  logic signed [63:0] mul_p;
  multiplier #(.W(32)) u_mul (.clk, .rst_n, .en_in(mul_en), .a_in(mul_a),
                              .b_in(mul_b), .p_out(mul_p), .done_out(mul_done));

  // Divider (magnitudes)
  logic        div_start, div_done, div_busy, div0;
  logic [63:0] div_n, div_q, div_r;
  divider #(.W(64)) u_div (.clk, .rst_n, .start_in(div_start), .dividend_in(div_n),
                           .divisor_in(d_q), .quotient_out(div_q),
                           .remainder_out(div_r), .done_out(div_done),
                           .busy_out(div_busy), .div0_out(div0));

  function automatic logic [63:0] mag_shift(input logic signed [63:0] v);
    logic [63:0] m;
    m = v[63] ? 64'(-v) : 64'(v);
    return m << SHIFT;
  endfunction

  always_comb begin
    lut_en = 1'b0; mul_en = 1'b0; div_start = 1'b0;
    mul_a = '0; mul_b = '0; div_n = '0;
    case (st_q)
      P_LUT:  lut_en = !mul_wait_q;
      P_VFR:  begin mul_a = 32'(raw_q.amp); mul_b = cos_q; end
      P_VFI:  begin mul_a = 32'(raw_q.amp); mul_b = sin_q; end
      P_K:    begin mul_a = 32'(vo_q);      mul_b = 32'(rf_q); end
      P_SQR:  begin mul_a = vfr_q;          mul_b = vfr_q; end
      P_SQI:  begin mul_a = vfi_q;          mul_b = vfi_q; end
      P_L:    begin mul_a = k_q;            mul_b = vfr_q; end
      P_M:    begin mul_a = k_q;            mul_b = vfi_q; end
      P_DIVR: begin div_n = mag_shift(l_q); div_start = !div_wait_q; end
      P_DIVI: begin div_n = mag_shift(m_q); div_start = !div_wait_q; end
      default: ;
    endcase
    if (st_q inside {P_VFR, P_VFI, P_K, P_SQR, P_SQI, P_L, P_M})
      mul_en = !mul_wait_q;
  end

  function automatic logic signed [Z_W-1:0] apply_sign(input logic neg,
                                                       input logic [Z_W-1:0] q);
    logic signed [Z_W-1:0] r;
    r = q;
    return neg ? -r : r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= P_IDLE;
      raw_q <= '0; vo_q <= '0; rf_q <= '0;
      cos_q <= '0; sin_q <= '0; vfr_q <= '0; vfi_q <= '0; k_q <= '0;
      d_q <= '0; l_q <= '0; m_q <= '0;
      mul_wait_q <= 1'b0; div_wait_q <= 1'b0;
      final_out <= '0; data_ready_out <= 1'b0; error_out <= 1'b0;
    end else begin
      case (st_q)
        P_IDLE: if (enable_in) begin
          raw_q <= raw_in; vo_q <= vo_in; rf_q <= rf_in;
          data_ready_out <= 1'b0;
          error_out <= 1'b0;
          st_q <= P_LUT;
        end
        P_LUT: begin
          mul_wait_q <= 1'b1;          // reused as "lookup issued"
          if (lut_valid) begin
            cos_q <= 32'(lut_cos); sin_q <= 32'(lut_sin);
            error_out <= lut_err;
            mul_wait_q <= 1'b0;
            st_q <= P_VFR;
          end
        end
        P_VFR, P_VFI, P_K, P_SQR, P_SQI, P_L, P_M: begin
          mul_wait_q <= 1'b1;
          if (mul_done) begin
            mul_wait_q <= 1'b0;
            case (st_q)
              P_VFR: begin vfr_q <= 32'(mul_p); st_q <= P_VFI; end
              P_VFI: begin vfi_q <= 32'(mul_p); st_q <= P_K;   end
              P_K:   begin k_q   <= 32'(mul_p); st_q <= P_SQR; end
              P_SQR: begin d_q   <= mul_p;      st_q <= P_SQI; end
              P_SQI: begin d_q   <= d_q + mul_p; st_q <= P_L;  end
              P_L:   begin l_q   <= mul_p;      st_q <= P_M;   end
              default: begin m_q <= mul_p;      st_q <= P_DIVR; end
            endcase
          end
        end
        P_DIVR, P_DIVI: begin
          div_wait_q <= 1'b1;
          if (div_done) begin
            div_wait_q <= 1'b0;
            if (div0) error_out <= 1'b1;
            if (st_q == P_DIVR) begin
              final_out.zxr <= apply_sign(l_q[63], Z_W'(div_q));
              st_q <= P_DIVI;
            end else begin
              final_out.zxi <= apply_sign(m_q[63], Z_W'(div_q));
              final_out.raw <= raw_q;
              final_out.raw.flags.processed <= 1'b1;
              data_ready_out <= 1'b1;
              st_q <= P_DONE;
            end
          end
        end
        P_DONE: if (!enable_in) begin
          data_ready_out <= 1'b0;
          st_q <= P_IDLE;
        end
        default: st_q <= P_IDLE;
      endcase
    end
  end

  logic unused;
  assign unused = ^{div_r, div_busy};
endmodule
