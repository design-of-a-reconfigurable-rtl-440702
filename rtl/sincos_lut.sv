// sincos_lut: sine and cosine of a whole-degree angle, by table lookup.
//
// The table holds sin(0..90 degrees) only, scaled by 2^14 (so 1.0 = 16384);
// the four quadrants are folded onto it with the identities
// sin(180-a) = sin(a), sin(a+180) = -sin(a), cos(a) = sin(90-a). This is the
// lookup method of the description (0 to 90 degrees plus identities); the
// table values come from a rational sine approximation evaluated at
// elaboration (this design's choice, within 0.2 % of the exact sine).
//
// Timing: angle_in is sampled when en_in is high; sin_out, cos_out and
// valid_out appear on the next clock. Angles of 360 and above set err_out.
module sincos_lut
  import bis_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en_in,
  input  logic [PHASE_W-1:0]  angle_in,
  output logic signed [15:0]  sin_out,
  output logic signed [15:0]  cos_out,
  output logic                valid_out,
  output logic                err_out
);
  logic [14:0] table_q [91];
  for (genvar i = 0; i <= 90; i++) begin : g_tab
    assign table_q[i] = 15'(sin_approx(i, 360, 1 << TRIG_FRAC));
  end

  logic [6:0]  si, ci;
  logic        sneg, cneg;

  always_comb begin
    si = '0; ci = '0; sneg = 1'b0; cneg = 1'b0;
    if (angle_in <= 90) begin
      si = 7'(angle_in);        ci = 7'(90 - angle_in);
    end else if (angle_in <= 180) begin
      si = 7'(180 - angle_in);  ci = 7'(angle_in - 90);   cneg = 1'b1;
    end else if (angle_in <= 270) begin
      si = 7'(angle_in - 180);  ci = 7'(270 - angle_in);  sneg = 1'b1; cneg = 1'b1;
    end else if (angle_in < 360) begin
      si = 7'(360 - angle_in);  ci = 7'(angle_in - 270);  sneg = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sin_out   <= '0;
      cos_out   <= '0;
      valid_out <= 1'b0;
      err_out   <= 1'b0;
    end else begin
      valid_out <= en_in;
      if (en_in) begin
        sin_out <= sneg ? -$signed({1'b0, table_q[si]}) : $signed({1'b0, table_q[si]});
        cos_out <= cneg ? -$signed({1'b0, table_q[ci]}) : $signed({1'b0, table_q[ci]});
        err_out <= (angle_in >= 360);
      end
    end
  end
endmodule
