// divider: the processor's divider unit, an unsigned restoring divider that
// produces one quotient bit per clock.
//
// The description names the unit and its enable only; a radix-2 restoring
// divider is the smallest general divider and is this design's choice.
// Division by zero returns an all-ones quotient and sets div0_out.
//
// Timing: start_in (one clock) loads dividend_in and divisor_in; after W + 1
// clocks done_out is high for one clock with quotient_out and remainder_out.
// busy_out is high in between.
module divider #(
  parameter int unsigned W = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_in,
  input  logic [W-1:0]  dividend_in,
  input  logic [W-1:0]  divisor_in,
  output logic [W-1:0]  quotient_out,
  output logic [W-1:0]  remainder_out,
  output logic          done_out,
  output logic          busy_out,
  output logic          div0_out
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  q_q, d_q;
  logic [W-1:0]  r_q;
  logic [W:0]    r_shift, r_sub;
  logic [CW-1:0] cnt_q;

  assign r_shift = {r_q[W-1:0], q_q[W-1]};
  assign r_sub   = r_shift - {1'b0, d_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_q <= '0; d_q <= '0; r_q <= '0; cnt_q <= '0;
      busy_out <= 1'b0; done_out <= 1'b0; div0_out <= 1'b0;
      quotient_out <= '0; remainder_out <= '0;
    end else begin
      done_out <= 1'b0;
      if (start_in && !busy_out) begin
        q_q      <= dividend_in;
        d_q      <= divisor_in;
        r_q      <= '0;
        cnt_q    <= CW'(W);
        busy_out <= 1'b1;
        div0_out <= (divisor_in == '0);
      end else if (busy_out) begin
        if (cnt_q != 0) begin
          if (!r_sub[W]) begin
            r_q <= r_sub[W-1:0];
            q_q <= {q_q[W-2:0], 1'b1};
          end else begin
            r_q <= r_shift[W-1:0];
            q_q <= {q_q[W-2:0], 1'b0};
          end
          cnt_q <= cnt_q - 1'b1;
        end else begin
          busy_out      <= 1'b0;
          done_out      <= 1'b1;
          quotient_out  <= div0_out ? '1 : q_q;
          remainder_out <= r_q;
        end
      end
    end
  end
endmodule
