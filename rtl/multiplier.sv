// multiplier: the processor's multiplier unit, a registered signed
// multiplication with an enable/done handshake.
//
// The description names the unit and its enable, not its structure; the
// simplest form is used: one W x W product computed in a single clock (the
// target FPGA family has hard multipliers).
//
// Timing: a_in and b_in are sampled while en_in is high; p_out is valid and
// done_out is high for one clock on the following edge.
module multiplier #(
  parameter int unsigned W = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en_in,
  input  logic signed [W-1:0]   a_in,
  input  logic signed [W-1:0]   b_in,
  output logic signed [2*W-1:0] p_out,
  output logic                  done_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_out    <= '0;
      done_out <= 1'b0;
    end else begin
      done_out <= en_in;
      if (en_in) p_out <= a_in * b_in;
    end
  end
endmodule
