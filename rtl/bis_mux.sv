// bis_mux: the channel multiplexer between the BIS modules and the system
// control unit. sel_in picks which channel's raw record and record number
// reach the control unit; the ready flags bypass it so the control unit can
// poll them all. The description shows the multiplexer and says it grows with
// the number of channels; the select encoding (binary channel index) is this
// design's choice. An out-of-range select gives channel 0. Purely
// combinational.
module bis_mux
  import bis_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic [$clog2(N > 1 ? N : 2)-1:0] sel_in,
  input  raw_t                             raw_in  [N],
  input  logic [FIDX_W-1:0]                addr_in [N],
  output raw_t                             raw_out,
  output logic [FIDX_W-1:0]                addr_out
);
  always_comb begin
    raw_out  = raw_in[0];
    addr_out = addr_in[0];
    for (int i = 1; i < N; i++) begin
      if (32'(sel_in) == i) begin
        raw_out  = raw_in[i];
        addr_out = addr_in[i];
      end
    end
  end
endmodule
