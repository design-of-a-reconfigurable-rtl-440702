// dac1_driver: drives external DAC 1, which produces the bridge excitation Vo.
//
// A segment counter walks through SEGMENTS (510) samples of one sine cycle, one
// sample per tick_in strobe from the clock divider, so the excitation frequency
// is tick rate / 510. Each sample is the sine value (+-127) scaled by the 8-bit
// amplitude_in and offset to mid-scale: data_out = 128 + amplitude*sin/256.
// Amplitude and phase of Vo stay constant for the whole run, as described;
// restart_in (new frequency) returns the counter to segment 0.
//
// The counter value next_seg_out is shared with DAC 2 so that both sinusoids
// use one time base; seg_out is the segment currently on data_out, and
// cycle_start_out marks the tick at which segment 0 is on the output (used by
// the detectors to frame one full cycle). The 8-bit output width and 510
// segments follow the description; the sine table (Bhaskara approximation) and
// the amplitude scaling are this design's choice.
//
// Timing: data_out and seg_out update on the clock edge at which tick_in is
// high.
module dac1_driver
  import bis_pkg::*;
#(
  parameter int unsigned SEG = SEGMENTS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable_in,
  input  logic                    tick_in,
  input  logic                    restart_in,
  input  logic [AMP_W-1:0]        amplitude_in,
  output logic [DAC_W-1:0]        data_out,
  output logic [$clog2(SEG)-1:0]  seg_out,
  output logic [$clog2(SEG)-1:0]  next_seg_out,
  output logic                    cycle_start_out
);
  localparam int unsigned SW = $clog2(SEG);

  logic signed [7:0] sine_rom [SEG];
  for (genvar i = 0; i < SEG; i++) begin : g_rom
    assign sine_rom[i] = 8'(sin_approx(i, SEG, 127));
  end

  logic [SW-1:0]      seg_q;
  logic signed [16:0] prod;

  assign prod         = $signed({1'b0, amplitude_in}) * sine_rom[seg_q];
  assign next_seg_out = seg_q;
  assign cycle_start_out = tick_in && enable_in && (seg_out == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seg_q    <= '0;
      seg_out  <= '0;
      data_out <= 8'd128;
    end else if (!enable_in || restart_in) begin
      seg_q    <= '0;
      seg_out  <= SW'(SEG - 1);
      data_out <= 8'd128;
    end else if (tick_in) begin
      data_out <= 8'(9'sd128 + 9'(prod >>> 8));
      seg_out  <= seg_q;
      seg_q    <= (seg_q == SW'(SEG - 1)) ? '0 : seg_q + 1'b1;
    end
  end
endmodule
