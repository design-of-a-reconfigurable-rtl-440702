// clock_divider: turns the 50 MHz system clock into the DAC sample strobe of
// one BIS channel.
//
// The requested excitation frequency freq_hz_in (Hz) needs SEGMENTS samples per
// cycle, so a strobe is produced every Scale = CLK_HZ / (freq_hz_in * SEGMENTS)
// system clocks, counted by a free-running counter while enable_in is high.
// Scale is computed by a divider by a constant numerator and registered; it is
// clamped to at least 1, so frequencies above CLK_HZ / SEGMENTS (98 kHz with
// the defaults) run at that maximum rate.
//
// Following the description, the block is a counter with an enable used for
// power saving and a Scale = ClockIn / FrequencyIn. Unlike a derived clock, the
// output tick_out is a one-cycle clock enable in the system clock domain (this
// design's choice), which keeps the whole channel synchronous. The frequency
// is given in Hz (17 bits) rather than by a 7-bit code, so that the whole
// 40 Hz..100 kHz range can be expressed.
//
// Timing: a change of freq_hz_in takes effect one clock later; the first tick
// comes Scale clocks after enable_in rises.
module clock_divider
  import bis_pkg::*;
#(
  parameter int unsigned CLK_FREQ = CLK_HZ,
  parameter int unsigned SEG      = SEGMENTS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable_in,
  input  logic [FHZ_W-1:0] freq_hz_in,
  output logic             tick_out
);
  localparam int unsigned SCALE_W = $clog2(CLK_FREQ + 1);

  logic [SCALE_W-1:0] scale_q, cnt_q;
  logic [31:0]        scale_c;

  always_comb begin
    if (freq_hz_in == '0) scale_c = CLK_FREQ / SEG;
    else                  scale_c = CLK_FREQ / (32'(freq_hz_in) * SEG);
    if (scale_c == 0) scale_c = 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scale_q  <= SCALE_W'(1);
      cnt_q    <= '0;
      tick_out <= 1'b0;
    end else begin
      scale_q  <= SCALE_W'(scale_c);
      tick_out <= 1'b0;
      if (!enable_in) begin
        cnt_q <= '0;
      end else if (cnt_q >= scale_q - 1'b1) begin
        cnt_q    <= '0;
        tick_out <= 1'b1;
      end else begin
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end
endmodule
