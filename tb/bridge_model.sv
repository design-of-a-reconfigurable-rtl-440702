// bridge_model: behavioural model of one digital auto balance bridge with its
// two DACs and its ADC, for simulation only (not synthesizable intent).
//
// The biosensor is modelled at the current frequency as a gain and a delay:
// the bridge target is GAIN_NUM/GAIN_DEN times the DAC 1 waveform delayed by
// DELAY samples (DELAY * 360/510 degrees). The ADC returns half the
// difference between that target and the DAC 2 signal, around code 128, so
// the error is zero when DAC 2 reproduces the target. The DAC codes are kept
// in a history shifted at every strobe; the ADC output is combinational.
module bridge_model #(
  parameter int DELAY    = 45,
  parameter int GAIN_NUM = 1,
  parameter int GAIN_DEN = 2
) (
  input  logic       clk,
  input  logic       strobe_in,
  input  logic [7:0] dac1_in,
  input  logic [7:0] dac2_in,
  output logic [7:0] adc_out
);
  logic [7:0] hist [512];
  int delay = DELAY, gnum = GAIN_NUM, gden = GAIN_DEN;

  initial for (int i = 0; i < 512; i++) hist[i] = 8'd128;

  always_ff @(posedge clk)
    if (strobe_in) begin
      for (int i = 511; i > 0; i--) hist[i] <= hist[i-1];
      hist[0] <= dac1_in;
    end

  always_comb begin
    int v1, t, e;
    v1 = (delay == 0) ? int'(dac1_in) : int'(hist[delay - 1]);
    t  = (v1 - 128) * gnum / gden;
    e  = 128 + (t - (int'(dac2_in) - 128)) / 2;
    if (e < 0) e = 0;
    if (e > 255) e = 255;
    adc_out = 8'(e);
  end
endmodule
