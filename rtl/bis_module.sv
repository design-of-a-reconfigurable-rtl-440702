// bis_module: one bioimpedance spectroscopy channel, attached to one digital
// auto balance bridge (two external DACs, one ADC, the reference resistor Rf
// and the biosensor Zx).
//
// DAC 1 applies the excitation Vo (fixed amplitude vo_in) to the sensor; DAC 2
// applies the balancing signal Vf through Rf. The ADC returns the bridge error
// Ve. The channel adjusts the phase and then the amplitude of Vf until Ve is
// as close to zero as the search allows; |Vf| and its phase (the "raw data")
// then describe Zx. The clock divider sets the sample strobe for the chosen
// frequency and runs DAC 1, DAC 2 and both detectors; the BIS control unit
// sequences the sweep. See the sub-blocks for details.
//
// Interface to the system control unit: enable_in, operate_in (0 = pause),
// vo_in, start/end frequency index, rdy_out with raw_out and nxt_address_out,
// done_out. Interface to the bridge: dac1_out, dac2_out (8-bit codes, mid-scale
// 128), dac_strobe_out (high in the clock cycle at whose end both DACs load
// their next sample) and adc_in (8-bit, mid-scale 128 = zero error), which is
// sampled at the same edges. ADC width and offset coding are this design's choice.
module bis_module
  import bis_pkg::*;
#(
  parameter int unsigned SEG = SEGMENTS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable_in,
  input  logic              operate_in,
  input  logic [ID_W-1:0]   bis_id_in,
  input  logic [AMP_W-1:0]  vo_in,
  input  logic [FIDX_W-1:0] start_idx_in,
  input  logic [FIDX_W-1:0] end_idx_in,
  output logic              rdy_out,
  output raw_t              raw_out,
  output logic [FIDX_W-1:0] nxt_address_out,
  output logic              done_out,
  output logic [DAC_W-1:0]  dac1_out,
  output logic [DAC_W-1:0]  dac2_out,
  output logic              dac_strobe_out,
  input  logic [ADC_W-1:0]  adc_in
);
  localparam int unsigned SW = $clog2(SEG);

  logic [FHZ_W-1:0]   freq_hz;
  logic               tick, restart, cycle_start;
  logic [SW-1:0]      seg_now, seg_next;
  logic [AMP_W-1:0]   amp2;
  logic               pd_en, ad_en, add, sub, nofl;
  logic signed [7:0]  rsin, rcos;
  logic [PHASE_W-1:0] phase;
  logic               ad_valid, ad_low;
  logic [ADC_W-1:0]   ad_peak;
  logic signed [27:0] pd_corr, ad_corr;
  logic               run;

  assign run = enable_in && !done_out;

  clock_divider #(.SEG(SEG)) u_clkdiv (
    .clk, .rst_n, .enable_in(run), .freq_hz_in(freq_hz), .tick_out(tick));

  assign dac_strobe_out = tick && run;

  dac1_driver #(.SEG(SEG)) u_dac1 (
    .clk, .rst_n, .enable_in(run), .tick_in(tick), .restart_in(restart),
    .amplitude_in(vo_in), .data_out(dac1_out), .seg_out(seg_now),
    .next_seg_out(seg_next), .cycle_start_out(cycle_start));

  dac2_driver #(.SEG(SEG)) u_dac2 (
    .clk, .rst_n, .enable_in(run), .tick_in(tick), .restart_in(restart),
    .seg_in(seg_next), .amplitude_in(amp2), .add_in(add), .sub_in(sub),
    .data_out(dac2_out), .ref_sin_out(rsin), .ref_cos_out(rcos),
    .phase_out(phase), .no_fluctuate_out(nofl));

  phase_detector u_pd (
    .clk, .rst_n, .enable_in(pd_en), .no_fluctuate_in(nofl), .tick_in(tick),
    .cycle_start_in(cycle_start), .adc_in, .ref_cos_in(rcos),
    .add_out(add), .sub_out(sub), .corr_out(pd_corr));

  amplitude_detector u_ad (
    .clk, .rst_n, .enable_in(ad_en), .no_fluctuate_in(nofl), .tick_in(tick),
    .cycle_start_in(cycle_start), .adc_in, .ref_sin_in(rsin),
    .valid_out(ad_valid), .vf_low_out(ad_low), .peak_out(ad_peak),
    .corr_out(ad_corr));

  bis_control u_ctrl (
    .clk, .rst_n, .enable_in, .operate_in, .bis_id_in, .start_idx_in,
    .end_idx_in, .pd_add_in(add), .pd_sub_in(sub), .ad_valid_in(ad_valid),
    .ad_vf_low_in(ad_low), .phase_in(phase), .freq_hz_out(freq_hz),
    .restart_out(restart), .pd_enable_out(pd_en), .ad_enable_out(ad_en),
    .amplitude_out(amp2), .rdy_out, .raw_out, .nxt_address_out, .done_out);

  // seg_now, ad_peak and the correlation sums are observation points for
  // simulation; they do not steer the search.
  logic unused;
  assign unused = ^{seg_now, ad_peak, pd_corr, ad_corr};
endmodule
