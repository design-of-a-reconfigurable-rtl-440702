// dac2_driver: drives external DAC 2, which produces the balancing signal Vf.
//
// Vf uses the time base of DAC 1 (seg_in) delayed by the current phase:
// index = seg_in - round(phase * 510 / 360), so phase_out is the lag of Vf
// behind Vo in degrees. Each sample is amplitude_in * sin(index) / 256 around
// mid-scale, as for DAC 1. The driver also outputs the unscaled in-phase and
// quadrature references (sin and cos at the same index) that the amplitude and
// phase detectors correlate the bridge error with.
//
// Phase search, as described: an add_in or sub_in pulse moves the phase by the
// next value of the sequence 90, 45, 23, 11, 6, 3, 2, 1 degrees (the last one
// repeats). restart_in (new frequency) sets the phase back to INIT_PHASE and
// the sequence to its start.
//
// no_fluctuate_out is cleared by any change of phase or amplitude and set again
// at the first tick at which a fresh cycle (segment 0) is emitted with the new
// setting, so the detectors that wait for it measure whole settled cycles. The
// reference outputs, the settle rule and INIT_PHASE are this design's choice.
//
// Timing: data_out, ref_sin_out and ref_cos_out update on the clock edge where
// tick_in is high, together with DAC 1.
module dac2_driver
  import bis_pkg::*;
#(
  parameter int unsigned SEG        = SEGMENTS,
  parameter int unsigned INIT_PHASE = 180
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable_in,
  input  logic                    tick_in,
  input  logic                    restart_in,
  input  logic [$clog2(SEG)-1:0]  seg_in,
  input  logic [AMP_W-1:0]        amplitude_in,
  input  logic                    add_in,
  input  logic                    sub_in,
  output logic [DAC_W-1:0]        data_out,
  output logic signed [7:0]       ref_sin_out,
  output logic signed [7:0]       ref_cos_out,
  output logic [PHASE_W-1:0]      phase_out,
  output logic                    no_fluctuate_out
);
  localparam int unsigned SW = $clog2(SEG);

  logic signed [7:0] sine_rom   [SEG];
  logic signed [7:0] cosine_rom [SEG];
  for (genvar i = 0; i < SEG; i++) begin : g_rom
    assign sine_rom[i]   = 8'(sin_approx(i, SEG, 127));
    assign cosine_rom[i] = 8'(sin_approx(64'(2 * i) + 64'(SEG / 2), 64'(2 * SEG), 127));
  end

  logic [PHASE_W-1:0] phase_q;
  logic [2:0]         step_q;
  logic [AMP_W-1:0]   amp_last_q;
  logic [SW:0]        phase_seg, idx_c;
  logic [PHASE_W:0]   ph_add, ph_sub;
  logic signed [16:0] prod;

  // Phase in segments, rounded: phase * SEG / 360.
  assign phase_seg = (SW+1)'((32'(phase_q) * SEG + 180) / 360);
  always_comb begin
    if ({1'b0, seg_in} >= phase_seg) idx_c = {1'b0, seg_in} - phase_seg;
    else                             idx_c = {1'b0, seg_in} + (SW+1)'(SEG) - phase_seg;
    if (idx_c >= (SW+1)'(SEG)) idx_c = idx_c - (SW+1)'(SEG);
  end

  assign ph_add = {1'b0, phase_q} + (PHASE_W+1)'(phase_step(step_q));
  assign ph_sub = {1'b0, phase_q} + (PHASE_W+1)'(360) - (PHASE_W+1)'(phase_step(step_q));
  assign prod   = $signed({1'b0, amplitude_in}) * sine_rom[idx_c[SW-1:0]];
  assign phase_out = phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q          <= PHASE_W'(INIT_PHASE);
      step_q           <= '0;
      amp_last_q       <= '0;
      no_fluctuate_out <= 1'b0;
      data_out         <= 8'd128;
      ref_sin_out      <= '0;
      ref_cos_out      <= '0;
    end else if (!enable_in || restart_in) begin
      phase_q          <= PHASE_W'(INIT_PHASE);
      step_q           <= '0;
      amp_last_q       <= amplitude_in;
      no_fluctuate_out <= 1'b0;
      data_out         <= 8'd128;
      ref_sin_out      <= '0;
      ref_cos_out      <= '0;
    end else begin
      amp_last_q <= amplitude_in;
      if (add_in || sub_in) begin
        if (add_in) phase_q <= (ph_add >= 360) ? PHASE_W'(ph_add - 360) : PHASE_W'(ph_add);
        else        phase_q <= (ph_sub >= 360) ? PHASE_W'(ph_sub - 360) : PHASE_W'(ph_sub);
        if (step_q != 3'd7) step_q <= step_q + 1'b1;
        no_fluctuate_out <= 1'b0;
      end else if (amplitude_in != amp_last_q) begin
        no_fluctuate_out <= 1'b0;
      end else if (tick_in && seg_in == '0) begin
        no_fluctuate_out <= 1'b1;
      end
      if (tick_in) begin
        data_out    <= 8'(9'sd128 + 9'(prod >>> 8));
        ref_sin_out <= sine_rom[idx_c[SW-1:0]];
        ref_cos_out <= cosine_rom[idx_c[SW-1:0]];
      end
    end
  end

  // add and sub are never requested together.
  a_add_sub_excl: assert property (@(posedge clk) disable iff (!rst_n) !(add_in && sub_in));
endmodule
