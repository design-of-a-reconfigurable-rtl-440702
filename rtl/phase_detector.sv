// phase_detector: decides in which direction DAC 2 must shift the phase of Vf
// to cancel the bridge error Ve.
//
// Over one full excitation cycle the detector correlates the error sample
// (ADC code minus mid-scale 128) with the quadrature reference cos(x - phi) of
// Vf. With Vf = a*sin(x - phi) and the bridge target b*sin(x - psi), the
// sum is proportional to b*sin(phi - psi), independent of the amplitude a:
// positive means Vf lags too much, so sub_out is pulsed; otherwise add_out.
// The add/sub outputs, the gating by no_fluctuate and the one-cycle framing
// follow the description; the correlation method is this design's choice, as
// the description names the detector but does not give its insides.
//
// Timing: a measurement starts at a cycle_start_in tick while enable_in and
// no_fluctuate_in are high and ends at the next cycle_start_in tick, where one
// of add_out / sub_out is high for one clock and corr_out holds the sum. A
// drop of no_fluctuate_in aborts it. The cycle right after a result is never
// measured, so that DAC 2 has applied the correction first.
module phase_detector
  import bis_pkg::*;
#(
  parameter int unsigned ACC_W = 28
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable_in,
  input  logic                    no_fluctuate_in,
  input  logic                    tick_in,
  input  logic                    cycle_start_in,
  input  logic [ADC_W-1:0]        adc_in,
  input  logic signed [7:0]       ref_cos_in,
  output logic                    add_out,
  output logic                    sub_out,
  output logic signed [ACC_W-1:0] corr_out
);
  logic                    meas_q;
  logic signed [ACC_W-1:0] acc_q;
  logic signed [ADC_W:0]   ve;
  logic signed [ACC_W-1:0] prod;

  assign ve   = $signed({1'b0, adc_in}) - $signed((ADC_W+1)'(1 << (ADC_W - 1)));
  assign prod = ACC_W'(ve * ref_cos_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meas_q   <= 1'b0;
      acc_q    <= '0;
      add_out  <= 1'b0;
      sub_out  <= 1'b0;
      corr_out <= '0;
    end else begin
      add_out <= 1'b0;
      sub_out <= 1'b0;
      if (!enable_in || !no_fluctuate_in) begin
        meas_q <= 1'b0;
      end else if (tick_in) begin
        if (cycle_start_in) begin
          if (meas_q) begin
            corr_out <= acc_q;
            if (acc_q > 0) sub_out <= 1'b1;
            else           add_out <= 1'b1;
            meas_q <= 1'b0;
          end else begin
            acc_q  <= prod;
            meas_q <= 1'b1;
          end
        end else if (meas_q) begin
          acc_q <= acc_q + prod;
        end
      end
    end
  end

  a_one_decision: assert property (@(posedge clk) disable iff (!rst_n) !(add_out && sub_out));
endmodule
