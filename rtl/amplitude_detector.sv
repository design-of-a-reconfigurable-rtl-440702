// amplitude_detector: measures the bridge error Ve against the in-phase part
// of Vf so that the BIS control unit can set the amplitude of Vf.
//
// Over one full excitation cycle it sums the error sample (ADC code minus 128)
// times the in-phase reference sin(x - phi) of Vf. With Vf = a*sin(x - phi) and
// the bridge target b*sin(x - psi) the sum is proportional to
// b*cos(phi - psi) - a: positive means Vf is too small (vf_low_out = 1). It also
// reports the peak magnitude of Ve seen in the cycle (peak_out), the error
// amplitude itself. The block is run by the DAC sample strobe as described;
// its insides are this design's choice.
//
// Timing: same framing as the phase detector: a measurement runs from one
// cycle_start_in tick to the next while enable_in and no_fluctuate_in are high;
// valid_out is then high for one clock with vf_low_out, peak_out and corr_out.
// The cycle right after a result is skipped.
module amplitude_detector
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
  input  logic signed [7:0]       ref_sin_in,
  output logic                    valid_out,
  output logic                    vf_low_out,
  output logic [ADC_W-1:0]        peak_out,
  output logic signed [ACC_W-1:0] corr_out
);
  logic                    meas_q;
  logic signed [ACC_W-1:0] acc_q;
  logic [ADC_W-1:0]        peak_q;
  logic signed [ADC_W:0]   ve;
  logic [ADC_W-1:0]        mag;
  logic signed [ACC_W-1:0] prod;

  assign ve   = $signed({1'b0, adc_in}) - $signed((ADC_W+1)'(1 << (ADC_W - 1)));
  assign mag  = ve[ADC_W] ? ADC_W'(-ve) : ADC_W'(ve);
  assign prod = ACC_W'(ve * ref_sin_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meas_q     <= 1'b0;
      acc_q      <= '0;
      peak_q     <= '0;
      valid_out  <= 1'b0;
      vf_low_out <= 1'b0;
      peak_out   <= '0;
      corr_out   <= '0;
    end else begin
      valid_out <= 1'b0;
      if (!enable_in || !no_fluctuate_in) begin
        meas_q <= 1'b0;
      end else if (tick_in) begin
        if (cycle_start_in) begin
          if (meas_q) begin
            valid_out  <= 1'b1;
            vf_low_out <= (acc_q > 0);
            peak_out   <= peak_q;
            corr_out   <= acc_q;
            meas_q     <= 1'b0;
          end else begin
            acc_q  <= prod;
            peak_q <= mag;
            meas_q <= 1'b1;
          end
        end else if (meas_q) begin
          acc_q <= acc_q + prod;
          if (mag > peak_q) peak_q <= mag;
        end
      end
    end
  end
endmodule
