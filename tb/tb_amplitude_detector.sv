// Testbench for amplitude_detector: the same synthetic bridge as the phase
// detector test, now with the in-phase reference 127*sin(x - phi). With the
// phases matched it checks vf_low_out for Vf amplitudes below and above the
// target, one result per measurement within two cycles of 510 samples, and
// the reported peak |Ve| against the real-arithmetic peak (tolerance 2).
module tb_amplitude_detector;
  import bis_pkg::*;
  logic clk = 0, rst_n = 1, en = 0, nofl = 0, tick = 0, cstart;
  logic [7:0] adc, peak;
  logic signed [7:0] rsin;
  logic valid, low;
  logic signed [27:0] corr;
  int checks = 0, failures = 0;
  int seg = 0;
  real phi = 30, psi = 30, a = 100, b = 80;

  amplitude_detector dut (.clk, .rst_n, .enable_in(en), .no_fluctuate_in(nofl), .tick_in(tick),
                          .cycle_start_in(cstart), .adc_in(adc), .ref_sin_in(rsin),
                          .valid_out(valid), .vf_low_out(low), .peak_out(peak), .corr_out(corr));
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.14159265358979;
  always_ff @(posedge clk) begin
    tick <= 1'b1;
    if (tick) seg <= (seg == 509) ? 0 : seg + 1;
  end
  always_comb begin
    real x;
    x = 2.0 * PI * seg / 510.0;
    cstart = tick && (seg == 0);
    rsin = 8'($rtoi(127.0 * $sin(x - phi * PI / 180.0)));
    adc  = 8'(128 + $rtoi((b * $sin(x - psi * PI / 180.0) - a * $sin(x - phi * PI / 180.0)) / 2.0));
  end

  task automatic trial(input real pa, input real pb, input bit exp_low);
    int n, vals;
    real epk;
    a = pa; b = pb;
    epk = (pa > pb ? pa - pb : pb - pa) / 2.0;
    @(negedge clk); en = 1; nofl = 1;
    n = 0; vals = 0;
    while (n < 2 * 510 + 20 && vals == 0) begin
      @(posedge clk); #1;
      if (valid) vals++;
      n++;
    end
    checks++;
    if (vals != 1 || low != exp_low) begin
      failures++; $display("FAIL a=%f b=%f valid=%0d low=%0d", pa, pb, vals, low);
    end
    checks++;
    if (real'(peak) > epk + 2.0 || real'(peak) < epk - 2.0) begin
      failures++; $display("FAIL peak %0d expected %f", peak, epk);
    end
    @(negedge clk); en = 0; nofl = 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    trial(100, 80, 0);
    trial(60, 80, 1);
    trial(76, 80, 1);
    trial(84, 80, 0);
    trial(0, 120, 1);
    trial(200, 10, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
