// Testbench for phase_detector: a synthetic bridge produces the error
// samples Ve = (b*sin(x - psi) - a*sin(x - phi)) / 2 around code 128 and the
// quadrature reference 127*cos(x - phi). For phase pairs on both sides of the
// target, including wrap-around at 0/360 degrees, it checks that exactly one
// decision comes, in the right direction (sub when phi lags psi too much,
// add otherwise), within two cycles of 510 samples, and that nothing is
// decided while no_fluctuate is low.
module tb_phase_detector;
  import bis_pkg::*;
  logic clk = 0, rst_n = 1, en = 0, nofl = 0, tick = 0, cstart;
  logic [7:0] adc;
  logic signed [7:0] rcos;
  logic add, sub;
  logic signed [27:0] corr;
  int checks = 0, failures = 0;
  int seg = 0;
  real phi = 0, psi = 0, a = 100, b = 80;

  phase_detector dut (.clk, .rst_n, .enable_in(en), .no_fluctuate_in(nofl), .tick_in(tick),
                      .cycle_start_in(cstart), .adc_in(adc), .ref_cos_in(rcos),
                      .add_out(add), .sub_out(sub), .corr_out(corr));
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
    rcos = 8'($rtoi(127.0 * $cos(x - phi * PI / 180.0)));
    adc  = 8'(128 + $rtoi((b * $sin(x - psi * PI / 180.0) - a * $sin(x - phi * PI / 180.0)) / 2.0));
  end

  task automatic trial(input real p_phi, input real p_psi, input bit exp_sub);
    int adds, subs, n;
    phi = p_phi; psi = p_psi;
    @(negedge clk); en = 1; nofl = 1;
    adds = 0; subs = 0; n = 0;
    while (n < 2 * 510 + 20) begin
      @(posedge clk); #1;
      if (add) adds++;
      if (sub) subs++;
      if (add || sub) break;
      n++;
    end
    @(negedge clk); en = 0; nofl = 0;
    checks++;
    if (adds + subs != 1 || (exp_sub ? subs : adds) != 1) begin
      failures++;
      $display("FAIL phi=%f psi=%f adds=%0d subs=%0d", p_phi, p_psi, adds, subs);
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    int dec;
    repeat (3) @(posedge clk);
    rst_n = 1;
    trial(180, 32, 1);
    trial(10, 32, 0);
    trial(33, 32, 1);
    trial(31, 32, 0);
    trial(350, 10, 0);
    trial(40, 350, 1);
    trial(270, 300, 0);
    // gated off by no_fluctuate
    phi = 180; psi = 32;
    @(negedge clk); en = 1; nofl = 0;
    dec = 0;
    repeat (1200) begin @(posedge clk); #1; if (add || sub) dec++; end
    checks++; if (dec != 0) begin failures++; $display("FAIL decision while fluctuating"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
