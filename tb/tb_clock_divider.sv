// Testbench for clock_divider: measures the strobe period for several
// frequencies against Scale = 50 MHz / (f * 510), clamped to 1, and checks
// that no strobe comes while the divider is disabled.
module tb_clock_divider;
  import bis_pkg::*;
  logic clk = 0, rst_n = 1, en = 0, tick;
  logic [FHZ_W-1:0] f = '0;
  int checks = 0, failures = 0;

  clock_divider dut (.clk, .rst_n, .enable_in(en), .freq_hz_in(f), .tick_out(tick));
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int hz);
    int t0, t1, exp_p, n;
    f  = FHZ_W'(hz);
    en = 1;
    exp_p = 50_000_000 / (hz * 510);
    if (exp_p < 1) exp_p = 1;
    // let the new scale settle, then time 3 periods
    repeat (3) @(posedge clk iff tick);
    t0 = $time;
    n = 0;
    repeat (3) @(posedge clk iff tick);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 != 3 * exp_p) begin
      failures++;
      $display("FAIL f=%0d period %0d expected %0d", hz, (t1 - t0) / 30, exp_p);
    end
  endtask

  initial begin
    int cnt;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // disabled: no ticks
    f = 17'd1000;
    cnt = 0;
    repeat (500) begin @(posedge clk); if (tick) cnt++; end
    checks++; if (cnt != 0) begin failures++; $display("FAIL tick while disabled"); end
    measure(1000);     // 98
    measure(5000);     // 19
    measure(100000);   // clamped to 1
    measure(40);       // 2450
    measure(25000);    // 3
    en = 0;
    repeat (3) @(posedge clk);
    cnt = 0;
    repeat (3000) begin @(posedge clk); if (tick) cnt++; end
    checks++; if (cnt != 0) begin failures++; $display("FAIL tick after disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
