// Testbench for dac2_driver: walks the phase through a sequence of add/sub
// requests, checking the phase after each against the step list 90, 45, 23,
// 11, 6, 3, 2, 1 (then 1 again); checks the output samples, sine and cosine
// references over a full cycle against real-arithmetic values of
// sin/cos(2*pi*(k - round(phase*510/360))/510); and checks that
// no_fluctuate_out drops on a change and returns at the next cycle start.
module tb_dac2_driver;
  import bis_pkg::*;
  logic clk = 0, rst_n = 1, en = 0, tick = 0, restart = 0, add = 0, sub = 0;
  logic [7:0] amp = 8'd160, data;
  logic signed [7:0] rs, rc;
  logic [8:0] seg = '0, phase;
  logic nofl;
  int checks = 0, failures = 0;

  dac2_driver dut (.clk, .rst_n, .enable_in(en), .tick_in(tick), .restart_in(restart),
                   .seg_in(seg), .amplitude_in(amp), .add_in(add), .sub_in(sub),
                   .data_out(data), .ref_sin_out(rs), .ref_cos_out(rc),
                   .phase_out(phase), .no_fluctuate_out(nofl));
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // time base: one sample every 2 clocks, as DAC 1 would provide
  logic ph = 0;
  always_ff @(posedge clk) begin
    ph   <= ~ph;
    tick <= en && ph;
    if (tick) seg <= (seg == 9'd509) ? '0 : seg + 1'b1;
  end

  function automatic bit near(real a, real b, real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  task automatic step(input bit is_add, input int exp_phase);
    @(negedge clk);
    if (is_add) add = 1; else sub = 1;
    @(negedge clk);
    add = 0; sub = 0;
    checks++;
    if (int'(phase) != exp_phase) begin
      failures++; $display("FAIL phase %0d expected %0d", phase, exp_phase);
    end
    checks++;
    if (nofl) begin failures++; $display("FAIL no_fluctuate still high after change"); end
  endtask

  task automatic check_cycle();
    int k, off, bad;
    real x;
    off = (int'(phase) * 510 + 180) / 360;
    bad = 0;
    // wait for settle, then compare 510 samples
    @(posedge clk iff nofl);
    for (int n = 0; n < 510; n++) begin
      @(posedge clk iff tick); #1;
      k = (int'(seg) + 509) % 510;          // sample index now on the output
      x = 2.0 * 3.14159265358979 * (k - off) / 510.0;
      if (!near(real'(data), 128.0 + 160.0 * 127.0 * $sin(x) / 256.0, 2.0)) bad++;
      if (!near(real'(rs), 127.0 * $sin(x), 1.5)) bad++;
      if (!near(real'(rc), 127.0 * $cos(x), 1.5)) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %0d sample errors at phase %0d", bad, phase); end
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    en = 1;
    repeat (2) @(posedge clk);
    checks++; if (phase != 9'd180) begin failures++; $display("FAIL initial phase %0d", phase); end
    check_cycle();
    step(1, 270);   // +90
    // no_fluctuate returns within one cycle of 510 samples
    cyc = 0;
    while (!nofl && cyc < 2100) begin @(posedge clk); cyc++; end
    checks++; if (!nofl) begin failures++; $display("FAIL no_fluctuate did not return"); end
    step(0, 225);   // -45
    step(1, 248);   // +23
    step(0, 237);   // -11
    step(0, 231);   // -6
    step(1, 234);   // +3
    step(0, 232);   // -2
    step(1, 233);   // +1
    step(1, 234);   // +1, last step repeats
    check_cycle();
    step(1, 235);
    step(0, 234);
    // wrap-around below zero
    restart = 1; @(negedge clk); restart = 0;
    checks++; if (phase != 9'd180) begin failures++; $display("FAIL restart phase %0d", phase); end
    step(0, 90); step(0, 45); step(0, 22); step(0, 11); step(0, 5); step(0, 2); step(0, 0); step(0, 359);
    check_cycle();
    // amplitude change clears no_fluctuate
    @(negedge clk); amp = 8'd100; @(negedge clk); @(negedge clk);
    checks++; if (nofl) begin failures++; $display("FAIL no_fluctuate after amplitude change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
