// Testbench for dac1_driver: with a strobe every 3 clocks, checks every
// output sample of two full cycles against 128 + A*127*sin(2*pi*k/510)/256
// computed with real arithmetic (tolerance 2 codes: table and scaling truncate), the 510-sample period,
// the segment counter and the cycle_start marker.
module tb_dac1_driver;
  import bis_pkg::*;
  logic clk = 0, rst_n = 1, en = 0, tick = 0, restart = 0;
  logic [7:0] amp = 8'd200, data;
  logic [8:0] seg, nseg;
  logic cstart;
  int checks = 0, failures = 0;

  dac1_driver dut (.clk, .rst_n, .enable_in(en), .tick_in(tick), .restart_in(restart),
                   .amplitude_in(amp), .data_out(data), .seg_out(seg),
                   .next_seg_out(nseg), .cycle_start_out(cstart));
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int div = 0;
  always_ff @(posedge clk) begin
    div  <= (div == 2) ? 0 : div + 1;
    tick <= en && (div == 2);
  end

  initial begin
    real e;
    int k, starts;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    en = 1;
    starts = 0;
    for (int n = 0; n < 1020; n++) begin
      @(posedge clk iff tick);
      if (cstart) starts++;
      #1;
      k = n % 510;
      e = 128.0 + 200.0 * 127.0 * $sin(2.0 * 3.14159265358979 * k / 510.0) / 256.0;
      checks++;
      if ((real'(data) - e) > 2.0 || (e - real'(data)) > 2.0 || seg != 9'(k)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d seg=%0d data=%0d exp=%f", n, seg, data, e);
      end
    end
    @(posedge clk iff tick);
    if (cstart) starts++;
    checks++;
    if (starts != 2) begin failures++; $display("FAIL cycle starts %0d", starts); end
    // restart returns to segment 0
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    @(posedge clk iff tick); #1;
    checks++;
    if (seg != 0 || data != 8'd128) begin failures++; $display("FAIL restart seg=%0d", seg); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
