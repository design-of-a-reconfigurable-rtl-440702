// tb_bis_system_scaled: the whole system at the smallest and the largest
// channel counts of the resource study of the description, one and five
// channels (the default build has three). Both systems run side by side
// over frequency indices 99..100 (about 9.9 to 10 kHz), each with its own
// bridges and flash, and every stored record is checked (see bis_system_rig).
// A watchdog ends the run if either system never finishes.
module tb_bis_system_scaled;
  logic clk = 0, rst_n = 1, en = 0;
  logic fin1, fin5;
  int   chk1, chk5, fail1, fail5, clk1, clk5;
  int   checks = 0, failures = 0;

  bis_system_rig #(.N(1), .F0(99), .F1(100)) u_one (
    .clk, .rst_n, .en, .finished_out(fin1), .checks_out(chk1), .failures_out(fail1), .clocks_out(clk1));
  bis_system_rig #(.N(5), .F0(99), .F1(100)) u_five (
    .clk, .rst_n, .en, .finished_out(fin5), .checks_out(chk5), .failures_out(fail5), .clocks_out(clk5));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); en = 1;
    wait (fin1 && fin5);
    checks   = chk1 + chk5 + 1;
    failures = fail1 + fail5;
    // five channels share one flash port and processor: they must take longer
    if (clk5 <= clk1) begin failures++; $display("FAIL five channels not slower than one"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
