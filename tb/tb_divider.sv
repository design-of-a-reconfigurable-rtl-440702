// Testbench for divider: random and corner operands (including operands of
// the sizes the processor uses and division by zero) against the
// testbench's own quotient and remainder, and the W + 1 clock latency.
module tb_divider;
  logic clk = 0, rst_n = 1, start = 0, done, busy, div0;
  logic [63:0] n = 0, d = 0, q, r;
  int checks = 0, failures = 0;

  divider #(.W(64)) dut (.clk, .rst_n, .start_in(start), .dividend_in(n), .divisor_in(d),
                         .quotient_out(q), .remainder_out(r), .done_out(done), .busy_out(busy),
                         .div0_out(div0));
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [63:0] x, input logic [63:0] y);
    int cyc;
    @(negedge clk); start = 1; n = x; d = y;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 200) begin @(negedge clk); cyc++; end
    checks++;
    if (y == 0) begin
      if (!div0 || q != '1) begin failures++; $display("FAIL div by zero"); end
    end else if (q != x / y || r != x % y) begin
      failures++; $display("FAIL %0d/%0d = %0d r %0d", x, y, q, r);
    end
    checks++;
    if (cyc != 66) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(100, 7); one(0, 5); one(5, 0); one('1, 1); one('1, '1); one(64'd1 << 62, 3);
    one(64'd270000000000 << 22, 64'd35000000000000);
    for (int i = 0; i < 100; i++) one({$urandom, $urandom}, {32'($urandom % 4), $urandom});
    for (int i = 0; i < 50; i++) one({$urandom, $urandom}, 64'($urandom % 1000 + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
