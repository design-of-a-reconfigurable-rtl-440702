// Testbench for multiplier: random and corner signed operands against the
// testbench's own 64-bit product, with done one clock after enable.
module tb_multiplier;
  logic clk = 0, rst_n = 1, en = 0, done;
  logic signed [31:0] a = 0, b = 0;
  logic signed [63:0] p;
  int checks = 0, failures = 0;

  multiplier #(.W(32)) dut (.clk, .rst_n, .en_in(en), .a_in(a), .b_in(b), .p_out(p), .done_out(done));
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic signed [31:0] x, input logic signed [31:0] y);
    longint e;
    @(negedge clk); en = 1; a = x; b = y;
    @(negedge clk); en = 0;
    e = longint'(x) * longint'(y);
    checks++;
    if (!done || p != e) begin failures++; $display("FAIL %0d*%0d=%0d done=%0d", x, y, p, done); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(0, 0); one(-1, -1); one(32'h7fffffff, 32'h7fffffff); one(32'h80000000, 3);
    one(255, 16384); one(-4177920, 4177920);
    for (int i = 0; i < 200; i++) one($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
