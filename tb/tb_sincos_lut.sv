// Testbench for sincos_lut: every angle 0..359 against 16384*sin and
// 16384*cos computed with real arithmetic (tolerance 0.2 % of full scale),
// the one-clock latency, and err_out for angles 360 and above.
module tb_sincos_lut;
  import bis_pkg::*;
  logic clk = 0, rst_n = 1, en = 0, valid, err;
  logic [8:0] ang = '0;
  logic signed [15:0] s, c;
  int checks = 0, failures = 0;

  sincos_lut dut (.clk, .rst_n, .en_in(en), .angle_in(ang), .sin_out(s), .cos_out(c),
                  .valid_out(valid), .err_out(err));
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real es, ec, r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 370; a++) begin
      @(negedge clk); en = 1; ang = 9'(a);
      @(negedge clk); en = 0;
      r  = a * 3.14159265358979 / 180.0;
      es = 16384.0 * $sin(r);
      ec = 16384.0 * $cos(r);
      checks++;
      if (!valid) begin failures++; $display("FAIL latency"); end
      else if (a < 360) begin
        if (real'(s) - es > 33.0 || es - real'(s) > 33.0 ||
            real'(c) - ec > 33.0 || ec - real'(c) > 33.0 || err) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d sin=%0d (%f) cos=%0d (%f)", a, s, es, c, ec);
        end
      end else if (!err) begin
        failures++; $display("FAIL no error for %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
