// Testbench for processor: computes ZxR = Vout*Rf*cos(theta)/|Vf| and
// ZxI = Vout*Rf*sin(theta)/|Vf| with real arithmetic and compares the
// processor's 8-fraction-bit results (tolerance 0.5 % + 0.1 ohm). Cases: the
// worked example of the description (Vo = 5 V, Vf = 0.294 V, Rf = 10 ohm,
// theta = 31.765 deg, as DAC codes 250 and 15, whole degrees), the angles of
// the ZxR/ZxI comparison plot, all four quadrants and random records. It also
// checks the 88-bit record layout (raw bits, processed flag set), the
// data-ready handshake, the error flag for |Vf| = 0 and theta >= 360, and the
// fixed computation time.
module tb_processor;
  import bis_pkg::*;
  localparam int PROC_CYCLES = 151;
  logic clk = 0, rst_n = 1, en = 0, rdy, err;
  raw_t raw = '0;
  logic [7:0] vo = '0, rf = '0;
  rec_t rec;
  int checks = 0, failures = 0;

  processor dut (.clk, .rst_n, .enable_in(en), .raw_in(raw), .vo_in(vo), .rf_in(rf),
                 .final_out(rec), .data_ready_out(rdy), .error_out(err));
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int v, input int r, input int a, input int th, input int id,
                     input bit exp_err);
    int cyc;
    real er, ei, gr, gi, tol;
    @(negedge clk);
    vo = 8'(v); rf = 8'(r);
    raw.flags.bis_id = 6'(id); raw.flags.processed = 0; raw.phase = 9'(th); raw.amp = 8'(a);
    en = 1;
    cyc = 0;
    while (!rdy && cyc < 5000) begin @(negedge clk); cyc++; end
    checks++;
    if (exp_err) begin
      if (!err) begin failures++; $display("FAIL no error for amp=%0d th=%0d", a, th); end
    end else begin
      er = v * r * $cos(th * 3.14159265358979 / 180.0) / a;
      ei = v * r * $sin(th * 3.14159265358979 / 180.0) / a;
      gr = real'(rec.zxr) / 256.0;
      gi = real'(rec.zxi) / 256.0;
      tol = 0.005 * (er > 0 ? er : -er) + 0.005 * (ei > 0 ? ei : -ei) + 0.1;
      if (gr - er > tol || er - gr > tol || gi - ei > tol || ei - gi > tol || err) begin
        failures++;
        $display("FAIL v=%0d r=%0d a=%0d th=%0d: %f %f expected %f %f", v, r, a, th, gr, gi, er, ei);
      end
      checks++;
      if (rec.raw.amp != 8'(a) || rec.raw.phase != 9'(th) || rec.raw.flags.bis_id != 6'(id)
          || !rec.raw.flags.processed || rec[87:64] != {6'(id), 1'b1, 9'(th), 8'(a)}) begin
        failures++; $display("FAIL record layout");
      end
      checks++;
      if (cyc != PROC_CYCLES) begin failures++; $display("FAIL cycles %0d", cyc); end
    end
    // data ready holds until enable drops
    repeat (3) @(negedge clk);
    checks++; if (!rdy) begin failures++; $display("FAIL ready dropped"); end
    en = 0;
    @(negedge clk); @(negedge clk);
    checks++; if (rdy) begin failures++; $display("FAIL ready stuck"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(250, 10, 15, 32, 1, 0);      // worked example: about 143 + j 89 ohm
    $display("example: ZxR=%f ZxI=%f", real'(rec.zxr) / 256.0, real'(rec.zxi) / 256.0);
    one(200, 100, 160, 5, 2, 0);  one(200, 100, 160, 11, 2, 0); one(200, 100, 160, 16, 2, 0);
    one(200, 100, 160, 19, 2, 0); one(200, 100, 160, 22, 2, 0); one(200, 100, 160, 30, 2, 0);
    one(200, 100, 160, 33, 2, 0); one(200, 100, 160, 44, 2, 0); one(200, 100, 160, 67, 2, 0);
    one(255, 255, 1, 0, 63, 0);   one(100, 50, 200, 90, 0, 0);  one(100, 50, 200, 135, 0, 0);
    one(100, 50, 200, 180, 0, 0); one(100, 50, 200, 225, 0, 0); one(100, 50, 200, 270, 0, 0);
    one(100, 50, 200, 359, 0, 0);
    for (int i = 0; i < 40; i++)
      one(int'($urandom % 255) + 1, int'($urandom % 255) + 1, int'($urandom % 255) + 1,
          int'($urandom % 360), int'($urandom % 64), 0);
    one(100, 50, 0, 30, 0, 1);     // |Vf| = 0
    one(100, 50, 100, 400, 0, 1);  // angle out of range
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
