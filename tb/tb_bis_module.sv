// Testbench for bis_module: one channel on a modelled bridge whose target is
// a scaled, delayed copy of Vo. For two bridges and a sweep of two frequency
// indices (the highest frequencies, to keep simulation short) it checks that
// the balance found matches the bridge: phase within 2 degrees of
// DELAY*360/510 and amplitude within 3 codes of GAIN * Vo, plus record number,
// flags, the one-sample-per-strobe DAC timing and done after the sweep.
module tb_bis_module;
  import bis_pkg::*;
  logic clk = 0, rst_n = 1, en = 0, op = 1;
  logic rdy, done, strobe;
  raw_t raw;
  logic [FIDX_W-1:0] addr;
  logic [7:0] d1, d2, adc;
  int checks = 0, failures = 0;

  bis_module dut (.clk, .rst_n, .enable_in(en), .operate_in(op), .bis_id_in(6'd2),
                  .vo_in(8'd200), .start_idx_in(10'd999), .end_idx_in(10'd1000),
                  .rdy_out(rdy), .raw_out(raw), .nxt_address_out(addr), .done_out(done),
                  .dac1_out(d1), .dac2_out(d2), .dac_strobe_out(strobe), .adc_in(adc));
  bridge_model #(.DELAY(45), .GAIN_NUM(1), .GAIN_DEN(2)) u_br (
    .clk, .strobe_in(strobe), .dac1_in(d1), .dac2_in(d2), .adc_out(adc));
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input int delay, input int gn, input int gd);
    real eph, eamp;
    u_br.delay = delay; u_br.gnum = gn; u_br.gden = gd;
    eph  = delay * 360.0 / 510.0;
    eamp = 200.0 * gn / gd;
    @(negedge clk); en = 1;
    for (int idx = 999; idx <= 1000; idx++) begin
      @(posedge clk iff rdy); #1;
      $display("balance idx=%0d amp=%0d phase=%0d (expected %f, %f)", idx, raw.amp, raw.phase, eamp, eph);
      checks++;
      if (real'(raw.phase) > eph + 2.0 || real'(raw.phase) < eph - 2.0) begin
        failures++; $display("FAIL phase");
      end
      checks++;
      if (real'(raw.amp) > eamp + 3.0 || real'(raw.amp) < eamp - 3.0) begin
        failures++; $display("FAIL amplitude");
      end
      checks++;
      if (int'(addr) != idx || raw.flags.bis_id != 6'd2 || raw.flags.processed) begin
        failures++; $display("FAIL record number / flags");
      end
      @(negedge clk); op = 0; @(negedge clk); op = 1;
      @(negedge clk iff !rdy);
    end
    repeat (3) @(negedge clk);
    checks++; if (!done) begin failures++; $display("FAIL done"); end
    en = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    int gap, last, bad;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_one(45, 1, 2);       // 31.8 degrees, amplitude 100
    // strobe every clock at the top frequencies (Scale clamps to 1)
    @(negedge clk); en = 1;
    repeat (5) @(posedge clk);
    bad = 0;
    repeat (600) begin @(posedge clk); if (!strobe) bad++; end
    checks++; if (bad != 0) begin failures++; $display("FAIL strobe gaps %0d", bad); end
    en = 0; repeat (3) @(negedge clk);
    run_one(95, 3, 4);       // 67.1 degrees, amplitude 150
    run_one(300, 1, 4);      // 211.8 degrees, amplitude 50
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
