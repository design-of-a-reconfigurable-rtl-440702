// Testbench for bis_control: stands in for the detectors and DAC 2 with a
// small model. The phase model starts at 180 degrees on each restart and
// moves by 90, 45, 23, 11, 6, 3, 2, 1 on each decision; the phase "detector"
// answers add when the model phase is below the target, sub otherwise. The
// amplitude "detector" reports Vf low while the requested amplitude is below
// the target. For a sweep of three frequency indices it checks the frequency
// in Hz, one restart per step, eight phase decisions, the amplitude found by
// the successive approximation (target - 1), the raw record and record
// number, the pause/resume handshake, that decisions are ignored while
// paused, and done_out after the last index.
module tb_bis_control;
  import bis_pkg::*;
  logic clk = 0, rst_n = 1, en = 0, op = 1;
  logic [FIDX_W-1:0] sidx = 10'd4, eidx = 10'd6, addr;
  logic pd_add = 0, pd_sub = 0, ad_valid = 0, ad_low = 0;
  logic [PHASE_W-1:0] phase = 9'd180;
  logic [FHZ_W-1:0] fhz;
  logic restart, pd_en, ad_en, rdy, done;
  logic [AMP_W-1:0] amp;
  raw_t raw;
  int checks = 0, failures = 0;
  int tgt_phase = 77, tgt_amp = 150, restarts = 0, decisions = 0;

  bis_control dut (.clk, .rst_n, .enable_in(en), .operate_in(op), .bis_id_in(6'd5),
                   .start_idx_in(sidx), .end_idx_in(eidx), .pd_add_in(pd_add), .pd_sub_in(pd_sub),
                   .ad_valid_in(ad_valid), .ad_vf_low_in(ad_low), .phase_in(phase),
                   .freq_hz_out(fhz), .restart_out(restart), .pd_enable_out(pd_en),
                   .ad_enable_out(ad_en), .amplitude_out(amp), .rdy_out(rdy), .raw_out(raw),
                   .nxt_address_out(addr), .done_out(done));
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // detector / DAC 2 model
  int step_i = 0, wait_c = 0;
  const int steps[8] = '{90, 45, 23, 11, 6, 3, 2, 1};
  always @(posedge clk) begin
    pd_add <= 0; pd_sub <= 0; ad_valid <= 0;
    if (restart) begin
      phase <= 9'd180; step_i <= 0; restarts++; wait_c <= 0;
    end else if (pd_en || ad_en) begin
      wait_c <= wait_c + 1;
      if (wait_c == 6) begin
        wait_c <= 0;
        if (pd_en) begin
          decisions++;
          if (int'(phase) < tgt_phase) begin
            pd_add <= 1; phase <= 9'(int'(phase) + steps[step_i]);
          end else begin
            pd_sub <= 1; phase <= 9'(int'(phase) - steps[step_i]);
          end
          if (step_i < 7) step_i <= step_i + 1;
        end else begin
          ad_valid <= 1; ad_low <= (int'(amp) < tgt_amp);
        end
      end
    end
  end

  initial begin
    int efhz;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    en = 1;
    for (int idx = 4; idx <= 6; idx++) begin
      int d0;
      d0 = decisions;
      @(posedge clk iff rdy); #1;
      efhz = 40 + idx * (100000 - 40) / 1000;
      checks++;
      if (int'(fhz) != efhz || int'(addr) != idx) begin
        failures++; $display("FAIL freq %0d/%0d addr %0d", fhz, efhz, addr);
      end
      checks++;
      if (decisions - d0 != 8) begin failures++; $display("FAIL %0d phase decisions", decisions - d0); end
      checks++;
      if (int'(raw.amp) != tgt_amp - 1 || raw.phase != phase || raw.flags.bis_id != 6'd5
          || raw.flags.processed) begin
        failures++; $display("FAIL raw amp=%0d phase=%0d id=%0d", raw.amp, raw.phase, raw.flags.bis_id);
      end
      checks++;
      if (phase > 9'(tgt_phase + 1) || phase < 9'(tgt_phase - 1)) begin
        failures++; $display("FAIL phase %0d target %0d", phase, tgt_phase);
      end
      // stays ready until paused and resumed
      repeat (20) @(posedge clk);
      checks++; if (!rdy) begin failures++; $display("FAIL ready dropped"); end
      @(negedge clk); op = 0;
      repeat (5) @(negedge clk);
      checks++; if (!rdy) begin failures++; $display("FAIL ready dropped while paused"); end
      op = 1;
      repeat (3) @(negedge clk);
      checks++;
      if (idx < 6 && rdy) begin failures++; $display("FAIL still ready after resume"); end
      if (idx == 4) begin
        // pause during the phase search: decisions are ignored
        int dd;
        tgt_amp = 90; tgt_phase = 300;
        @(posedge clk iff pd_en);
        @(negedge clk); op = 0;
        dd = decisions;
        repeat (60) @(negedge clk);
        checks++;
        if (pd_en || rdy) begin failures++; $display("FAIL not frozen"); end
        op = 1;
      end
    end
    repeat (3) @(negedge clk);
    checks++; if (!done) begin failures++; $display("FAIL no done"); end
    checks++; if (restarts != 3) begin failures++; $display("FAIL restarts %0d", restarts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
