// Testbench for system_control_unit: three modelled BIS channels each offer
// a series of raw records (all three at once, to force contention); a
// modelled processor answers after 40 clocks with a record whose ZxR/ZxI are
// simple functions of the raw data; a flash model checks that every byte is
// erased before it is written. At the end it checks, for every record, the
// 11 bytes of its flash slot ((f*3 + c)*11): raw bytes, processed flag, ZxR
// and ZxI; that every channel was paused (operate bit low) while its data was
// taken; byte counts of erases, writes and reads; that the queue of
// unprocessed records filled up at least once (stall); and done_out.
module tb_system_control_unit;
  import bis_pkg::*;
  localparam int N = 3, NREC = 4;
  logic clk = 0, rst_n = 1, en = 0, done;
  logic [N-1:0] bis_en, bis_op, bis_rdy = '0, bis_done = '0;
  logic [7:0] vo, rf;
  logic [FIDX_W-1:0] sf, ef, mux_addr;
  logic [1:0] cc;
  raw_t mux_raw;
  logic proc_en, proc_rdy = 0;
  raw_t proc_raw;
  rec_t proc_rec = '0;
  logic [21:0] maddr;
  logic [7:0] mdo, mdi;
  logic mer, mwr, mrd, mrst, mdone;
  logic [15:0] stalls;
  int checks = 0, failures = 0;
  int recno [N];
  int pauses [N];

  system_control_unit #(.NUM_BIS(N), .PEND_DEPTH(2)) dut (
    .clk, .rst_n, .enable_in(en), .vo_in(8'd200), .rf_in(8'd100), .start_freq_in(10'd0),
    .end_freq_in(10'(NREC - 1)), .done_out(done), .bis_enable_out(bis_en),
    .bis_operate_out(bis_op), .vo_out(vo), .bis_start_freq_out(sf), .bis_end_freq_out(ef),
    .bis_rdy_in(bis_rdy), .bis_done_in(bis_done), .check_count(cc), .bis_raw_in(mux_raw),
    .bis_nxt_address_in(mux_addr), .proc_enable_out(proc_en), .proc_raw_data_out(proc_raw),
    .rf_out(rf), .proc_data_rdy_in(proc_rdy), .proc_data_in(proc_rec),
    .mem_address_out(maddr), .mem_data_out(mdo), .mem_erase_out(mer), .mem_write_out(mwr),
    .mem_read_out(mrd), .mem_reset_out(mrst), .mem_data_in(mdi), .mem_done_in(mdone),
    .stall_count_out(stalls));
  flash_model u_flash (.clk, .address_in(maddr), .data_in(mdo), .erase_in(mer), .write_in(mwr),
                       .read_in(mrd), .data_out(mdi), .done_out(mdone));
  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic raw_t mkraw(int c, int f);
    raw_t r;
    r.flags.bis_id = 6'(c); r.flags.processed = 0;
    r.phase = 9'((37 * c + 91 * f + 5) % 360); r.amp = 8'(17 + 13 * c + 29 * f);
    return r;
  endfunction

  // channel model: after a working time, offer record recno[c]; when paused
  // and resumed, move on; done after NREC records
  assign mux_raw  = mkraw(int'(cc), recno[cc]);
  assign mux_addr = FIDX_W'(recno[cc]);
  int wait_c [N];
  int mem_resets = 0;
  always @(posedge clk) if (mrst) mem_resets++;
  logic [N-1:0] paused = '0;
  always @(posedge clk) begin
    for (int c = 0; c < N; c++) begin
      if (!bis_en[c]) begin
        recno[c] <= 0; wait_c[c] <= 0; bis_rdy[c] <= 0; bis_done[c] <= 0;
      end else if (bis_done[c]) begin
      end else if (bis_rdy[c]) begin
        if (!bis_op[c]) begin
          if (!paused[c]) pauses[c]++;
          paused[c] <= 1;
        end else if (paused[c]) begin
          paused[c] <= 0; bis_rdy[c] <= 0; wait_c[c] <= 0;
          if (recno[c] == NREC - 1) bis_done[c] <= 1;
          else recno[c] <= recno[c] + 1;
        end
      end else begin
        wait_c[c] <= wait_c[c] + 1;
        if (wait_c[c] == 30) bis_rdy[c] <= 1;
      end
    end
  end

  // processor model
  int pc = 0;
  always @(posedge clk) begin
    if (!proc_en) begin pc <= 0; proc_rdy <= 0; end
    else if (!proc_rdy) begin
      pc <= pc + 1;
      if (pc == 40) begin
        proc_rdy <= 1;
        proc_rec.raw <= proc_raw;
        proc_rec.raw.flags.processed <= 1;
        proc_rec.zxr <= 32'(proc_raw.amp) * 32'h01010101;
        proc_rec.zxi <= -32'(proc_raw.phase) * 32'h00100001;
      end
    end
  end

  initial begin
    for (int c = 0; c < N; c++) begin recno[c] = 0; pauses[c] = 0; wait_c[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); en = 1;
    @(posedge clk iff done);
    repeat (5) @(posedge clk);
    for (int f = 0; f < NREC; f++)
      for (int c = 0; c < N; c++) begin
        logic [87:0] exp_rec, got;
        raw_t r;
        int base;
        r = mkraw(c, f);
        r.flags.processed = 1;
        exp_rec = {r, 32'(r.amp) * 32'h01010101, -32'(r.phase) * 32'h00100001};
        base = (f * N + c) * 11;
        for (int k = 0; k < 11; k++) got[87 - 8 * k -: 8] = u_flash.mem[base + k];
        checks++;
        if (got != exp_rec) begin
          failures++; $display("FAIL slot f=%0d c=%0d: %h expected %h", f, c, got, exp_rec);
        end
      end
    checks++;
    if (u_flash.bad_writes != 0) begin failures++; $display("FAIL %0d writes without erase", u_flash.bad_writes); end
    checks++;
    if (u_flash.writes != N * NREC * 14 || u_flash.erases != N * NREC * 14 || u_flash.reads != N * NREC * 3) begin
      failures++; $display("FAIL counts w=%0d e=%0d r=%0d", u_flash.writes, u_flash.erases, u_flash.reads);
    end
    for (int c = 0; c < N; c++) begin
      checks++;
      if (pauses[c] != NREC) begin failures++; $display("FAIL channel %0d paused %0d times", c, pauses[c]); end
    end
    checks++;
    if (mem_resets != 1) begin failures++; $display("FAIL %0d memory controller resets, expected 1", mem_resets); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL queue never filled"); end
    $display("stall cycles %0d, flash erases %0d writes %0d reads %0d", stalls, u_flash.erases, u_flash.writes, u_flash.reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
