// Full-size testbench for bis_system: the top at its default parameters
// (three channels, queue of 16) runs one complete operation, the
// whole sweep of the description, frequency indices 0..1000 (40 Hz to
// 100 kHz, 1001 points).
//
// Three bridge models stand for the three biosensors; their delay (phase) and
// gain change with the frequency index (repeating every three points), so that the records
// cover the nine angles of the ZxR/ZxI comparison plot of the description
// (4.94 to 67.06 degrees, i.e. 7 to 95 of the 510 samples). A flash model
// stores the records. After done_out the testbench reads every slot
// ((f*3 + c)*11) back and checks:
//   - raw data: phase within 2 degrees of the bridge angle, |Vf| within
//     3 codes of gain*Vo, channel id;
//   - processed data: 'processed' flag set, ZxR/ZxI equal to
//     Vo*Rf*cos/sin(theta)/|Vf| of the stored raw data (0.5 %), and within
//     3 amplitude codes plus 2 % of the bridge's own impedance Rf/gain at its
//     angle;
//   - that the flash was never written without an erase.
// It also counts each mechanism of the design and fails if one never
// happened: polling of every channel, channel pause, flash erase / write /
// read, processor dispatch, phase add and phase sub decisions, amplitude
// bits kept and cleared, frequency restarts, and done.
// It reports the clocks taken per frequency point.
module tb_bis_system_full;
  import bis_pkg::*;
  localparam int N = 3, F0 = 0, F1 = 1000, NF = F1 - F0 + 1;
  localparam int VO = 200, RF = 100;
  logic clk = 0, rst_n = 1, en = 0, done, perr;
  logic [15:0] stalls;
  logic [7:0] d1 [N], d2 [N], adc [N];
  logic [N-1:0] strobe;
  logic [21:0] maddr;
  logic [7:0] mdo, mdi;
  logic mer, mwr, mrd, mrst, mdone;
  int checks = 0, failures = 0;

  bis_system dut (
    .clk, .rst_n, .enable_in(en), .vo_in(8'(VO)), .rf_in(8'(RF)), .start_freq_in(10'(F0)),
    .end_freq_in(10'(F1)), .done_out(done), .proc_error_out(perr), .stall_count_out(stalls),
    .dac1_out(d1), .dac2_out(d2), .dac_strobe_out(strobe), .adc_in(adc),
    .mem_address_out(maddr), .mem_data_out(mdo), .mem_erase_out(mer), .mem_write_out(mwr),
    .mem_read_out(mrd), .mem_reset_out(mrst), .mem_data_in(mdi), .mem_done_in(mdone));

  flash_model #(.SIZE(65536)) u_flash (.clk, .address_in(maddr), .data_in(mdo), .erase_in(mer),
    .write_in(mwr), .read_in(mrd), .data_out(mdi), .done_out(mdone));

  // bridge settings per channel c and frequency point k: delay in samples
  // and gain numerator / denominator
  const int DEL [9] = '{7, 15, 23, 27, 31, 42, 47, 63, 95};
  const int GN  [3] = '{1, 3, 1};
  const int GD  [3] = '{2, 4, 4};
  bridge_model u_br0 (.clk, .strobe_in(strobe[0]), .dac1_in(d1[0]), .dac2_in(d2[0]), .adc_out(adc[0]));
  bridge_model u_br1 (.clk, .strobe_in(strobe[1]), .dac1_in(d1[1]), .dac2_in(d2[1]), .adc_out(adc[1]));
  bridge_model u_br2 (.clk, .strobe_in(strobe[2]), .dac1_in(d1[2]), .dac2_in(d2[2]), .adc_out(adc[2]));

  function automatic int del_of(int c, int k);
    return DEL[(3 * c + k) % 9];
  endfunction

  // follow each channel's frequency index and set its bridge accordingly
  always_comb begin
    u_br0.delay = del_of(0, int'(dut.g_bis[0].u_bis.nxt_address_out) - F0);
    u_br1.delay = del_of(1, int'(dut.g_bis[1].u_bis.nxt_address_out) - F0);
    u_br2.delay = del_of(2, int'(dut.g_bis[2].u_bis.nxt_address_out) - F0);
    u_br0.gnum = GN[0]; u_br0.gden = GD[0];
    u_br1.gnum = GN[1]; u_br1.gden = GD[1];
    u_br2.gnum = GN[2]; u_br2.gden = GD[2];
  end

  always #5 clk = ~clk;
  initial #1 rst_n = 0;   // asynchronous reset before the first clock edge

  initial begin
    repeat (400000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_poll [N], n_pause = 0, n_er = 0, n_wr = 0, n_rd = 0, n_disp = 0;
  int n_mrst = 0, n_add = 0, n_sub = 0, n_keep = 0, n_clear = 0, n_restart = 0;
  logic pen_q = 0;
  logic [N-1:0] op_q = '1;
  always @(posedge clk) if (rst_n) begin
    n_poll[dut.u_scu.check_count]++;
    for (int c = 0; c < N; c++) if (op_q[c] && !dut.bis_op[c] && dut.bis_en[c]) n_pause++;
    op_q <= dut.bis_op;
    if (mer) n_er++;
    if (mwr) n_wr++;
    if (mrd) n_rd++;
    if (mrst) n_mrst++;
    if (dut.proc_en && !pen_q) n_disp++;
    pen_q <= dut.proc_en;
    if (dut.g_bis[0].u_bis.add || dut.g_bis[1].u_bis.add || dut.g_bis[2].u_bis.add) n_add++;
    if (dut.g_bis[0].u_bis.sub || dut.g_bis[1].u_bis.sub || dut.g_bis[2].u_bis.sub) n_sub++;
    if (dut.g_bis[0].u_bis.ad_valid) begin if (dut.g_bis[0].u_bis.ad_low) n_keep++; else n_clear++; end
    if (dut.g_bis[0].u_bis.restart) n_restart++;
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("%-28s %0d", what, n);
  endtask

  initial begin
    longint t0, t1;
    for (int c = 0; c < N; c++) n_poll[c] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); en = 1;
    t0 = $time;
    @(posedge clk iff done);
    t1 = $time;
    $display("run finished after %0d clocks, %0d per frequency point", (t1 - t0) / 10, (t1 - t0) / 10 / NF);
    repeat (5) @(posedge clk);
    for (int k = 0; k < NF; k++)
      for (int c = 0; c < N; c++) begin
        logic [87:0] got;
        rec_t r;
        real th, eamp, gr, gi, er, ei, zr, zi, tol;
        int base;
        base = ((F0 + k) * N + c) * 11;
        for (int b = 0; b < 11; b++) got[87 - 8 * b -: 8] = u_flash.mem[base + b];
        r = rec_t'(got);
        th   = del_of(c, k) * 360.0 / 510.0;
        eamp = real'(VO) * GN[c] / GD[c];
        gr = real'(r.zxr) / 256.0;
        gi = real'(r.zxi) / 256.0;
        if (k < 3 || k >= NF - 2) $display("ch%0d f%0d: |Vf|=%0d theta=%0d (bridge %f) ZxR=%f ZxI=%f", c, F0 + k,
                 r.raw.amp, r.raw.phase, th, gr, gi);
        checks++;
        if (r.raw.flags.bis_id != 6'(c) || !r.raw.flags.processed) begin
          failures++; $display("FAIL flags");
        end
        checks++;
        if (real'(r.raw.phase) > th + 2.0 || real'(r.raw.phase) < th - 2.0 ||
            real'(r.raw.amp) > eamp + 3.0 || real'(r.raw.amp) < eamp - 3.0) begin
          failures++; $display("FAIL raw data");
        end
        checks++;
        if (r.raw.amp != 0) begin
          er = VO * RF * $cos(r.raw.phase * 3.14159265358979 / 180.0) / r.raw.amp;
          ei = VO * RF * $sin(r.raw.phase * 3.14159265358979 / 180.0) / r.raw.amp;
        end else begin er = 0; ei = 0; end
        tol = 0.005 * (er < 0 ? -er : er) + 0.005 * (ei < 0 ? -ei : ei) + 0.1;
        if (gr - er > tol || er - gr > tol || gi - ei > tol || ei - gi > tol) begin
          failures++; $display("FAIL processed data %f %f expected %f %f", gr, gi, er, ei);
        end
        checks++;
        zr = real'(RF) * GD[c] / GN[c] * $cos(th * 3.14159265358979 / 180.0);
        zi = real'(RF) * GD[c] / GN[c] * $sin(th * 3.14159265358979 / 180.0);
        tol = real'(RF) * GD[c] / GN[c] * (3.0 / eamp + 0.02);
        if (gr - zr > tol || zr - gr > tol || gi - zi > tol || zi - gi > tol) begin
          failures++; $display("FAIL impedance %f %f, bridge %f %f", gr, gi, zr, zi);
        end
      end
    checks++;
    if (u_flash.bad_writes != 0 || perr) begin failures++; $display("FAIL write without erase / error"); end
    for (int c = 0; c < N; c++) need($sformatf("polls of channel %0d", c), n_poll[c]);
    need("channel pauses", n_pause);
    need("flash erases", n_er);
    need("flash writes", n_wr);
    need("flash reads", n_rd);
    need("memory controller resets", n_mrst);
    need("processor dispatches", n_disp);
    need("phase add decisions", n_add);
    need("phase sub decisions", n_sub);
    need("amplitude bits kept", n_keep);
    need("amplitude bits cleared", n_clear);
    need("frequency restarts", n_restart);
    need("done", int'(done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
