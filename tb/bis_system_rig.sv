// bis_system_rig: test rig for the top level at a chosen channel count.
//
// Builds bis_system with NUM_BIS = N, one bridge model per channel and a
// flash model, starts one sweep over frequency indices F0..F1 and, once
// done_out rises, reads every flash slot ((f*N + c)*11) back and checks it:
// channel id and 'processed' flag, phase within 2 degrees of the bridge
// angle, |Vf| within 3 codes of gain*Vo, ZxR/ZxI within 3 amplitude codes plus
// 2 % of the bridge impedance Rf/gain at its angle, and no write without an
// erase. Channel c sees a fixed delay DEL[(2c) mod 9] of the 510 samples and
// gain 1/2, 3/4 or 1/4 (c mod 3). The result is reported on checks_out /
// failures_out with finished_out, so that a testbench can run several rigs.
module bis_system_rig
  import bis_pkg::*;
#(
  parameter int N  = 3,
  parameter int F0 = 99,
  parameter int F1 = 100
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic        finished_out,
  output int          checks_out,
  output int          failures_out,
  output int          clocks_out
);
  localparam int NF = F1 - F0 + 1;
  localparam int VO = 200, RF = 100;
  localparam int DEL [9] = '{7, 15, 23, 27, 31, 42, 47, 63, 95};
  localparam int GN  [3] = '{1, 3, 1};
  localparam int GD  [3] = '{2, 4, 4};

  logic        done, perr;
  logic [15:0] stalls;
  logic [7:0]  d1 [N], d2 [N], adc [N];
  logic [N-1:0] strobe;
  logic [21:0] maddr;
  logic [7:0]  mdo, mdi;
  logic        mer, mwr, mrd, mrst, mdone;

  bis_system #(.NUM_BIS(N)) dut (
    .clk, .rst_n, .enable_in(en), .vo_in(8'(VO)), .rf_in(8'(RF)), .start_freq_in(10'(F0)),
    .end_freq_in(10'(F1)), .done_out(done), .proc_error_out(perr), .stall_count_out(stalls),
    .dac1_out(d1), .dac2_out(d2), .dac_strobe_out(strobe), .adc_in(adc),
    .mem_address_out(maddr), .mem_data_out(mdo), .mem_erase_out(mer), .mem_write_out(mwr),
    .mem_read_out(mrd), .mem_reset_out(mrst), .mem_data_in(mdi), .mem_done_in(mdone));

  flash_model #(.SIZE(65536)) u_flash (.clk, .address_in(maddr), .data_in(mdo), .erase_in(mer),
    .write_in(mwr), .read_in(mrd), .data_out(mdi), .done_out(mdone));

  for (genvar c = 0; c < N; c++) begin : g_br
    bridge_model #(.DELAY(DEL[(2 * c) % 9]), .GAIN_NUM(GN[c % 3]), .GAIN_DEN(GD[c % 3])) u_br (
      .clk, .strobe_in(strobe[c]), .dac1_in(d1[c]), .dac2_in(d2[c]), .adc_out(adc[c]));
  end

  initial begin
    longint t0;
    finished_out = 0; checks_out = 0; failures_out = 0; clocks_out = 0;
    @(posedge clk iff en);
    t0 = $time;
    @(posedge clk iff done);
    clocks_out = int'(($time - t0) / 10);
    repeat (5) @(posedge clk);
    for (int k = 0; k < NF; k++)
      for (int c = 0; c < N; c++) begin
        logic [87:0] got;
        rec_t r;
        real th, eamp, g, gr, gi, zr, zi, tol;
        int base;
        base = ((F0 + k) * N + c) * 11;
        for (int b = 0; b < 11; b++) got[87 - 8 * b -: 8] = u_flash.mem[base + b];
        r    = rec_t'(got);
        th   = DEL[(2 * c) % 9] * 360.0 / 510.0;
        g    = real'(GN[c % 3]) / GD[c % 3];
        eamp = real'(VO) * g;
        gr   = real'(r.zxr) / 256.0;
        gi   = real'(r.zxi) / 256.0;
        checks_out++;
        if (r.raw.flags.bis_id != 6'(c) || !r.raw.flags.processed) begin
          failures_out++; $display("N=%0d FAIL flags ch%0d f%0d", N, c, F0 + k);
        end
        checks_out++;
        if (real'(r.raw.phase) > th + 2.0 || real'(r.raw.phase) < th - 2.0 ||
            real'(r.raw.amp) > eamp + 3.0 || real'(r.raw.amp) < eamp - 3.0) begin
          failures_out++;
          $display("N=%0d FAIL raw ch%0d f%0d: |Vf|=%0d theta=%0d, bridge %f at %f deg",
                   N, c, F0 + k, r.raw.amp, r.raw.phase, eamp, th);
        end
        checks_out++;
        zr  = real'(RF) / g * $cos(th * 3.14159265358979 / 180.0);
        zi  = real'(RF) / g * $sin(th * 3.14159265358979 / 180.0);
        tol = real'(RF) / g * (3.0 / eamp + 0.02);
        if (gr - zr > tol || zr - gr > tol || gi - zi > tol || zi - gi > tol) begin
          failures_out++;
          $display("N=%0d FAIL impedance ch%0d f%0d: %f %f, bridge %f %f", N, c, F0 + k, gr, gi, zr, zi);
        end
      end
    checks_out++;
    if (u_flash.bad_writes != 0 || perr) begin
      failures_out++; $display("N=%0d FAIL write without erase / processor error", N);
    end
    $display("N=%0d channels: %0d records checked, %0d clocks", N, NF * N, clocks_out);
    finished_out = 1;
  end
endmodule
