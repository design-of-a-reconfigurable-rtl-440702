// bis_system: multi-channel bioimpedance spectroscopy system (top level).
//
// NUM_BIS identical BIS channels each balance their own digital auto balance
// bridge over a user-chosen frequency sweep and produce, per frequency, the
// magnitude and phase of the balancing signal Vf (the raw record). The system
// control unit polls the channels through the channel multiplexer, stores
// every raw record in flash, hands stored unprocessed records to the processor
// and writes back the processed 88-bit records holding ZxR and ZxI. Channels
// and processor run in parallel; the control unit serialises flash access.
//
// User inputs: enable_in (start), vo_in (DAC 1 amplitude code), rf_in (the
// reference resistance in ohms), start_freq_in / end_freq_in (indices of the
// 1001-point 40 Hz..100 kHz sweep). Each channel i has channel id i and its
// own bridge pins dac1_out[i], dac2_out[i], dac_strobe_out[i], adc_in[i]. The
// flash memory controller is outside this design: its command interface
// (mem_*) is brought out. done_out goes high when all records are processed.
// Default NUM_BIS = 3 is the configuration the description simulates.
// rst_n is an asynchronous reset everywhere; it also disables the handshake
// assertions, which linters report as a net used both ways.
module bis_system
  import bis_pkg::*;
#(
  parameter int unsigned NUM_BIS    = 3,
  parameter int unsigned PEND_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable_in,
  input  logic [AMP_W-1:0]   vo_in,
  input  logic [7:0]         rf_in,
  input  logic [FIDX_W-1:0]  start_freq_in,
  input  logic [FIDX_W-1:0]  end_freq_in,
  output logic               done_out,
  output logic               proc_error_out,
  output logic [15:0]        stall_count_out,
  // bridge front ends
  output logic [DAC_W-1:0]   dac1_out       [NUM_BIS],
  output logic [DAC_W-1:0]   dac2_out       [NUM_BIS],
  output logic [NUM_BIS-1:0] dac_strobe_out,
  input  logic [ADC_W-1:0]   adc_in         [NUM_BIS],
  // flash memory controller
  output logic [MEM_AW-1:0]  mem_address_out,
  output logic [7:0]         mem_data_out,
  output logic               mem_erase_out,
  output logic               mem_write_out,
  output logic               mem_read_out,
  output logic               mem_reset_out,
  input  logic [7:0]         mem_data_in,
  input  logic               mem_done_in
);
  localparam int unsigned CW = $clog2(NUM_BIS > 1 ? NUM_BIS : 2);

  logic [NUM_BIS-1:0] bis_en, bis_op, bis_rdy, bis_done;
  logic [AMP_W-1:0]   vo;
  logic [7:0]         rf;
  logic [FIDX_W-1:0]  sf, ef;
  raw_t               bis_raw  [NUM_BIS];
  logic [FIDX_W-1:0]  bis_addr [NUM_BIS];
  logic [CW-1:0]      sel;
  raw_t               mux_raw;
  logic [FIDX_W-1:0]  mux_addr;
  logic               proc_en, proc_rdy;
  raw_t               proc_raw;
  rec_t               proc_rec;

  for (genvar i = 0; i < NUM_BIS; i++) begin : g_bis
    bis_module u_bis (
      .clk, .rst_n, .enable_in(bis_en[i]), .operate_in(bis_op[i]),
      .bis_id_in(ID_W'(i)), .vo_in(vo), .start_idx_in(sf), .end_idx_in(ef),
      .rdy_out(bis_rdy[i]), .raw_out(bis_raw[i]), .nxt_address_out(bis_addr[i]),
      .done_out(bis_done[i]), .dac1_out(dac1_out[i]), .dac2_out(dac2_out[i]),
      .dac_strobe_out(dac_strobe_out[i]), .adc_in(adc_in[i]));
  end

  bis_mux #(.N(NUM_BIS)) u_mux (
    .sel_in(sel), .raw_in(bis_raw), .addr_in(bis_addr),
    .raw_out(mux_raw), .addr_out(mux_addr));

  system_control_unit #(.NUM_BIS(NUM_BIS), .PEND_DEPTH(PEND_DEPTH)) u_scu (
    .clk, .rst_n, .enable_in, .vo_in, .rf_in, .start_freq_in, .end_freq_in,
    .done_out, .bis_enable_out(bis_en), .bis_operate_out(bis_op), .vo_out(vo),
    .bis_start_freq_out(sf), .bis_end_freq_out(ef), .bis_rdy_in(bis_rdy),
    .bis_done_in(bis_done), .check_count(sel), .bis_raw_in(mux_raw),
    .bis_nxt_address_in(mux_addr), .proc_enable_out(proc_en),
    .proc_raw_data_out(proc_raw), .rf_out(rf), .proc_data_rdy_in(proc_rdy),
    .proc_data_in(proc_rec), .mem_address_out, .mem_data_out, .mem_erase_out,
    .mem_write_out, .mem_read_out, .mem_reset_out, .mem_data_in, .mem_done_in,
    .stall_count_out);

  processor u_proc (
    .clk, .rst_n, .enable_in(proc_en), .raw_in(proc_raw), .vo_in(vo),
    .rf_in(rf), .final_out(proc_rec), .data_ready_out(proc_rdy),
    .error_out(proc_error_out));
endmodule
