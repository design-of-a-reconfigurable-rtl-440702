// system_control_unit: schedules the whole system. It polls the BIS channels,
// moves their raw records into flash, feeds unprocessed records to the
// processor and writes the processed records back.
//
// Operation (one state machine, work picked in this priority order each time
// it returns to polling):
//   1. Processor finished (proc_data_rdy_in): its 88-bit record is written to
//      the 11 bytes of its flash slot (each byte erased, then written), then
//      proc_enable_out is dropped.
//   2. Channel check_count has raw data (bis_rdy_in): the channel is paused
//      (its bis_operate_out bit goes to 0), its 3 raw bytes are erased and
//      written to the top 3 bytes of its slot, the slot is queued as
//      unprocessed and the operate bit returns to 1, which tells the channel
//      to go on to its next frequency. If the unprocessed queue is full the
//      channel is left waiting (a stall, counted in stall_count_out) until
//      the processor catches up. A channel just served is not served again
//      until its ready flag has dropped.
//   3. Processor free and a slot queued: the 3 raw bytes are read back from
//      flash and handed to the processor (proc_enable_out = 1).
//   Otherwise check_count moves on to the next channel (round-robin polling).
// done_out is raised when every channel has finished its sweep, the queue is
// empty and the processor is idle.
//
// Flash layout: slot of frequency index f of channel c starts at byte
// (f * NUM_BIS + c) * 11 and holds the record most significant byte first, so
// the raw data sits in the 3 most significant bytes and ZxR, ZxI in the other
// 8. Memory commands are one-clock pulses of mem_erase_out, mem_write_out or
// mem_read_out with mem_address_out (and mem_data_out); mem_done_in answers
// each one (with mem_data_in for a read). mem_reset_out pulses for one clock
// when a run starts, to reset the memory controller. The polling, the per-byte
// erase-then-write, the 3/11-byte transfers, the operate pause code and the
// signal names follow the description; the queue of unprocessed slots, the
// slot numbering and the priority order are this design's choices.
module system_control_unit
  import bis_pkg::*;
#(
  parameter int unsigned NUM_BIS    = 3,
  parameter int unsigned PEND_DEPTH = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // user
  input  logic                        enable_in,
  input  logic [AMP_W-1:0]            vo_in,
  input  logic [7:0]                  rf_in,
  input  logic [FIDX_W-1:0]           start_freq_in,
  input  logic [FIDX_W-1:0]           end_freq_in,
  output logic                        done_out,
  // BIS channels
  output logic [NUM_BIS-1:0]          bis_enable_out,
  output logic [NUM_BIS-1:0]          bis_operate_out,
  output logic [AMP_W-1:0]            vo_out,
  output logic [FIDX_W-1:0]           bis_start_freq_out,
  output logic [FIDX_W-1:0]           bis_end_freq_out,
  input  logic [NUM_BIS-1:0]          bis_rdy_in,
  input  logic [NUM_BIS-1:0]          bis_done_in,
  output logic [$clog2(NUM_BIS > 1 ? NUM_BIS : 2)-1:0] check_count,
  input  raw_t                        bis_raw_in,
  input  logic [FIDX_W-1:0]           bis_nxt_address_in,
  // processor
  output logic                        proc_enable_out,
  output raw_t                        proc_raw_data_out,
  output logic [7:0]                  rf_out,
  input  logic                        proc_data_rdy_in,
  input  rec_t                        proc_data_in,
  // flash memory controller
  output logic [MEM_AW-1:0]           mem_address_out,
  output logic [7:0]                  mem_data_out,
  output logic                        mem_erase_out,
  output logic                        mem_write_out,
  output logic                        mem_read_out,
  output logic                        mem_reset_out,
  input  logic [7:0]                  mem_data_in,
  input  logic                        mem_done_in,
  // event counters for observation
  output logic [15:0]                 stall_count_out
);
  localparam int unsigned PW = $clog2(PEND_DEPTH > 1 ? PEND_DEPTH : 2);

  typedef enum logic [3:0] {
    C_IDLE, C_POLL, C_ERASE, C_ERASE_W, C_WRITE, C_WRITE_W, C_READ, C_READ_W
  } cstate_t;
  typedef enum logic [1:0] {J_RAW, J_PROC, J_FETCH} job_t;

  cstate_t            st_q;
  job_t               job_q;
  logic [REC_W-1:0]   buf_q;
  logic [3:0]         byte_count;
  logic [3:0]         nbytes_q;
  logic [MEM_AW-1:0]  base_q, proc_base_q;
  logic               proc_busy_q;
  logic [MEM_AW-1:0]  pend_q [PEND_DEPTH];
  logic [PW-1:0]      wr_ptr_q, rd_ptr_q;
  logic [PW:0]        pend_cnt_q;
  logic [MEM_AW-1:0]  slot_addr;
  logic [NUM_BIS-1:0] served_q;     // record written, channel not yet moved on
  logic               can_serve, q_full;

  assign vo_out             = vo_in;
  assign rf_out             = rf_in;
  assign bis_start_freq_out = start_freq_in;
  assign bis_end_freq_out   = end_freq_in;
  assign q_full    = (pend_cnt_q == (PW+1)'(PEND_DEPTH));
  assign can_serve = bis_rdy_in[check_count] && !served_q[check_count];
  assign slot_addr = MEM_AW'((32'(bis_nxt_address_in) * NUM_BIS
                              + 32'(bis_raw_in.flags.bis_id)) * REC_BYTES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= C_IDLE; job_q <= J_RAW; buf_q <= '0; byte_count <= '0;
      nbytes_q <= '0; base_q <= '0; proc_base_q <= '0; proc_busy_q <= 1'b0;
      wr_ptr_q <= '0; rd_ptr_q <= '0; pend_cnt_q <= '0;
      check_count <= '0; bis_enable_out <= '0; bis_operate_out <= '0;
      proc_enable_out <= 1'b0; proc_raw_data_out <= '0;
      mem_address_out <= '0; mem_data_out <= '0;
      mem_erase_out <= 1'b0; mem_write_out <= 1'b0; mem_read_out <= 1'b0;
      mem_reset_out <= 1'b0;
      done_out <= 1'b0; stall_count_out <= '0; served_q <= '0;
      for (int i = 0; i < PEND_DEPTH; i++) pend_q[i] <= '0;
    end else begin
      mem_erase_out <= 1'b0;
      mem_write_out <= 1'b0;
      mem_read_out  <= 1'b0;
      mem_reset_out <= 1'b0;
      served_q      <= served_q & bis_rdy_in;
      case (st_q)
        C_IDLE: if (enable_in) begin
          bis_enable_out  <= '1;
          bis_operate_out <= '1;
          mem_reset_out   <= 1'b1;
          done_out        <= 1'b0;
          st_q            <= C_POLL;
        end
        C_POLL: begin
          done_out <= (&bis_done_in) && pend_cnt_q == 0 && !proc_busy_q;
          if (can_serve && q_full)
            stall_count_out <= stall_count_out + 1'b1;
          if (!enable_in) begin
            bis_enable_out <= '0;
            st_q           <= C_IDLE;
          end else if (proc_busy_q && proc_data_rdy_in) begin
            buf_q      <= proc_data_in;
            base_q     <= proc_base_q;
            nbytes_q   <= 4'(REC_BYTES);
            byte_count <= '0;
            job_q      <= J_PROC;
            st_q       <= C_ERASE;
          end else if (can_serve && !q_full) begin
            bis_operate_out[check_count] <= 1'b0;
            buf_q      <= {bis_raw_in, 64'd0};
            base_q     <= slot_addr;
            nbytes_q   <= 4'(RAW_BYTES);
            byte_count <= '0;
            job_q      <= J_RAW;
            st_q       <= C_ERASE;
          end else if (!proc_busy_q && pend_cnt_q != 0) begin
            base_q      <= pend_q[rd_ptr_q];
            proc_base_q <= pend_q[rd_ptr_q];
            rd_ptr_q    <= (rd_ptr_q == PW'(PEND_DEPTH - 1)) ? '0 : rd_ptr_q + 1'b1;
            pend_cnt_q  <= pend_cnt_q - 1'b1;
            nbytes_q    <= 4'(RAW_BYTES);
            byte_count  <= '0;
            job_q       <= J_FETCH;
            st_q        <= C_READ;
          end else begin
            check_count <= (32'(check_count) == NUM_BIS - 1) ? '0 : check_count + 1'b1;
          end
        end
        C_ERASE: begin
          mem_address_out <= base_q + MEM_AW'(byte_count);
          mem_erase_out   <= 1'b1;
          st_q            <= C_ERASE_W;
        end
        C_ERASE_W: if (mem_done_in) st_q <= C_WRITE;
        C_WRITE: begin
          mem_address_out <= base_q + MEM_AW'(byte_count);
          mem_data_out    <= buf_q[REC_W-1 -: 8];
          mem_write_out   <= 1'b1;
          st_q            <= C_WRITE_W;
        end
        C_WRITE_W: if (mem_done_in) begin
          buf_q      <= buf_q << 8;
          byte_count <= byte_count + 1'b1;
          if (byte_count + 1'b1 == nbytes_q) begin
            byte_count <= '0;
            st_q       <= C_POLL;
            if (job_q == J_PROC) begin
              proc_enable_out <= 1'b0;
              proc_busy_q     <= 1'b0;
            end else begin
              pend_q[wr_ptr_q] <= base_q;
              wr_ptr_q   <= (wr_ptr_q == PW'(PEND_DEPTH - 1)) ? '0 : wr_ptr_q + 1'b1;
              pend_cnt_q <= pend_cnt_q + 1'b1;
              bis_operate_out[check_count] <= 1'b1;
              served_q[check_count]        <= 1'b1;
            end
          end else begin
            st_q <= C_ERASE;
          end
        end
        C_READ: begin
          mem_address_out <= base_q + MEM_AW'(byte_count);
          mem_read_out    <= 1'b1;
          st_q            <= C_READ_W;
        end
        C_READ_W: if (mem_done_in) begin
          buf_q      <= {buf_q[REC_W-9:0], mem_data_in};
          byte_count <= byte_count + 1'b1;
          if (byte_count + 1'b1 == nbytes_q) begin
            byte_count        <= '0;
            proc_raw_data_out <= raw_t'({buf_q[15:0], mem_data_in});
            proc_enable_out   <= 1'b1;
            proc_busy_q       <= 1'b1;
            st_q              <= C_POLL;
          end else begin
            st_q <= C_READ;
          end
        end
        default: st_q <= C_IDLE;
      endcase
    end
  end
endmodule
