// bis_control: the control unit of one BIS channel. It sweeps the frequency
// steps and, at each step, balances the bridge and hands the result over.
//
// For every frequency index from start_idx_in to end_idx_in (ascending):
//   1. restart_out for one clock: the clock divider gets the new frequency
//      (freq_hz_out), both DAC drivers start a fresh cycle and DAC 2 goes back
//      to its initial phase.
//   2. Phase search: the phase detector is enabled (pd_enable_out) with Vf at
//      mid amplitude; its 8 add/sub decisions step the phase of DAC 2 by
//      90, 45, 23, 11, 6, 3, 2, 1 degrees.
//   3. Amplitude search: successive approximation of the 8-bit amplitude of
//      DAC 2, most significant bit first, keeping a bit while the amplitude
//      detector still reports Vf too small.
//   4. Ready: rdy_out is raised with the raw data (|Vf|, phase, flags). The
//      system control unit pauses the channel (operate_in = 0) to read it;
//      when operate_in returns to 1 the unit moves to the next frequency, or
//      raises done_out after the last one.
// operate_in = 0 also freezes the sequence in any other state. enable_in = 0
// returns the unit to idle.
//
// The frequency index is also the channel's record number (nxt_address_out),
// since the location of a record gives its frequency. The flags carry this
// channel's id with the 'processed' bit clear. The order phase-then-amplitude,
// the mid amplitude during phase search and the handshake details are this
// design's choice; the description gives the add/sub step sequence, the
// pause-by-operate protocol and the ascending sweep.
module bis_control
  import bis_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable_in,
  input  logic                operate_in,
  input  logic [ID_W-1:0]     bis_id_in,
  input  logic [FIDX_W-1:0]   start_idx_in,
  input  logic [FIDX_W-1:0]   end_idx_in,
  input  logic                pd_add_in,
  input  logic                pd_sub_in,
  input  logic                ad_valid_in,
  input  logic                ad_vf_low_in,
  input  logic [PHASE_W-1:0]  phase_in,
  output logic [FHZ_W-1:0]    freq_hz_out,
  output logic                restart_out,
  output logic                pd_enable_out,
  output logic                ad_enable_out,
  output logic [AMP_W-1:0]    amplitude_out,
  output logic                rdy_out,
  output raw_t                raw_out,
  output logic [FIDX_W-1:0]   nxt_address_out,
  output logic                done_out
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_PHASE, S_AMP, S_READY, S_DONE} state_t;

  state_t            state_q;
  logic [FIDX_W-1:0] idx_q;
  logic [3:0]        pcount_q;
  logic [2:0]        bit_q;
  logic              paused_q;

  assign freq_hz_out     = step_to_hz(idx_q);
  assign nxt_address_out = idx_q;
  assign pd_enable_out   = (state_q == S_PHASE) && operate_in;
  assign ad_enable_out   = (state_q == S_AMP) && operate_in;
  assign rdy_out         = (state_q == S_READY);
  assign done_out        = (state_q == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_IDLE;
      idx_q         <= '0;
      pcount_q      <= '0;
      bit_q         <= '0;
      paused_q      <= 1'b0;
      amplitude_out <= '0;
      restart_out   <= 1'b0;
      raw_out       <= '0;
    end else if (!enable_in) begin
      state_q     <= S_IDLE;
      restart_out <= 1'b0;
    end else begin
      restart_out <= 1'b0;
      case (state_q)
        S_IDLE: begin
          idx_q   <= start_idx_in;
          state_q <= S_START;
        end
        S_START: if (operate_in) begin
          restart_out   <= 1'b1;
          amplitude_out <= AMP_W'(1 << (AMP_W - 1));
          pcount_q      <= '0;
          state_q       <= S_PHASE;
        end
        S_PHASE: if (operate_in && (pd_add_in || pd_sub_in)) begin
          if (pcount_q == 4'(N_PSTEPS - 1)) begin
            amplitude_out <= AMP_W'(1 << (AMP_W - 1));
            bit_q         <= 3'(AMP_W - 1);
            state_q       <= S_AMP;
          end
          pcount_q <= pcount_q + 1'b1;
        end
        S_AMP: if (operate_in && ad_valid_in) begin
          logic [AMP_W-1:0] a;
          a = amplitude_out;
          if (!ad_vf_low_in) a[bit_q] = 1'b0;
          if (bit_q == 0) begin
            raw_out.flags.bis_id    <= bis_id_in;
            raw_out.flags.processed <= 1'b0;
            raw_out.phase           <= phase_in;
            raw_out.amp             <= a;
            paused_q                <= 1'b0;
            state_q                 <= S_READY;
          end else begin
            a[bit_q - 1'b1] = 1'b1;
            bit_q <= bit_q - 1'b1;
          end
          amplitude_out <= a;
        end
        S_READY: begin
          if (!operate_in) paused_q <= 1'b1;
          else if (paused_q) begin
            if (idx_q == end_idx_in) state_q <= S_DONE;
            else begin
              idx_q   <= idx_q + 1'b1;
              state_q <= S_START;
            end
          end
        end
        S_DONE: ;
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
