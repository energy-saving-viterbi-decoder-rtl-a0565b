// switching_controller: decides which decoder works on the packet.
//
// A packet starts in the Simple Decoder (SD) from the all-zero state. Each
// cycle with a symbol available the SD decodes one slot; if its two branch
// outputs agree the bit is written to the output buffer (flagged as SD
// output) and the position advances. When they disagree, or when fewer than
// SD_GUARD = TB_DEPTH-TAIL slots would remain after this one, the controller
// winds back by the number of bits this SD run decoded, at most RETRACE = 7,
// and starts the Viterbi decoder (VD) there with the SD's recorded encoder
// state for that slot; the seven bits already written are overwritten by
// the VD. When the VD finishes a run it either hands back (switch back: the
// SD is loaded with the traceback state and continues after the VD's last
// bit) or has decoded the packet to its end, which raises `done`.
//
// The end-of-packet rule needs the packet length, given at `start`.
// `stats` counts SD and VD runs, bits kept from each, full-length wind-backs
// and VD runs forced by the packet end. `vd_on` is high while the VD runs:
// the Viterbi datapath is idle at all other times.
//
// Test mode: with FORCE_EVERY = N > 0 the SD also hands over after every N
// bits of a run, as if it had seen an error. The source design checks its
// switching this way (N = 7, error-free channel): every hand-over in both
// directions must then lose nothing. The default 0 is normal operation.
//
// Timing: one SD slot per cycle; each hand-over costs one cycle.
//
// From the source design: start in the Simple Decoder, wind back up to seven
// slots on an error, and hand the last 29 slots of a packet to the Viterbi
// decoder. This design's own choices: the state machine, stalling on missing
// symbols and the statistics counters.
module switching_controller
  import vit_pkg::*;
#(
  parameter int SD_GUARD    = TB_DEPTH - TAIL,
  parameter int FORCE_EVERY = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LEN_W-1:0] pkt_len,
  input  logic [LEN_W-1:0] sym_count,
  // Simple Decoder
  output logic [LEN_W-1:0] sd_pos,
  output logic             sd_load,
  output state_t           sd_load_state,
  output logic             sd_accept,
  input  logic             sd_mismatch,
  input  logic             sd_dec_bit,
  input  logic [2:0]       sd_rewind_count,
  input  state_t           sd_rewind_state,
  // Viterbi decoder
  output logic             vd_start,
  output state_t           vd_start_state,
  output logic [LEN_W-1:0] vd_start_pos,
  output logic [LEN_W-1:0] vd_pkt_len,
  input  logic             vd_finish,
  input  logic             vd_switch_back,
  input  logic [LEN_W-1:0] vd_end_pos,
  input  state_t           vd_end_state,
  // output buffer write by the Simple Decoder
  output logic             sd_we,
  output logic [LEN_W-1:0] sd_waddr,
  output logic             sd_wbit,
  // status
  output logic             vd_on,
  output logic             sd_on,
  output logic             sd_stall,   // Simple Decoder waits for a symbol
  output logic             done,
  output sw_stats_t        stats
);

  typedef enum logic [1:0] {C_IDLE, C_SD, C_VD, C_DONE} cstate_e;

  cstate_e          st;
  logic [LEN_W-1:0] flen;       // slots decoded so far
  logic [LEN_W-1:0] run_begin;  // flen when the present run started
  logic [LEN_W-1:0] nb;
  logic             avail, near_end, forced, sd_error;
  logic [LEN_W-1:0] back_pos;

  assign avail    = flen < sym_count;
  assign near_end = {1'b0, flen} + (LEN_W+1)'(SD_GUARD) > {1'b0, nb};
  // test mode: hand over after FORCE_EVERY bits of every Simple Decoder run
  assign forced   = FORCE_EVERY != 0 && flen - run_begin == LEN_W'(FORCE_EVERY);
  assign sd_error = st == C_SD && (near_end || (avail && (sd_mismatch || forced)));
  assign back_pos = flen - LEN_W'(sd_rewind_count);

  assign sd_pos    = flen;
  assign sd_accept = st == C_SD && !sd_error && avail;
  assign sd_we     = sd_accept;
  assign sd_waddr  = flen;
  assign sd_wbit   = sd_dec_bit;

  assign vd_start       = sd_error;
  assign vd_start_state = sd_rewind_state;
  assign vd_start_pos   = back_pos;
  assign vd_pkt_len     = nb;

  assign sd_load       = (st == C_IDLE || st == C_DONE) ? start
                       : (st == C_VD && vd_finish && vd_switch_back);
  assign sd_load_state = (st == C_VD) ? vd_end_state : '0;

  assign vd_on = st == C_VD;
  assign sd_on = st == C_SD;
  assign sd_stall = st == C_SD && !sd_error && !avail;
  assign done  = st == C_DONE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= C_IDLE;
      flen      <= '0;
      run_begin <= '0;
      nb        <= '0;
      stats     <= '0;
    end else begin
      unique case (st)
        C_IDLE, C_DONE: if (start) begin
          flen      <= '0;
          run_begin <= '0;
          nb        <= pkt_len;
          stats     <= '0;
          stats.sd_calls <= LEN_W'(1);
          st        <= C_SD;
        end
        C_SD: begin
          if (sd_error) begin
            flen           <= back_pos;
            run_begin      <= back_pos;
            stats.sd_bits  <= stats.sd_bits + (back_pos - run_begin);
            stats.vd_calls <= stats.vd_calls + 1'b1;
            if (sd_rewind_count == 3'(RETRACE))
              stats.full_rewinds <= stats.full_rewinds + 1'b1;
            if (near_end)
              stats.end_switches <= stats.end_switches + 1'b1;
            st <= C_VD;
          end else if (sd_accept) begin
            flen <= flen + 1'b1;
          end
        end
        C_VD: if (vd_finish) begin
          flen          <= vd_end_pos;
          run_begin     <= vd_end_pos;
          stats.vd_bits <= stats.vd_bits + (vd_end_pos - run_begin);
          if (vd_switch_back) begin
            stats.sd_calls <= stats.sd_calls + 1'b1;
            st <= C_SD;
          end else begin
            st <= C_DONE;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
