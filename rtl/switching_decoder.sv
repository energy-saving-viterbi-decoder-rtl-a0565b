// switching_decoder: the energy saving receiver for the K=7 (171,133) code.
//
// Hard-decision code symbols of one packet are written into the receive
// buffer as they arrive. The Simple Decoder decodes them one slot per cycle
// by inverting the encoder's XOR taps while the channel is error free; on a
// detected error the controller winds back up to seven slots and the
// Viterbi decoder takes over from the Simple Decoder's recorded state, and
// once the global winner's path metric has stayed constant for
// SWITCH_BACK slots it hands back to the Simple Decoder with its traceback
// state. The packet end (last TAIL slots are the zero flush) is always
// decoded by the Viterbi decoder, which needs a full traceback window there.
// Decoded bits and the decoder that produced each are kept in the output
// buffer and read through `rd_addr` after `done`.
//
// Interface: pulse `start` with `pkt_len` (slots including the tail) at the
// start of a packet, then write symbols with `rx_valid`/`rx_sym`, at any rate;
// the decoders stall while they wait for a symbol. `vd_on` marks the cycles in
// which the Viterbi datapath works. FORCE_EVERY (0 = off) is a test mode
// passed to the controller: forced hand-overs on an error-free channel.
//
// From the source design: the two decoders, the switching rules and their
// settings. This design's own choices: the buffer organisation, one active
// decoder at a time with the other held, and the read-out port.
module switching_decoder
  import vit_pkg::*;
#(
  parameter int DEPTH       = MAX_SLOTS,
  parameter int SWITCH_BACK = 21,
  parameter int PM_W        = 8,
  parameter int FORCE_EVERY = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LEN_W-1:0] pkt_len,
  input  logic             rx_valid,
  input  sym_t             rx_sym,
  input  logic [LEN_W-1:0] rd_addr,
  output logic             rd_bit,
  output logic             rd_by_sd,
  output logic             done,
  output logic             vd_on,
  output logic             sd_on,
  output logic             sd_stall,
  output logic             vd_stall,
  output logic             rx_overflow,
  output sw_stats_t        stats
);

  logic [LEN_W-1:0] sym_count, sd_pos, vd_rd_addr;
  sym_t             sd_sym, vd_sym;

  logic             sd_load, sd_accept, sd_mismatch, sd_dec_bit;
  state_t           sd_load_state, sd_state, sd_rewind_state;
  logic [2:0]       sd_rewind_count;

  logic             vd_start, vd_finish, vd_switch_back, vd_busy;
  state_t           vd_start_state, vd_end_state;
  logic [LEN_W-1:0] vd_start_pos, vd_pkt_len, vd_end_pos;

  logic             sd_we, sd_wbit, vd_we, vd_wbit;
  logic [LEN_W-1:0] sd_waddr, vd_waddr;

  rx_symbol_buffer #(.DEPTH(DEPTH)) u_rxbuf (
    .clk, .rst_n, .clear(start), .wr_valid(rx_valid), .wr_sym(rx_sym),
    .count(sym_count), .overflow(rx_overflow),
    .rd_addr_a(sd_pos), .rd_sym_a(sd_sym),
    .rd_addr_b(vd_rd_addr), .rd_sym_b(vd_sym)
  );

  simple_decoder u_sd (
    .clk, .rst_n, .load(sd_load), .load_state(sd_load_state), .sym(sd_sym),
    .accept(sd_accept), .dec_bit(sd_dec_bit), .mismatch(sd_mismatch),
    .state(sd_state), .rewind_count(sd_rewind_count),
    .rewind_state(sd_rewind_state)
  );

  adapted_viterbi_decoder #(.SWITCH_BACK(SWITCH_BACK), .PM_W(PM_W)) u_vd (
    .clk, .rst_n, .start(vd_start), .start_state(vd_start_state),
    .start_pos(vd_start_pos), .pkt_len(vd_pkt_len),
    .rd_addr(vd_rd_addr), .rd_sym(vd_sym), .sym_count,
    .dec_we(vd_we), .dec_addr(vd_waddr), .dec_bit(vd_wbit),
    .busy(vd_busy), .stall(vd_stall), .finish(vd_finish),
    .switch_back(vd_switch_back), .end_pos(vd_end_pos),
    .end_state(vd_end_state)
  );

  switching_controller #(.FORCE_EVERY(FORCE_EVERY)) u_ctl (
    .clk, .rst_n, .start, .pkt_len, .sym_count,
    .sd_pos, .sd_load, .sd_load_state, .sd_accept, .sd_mismatch, .sd_dec_bit,
    .sd_rewind_count, .sd_rewind_state,
    .vd_start, .vd_start_state, .vd_start_pos, .vd_pkt_len, .vd_finish,
    .vd_switch_back, .vd_end_pos, .vd_end_state,
    .sd_we, .sd_waddr, .sd_wbit,
    .vd_on, .sd_on, .sd_stall, .done, .stats
  );

  decoded_buffer #(.DEPTH(DEPTH)) u_out (
    .clk,
    .we(sd_we || vd_we),
    .waddr(sd_we ? sd_waddr : vd_waddr),
    .wbit(sd_we ? sd_wbit : vd_wbit),
    .wby_sd(sd_we),
    .raddr(rd_addr), .rbit(rd_bit), .rby_sd(rd_by_sd)
  );

  // The two decoders never write the output buffer in the same cycle, and
  // the Viterbi decoder is only ever busy while the controller has it on.
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n) !(sd_we && vd_we));
  a_vd_mode:    assert property (@(posedge clk) disable iff (!rst_n) vd_busy |-> vd_on);

endmodule
