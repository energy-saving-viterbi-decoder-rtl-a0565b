// viterbi_fec_top: transmitter and energy saving receiver side by side.
//
// Transmitter: the data source emits a packet of random data bits plus six
// zero flush bits, and the (171,133) K=7 encoder turns each into one code
// symbol (lower bit first on the line). Receiver: the switching decoder
// decodes the hard-decision symbols of a packet. Modulation, channel and
// demodulation lie between `tx_sym` and `rx_sym` and are not part of this
// RTL, so the two halves meet only at the ports; a test bench closes the
// loop through a bit-error channel model.
//
// Timing: the transmitter sends one symbol per cycle while `tx_ready` is
// high (symbol one cycle after its data bit); the receiver accepts a symbol
// per cycle and decodes at its own pace, see switching_decoder.
//
// From the source design: the transmitter (random data, zero tail, encoder)
// and the switching receiver. This design's own choice: leaving modulation,
// channel and demodulation outside, so the receiver takes hard-decision
// symbols.
module viterbi_fec_top
  import vit_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // transmitter
  input  logic             tx_start,
  input  logic [LEN_W-1:0] tx_data_bits,   // data bits, without the tail
  input  logic [22:0]      tx_seed,
  input  logic             tx_ready,
  output logic             tx_valid,
  output sym_t             tx_sym,
  output logic             tx_data_valid,  // data bit entering the encoder
  output logic             tx_data_bit,
  output logic             tx_busy,
  // receiver
  input  logic             rx_start,
  input  logic [LEN_W-1:0] rx_pkt_len,     // slots, tail included
  input  logic             rx_valid,
  input  sym_t             rx_sym,
  input  logic [LEN_W-1:0] rx_rd_addr,
  output logic             rx_rd_bit,
  output logic             rx_rd_by_sd,
  output logic             rx_done,
  output logic             rx_vd_on,
  output logic             rx_sd_on,
  output logic             rx_sd_stall,
  output logic             rx_vd_stall,
  output logic             rx_overflow,
  output sw_stats_t        rx_stats
);

  logic   src_valid, src_bit, src_last;
  state_t enc_state;

  data_source u_src (
    .clk, .rst_n, .start(tx_start), .n_bits(tx_data_bits), .seed(tx_seed),
    .ready(tx_ready), .valid(src_valid), .out_bit(src_bit), .last(src_last),
    .busy(tx_busy)
  );

  assign tx_data_valid = src_valid && tx_ready;
  assign tx_data_bit   = src_bit;

  conv_encoder u_enc (
    .clk, .rst_n, .clear(tx_start), .in_valid(tx_data_valid), .in_bit(src_bit),
    .out_valid(tx_valid), .out_sym(tx_sym), .enc_state
  );

  switching_decoder u_rx (
    .clk, .rst_n, .start(rx_start), .pkt_len(rx_pkt_len),
    .rx_valid, .rx_sym, .rd_addr(rx_rd_addr), .rd_bit(rx_rd_bit),
    .rd_by_sd(rx_rd_by_sd), .done(rx_done), .vd_on(rx_vd_on),
    .sd_on(rx_sd_on), .sd_stall(rx_sd_stall), .vd_stall(rx_vd_stall), .rx_overflow, .stats(rx_stats)
  );

  // After the tail the encoder is back in the all-zero state.
  a_flushed: assert property (@(posedge clk) disable iff (!rst_n)
                              tx_data_valid && src_last |=> enc_state == '0);

endmodule
