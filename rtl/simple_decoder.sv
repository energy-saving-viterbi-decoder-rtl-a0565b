// simple_decoder: the low-energy decoder used while the channel is clean.
//
// XORing a received code bit with the same flip-flop taps the encoder used
// gives back the data bit (since (A^B)^B = A). Both halves of a symbol are
// inverted this way: lower bit with FF1,FF2,FF3,FF6 and upper bit with
// FF2,FF3,FF5,FF6. If the two results agree the lower one is the decoded bit
// and is fed back into FF1, so the flip-flops keep mirroring the encoder. If
// they differ (`mismatch`) a bit error has happened within the last seven
// slots and the surrounding controller hands over to the Viterbi decoder.
//
// The module also keeps the encoder states of the last seven slots
// (hist[0] is the present state, hist[k] the state k decoded bits ago) and
// counts decoded bits since `load`, saturating at RETRACE. `rewind_state` is
// the state from which decoding must restart after winding back
// `rewind_count` slots: the state seven bits back, or the state at `load` if
// fewer bits were decoded since.
//
// Timing: `mismatch` and `dec_bit` are combinational from `sym` and the
// flip-flops; `accept` (one slot per cycle) shifts the decoded bit in.
// `load` sets the flip-flops to `load_state` (all zero at packet start, the
// Viterbi traceback state on a switch back) and has priority.
//
// From the source design: the XOR inversion of both branches, the feedback
// into FF1, the error flag on disagreement and the seven-slot wind-back. This
// design's own choices: keeping the states of the last seven slots, instead
// of the last 14 received bits, so that the wind-back state is ready at once,
// and stopping the wind-back at the load point.
module simple_decoder
  import vit_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  state_t     load_state,
  input  sym_t       sym,
  input  logic       accept,
  output logic       dec_bit,
  output logic       mismatch,
  output state_t     state,
  output logic [2:0] rewind_count,
  output state_t     rewind_state
);

  state_t     hist [RETRACE+1];
  logic [2:0] count;
  logic       lower_out, upper_out;

  assign state     = hist[0];
  assign lower_out = sym.lower ^ state[5] ^ state[4] ^ state[3] ^ state[0];
  assign upper_out = sym.upper ^ state[4] ^ state[3] ^ state[1] ^ state[0];
  assign dec_bit   = lower_out;
  assign mismatch  = lower_out ^ upper_out;

  assign rewind_count = count;
  assign rewind_state = hist[count];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= RETRACE; k++) hist[k] <= '0;
      count <= '0;
    end else if (load) begin
      for (int k = 0; k <= RETRACE; k++) hist[k] <= load_state;
      count <= '0;
    end else if (accept) begin
      hist[0] <= next_state(hist[0], dec_bit);
      for (int k = 1; k <= RETRACE; k++) hist[k] <= hist[k-1];
      if (count != 3'(RETRACE)) count <= count + 1'b1;
    end
  end

endmodule
