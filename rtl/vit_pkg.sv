// vit_pkg: types, constants and trellis functions shared by the energy saving
// switching Viterbi decoder.
//
// Code: rate 1/2, constraint length K = 7, generators (171,133) octal.
// State numbering: the six encoder flip-flops FF1..FF6 form a 6-bit state
// with FF1 (the most recent data bit) as the MSB and FF6 as the LSB, so the
// successor of state s for data bit u is {u, s[5:1]} and the two
// predecessors of state n are {n[4:0],0} and {n[4:0],1}.
// Per data bit the encoder produces a "lower" bit (171: u^FF1^FF2^FF3^FF6),
// sent first, and an "upper" bit (133: u^FF2^FF3^FF5^FF6), sent second.
//
// From the source design: the (171,133) K=7 code, the tap sets of the two
// outputs, the 35-slot traceback depth, the 7-slot wind-back and the six-bit
// zero tail. This design's own choices: the state numbering, the symbol
// packing and the 10,006-slot packet bound derived from the 10,000-bit
// packets the design is evaluated with.
package vit_pkg;

  localparam int K          = 7;          // constraint length
  localparam int NSTATES    = 64;         // 2^(K-1) trellis states
  localparam int TB_DEPTH   = 35;         // traceback window in trellis columns (5*K)
  localparam int WIN        = TB_DEPTH-1; // decision columns held = transitions in window
  localparam int RETRACE    = 7;          // slots the Simple Decoder winds back on an error
  localparam int TAIL       = 6;          // zero flush bits appended to every packet
  localparam int DATA_BITS  = 10000;      // data length of the main evaluation
  localparam int MAX_SLOTS  = DATA_BITS + TAIL; // trellis slots per packet
  localparam int LEN_W      = $clog2(MAX_SLOTS + 1);

  typedef logic [K-2:0] state_t;

  // One received or transmitted code symbol (one trellis slot).
  typedef struct packed {
    logic upper;   // 133 output, second on the line
    logic lower;   // 171 output, first on the line
  } sym_t;

  // Switching statistics of one packet.
  typedef struct packed {
    logic [LEN_W-1:0] sd_calls;    // times the Simple Decoder was started
    logic [LEN_W-1:0] vd_calls;    // times the Viterbi decoder was started
    logic [LEN_W-1:0] sd_bits;     // bits kept from the Simple Decoder
    logic [LEN_W-1:0] vd_bits;     // bits produced by the Viterbi decoder
    logic [LEN_W-1:0] full_rewinds;  // wind-backs of the full RETRACE slots
    logic [LEN_W-1:0] end_switches;  // Viterbi started because the packet end is near
  } sw_stats_t;

  function automatic state_t next_state(state_t s, logic u);
    return {u, s[K-2:1]};
  endfunction

  // Code symbol emitted when data bit u enters with the encoder in state s.
  function automatic sym_t enc_out(state_t s, logic u);
    sym_t y;
    y.lower = u ^ s[5] ^ s[4] ^ s[3] ^ s[0];
    y.upper = u ^ s[4] ^ s[3] ^ s[1] ^ s[0];
    return y;
  endfunction

endpackage
