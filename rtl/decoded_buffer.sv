// decoded_buffer: decoded packet store.
//
// One entry per data slot holds the decoded bit and a flag telling whether
// the Simple Decoder (1) or the Viterbi decoder (0) produced it. Entries are
// written by slot number because decoding is not strictly in order: bits the
// Simple Decoder wrote in the seven slots before an error are written again
// by the Viterbi decoder after the wind-back. The reader uses the port once
// the packet is done.
//
// Timing: one write per cycle, combinational read.
//
// From the source design: each output bit carries a flag of the decoder that
// produced it. This design's own choice: a slot-addressed store so that
// wound-back bits can be overwritten.
module decoded_buffer
  import vit_pkg::*;
#(
  parameter int DEPTH = MAX_SLOTS
) (
  input  logic             clk,
  input  logic             we,
  input  logic [LEN_W-1:0] waddr,
  input  logic             wbit,
  input  logic             wby_sd,
  input  logic [LEN_W-1:0] raddr,
  output logic             rbit,
  output logic             rby_sd
);

  logic [1:0] mem [DEPTH];

  assign {rby_sd, rbit} = (raddr < LEN_W'(DEPTH)) ? mem[raddr] : 2'b00;

  always_ff @(posedge clk) begin
    if (we && waddr < LEN_W'(DEPTH)) mem[waddr] <= {wby_sd, wbit};
  end

endmodule
