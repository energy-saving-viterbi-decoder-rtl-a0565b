// rx_symbol_buffer: store of received hard-decision code symbols.
//
// The demodulator side writes one symbol per slot in order; the decoders
// read by slot number. Keeping the symbols addressable lets the Simple
// Decoder's error detection wind back seven slots and feed the same symbols
// again to the Viterbi decoder, and lets the two decoders run at different
// speeds (the Viterbi decoder needs many cycles per slot) while symbols keep
// arriving. Sized for one whole packet of DEPTH slots; `count` tells the
// readers how many symbols have arrived, and a reader must stall on a slot
// not yet written. `clear` starts a new packet. Writes beyond DEPTH are
// dropped and raise `overflow`.
//
// Timing: write on the clock edge, two combinational read ports (one per
// decoder).
//
// From the source design: received symbols must be kept so that decoding can
// go back seven slots. This design's own choice: storing the whole packet,
// since the Viterbi decoder runs slower than the line and both decoders read
// by slot number.
module rx_symbol_buffer
  import vit_pkg::*;
#(
  parameter int DEPTH = MAX_SLOTS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             wr_valid,
  input  sym_t             wr_sym,
  output logic [LEN_W-1:0] count,
  output logic             overflow,
  input  logic [LEN_W-1:0] rd_addr_a,
  output sym_t             rd_sym_a,
  input  logic [LEN_W-1:0] rd_addr_b,
  output sym_t             rd_sym_b
);

  sym_t mem [DEPTH];

  assign rd_sym_a = (rd_addr_a < LEN_W'(DEPTH)) ? mem[rd_addr_a] : '0;
  assign rd_sym_b = (rd_addr_b < LEN_W'(DEPTH)) ? mem[rd_addr_b] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (wr_valid) begin
      if (count < LEN_W'(DEPTH)) count <= count + 1'b1;
      else                       overflow <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid && !clear && count < LEN_W'(DEPTH)) mem[count] <= wr_sym;
  end

endmodule
