// conv_encoder: rate 1/2, K = 7, (171,133) convolutional encoder of the
// transmitter.
//
// Six flip-flops hold the last six data bits; each accepted data bit is
// XORed with taps FF1,FF2,FF3,FF6 to give the lower (171) bit and with taps
// FF2,FF3,FF5,FF6 to give the upper (133) bit, then shifted into FF1. The
// flip-flops start at zero (reset or `clear` at the start of a packet), as
// the decoders assume. The two coded bits of a slot are delivered together as
// one sym_t; the lower bit is the one that goes first on the line, so the
// 2:1 output multiplexer is just the bit order of the symbol.
//
// Timing: one data bit per cycle when in_valid is high; out_sym/out_valid are
// registered, one cycle after the data bit.
//
// From the source design: the code, the taps and the zero start state. This
// design's own choices: one symbol per cycle with both bits together, and the
// registered output.
module conv_encoder
  import vit_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,      // return flip-flops to the all-zero state
  input  logic   in_valid,
  input  logic   in_bit,
  output logic   out_valid,
  output sym_t   out_sym,
  output state_t enc_state   // current flip-flop contents, FF1 = MSB
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_state <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      if (clear) begin
        enc_state <= '0;
      end else if (in_valid) begin
        out_sym   <= enc_out(enc_state, in_bit);
        enc_state <= next_state(enc_state, in_bit);
      end
    end
  end

endmodule
