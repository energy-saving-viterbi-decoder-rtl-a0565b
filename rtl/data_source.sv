// data_source: test data generator of the transmitter.
//
// After `start` it emits `n_bits` pseudo-random data bits followed by TAIL
// zero bits, which flush the six encoder flip-flops so that the last data
// bit reaches the channel. The random bits come from a 23-bit maximal-length
// LFSR (x^23 + x^18 + 1), loaded with `seed` on start (an all-zero seed is
// replaced by 1). The generator type is this design's choice; the zero tail
// follows the packet format of the decoder.
//
// Interface: valid/ready, one bit per cycle when ready is high; `last` marks
// the final tail bit, `busy` is high from start until the last bit is taken.
//
// From the source design: random data followed by six zero bits. This
// design's own choices: the LFSR as the random source and the valid/ready
// interface.
module data_source
  import vit_pkg::*;
#(
  parameter int unsigned TAIL_BITS = TAIL
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LEN_W-1:0] n_bits,
  input  logic [22:0]      seed,
  input  logic             ready,
  output logic             valid,
  output logic             out_bit,
  output logic             last,
  output logic             busy
);

  logic [22:0]      lfsr;
  logic [LEN_W-1:0] remaining;   // data bits still to send
  logic [3:0]       tail_left;   // zero bits still to send

  assign valid   = busy;
  assign out_bit = (remaining != '0) ? lfsr[22] : 1'b0;
  assign last    = busy && (remaining == '0) && (tail_left == 4'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr      <= 23'd1;
      remaining <= '0;
      tail_left <= '0;
      busy      <= 1'b0;
    end else if (start) begin
      lfsr      <= (seed == '0) ? 23'd1 : seed;
      remaining <= n_bits;
      tail_left <= 4'(TAIL_BITS);
      busy      <= (n_bits != '0) || (TAIL_BITS != 0);
    end else if (busy && ready) begin
      if (remaining != '0) begin
        remaining <= remaining - 1'b1;
        lfsr      <= {lfsr[21:0], lfsr[22] ^ lfsr[17]};
        if (remaining == LEN_W'(1) && TAIL_BITS == 0) busy <= 1'b0;
      end else begin
        tail_left <= tail_left - 1'b1;
        if (tail_left == 4'd1) busy <= 1'b0;
      end
    end
  end

endmodule
