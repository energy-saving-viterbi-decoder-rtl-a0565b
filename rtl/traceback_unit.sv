// traceback_unit: survivor path traceback and data bit determination
// (Blocks 3 and 4 of the Viterbi decoder).
//
// Started with the global winner and the number `n` of decision columns to
// walk, it visits one trellis column per cycle, newest first. In the state
// it holds, the MSB (FF1) is the data bit that led into that state, so each
// visit yields the decoded bit of one slot (`bit_valid`, `bit_k`, `bit_out`,
// k = 0 for the newest slot). It then moves to the predecessor
// {state[4:0], decision[state]} read from the survivor memory (`back`,
// `col`). After the n-th visit `done` pulses and `oldest_state` is the
// state on the path after the oldest slot walked, which is the state the
// Simple Decoder resumes from on a switch back.
//
// Timing: n cycles per traceback, the first visit in the cycle after
// `start`.
//
// From the source design: traceback from the global winner through the stored
// decisions; the decoded bit is the state's FF1. This design's own choice: a
// full walk of the window after every slot, one column per cycle.
module traceback_unit
  import vit_pkg::*;
#(
  parameter int DEPTH = WIN
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  state_t                   start_state,
  input  logic [$clog2(DEPTH+1)-1:0] n,
  output logic [$clog2(DEPTH)-1:0] back,
  input  logic [NSTATES-1:0]       col,
  output logic                     busy,
  output logic                     bit_valid,
  output logic [$clog2(DEPTH)-1:0] bit_k,
  output logic                     bit_out,
  output logic                     done,
  output state_t                   oldest_state
);

  localparam int KW = $clog2(DEPTH);
  localparam int NW = $clog2(DEPTH+1);

  state_t                   s;
  logic [KW-1:0]            k;
  logic [NW-1:0]            n_q;
  logic                     last;

  assign back      = k;
  assign bit_valid = busy;
  assign bit_k     = k;
  assign bit_out   = s[5];
  assign last      = busy && (NW'(k) + 1'b1 == n_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s            <= '0;
      k            <= '0;
      n_q          <= '0;
      busy         <= 1'b0;
      done         <= 1'b0;
      oldest_state <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        s    <= start_state;
        k    <= '0;
        n_q  <= n;
        busy <= (n != '0);
        done <= (n == '0);
        if (n == '0) oldest_state <= start_state;
      end else if (busy) begin
        if (last) begin
          busy         <= 1'b0;
          done         <= 1'b1;
          oldest_state <= s;
        end else begin
          s <= {s[4:0], col[s]};
          k <= k + 1'b1;
        end
      end
    end
  end

endmodule
