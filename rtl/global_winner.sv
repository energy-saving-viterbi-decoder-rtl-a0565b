// global_winner: finds the trellis state with the least accumulated path
// metric, from which traceback starts.
//
// Linear comparison over all states; on equal metrics the lowest-numbered
// state wins (a tie rule chosen here). `min_metric` is the winning value.
// Purely combinational.
//
// From the source design: traceback starts at the state with the least
// metric. This design's own choices: the lowest index wins ties, and the
// search is a plain linear comparison.
module global_winner
  import vit_pkg::*;
#(
  parameter int PM_W = 8
) (
  input  logic [PM_W-1:0] metric [NSTATES],
  output state_t          win_state,
  output logic [PM_W-1:0] min_metric
);

  always_comb begin
    win_state  = '0;
    min_metric = metric[0];
    for (int s = 1; s < NSTATES; s++) begin
      if (metric[s] < min_metric) begin
        min_metric = metric[s];
        win_state  = state_t'(s);
      end
    end
  end

endmodule
