// branch_metric_unit: hard-decision branch metrics (Block 1 of the Viterbi
// decoder).
//
// A branch of the K=7 trellis expects one of only four code symbols, so the
// unit computes the Hamming distance (0, 1 or 2) from the received symbol to
// each of them once per slot and the ACS units select the one their branch
// expects. bm[e] is the distance to the symbol whose packed sym_t value is e
// (bit 1 = upper, bit 0 = lower). Purely combinational.
//
// From the source design: hard-decision Hamming branch metrics. This design's
// own choice: computing only the four distinct metrics once per slot.
module branch_metric_unit
  import vit_pkg::*;
(
  input  sym_t       rx,
  output logic [1:0] bm [4]
);

  always_comb begin
    for (int e = 0; e < 4; e++) begin
      bm[e] = {1'b0, rx.lower ^ e[0]} + {1'b0, rx.upper ^ e[1]};
    end
  end

endmodule
