// acs_array: path metric registers and the 64 add-compare-select units
// (Block 2 of the Viterbi decoder).
//
// For every state n the two predecessors are p0 = {n[4:0],0} and
// p1 = {n[4:0],1}; the data bit of the branch is n[5]. Each candidate is the
// predecessor's path metric plus the branch metric of the code symbol that
// branch expects. The smaller candidate survives; on a tie the higher
// predecessor p1 is taken. The decision bit (1 = p1) is the local winner
// recorded for traceback.
//
// Metrics are kept normalised: when `step` registers the new metrics, `norm`
// (the smallest new metric, supplied by the global winner search on
// `new_pm`) is subtracted, so the stored minimum is always 0 and the smallest
// value of `new_pm` is exactly the growth of the global winner's metric in
// this slot. Additions saturate at 2^PM_W-1, which stands for "unreachable".
// `init` loads 0 into `init_state` and the unreachable value everywhere
// else, so decoding starts from a known state.
//
// Timing: `new_pm` and `decision` are combinational from the registers and
// `bm`; one trellis slot per `step` cycle.
//
// From the source design: add-compare-select per state, one decision bit per
// state, ties to the higher predecessor, and an 'infinite' start metric for
// all states but the start state. This design's own choices: 8-bit saturating
// metrics normalised every slot, and treating unreachable candidates as
// ordinary large values.
module acs_array
  import vit_pkg::*;
#(
  parameter int PM_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  state_t          init_state,
  input  logic            step,
  input  logic [1:0]      bm [4],
  input  logic [PM_W-1:0] norm,
  output logic [PM_W-1:0] pm [NSTATES],
  output logic [PM_W-1:0] new_pm [NSTATES],
  output logic [NSTATES-1:0] decision
);

  localparam logic [PM_W-1:0] PM_INF = '1;

  function automatic logic [PM_W-1:0] sat_add(logic [PM_W-1:0] a, logic [1:0] b);
    logic [PM_W:0] t;
    t = {1'b0, a} + {{(PM_W-1){1'b0}}, b};
    return t[PM_W] ? PM_INF : t[PM_W-1:0];
  endfunction

  always_comb begin
    for (int n = 0; n < NSTATES; n++) begin
      state_t          ns, p0, p1;
      logic [PM_W-1:0] c0, c1;
      ns = state_t'(n);
      p0 = {ns[4:0], 1'b0};
      p1 = {ns[4:0], 1'b1};
      c0 = sat_add(pm[p0], bm[enc_out(p0, ns[5])]);
      c1 = sat_add(pm[p1], bm[enc_out(p1, ns[5])]);
      decision[n] = (c1 <= c0);
      new_pm[n]   = (c1 <= c0) ? c1 : c0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NSTATES; n++) pm[n] <= (n == 0) ? '0 : PM_INF;
    end else if (init) begin
      for (int n = 0; n < NSTATES; n++) pm[n] <= (state_t'(n) == init_state) ? '0 : PM_INF;
    end else if (step) begin
      for (int n = 0; n < NSTATES; n++) pm[n] <= new_pm[n] - norm;
    end
  end

endmodule
