// Test bench for acs_array, together with branch_metric_unit and
// global_winner for the normalisation input.
//
// The reference model runs the trellis forward, the way a software decoder
// does: it starts with every next-state metric "infinite", visits every
// present state and both data bits, and keeps a candidate when it is
// smaller, or equal and coming from the higher predecessor. Its metrics are
// unbounded integers; the RTL's normalised metrics must equal them minus
// their minimum, and the RTL's decision bits must equal the model's choices
// for all reachable states. Random start states and random (noisy) symbols.
//
// The expected values are computed independently of the design; the code, the
// tie rules and the switching settings they assume are those of the source
// design, and the stimulus, its sizes and the random error patterns are this
// test bench's own choices.
module tb_acs_array;
  import vit_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, step = 1'b0;
  state_t init_state = '0;
  sym_t rx = '0;
  logic [1:0] bm [4];
  logic [7:0] pm [NSTATES], new_pm [NSTATES], norm;
  logic [NSTATES-1:0] decision;
  state_t win_state;
  int checks = 0, failures = 0;

  branch_metric_unit u_bm (.rx, .bm);
  acs_array dut (.clk, .rst_n, .init, .init_state, .step, .bm, .norm,
                             .pm, .new_pm, .decision);
  global_winner u_gw (.metric(new_pm), .win_state, .min_metric(norm));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int INF = 1 << 30;
  int ref_pm [NSTATES];
  int nxt [NSTATES];
  int dec [NSTATES];

  task automatic ref_step(sym_t r);
    for (int n = 0; n < NSTATES; n++) begin nxt[n] = INF; dec[n] = 0; end
    for (int s = 0; s < NSTATES; s++) begin
      for (int u = 0; u < 2; u++) begin
        int lo, up, d, n, c;
        lo = u ^ ((s >> 5) & 1) ^ ((s >> 4) & 1) ^ ((s >> 3) & 1) ^ (s & 1);
        up = u ^ ((s >> 4) & 1) ^ ((s >> 3) & 1) ^ ((s >> 1) & 1) ^ (s & 1);
        d  = (lo != int'(r.lower)) + (up != int'(r.upper));
        n  = (s >> 1) + 32 * u;
        c  = (ref_pm[s] >= INF) ? INF : ref_pm[s] + d;
        if (c < nxt[n] || (c == nxt[n] && c < INF)) begin
          dec[n] = s & 1;     // s visited in increasing order: later = higher
          nxt[n] = c;
        end
      end
    end
    for (int n = 0; n < NSTATES; n++) ref_pm[n] = nxt[n];
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 6; run++) begin
      init_state = state_t'($urandom);
      init = 1'b1; @(negedge clk); init = 1'b0;
      for (int n = 0; n < NSTATES; n++) ref_pm[n] = (n == int'(init_state)) ? 0 : INF;
      for (int t = 0; t < 120; t++) begin
        int mn;
        rx = sym_t'($urandom);
        #1;
        ref_step(rx);
        mn = INF;
        for (int n = 0; n < NSTATES; n++) if (ref_pm[n] < mn) mn = ref_pm[n];
        // decisions (reachable states) and the growth of the minimum
        for (int n = 0; n < NSTATES; n++) if (ref_pm[n] < INF) begin
          checks++;
          if (int'(decision[n]) != dec[n]) begin
            failures++; $display("FAIL run %0d t %0d state %0d decision", run, t, n);
          end
        end
        step = 1'b1;
        @(negedge clk);
        step = 1'b0;
        for (int n = 0; n < NSTATES; n++) if (ref_pm[n] < INF) begin
          checks++;
          if (int'(pm[n]) != ref_pm[n] - mn) begin
            failures++;
            $display("FAIL run %0d t %0d state %0d pm %0d exp %0d", run, t, n, pm[n], ref_pm[n] - mn);
          end
        end
        for (int n = 0; n < NSTATES; n++) if (ref_pm[n] < INF) ref_pm[n] -= mn;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
