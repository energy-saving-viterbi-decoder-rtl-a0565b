// Test bench for global_winner: random and hand-made metric vectors. The
// reference first finds the minimum value and then the first state holding
// it (lowest index wins ties).
//
// The expected values are computed independently of the design; the code, the
// tie rules and the switching settings they assume are those of the source
// design, and the stimulus, its sizes and the random error patterns are this
// test bench's own choices.
module tb_global_winner;
  import vit_pkg::*;

  logic [7:0] metric [NSTATES];
  state_t     win_state;
  logic [7:0] min_metric;
  int checks = 0, failures = 0;

  global_winner dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    int mn, idx;
    #1;
    mn = 256;
    for (int s = 0; s < NSTATES; s++) if (int'(metric[s]) < mn) mn = int'(metric[s]);
    idx = -1;
    for (int s = NSTATES-1; s >= 0; s--) if (int'(metric[s]) == mn) idx = s;
    checks++;
    if (int'(min_metric) != mn || int'(win_state) != idx) begin
      failures++;
      $display("FAIL got state %0d metric %0d exp %0d %0d", win_state, min_metric, idx, mn);
    end
  endtask

  initial begin
    for (int t = 0; t < 300; t++) begin
      int range_hi;
      range_hi = (t % 3 == 0) ? 3 : 255;     // small range forces ties
      for (int s = 0; s < NSTATES; s++) metric[s] = 8'($urandom_range(0, range_hi));
      check_now();
    end
    for (int s = 0; s < NSTATES; s++) metric[s] = 8'hff;
    check_now();
    metric[63] = 8'd0;
    check_now();
    metric[17] = 8'd0;
    check_now();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
