// Test bench for traceback_unit with a model survivor memory in the test
// bench. Random decision columns; the expected path is computed by walking
// predecessors (state*2 mod 64 + decision) from the start state, and every
// emitted bit must be the MSB of the path state of its column. Checks
// `oldest_state`, the n-cycle duration, and n = 1.
//
// The expected values are computed independently of the design; the code, the
// tie rules and the switching settings they assume are those of the source
// design, and the stimulus, its sizes and the random error patterns are this
// test bench's own choices.
module tb_traceback_unit;
  import vit_pkg::*;

  localparam int D = WIN;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  state_t start_state = '0, oldest_state;
  logic [5:0] n = '0;
  logic [5:0] back, bit_k;
  logic [63:0] col;
  logic busy, bit_valid, bit_out, done;
  int checks = 0, failures = 0;
  logic [63:0] cols [D];     // cols[0] = newest

  traceback_unit dut (.*);

  assign col = cols[back];

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 60; run++) begin
      int nn, s, cyc, seen;
      int path [D];
      for (int c = 0; c < D; c++) cols[c] = {$urandom, $urandom};
      nn = (run % 5 == 0) ? 1 : $urandom_range(1, D);
      if (run % 7 == 0) nn = D;
      s = $urandom_range(0, 63);
      for (int k = 0; k < nn; k++) begin
        path[k] = s;
        s = ((s * 2) % 64) + int'(cols[k][s]);
      end
      start = 1'b1; start_state = state_t'(path[0]); n = 6'(nn);
      @(negedge clk);
      start = 1'b0;
      cyc = 0; seen = 0;
      while (!done && cyc < 100) begin
        if (bit_valid) begin
          checks++;
          if (int'(bit_k) != seen || int'(bit_out) != ((path[seen] >> 5) & 1)) begin
            failures++; $display("FAIL run %0d k %0d bit", run, seen);
          end
          seen++;
        end
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (!done || seen != nn || cyc != nn || int'(oldest_state) != path[nn-1]) begin
        failures++;
        $display("FAIL run %0d n %0d: done %0b seen %0d cycles %0d oldest %0d exp %0d",
                 run, nn, done, seen, cyc, oldest_state, path[nn-1]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
