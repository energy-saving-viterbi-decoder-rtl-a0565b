// Test bench for branch_metric_unit: all 16 combinations of received and
// expected symbol against a Hamming distance counted bit by bit.
//
// The expected values are computed independently of the design; the code, the
// tie rules and the switching settings they assume are those of the source
// design, and the stimulus, its sizes and the random error patterns are this
// test bench's own choices.
module tb_branch_metric_unit;
  import vit_pkg::*;

  sym_t       rx;
  logic [1:0] bm [4];
  int checks = 0, failures = 0;

  branch_metric_unit dut (.rx, .bm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      rx = sym_t'(r);
      #1;
      for (int e = 0; e < 4; e++) begin
        int d;
        d = 0;
        if (((r >> 0) & 1) != ((e >> 0) & 1)) d++;
        if (((r >> 1) & 1) != ((e >> 1) & 1)) d++;
        checks++;
        if (int'(bm[e]) != d) begin
          failures++; $display("FAIL rx=%0d e=%0d got %0d exp %0d", r, e, bm[e], d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
