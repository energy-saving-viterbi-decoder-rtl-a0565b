// Test bench for metric_monitor: random growth sequences against a counter
// model; checks that `quiet` rises exactly after THRESH zero-growth updates.
//
// The expected values are computed independently of the design; the code, the
// tie rules and the switching settings they assume are those of the source
// design, and the stimulus, its sizes and the random error patterns are this
// test bench's own choices.
module tb_metric_monitor;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, update = 1'b0;
  logic [7:0] growth = '0;
  logic [4:0] count;
  logic quiet;
  int checks = 0, failures = 0;
  int model;

  metric_monitor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 3000; t++) begin
      logic u, c;
      logic [7:0] g;
      u = ($urandom_range(0, 3) != 0);
      c = ($urandom_range(0, 200) == 0);
      g = ($urandom_range(0, 30) == 0) ? 8'($urandom_range(1, 3)) : 8'd0;
      update <= u; growth <= g; clear <= c;
      @(posedge clk); #1;
      if (c) model = 0;
      else if (u) model = (g != 0) ? 0 : ((model < 21) ? model + 1 : 21);
      checks++;
      if (int'(count) != model || quiet != (model >= 21)) begin
        failures++;
        $display("FAIL t=%0d count %0d quiet %0b exp %0d", t, count, quiet, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
