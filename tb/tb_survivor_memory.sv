// Test bench for survivor_memory: writes random 64-bit columns and reads
// them back relative to the newest, against a queue model, across several
// wraps of the circular buffer and a clear.
//
// The expected values are computed independently of the design; the code, the
// tie rules and the switching settings they assume are those of the source
// design, and the stimulus, its sizes and the random error patterns are this
// test bench's own choices.
module tb_survivor_memory;
  import vit_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, we = 1'b0;
  logic [63:0] wdata = '0, rdata;
  logic [5:0]  back = '0;
  int checks = 0, failures = 0;
  logic [63:0] model [$];

  survivor_memory dut (.*);

  always #100 clk = ~clk;   // long enough for the read sweep between edges

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      if (t == 150) begin
        clear = 1'b1; @(negedge clk); clear = 1'b0;
        model.delete();
      end
      wdata = {$urandom, $urandom};
      we = ($urandom_range(0, 4) != 0);
      @(negedge clk);
      if (we) begin
        model.push_front(wdata);
        if (model.size() > 34) void'(model.pop_back());
      end
      we = 1'b0;
      for (int k = 0; k < model.size(); k++) begin
        back = 6'(k);
        #1;
        checks++;
        if (rdata !== model[k]) begin
          failures++; $display("FAIL t=%0d back=%0d we=%0b got %h exp %h n=%0d", t, k, we, rdata, model[k], model.size());
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
