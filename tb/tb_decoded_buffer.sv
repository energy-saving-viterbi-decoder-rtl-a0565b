// Test bench for decoded_buffer: random writes (including rewrites of the
// same slot, as after a wind-back) and reads against an array model.
//
// The expected values are computed independently of the design; the code, the
// tie rules and the switching settings they assume are those of the source
// design, and the stimulus, its sizes and the random error patterns are this
// test bench's own choices.
module tb_decoded_buffer;
  import vit_pkg::*;

  localparam int D = MAX_SLOTS;
  logic clk = 1'b0, we = 1'b0, wbit = 1'b0, wby_sd = 1'b0, rbit, rby_sd;
  logic [LEN_W-1:0] waddr = '0, raddr = '0;
  int checks = 0, failures = 0;
  logic [1:0] model [D];

  decoded_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = LEN_W'(a); wbit = 1'($urandom); wby_sd = 1'($urandom);
      model[a] = {wby_sd, wbit};
    end
    @(negedge clk);
    for (int t = 0; t < 500; t++) begin
      we = 1'($urandom); waddr = LEN_W'($urandom_range(0, D-1));
      wbit = 1'($urandom); wby_sd = 1'($urandom);
      @(negedge clk);
      if (we) model[waddr] = {wby_sd, wbit};
      we = 1'b0;
      raddr = LEN_W'($urandom_range(0, D-1));
      #1;
      checks++;
      if ({rby_sd, rbit} !== model[raddr]) begin
        failures++; $display("FAIL addr %0d", raddr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
