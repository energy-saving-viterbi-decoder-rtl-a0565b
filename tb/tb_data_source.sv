// Test bench for data_source: checks the number of data bits, the six zero
// tail bits, `last`, back-pressure through `ready`, and the random bits
// against an independent LFSR model (Fibonacci x^23 + x^18 + 1, output taken
// from the oldest stage).
//
// The expected values are computed independently of the design; the code, the
// tie rules and the switching settings they assume are those of the source
// design, and the stimulus, its sizes and the random error patterns are this
// test bench's own choices.
module tb_data_source;
  import vit_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, ready = 1'b0;
  logic [LEN_W-1:0] n_bits = '0;
  logic [22:0] seed = '0;
  logic valid, out_bit, last, busy;
  int checks = 0, failures = 0;

  data_source dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_packet(input int nb, input logic [22:0] sd);
    logic [22:0] model;
    int got, cycles;
    model = (sd == 0) ? 23'd1 : sd;
    @(negedge clk);
    start = 1'b1; n_bits = LEN_W'(nb); seed = sd;
    @(negedge clk);
    start = 1'b0;
    got = 0; cycles = 0;
    while (busy && cycles < 10*(nb+10)) begin
      ready = ($urandom_range(0, 2) != 0);
      #1;
      if (valid && ready) begin
        logic exp_bit;
        exp_bit = (got < nb) ? model[22] : 1'b0;
        checks++;
        if (out_bit !== exp_bit || last !== (got == nb + TAIL - 1)) begin
          failures++;
          $display("FAIL nb=%0d bit %0d got %0b last %0b exp %0b", nb, got, out_bit, last, exp_bit);
        end
        if (got < nb) model = {model[21:0], model[22] ^ model[17]};
        got++;
      end
      @(negedge clk);
      cycles++;
    end
    ready = 1'b0;
    checks++;
    if (got != nb + TAIL || busy) begin
      failures++; $display("FAIL nb=%0d emitted %0d bits", nb, got);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_packet(40, 23'h5a5a5);
    run_packet(1, 23'h1);
    run_packet(0, 23'h0);
    run_packet(1000, 23'h7fffff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
