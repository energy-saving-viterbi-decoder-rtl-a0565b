// Test bench for rx_symbol_buffer: fills a small buffer with random symbols,
// reads both ports at random addresses against an array model, checks the
// count, the overflow flag and clear.
//
// The expected values are computed independently of the design; the code, the
// tie rules and the switching settings they assume are those of the source
// design, and the stimulus, its sizes and the random error patterns are this
// test bench's own choices.
module tb_rx_symbol_buffer;
  import vit_pkg::*;

  localparam int D = MAX_SLOTS;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, wr_valid = 1'b0;
  sym_t wr_sym = '0, rd_sym_a, rd_sym_b;
  logic [LEN_W-1:0] count, rd_addr_a = '0, rd_addr_b = '0;
  logic overflow;
  int checks = 0, failures = 0;
  sym_t model [D];

  rx_symbol_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int pkt = 0; pkt < 2; pkt++) begin
      int n;
      clear = 1'b1; @(negedge clk); clear = 1'b0;
      n = 0;
      while (n < D + 3) begin
        wr_valid = ($urandom_range(0, 2) != 0);
        wr_sym = sym_t'($urandom);
        @(negedge clk);
        if (wr_valid) begin
          if (n < D) model[n] = wr_sym;
          n++;
        end
        wr_valid = 1'b0;
        checks++;
        if (int'(count) != ((n < D) ? n : D) || overflow != (n > D)) begin
          failures++; $display("FAIL count %0d overflow %0b after %0d writes", count, overflow, n);
        end
        if (count != 0) begin
          rd_addr_a = LEN_W'($urandom_range(0, int'(count) - 1));
          rd_addr_b = LEN_W'($urandom_range(0, int'(count) - 1));
          #1;
          checks++;
          if (rd_sym_a !== model[rd_addr_a] || rd_sym_b !== model[rd_addr_b]) begin
            failures++; $display("FAIL read a=%0d b=%0d", rd_addr_a, rd_addr_b);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
