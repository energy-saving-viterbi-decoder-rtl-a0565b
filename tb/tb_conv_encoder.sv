// Test bench for conv_encoder. The reference encodes with the octal
// generator masks 171 and 133 applied to a 7-bit window of the data history
// (current bit as the MSB), a formulation independent of the RTL's tap list.
// It also checks the worked example of a short message and the one-cycle
// output latency.
//
// The expected values are computed independently of the design; the code, the
// tie rules and the switching settings they assume are those of the source
// design, and the stimulus, its sizes and the random error patterns are this
// test bench's own choices.
module tb_conv_encoder;
  import vit_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0, in_bit = 1'b0;
  logic out_valid;
  sym_t out_sym;
  state_t enc_state;
  int checks = 0, failures = 0;

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] ref_enc(logic [6:0] win);  // {lower, upper}
    return {^(win & 7'o171), ^(win & 7'o133)};
  endfunction


  logic [6:0] hist;
  logic [7:0] msg = 8'b1110_1010;
  logic [15:0] tx_exp = 16'b11_01_10_10_11_00_10_11;   // lower, upper per slot
  logic [15:0] tx_got;
  logic bits [400];
  logic gaps [400];

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // short message: expected line sequence
    for (int i = 0; i < 8; i++) begin
      in_valid <= 1'b1; in_bit <= msg[7-i];
      @(posedge clk); #1;
      tx_got[15-2*i] = out_sym.lower;
      tx_got[14-2*i] = out_sym.upper;
    end
    in_valid <= 1'b0;
    checks++;
    if (tx_got !== tx_exp) begin
      failures++; $display("FAIL example: got %b exp %b", tx_got, tx_exp);
    end
    // no new symbol without in_valid
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid without input"); end
    // clear returns to the zero state
    clear <= 1'b1; @(posedge clk); #1; clear <= 1'b0;
    checks++;
    if (enc_state != '0) begin failures++; $display("FAIL clear"); end
    // random data against the generator-mask reference
    hist = '0;
    for (int i = 0; i < 400; i++) begin
      bits[i] = 1'($urandom);
      gaps[i] = ($urandom_range(0, 3) == 0);
    end
    for (int i = 0; i < 400; i++) begin
      logic [1:0] exp_lu;
      hist = {bits[i], hist[6:1]};
      @(negedge clk);
      in_valid = 1'b1; in_bit = bits[i];
      @(negedge clk);
      in_valid = 1'b0;
      exp_lu = ref_enc(hist);
      checks++;
      if (!out_valid || out_sym.lower !== exp_lu[1] || out_sym.upper !== exp_lu[0]) begin
        failures++;
        $display("FAIL enc: i=%0d win %b got v=%0b L=%0b U=%0b exp L=%0b U=%0b",
                 i, hist, out_valid, out_sym.lower, out_sym.upper, exp_lu[1], exp_lu[0]);
      end
      if (gaps[i]) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
