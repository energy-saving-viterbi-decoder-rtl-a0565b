// Test bench for simple_decoder.
//  1. The received sequence of the first worked example in the design notes
//     (nine bit errors that keep both branches equal) must give outputs
//     0 1 1 0 1 0 1 0 and never a mismatch.
//  2. Error-free code symbols from a reference encoder (generator masks)
//     must be decoded exactly, with the state history matching the encoder.
//  3. A single inverted bit must raise `mismatch` at once.
//  4. `rewind_state`/`rewind_count` must give the encoder state
//     min(decoded,7) slots back; `load` must restart from the given state.
//
// The expected values are computed independently of the design; the code, the
// tie rules and the switching settings they assume are those of the source
// design, and the stimulus, its sizes and the random error patterns are this
// test bench's own choices.
module tb_simple_decoder;
  import vit_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, accept = 1'b0;
  state_t load_state = '0;
  sym_t sym = '0;
  logic dec_bit, mismatch;
  state_t state, rewind_state;
  logic [2:0] rewind_count;
  int checks = 0, failures = 0;

  simple_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference encoder on a 7-bit window, current data bit as MSB
  function automatic sym_t ref_enc(logic [6:0] win);
    sym_t y;
    y.lower = ^(win & 7'o171);
    y.upper = ^(win & 7'o133);
    return y;
  endfunction

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [15:0] rx_ex = 16'b0011010111010111;
  logic [7:0]  out_ex = 8'b01101010;
  logic [6:0]  win;
  state_t      st;
  state_t      states [$];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // 1. worked example, starting from the zero state
    load = 1'b1; load_state = '0; @(negedge clk); load = 1'b0;
    for (int t = 0; t < 8; t++) begin
      sym.lower = rx_ex[15-2*t];
      sym.upper = rx_ex[14-2*t];
      #1;
      chk(!mismatch && dec_bit == out_ex[7-t], $sformatf("example slot T%0d", t+1));
      accept = 1'b1;
      @(negedge clk);
      accept = 1'b0;
    end
    // 2./4. random error-free data from a random starting state
    for (int run = 0; run < 20; run++) begin
      state_t st0;
      int len;
      st0 = state_t'($urandom);
      len = $urandom_range(0, 30);
      load = 1'b1; load_state = st0; @(negedge clk); load = 1'b0;
      // window holds the encoder flip-flops FF1..FF6 in bits 5..0
      st = st0;
      states.delete();
      states.push_front(st0);
      for (int i = 0; i < len; i++) begin
        logic b;
        b = 1'($urandom);
        win = {b, st};
        sym = ref_enc(win);
        st = win[6:1];
        #1;
        chk(!mismatch && dec_bit == b, $sformatf("clean decode run %0d bit %0d", run, i));
        accept = 1'b1;
        @(negedge clk);
        accept = 1'b0;
        states.push_front(st);
        chk(state == st, "state follows encoder");
      end
      #1;
      begin
        int r;
        r = (len < RETRACE) ? len : RETRACE;
        chk(int'(rewind_count) == r && rewind_state == states[r],
            $sformatf("rewind after %0d bits: count %0d state %0d exp %0d", len,
                      rewind_count, rewind_state, states[r]));
      end
      // 3. single error in one branch of the next symbol
      begin
        logic b;
        sym_t y;
        b = 1'($urandom);
        y = ref_enc({b, st});
        if ($urandom_range(0, 1) == 1) y.lower = ~y.lower; else y.upper = ~y.upper;
        sym = y;
        #1;
        chk(mismatch, "single error detected");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
