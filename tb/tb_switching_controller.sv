// Test bench for switching_controller with scripted Simple Decoder and
// Viterbi decoder responses. It walks one packet of 200 slots through:
// a stall while no symbol has arrived, Simple Decoder bits, an error with a
// full 7-slot wind-back, a switch back, an error straight after the switch
// back (no wind-back), the forced hand-over near the packet end and the
// final Viterbi run, then checks every hand-over value and the statistics.
//
// The expected values are computed independently of the design; the code, the
// tie rules and the switching settings they assume are those of the source
// design, and the stimulus, its sizes and the random error patterns are this
// test bench's own choices.
module tb_switching_controller;
  import vit_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [LEN_W-1:0] pkt_len = LEN_W'(200), sym_count = '0;
  logic [LEN_W-1:0] sd_pos, vd_start_pos, vd_pkt_len, vd_end_pos = '0, sd_waddr;
  logic sd_load, sd_accept, sd_mismatch = 1'b0, sd_dec_bit = 1'b0;
  logic [2:0] sd_rewind_count = '0;
  state_t sd_load_state, sd_rewind_state = '0, vd_start_state, vd_end_state = '0;
  logic vd_start, vd_finish = 1'b0, vd_switch_back = 1'b0;
  logic sd_we, sd_wbit, vd_on, sd_on, sd_stall, done;
  sw_stats_t stats;
  int checks = 0, failures = 0;

  switching_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic vd_return(input logic sb, input int pos, input state_t s);
    repeat (3) begin
      #1 chk(vd_on && !sd_accept && !vd_start && !sd_we, "Viterbi mode holds");
      @(negedge clk);
    end
    vd_finish = 1'b1; vd_switch_back = sb; vd_end_pos = LEN_W'(pos); vd_end_state = s;
    #1;
    chk(sd_load == sb && (!sb || sd_load_state == s), "switch back loads the Simple Decoder");
    @(negedge clk);
    vd_finish = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    start = 1'b1;
    #1 chk(sd_load && sd_load_state == '0, "packet start loads state 0");
    @(negedge clk);
    start = 1'b0;
    // stall: no symbols yet
    repeat (3) begin
      #1 chk(sd_on && sd_stall && !sd_accept && !sd_we && !vd_start, "stall without symbols");
      @(negedge clk);
    end
    sym_count = LEN_W'(200);
    // clean decoding
    for (int i = 0; i < 10; i++) begin
      sd_dec_bit = 1'($urandom);
      #1 chk(sd_accept && sd_we && int'(sd_waddr) == i && int'(sd_pos) == i && sd_wbit == sd_dec_bit,
             $sformatf("clean slot %0d", i));
      @(negedge clk);
    end
    // error: full wind-back
    sd_mismatch = 1'b1; sd_rewind_count = 3'd7; sd_rewind_state = 6'h2a;
    #1 chk(vd_start && int'(vd_start_pos) == 3 && vd_start_state == 6'h2a && !sd_we &&
           int'(vd_pkt_len) == 200, "error hands over 7 slots back");
    @(negedge clk);
    sd_mismatch = 1'b0;
    vd_return(1'b1, 60, 6'h15);
    #1 chk(sd_on && int'(sd_pos) == 60, "Simple Decoder resumes at 60");
    // error at once: no wind-back
    sd_mismatch = 1'b1; sd_rewind_count = 3'd0; sd_rewind_state = 6'h15;
    #1 chk(vd_start && int'(vd_start_pos) == 60 && vd_start_state == 6'h15, "error right after switch back");
    @(negedge clk);
    sd_mismatch = 1'b0;
    vd_return(1'b1, 150, 6'h01);
    // clean until the end guard: slots 150..171 decoded, hand-over at 172
    for (int i = 150; i < 172; i++) begin
      #1 chk(sd_accept && int'(sd_pos) == i, $sformatf("clean slot %0d", i));
      @(negedge clk);
    end
    sd_rewind_count = 3'd7; sd_rewind_state = 6'h3c;
    #1 chk(vd_start && int'(vd_start_pos) == 165 && vd_start_state == 6'h3c,
           "packet end forces the Viterbi decoder");
    @(negedge clk);
    vd_return(1'b0, 200, 6'h00);
    #1 chk(done && !sd_on && !vd_on, "done after the final Viterbi run");
    chk(int'(stats.sd_calls) == 3 && int'(stats.vd_calls) == 3, "run counts");
    chk(int'(stats.sd_bits) == 18 && int'(stats.vd_bits) == 182,
        $sformatf("bit counts sd %0d vd %0d", stats.sd_bits, stats.vd_bits));
    chk(int'(stats.full_rewinds) == 2 && int'(stats.end_switches) == 1, "wind-back counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
