// Test bench: forced switching on an error-free channel, switching_decoder
// with FORCE_EVERY = 7.
//
// The Simple Decoder is made to hand over after every seven bits it decodes,
// as if it had seen an error. On an error-free channel every hand-over must
// then lose nothing: the Viterbi decoder restarts seven slots back from the
// Simple Decoder's recorded state, switches back after its quiet slots with
// the right state, and the Simple Decoder resumes. Packets: one of 10,000
// data bits and two of 1,000, each plus the zero tail, encoded by a
// reference encoder (generator masks 171/133) from state 0 and sent at a
// random symbol rate.
//
// Checked per packet: every decoded bit; `done`; bit counts adding up to the
// packet length; and the number of Viterbi runs. With hand-overs forced every
// 7 slots and a switch back 1 + 21 slots after each restart, the Viterbi
// decoder must start once per 22 slots until the end guards take over:
// between (len - 41) / 22 and (len - 29) / 22 + 2 runs.
//
// The expected values are computed independently of the design; the code and
// the switching settings they assume are those of the source design, and the
// packet sizes and symbol rates are this test bench's own choices.
module tb_forced_switching;
  import vit_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, rx_valid = 1'b0;
  logic [LEN_W-1:0] pkt_len = '0, rd_addr = '0;
  sym_t rx_sym = '0;
  logic rd_bit, rd_by_sd, done, vd_on, sd_on, sd_stall, vd_stall, rx_overflow;
  sw_stats_t stats;
  int checks = 0, failures = 0;

  switching_decoder #(.FORCE_EVERY(7)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  logic data [MAX_SLOTS];
  sym_t code [MAX_SLOTS];

  task automatic packet(input int nbits, input int rate);
    int nb, sent, cyc, errs;
    logic [5:0] st;
    nb = nbits + TAIL;
    st = '0;
    for (int i = 0; i < nb; i++) begin
      data[i] = (i < nbits) ? 1'($urandom) : 1'b0;
      code[i].lower = ^({data[i], st} & 7'o171);
      code[i].upper = ^({data[i], st} & 7'o133);
      st = {data[i], st[5:1]};
    end
    @(negedge clk);
    start = 1'b1; pkt_len = LEN_W'(nb);
    @(negedge clk);
    start = 1'b0;
    sent = 0; cyc = 0;
    while (!done && cyc < 2000000) begin
      rx_valid = sent < nb && $urandom_range(0, 99) < rate;
      rx_sym   = code[sent < nb ? sent : 0];
      @(negedge clk);
      if (rx_valid) sent++;
      cyc++;
    end
    rx_valid = 1'b0;
    chk(done, $sformatf("packet of %0d slots done", nb));
    chk(int'(stats.sd_bits) + int'(stats.vd_bits) == nb, "bit counts add up");
    errs = 0;
    for (int i = 0; i < nb; i++) begin
      rd_addr = LEN_W'(i);
      #1;
      checks++;
      if (rd_bit !== data[i]) begin
        failures++; errs++;
        if (errs < 10) $display("FAIL slot %0d decoded %0b sent %0b", i, rd_bit, data[i]);
      end
    end
    chk(int'(stats.vd_calls) >= (nb - 41) / 22 && int'(stats.vd_calls) <= (nb - 29) / 22 + 2,
        $sformatf("%0d Viterbi runs for %0d slots", stats.vd_calls, nb));
    chk(int'(stats.full_rewinds) + 1 >= int'(stats.vd_calls), "forced hand-overs wind back the full seven slots");
    $display("packet %0d slots: %0d cycles, Viterbi runs %0d, full wind-backs %0d, bits by SD %0d, by VD %0d",
             nb, cyc, stats.vd_calls, stats.full_rewinds, stats.sd_bits, stats.vd_bits);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    packet(DATA_BITS, 100);
    packet(1000, 60);
    packet(1000, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
