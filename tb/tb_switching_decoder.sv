// Test bench for switching_decoder (the whole receiver).
//
// Packets of 1000 data bits plus the six zero tail bits are encoded by a
// reference encoder (generator masks 171/133) and passed through a
// bit-error channel model that places isolated error events: one inverted
// bit, both bits of one slot inverted (which the Simple Decoder only notices
// a slot later), or two errors a few slots apart. Events are far enough
// apart for a K=7 hard-decision Viterbi decoder to correct them, so every
// decoded bit must equal the data. Symbols arrive at a random rate, so both
// decoders have to stall at times.
//
// Checked per packet: every bit, `done`, the per-bit decoder flag against
// the bit counts, sd_bits + vd_bits = packet length. An error-free packet
// must be decoded by the Simple Decoder up to the last TB_DEPTH slots.
// Across the run each mechanism must occur at least once: hand-over on a
// mismatch, full 7-slot wind-back, shorter wind-back, switch back, forced
// hand-over at the packet end, Simple Decoder stall, Viterbi stall.
//
// The expected values are computed independently of the design; the code, the
// tie rules and the switching settings they assume are those of the source
// design, and the stimulus, its sizes and the random error patterns are this
// test bench's own choices.
module tb_switching_decoder;
  import vit_pkg::*;

  localparam int NB = 1006;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, rx_valid = 1'b0;
  logic [LEN_W-1:0] pkt_len = LEN_W'(NB), rd_addr = '0;
  sym_t rx_sym = '0;
  logic rd_bit, rd_by_sd, done, vd_on, sd_on, sd_stall, vd_stall, rx_overflow;
  sw_stats_t stats;
  int checks = 0, failures = 0;

  logic data [NB];
  sym_t line [NB];

  int n_mismatch = 0, n_full = 0, n_short = 0, n_back = 0, n_end = 0;
  int n_sd_stall = 0, n_vd_stall = 0;

  switching_decoder dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (sd_stall) n_sd_stall <= n_sd_stall + 1;
    if (vd_stall) n_vd_stall <= n_vd_stall + 1;
  end

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

  task automatic make_packet(input int gmin, input int gmax, input int n_ev);
    state_t s;
    int pos;
    s = '0;
    for (int i = 0; i < NB; i++) begin
      data[i] = (i >= NB - TAIL) ? 1'b0 : 1'($urandom);
      line[i].lower = ^({data[i], s} & 7'o171);
      line[i].upper = ^({data[i], s} & 7'o133);
      s = {data[i], s[5:1]};
    end
    pos = $urandom_range(5, 60);
    for (int e = 0; e < n_ev && pos < NB - 12; e++) begin
      case ($urandom_range(0, 2))
        0: line[pos].lower = ~line[pos].lower;
        1: begin line[pos].lower = ~line[pos].lower; line[pos].upper = ~line[pos].upper; end
        default: begin
          line[pos].upper = ~line[pos].upper;
          line[pos + $urandom_range(2, 5)].lower ^= 1'b1;
        end
      endcase
      pos += $urandom_range(gmin, gmax);
    end
  endtask

  task automatic run_packet(input int rate, input logic clean);
    int sent, cyc, n_sd_flag;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    sent = 0; cyc = 0;
    while (!done && cyc < 2000000) begin
      rx_valid = (sent < NB) && ($urandom_range(0, 99) < rate);
      rx_sym = line[sent < NB ? sent : 0];
      @(negedge clk);
      if (rx_valid) sent++;
      rx_valid = 1'b0;
      cyc++;
    end
    chk(done, "packet done");
    n_sd_flag = 0;
    for (int i = 0; i < NB; i++) begin
      rd_addr = LEN_W'(i);
      #1;
      checks++;
      if (rd_bit !== data[i]) begin
        failures++; $display("FAIL slot %0d decoded %0b exp %0b (by sd %0b)", i, rd_bit, data[i], rd_by_sd);
      end
      if (rd_by_sd) n_sd_flag++;
    end
    chk(int'(stats.sd_bits) + int'(stats.vd_bits) == NB, "bit counts add up");
    chk(int'(stats.sd_bits) == n_sd_flag, "decoder flags match the count");
    chk(!rx_overflow, "no overflow");
    if (clean)
      chk(int'(stats.sd_bits) == NB - TB_DEPTH && int'(stats.vd_calls) == 1,
          $sformatf("clean packet: sd_bits %0d vd_calls %0d", stats.sd_bits, stats.vd_calls));
    n_end      += int'(stats.end_switches);
    n_mismatch += int'(stats.vd_calls) - int'(stats.end_switches);
    n_full     += int'(stats.full_rewinds);
    n_short    += int'(stats.vd_calls) - int'(stats.full_rewinds);
    n_back     += int'(stats.sd_calls) - 1;
    $display("packet: sd runs %0d vd runs %0d sd bits %0d vd bits %0d", stats.sd_calls,
             stats.vd_calls, stats.sd_bits, stats.vd_bits);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    make_packet(0, 0, 0);
    run_packet(100, 1'b1);
    make_packet(16, 200, 1000);
    run_packet(100, 1'b0);
    make_packet(40, 120, 1000);
    run_packet(60, 1'b0);
    make_packet(16, 60, 1000);
    run_packet(30, 1'b0);
    chk(n_mismatch > 0, "hand-over on mismatch seen");
    chk(n_full > 0, "full wind-back seen");
    chk(n_short > 0, "short wind-back seen");
    chk(n_back > 0, "switch back seen");
    chk(n_end > 0 && n_end <= 4, "end-of-packet hand-over seen, at most once per packet");
    chk(n_sd_stall > 0 && n_vd_stall > 0, "both decoders stalled");
    $display("mechanisms: mismatch %0d full %0d short %0d back %0d end %0d sd_stall %0d vd_stall %0d",
             n_mismatch, n_full, n_short, n_back, n_end, n_sd_stall, n_vd_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
