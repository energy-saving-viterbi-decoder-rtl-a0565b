// Test bench: bit-error sweep of the whole chain, viterbi_fec_top at its
// default parameters.
//
// Packets of 10,000 random data bits plus the zero tail go from the
// transmitter through a binary symmetric channel (each code bit inverted
// independently with probability p, the hard-decision view of a noisy
// channel) into the switching receiver, at line rate. For every p the
// received symbols are also decoded by a reference model: a plain
// traceback Viterbi decoder of the same depth that never switches off
// (start in state 0, 35-state traceback from the least-metric state after
// every slot, higher predecessor on ACS ties, lowest state on global ties,
// final flush from the least-metric state).
//
// Reported per p: decoded bit errors of the switching receiver and of the
// reference, bits on which the two differ, the share of bits the Simple
// Decoder produced, the number of hand-overs and the cycles the packet took.
// The same symbols also go to two more switching receivers with the other
// switch-back settings the scheme was tried with, 7 and 35 quiet slots.
//
// Checked: every packet finishes and accounts for all its bits; with p = 0
// every bit is right and only the packet end goes to the Viterbi decoder;
// the Simple Decoder's share does not rise as p rises; over the whole sweep
// the switching receiver makes no more than 5% more bit errors than the
// reference (plus 5 bits), i.e. switching does not noticeably cost error
// correction, and the same for the 35-slot setting; and, summed over the
// rates up to 1%, the Simple Decoder's share orders as 35 <= 21 <= 7 slots.
//
// The expected values are computed independently of the design; the code,
// the tie rules and the switching settings they assume are those of the
// source design, and the channel model, the error rates and the sizes are
// this test bench's own choices.
module tb_channel_sweep;
  import vit_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tx_start = 1'b0, tx_ready = 1'b0;
  logic [LEN_W-1:0] tx_data_bits = '0;
  logic [22:0] tx_seed = '0;
  logic tx_valid, tx_data_valid, tx_data_bit, tx_busy;
  sym_t tx_sym;
  logic rx_start = 1'b0, rx_valid;
  logic [LEN_W-1:0] rx_pkt_len = '0, rx_rd_addr = '0;
  sym_t rx_sym;
  logic rx_rd_bit, rx_rd_by_sd, rx_done, rx_vd_on, rx_sd_on, rx_sd_stall, rx_vd_stall, rx_overflow;
  sw_stats_t rx_stats;
  int checks = 0, failures = 0;

  viterbi_fec_top dut (.*);

  // the other two switch-back settings the scheme was evaluated with, on the
  // same received symbols
  localparam int NS = 2;
  localparam int SB [NS] = '{7, 35};
  logic      alt_bit [NS], alt_done [NS];
  sw_stats_t alt_stats [NS];
  for (genvar g = 0; g < NS; g++) begin : g_alt
    logic by_sd, von, son, sst, vst, ovf;
    switching_decoder #(.SWITCH_BACK(SB[g])) u_alt (
      .clk, .rst_n, .start(rx_start), .pkt_len(rx_pkt_len), .rx_valid, .rx_sym,
      .rd_addr(rx_rd_addr), .rd_bit(alt_bit[g]), .rd_by_sd(by_sd), .done(alt_done[g]),
      .vd_on(von), .sd_on(son), .sd_stall(sst), .vd_stall(vst), .rx_overflow(ovf),
      .stats(alt_stats[g]));
  end

  always #5 clk = ~clk;

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // data bits at the encoder input and symbols as received
  logic data [MAX_SLOTS];
  sym_t rxd  [MAX_SLOTS];
  logic [1:0] flip [MAX_SLOTS];
  int   n_data = 0, n_sent = 0;

  always @(posedge clk) begin
    if (tx_data_valid) begin data[n_data] <= tx_data_bit; n_data <= n_data + 1; end
    if (tx_valid) begin rxd[n_sent] <= rx_sym; n_sent <= n_sent + 1; end
  end

  always_comb begin
    rx_valid = tx_valid;
    rx_sym   = tx_sym ^ flip[n_sent < MAX_SLOTS ? n_sent : 0];
  end

  // ---- reference: plain traceback Viterbi decoder, never switched off
  logic [NSTATES-1:0] dec [MAX_SLOTS];
  logic ref_bit [MAX_SLOTS];

  function automatic int hd(sym_t a, sym_t b);
    return int'(a.lower ^ b.lower) + int'(a.upper ^ b.upper);
  endfunction

  function automatic int argmin(int m [NSTATES]);
    int w = 0;
    for (int s = 1; s < NSTATES; s++) if (m[s] < m[w]) w = s;
    return w;
  endfunction

  // walk back from state `st` after slot `t` over `n` slots; writes the bit
  // of the oldest slot only, or of every slot walked when `all` is set
  function automatic void walk(int t, int st, int n, logic all);
    int s = st;
    for (int k = 0; k < n; k++) begin
      if (all || k == n - 1) ref_bit[t - k] = s[5];
      s = ((s << 1) & 6'h3f) | int'(dec[t - k][s]);
    end
  endfunction

  function automatic void reference(int nb);
    int pm [NSTATES], nm [NSTATES];
    localparam int BIG = 1 << 28;
    for (int s = 0; s < NSTATES; s++) pm[s] = (s == 0) ? 0 : BIG;
    for (int t = 0; t < nb; t++) begin
      for (int n = 0; n < NSTATES; n++) begin
        int p0 = (n << 1) & 6'h3f, p1 = ((n << 1) & 6'h3f) | 1;
        logic u = 1'(n >> 5);
        int c0 = pm[p0] + hd(rxd[t], enc_out(state_t'(p0), u));
        int c1 = pm[p1] + hd(rxd[t], enc_out(state_t'(p1), u));
        dec[t][n] = (c1 <= c0);
        nm[n]     = (c1 <= c0) ? c1 : c0;
      end
      pm = nm;
      if (t >= TB_DEPTH - 2) walk(t, argmin(pm), TB_DEPTH - 1, 1'b0);
    end
    walk(nb - 1, argmin(pm), (nb < TB_DEPTH - 1) ? nb : TB_DEPTH - 1, 1'b1);
  endfunction

  // ---- sweep
  localparam int NP = 7;
  localparam int P_PPM [NP] = '{0, 1000, 5000, 10000, 20000, 40000, 60000};
  int sw_total = 0, ref_total = 0;
  int alt_total [NS] = '{0, 0}, alt_sd [NS] = '{0, 0}, main_sd = 0;
  real prev_share = 101.0;

  task automatic run(input int ppm);
    int nb, cyc, sw_err, ref_err, diff;
    int alt_err [NS] = '{0, 0};
    real share;
    nb = DATA_BITS + TAIL;
    for (int i = 0; i < MAX_SLOTS; i++) begin
      flip[i][0] = ($urandom_range(0, 999999) < ppm);
      flip[i][1] = ($urandom_range(0, 999999) < ppm);
    end
    @(negedge clk);
    n_data = 0; n_sent = 0;
    rx_start = 1'b1; rx_pkt_len = LEN_W'(nb);
    tx_start = 1'b1; tx_data_bits = LEN_W'(DATA_BITS); tx_seed = 23'($urandom);
    @(negedge clk);
    rx_start = 1'b0; tx_start = 1'b0; tx_ready = 1'b1;
    cyc = 0;
    while (!(rx_done && alt_done[0] && alt_done[1]) && cyc < 2000000) begin
      @(negedge clk);
      cyc++;
    end
    tx_ready = 1'b0;
    chk(rx_done && n_sent == nb, $sformatf("p=%0d ppm: packet done", ppm));
    chk(int'(rx_stats.sd_bits) + int'(rx_stats.vd_bits) == nb,
        $sformatf("p=%0d ppm: bit counts add up", ppm));
    reference(nb);
    sw_err = 0; ref_err = 0; diff = 0;
    for (int i = 0; i < DATA_BITS; i++) begin
      rx_rd_addr = LEN_W'(i);
      #1;
      if (rx_rd_bit != data[i]) sw_err++;
      if (ref_bit[i] != data[i]) ref_err++;
      if (rx_rd_bit != ref_bit[i]) diff++;
      for (int g = 0; g < NS; g++) if (alt_bit[g] != data[i]) alt_err[g]++;
    end
    share = 100.0 * real'(rx_stats.sd_bits) / real'(nb);
    if (ppm == 0) begin
      chk(sw_err == 0, "error-free channel decoded exactly");
      chk(int'(rx_stats.vd_calls) == 1, "error-free channel: Viterbi decoder only at the packet end");
    end
    chk(share <= prev_share + 1.0, $sformatf("p=%0d ppm: Simple Decoder share does not rise", ppm));
    prev_share = share;
    sw_total  += sw_err;
    if (ppm <= 10000) main_sd += int'(rx_stats.sd_bits);
    for (int g = 0; g < NS; g++) begin
      alt_total[g] += alt_err[g];
      if (ppm <= 10000) alt_sd[g] += int'(alt_stats[g].sd_bits);
      chk(alt_done[g] && int'(alt_stats[g].sd_bits) + int'(alt_stats[g].vd_bits) == nb,
          $sformatf("p=%0d ppm, switch back after %0d: packet done", ppm, SB[g]));
      $display("   switch back after %0d slots: errors %0d, by Simple Decoder %0.2f%%",
               SB[g], alt_err[g], 100.0 * real'(alt_stats[g].sd_bits) / real'(nb));
    end
    ref_total += ref_err;
    $display("p=%0.4f: errors switching %0d, reference %0d, differing bits %0d, by Simple Decoder %0.2f%%, hand-overs %0d, full wind-backs %0d, cycles %0d",
             real'(ppm) / 1.0e6, sw_err, ref_err, diff, share, rx_stats.vd_calls,
             rx_stats.full_rewinds, cyc);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NP; i++) run(P_PPM[i]);
    chk(sw_total * 100 <= ref_total * 105 + 500, "switching costs no noticeable error correction");
    // waiting longer before switching back leaves fewer bits to the Simple
    // Decoder while errors are sparse (p <= 1%); at higher rates the Viterbi
    // decoder dominates and the order is no longer fixed
    chk(alt_sd[1] <= main_sd && main_sd <= alt_sd[0], "Simple Decoder share: 35 <= 21 <= 7 slots");
    chk(alt_total[1] * 100 <= ref_total * 105 + 500, "35-slot setting costs no noticeable error correction");
    $display("total decoded bit errors: switching %0d, reference %0d", sw_total, ref_total);
    $display("total with switch back after 7 slots %0d, after 35 slots %0d", alt_total[0], alt_total[1]);
    $display("bits by Simple Decoder for p <= 1%%: 7 slots %0d, 21 slots %0d, 35 slots %0d",
             alt_sd[0], main_sd, alt_sd[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
