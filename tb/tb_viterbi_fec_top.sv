// End-to-end test bench for viterbi_fec_top at its default sizes.
//
// The transmitter's data source and encoder produce packets; the test bench
// checks every code symbol against a reference encoder (generator masks
// 171/133) applied to the data bits it sees entering the encoder, passes the
// symbols through a bit-error channel model and on into the receiver, and
// compares every decoded bit with the transmitted data.
//
// Packet 1 follows the mixed-condition test of the design: 10000 data bits,
// error free in the first and last third and with frequent isolated error
// events in the middle third. Packets 2-4 are 1000-bit packets with errors
// spread over the whole packet. The transmitter is throttled at random, so
// the receiver stalls for symbols. Each mechanism must occur at least once:
// hand-over on a mismatch, full and short wind-back, switch back, forced
// hand-over near the packet end, Simple Decoder and Viterbi stalls, and an
// error-free stretch decoded by the Simple Decoder.
//
// The expected values are computed independently of the design; the code, the
// tie rules and the switching settings they assume are those of the source
// design, and the stimulus, its sizes and the random error patterns are this
// test bench's own choices.
module tb_viterbi_fec_top;
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

  always #5 clk = ~clk;

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // transmitted data, captured at the encoder input
  logic   data [MAX_SLOTS];
  int     n_data = 0;
  state_t ref_state = '0;
  sym_t   exp_sym;
  logic   exp_pending = 1'b0;
  int     sym_errors = 0;

  // channel: which slots get which error event
  logic [1:0] flip [MAX_SLOTS];
  int     n_sent = 0;
  int     both_on = 0, tot_vd_bits = 0, tot_sd_bits = 0, tot_sd_calls = 0;
  int     vd_cycles = 0, sd_cycles = 0, n_sd_stall = 0, n_vd_stall = 0;

  always @(posedge clk) begin
    if (tx_data_valid) begin
      data[n_data]  <= tx_data_bit;
      n_data        <= n_data + 1;
      exp_sym.lower <= ^({tx_data_bit, ref_state} & 7'o171);
      exp_sym.upper <= ^({tx_data_bit, ref_state} & 7'o133);
      ref_state     <= {tx_data_bit, ref_state[5:1]};
    end
    exp_pending <= tx_data_valid;
    if (rst_n && (exp_pending != tx_valid || (tx_valid && tx_sym != exp_sym))) begin
      sym_errors <= sym_errors + 1;
      if (sym_errors < 3) $display("encoder mismatch at slot %0d: valid %0b exp %0b sym %0d exp %0d", n_sent, tx_valid, exp_pending, tx_sym, exp_sym);
    end
    if (rx_vd_on) vd_cycles <= vd_cycles + 1;
    if (rx_sd_on) sd_cycles <= sd_cycles + 1;
    if (rx_vd_on && rx_sd_on) both_on <= both_on + 1;
    if (rx_sd_stall) n_sd_stall <= n_sd_stall + 1;
    if (rx_vd_stall) n_vd_stall <= n_vd_stall + 1;
  end

  // the channel passes each transmitted symbol on in the same cycle
  always_comb begin
    rx_valid = tx_valid;
    rx_sym   = tx_sym ^ flip[n_sent < MAX_SLOTS ? n_sent : 0];
  end
  always @(posedge clk) if (tx_valid) n_sent <= n_sent + 1;

  function automatic void place_errors(int nb, int lo, int hi, int gmin, int gmax);
    int pos;
    for (int i = 0; i < MAX_SLOTS; i++) if (i < lo || i >= hi) flip[i] = 2'b00;
    pos = lo;
    for (int i = lo; i < hi; i++) flip[i] = 2'b00;
    while (pos < hi && pos < nb - 12) begin
      case ($urandom_range(0, 2))
        0: flip[pos] = 2'b01;
        1: flip[pos] = 2'b11;
        default: begin flip[pos] = 2'b10; flip[pos + $urandom_range(2, 5)] = 2'b01; end
      endcase
      pos += $urandom_range(gmin, gmax);
    end
  endfunction

  int n_mismatch = 0, n_full = 0, n_short = 0, n_back = 0, n_end = 0, max_sd_bits = 0;

  task automatic packet(input int nbits, input int rate, input int lo, input int hi,
                        input int gmin, input int gmax);
    int nb, cyc, errs;
    nb = nbits + TAIL;
    place_errors(nb, lo, hi, gmin, gmax);
    @(negedge clk);
    n_data = 0; n_sent = 0; ref_state = '0;
    rx_start = 1'b1; rx_pkt_len = LEN_W'(nb);
    tx_start = 1'b1; tx_data_bits = LEN_W'(nbits); tx_seed = 23'($urandom);
    @(negedge clk);
    rx_start = 1'b0; tx_start = 1'b0;
    cyc = 0;
    while (!rx_done && cyc < 5000000) begin
      tx_ready = ($urandom_range(0, 99) < rate);
      @(negedge clk);
      cyc++;
    end
    tx_ready = 1'b0;
    chk(rx_done && n_data == nb && n_sent == nb, $sformatf("packet of %0d slots done", nb));
    errs = 0;
    for (int i = 0; i < nb; i++) begin
      rx_rd_addr = LEN_W'(i);
      #1;
      checks++;
      if (rx_rd_bit !== data[i]) begin
        failures++; errs++;
        if (errs < 10) $display("FAIL slot %0d decoded %0b sent %0b", i, rx_rd_bit, data[i]);
      end
    end
    chk(int'(rx_stats.sd_bits) + int'(rx_stats.vd_bits) == nb, "bit counts add up");
    n_end      += int'(rx_stats.end_switches);
    n_mismatch += int'(rx_stats.vd_calls) - int'(rx_stats.end_switches);
    n_full     += int'(rx_stats.full_rewinds);
    n_short    += int'(rx_stats.vd_calls) - int'(rx_stats.full_rewinds);
    n_back     += int'(rx_stats.sd_calls) - 1;
    tot_vd_bits += int'(rx_stats.vd_bits);
    tot_sd_bits += int'(rx_stats.sd_bits);
    tot_sd_calls += int'(rx_stats.sd_calls);
    if (int'(rx_stats.sd_bits) > max_sd_bits) max_sd_bits = int'(rx_stats.sd_bits);
    $display("packet %0d slots: %0d cycles, SD runs %0d, VD runs %0d, bits by SD %0d, by VD %0d",
             nb, cyc, rx_stats.sd_calls, rx_stats.vd_calls, rx_stats.sd_bits, rx_stats.vd_bits);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    packet(DATA_BITS, 90, DATA_BITS/3, 2*DATA_BITS/3, 16, 120);
    chk(int'(rx_stats.sd_bits) > (2*DATA_BITS)/3 - 200, "clean thirds decoded by the Simple Decoder");
    for (int p = 0; p < 3; p++) packet(1000, 40, 0, 1006, 20, 300);
    chk(sym_errors == 0, "encoder output matches reference encoding");
    chk(n_mismatch > 0, "hand-over on mismatch seen");
    chk(n_full > 0, "full wind-back seen");
    chk(n_short > 0, "short wind-back seen");
    chk(n_back > 0, "switch back seen");
    chk(n_end > 0, "forced hand-over near packet end seen");
    chk(n_sd_stall > 0, "Simple Decoder stall seen");
    chk(n_vd_stall > 0, "Viterbi stall seen");
    chk(both_on == 0, "never both decoders on");
    // The Simple Decoder is on one cycle per slot it decodes, plus stalls
    // and up to RETRACE slots per run that the Viterbi decoder redoes.
    chk(sd_cycles <= tot_sd_bits + n_sd_stall + (RETRACE + 1) * tot_sd_calls,
        "Simple Decoder on only while decoding or stalled");
    chk(vd_cycles >= tot_vd_bits, "Viterbi on for at least one cycle per bit it decodes");
    $display("mechanisms: mismatch %0d full %0d short %0d back %0d end %0d sd_stall %0d vd_stall %0d",
             n_mismatch, n_full, n_short, n_back, n_end, n_sd_stall, n_vd_stall);
    $display("cycles with Viterbi on %0d, with Simple Decoder on %0d", vd_cycles, sd_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
