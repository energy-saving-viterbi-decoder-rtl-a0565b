// Test bench for adapted_viterbi_decoder, with the receive buffer modelled
// in the test bench.
//
// Random packets are encoded from the zero state by a reference encoder
// (generator masks 171/133). Scenarios:
//  A. error-free, started mid-packet from the true state: the run must
//     switch back exactly 1 + SWITCH_BACK slots after its start (the first
//     decode needs no quiet slots, the next 21 have constant metric) with
//     the true encoder state, and decode each slot once, correctly;
//     steady-state cost must be TB_DEPTH+1 cycles per slot.
//  B. started near the packet end: no switch back, the flush decodes the
//     rest of the packet.
//  C. isolated channel errors, decoder restarted at every switch back
//     until the packet is done; every bit must be right and the metric
//     growth must delay the switch back.
//  D. symbols arriving slowly: the decoder must stall and still be right.
//
// The expected values are computed independently of the design; the code, the
// tie rules and the switching settings they assume are those of the source
// design, and the stimulus, its sizes and the random error patterns are this
// test bench's own choices.
module tb_adapted_viterbi_decoder;
  import vit_pkg::*;

  localparam int NB = 600;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  state_t start_state = '0, end_state;
  logic [LEN_W-1:0] start_pos = '0, pkt_len = LEN_W'(NB), rd_addr, sym_count = '0;
  logic [LEN_W-1:0] dec_addr, end_pos;
  sym_t rd_sym;
  logic dec_we, dec_bit, busy, stall, finish, switch_back;
  int checks = 0, failures = 0;

  logic   data [NB];
  sym_t   rxs  [NB];
  state_t st_at [NB+1];     // encoder state before slot i
  int     written [NB];
  int     stalls = 0;
  int     last_we_cycle, cycle = 0, steady_gap_checks = 0;

  adapted_viterbi_decoder dut (.*);

  assign rd_sym = (int'(rd_addr) < NB) ? rxs[rd_addr] : '0;

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (stall) stalls <= stalls + 1;
    if (dec_we) begin
      if (int'(dec_addr) >= NB) begin
        failures++; $display("FAIL write outside packet %0d", dec_addr);
      end else begin
        written[dec_addr] <= written[dec_addr] + 1;
        checks++;
        if (dec_bit !== data[dec_addr]) begin
          failures++; $display("FAIL slot %0d decoded %0b exp %0b", dec_addr, dec_bit, data[dec_addr]);
        end
      end
    end
  end

  task automatic make_packet(input int n_err, input int min_gap);
    state_t s;
    int pos;
    s = '0;
    for (int i = 0; i < NB; i++) begin
      data[i] = (i >= NB - TAIL) ? 1'b0 : 1'($urandom);
      st_at[i] = s;
      rxs[i].lower = ^({data[i], s} & 7'o171);
      rxs[i].upper = ^({data[i], s} & 7'o133);
      s = {data[i], s[5:1]};
      written[i] = 0;
    end
    st_at[NB] = s;
    pos = 20;
    for (int e = 0; e < n_err && pos < NB - 10; e++) begin
      if ($urandom_range(0, 1) == 1) rxs[pos].lower = ~rxs[pos].lower;
      else                           rxs[pos].upper = ~rxs[pos].upper;
      pos += min_gap + $urandom_range(0, 40);
    end
  endtask

  // one run; returns end position and whether it switched back
  task automatic run_vd(input int p, input state_t s0, input int feed_div,
                        output int ep, output logic sb, output state_t es);
    int cyc;
    @(negedge clk);
    start = 1'b1; start_pos = LEN_W'(p); start_state = s0;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!finish && cyc < 200000) begin
      if (feed_div > 1) begin
        if (cyc % feed_div == 0 && int'(sym_count) < NB) sym_count = sym_count + 1'b1;
      end else sym_count = LEN_W'(NB);
      @(negedge clk);
      cyc++;
    end
    ep = int'(end_pos); sb = switch_back; es = end_state;
    checks++;
    if (!finish) begin failures++; $display("FAIL run from %0d never finished", p); end
  endtask

  initial begin
    int ep, t0, t1;
    logic sb;
    state_t es;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // A. error free, mid-packet start
    make_packet(0, 0);
    sym_count = LEN_W'(NB);
    t0 = cycle;
    run_vd(100, st_at[100], 1, ep, sb, es);
    t1 = cycle;
    checks++;
    if (!sb || ep != 100 + 1 + 21 || es != st_at[ep]) begin
      failures++;
      $display("FAIL A: switch_back %0b end_pos %0d exp %0d state %0d exp %0d", sb, ep, 122, es, st_at[ep]);
    end
    // fill 34 slots (1 cycle each), 22 decodes of TB_DEPTH+1 cycles each
    checks++;
    if (t1 - t0 < 34 + 22*(TB_DEPTH+1) || t1 - t0 > 34 + 22*(TB_DEPTH+1) + 4) begin
      failures++; $display("FAIL A: run took %0d cycles, exp about %0d", t1 - t0, 34 + 22*(TB_DEPTH+1));
    end
    for (int i = 0; i < NB; i++) begin
      checks++;
      if (written[i] != ((i >= 100 && i < ep) ? 1 : 0)) begin
        failures++; $display("FAIL A: slot %0d written %0d times", i, written[i]);
      end
    end

    // B. near the end: flush, no switch back
    make_packet(0, 0);
    run_vd(NB - 60, st_at[NB-60], 1, ep, sb, es);
    checks++;
    if (sb || ep != NB) begin failures++; $display("FAIL B: sb %0b end %0d", sb, ep); end
    for (int i = NB - 60; i < NB; i++) begin
      checks++;
      if (written[i] != 1) begin failures++; $display("FAIL B: slot %0d written %0d", i, written[i]); end
    end

    // C. isolated errors, Viterbi only, restarted at every switch back
    for (int pk = 0; pk < 3; pk++) begin
      int p, runs, late;
      state_t s;
      make_packet(12, 30);
      p = 0; s = '0; runs = 0; late = 0;
      do begin
        run_vd(p, s, 1, ep, sb, es);
        runs++;
        if (sb) begin
          checks++;
          if (es != st_at[ep]) begin failures++; $display("FAIL C: state at %0d", ep); end
          if (ep > p + 22) late++;
        end
        p = ep; s = es;
      end while (sb && runs < 200);
      checks++;
      if (sb || ep != NB || late == 0) begin
        failures++; $display("FAIL C: packet %0d ended at %0d, %0d late switch backs", pk, ep, late);
      end
      for (int i = 0; i < NB; i++) begin
        checks++;
        if (written[i] != 1) begin failures++; $display("FAIL C: slot %0d written %0d", i, written[i]); end
      end
    end

    // D. slow symbol arrival
    make_packet(6, 50);
    sym_count = '0;
    begin
      int p, runs;
      state_t s;
      p = 0; s = '0; runs = 0;
      do begin
        run_vd(p, s, 3, ep, sb, es);
        runs++;
        p = ep; s = es;
      end while (sb && runs < 200);
    end
    checks++;
    if (ep != NB || stalls == 0) begin failures++; $display("FAIL D: end %0d stalls %0d", ep, stalls); end
    for (int i = 0; i < NB; i++) begin
      checks++;
      if (written[i] != 1) begin failures++; $display("FAIL D: slot %0d written %0d", i, written[i]); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
