// adapted_viterbi_decoder: hard-decision traceback Viterbi decoder for the
// K=7 (171,133) code that can be started mid-packet and can hand decoding
// back to the Simple Decoder.
//
// A run is started with a slot position and the encoder state there. That
// state gets path metric 0 and every other state "unreachable", instead of
// the usual state 0. The run goes through three phases:
//  * fill:   one slot per cycle through branch metrics, ACS and survivor
//            memory until WIN = TB_DEPTH-1 decision columns are held;
//  * steady: after each further slot, trace back WIN columns from the global
//            winner and output the bit of the oldest slot (one slot per
//            WIN+1 cycles). From the second decode on, the metric monitor
//            counts slots in which the global winner's metric did not grow;
//            after SWITCH_BACK such slots, and only if more than END_GUARD
//            slots remain, the run ends with `switch_back` and returns the
//            traceback state after the last decoded bit;
//  * flush:  when the packet's last slot has been read, one last traceback
//            from the global winner outputs all remaining bits of the window.
// Decoded bits are written by slot number (`dec_*`).
//
// Interface: symbols are read from the receive buffer at `rd_addr`; a slot
// is available when rd_addr < sym_count, otherwise the decoder stalls.
// `finish` pulses at the end of a run with `end_pos` (next undecoded slot)
// and `end_state`.
//
// From the source design: starting from the Simple Decoder's state, the
// 35-slot traceback, switching back after 21 quiet slots only while more than
// 41 slots remain, and handing the traceback state to the Simple Decoder.
// This design's own choices: the phase sequencing and cycle budget, and a
// single final traceback that flushes the window at the packet end.
module adapted_viterbi_decoder
  import vit_pkg::*;
#(
  parameter int DEPTH       = TB_DEPTH,
  parameter int SWITCH_BACK = 21,
  parameter int END_GUARD   = TB_DEPTH + TAIL,
  parameter int PM_W        = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  state_t           start_state,
  input  logic [LEN_W-1:0] start_pos,
  input  logic [LEN_W-1:0] pkt_len,
  output logic [LEN_W-1:0] rd_addr,
  input  sym_t             rd_sym,
  input  logic [LEN_W-1:0] sym_count,
  output logic             dec_we,
  output logic [LEN_W-1:0] dec_addr,
  output logic             dec_bit,
  output logic             busy,
  output logic             stall,
  output logic             finish,
  output logic             switch_back,
  output logic [LEN_W-1:0] end_pos,
  output state_t           end_state
);

  localparam int NCOL = DEPTH - 1;          // decision columns in the window
  localparam int KW   = $clog2(NCOL);
  localparam int NW   = $clog2(NCOL + 1);

  typedef enum logic [2:0] {V_IDLE, V_FILL, V_TB, V_NEXT, V_FLUSH} vstate_e;

  vstate_e          st;
  logic [LEN_W-1:0] rd, dec_pos, nb;
  logic [NW-1:0]    n;        // undecoded slots held in the window
  logic [NW-1:0]    tb_n;     // columns walked by the current traceback
  logic             steady;   // first decode of the run is done

  // datapath
  logic [1:0]         bm [4];
  logic [PM_W-1:0]    pm [NSTATES];
  logic [PM_W-1:0]    new_pm [NSTATES];
  logic [NSTATES-1:0] decision;
  state_t             win_state;
  logic [PM_W-1:0]    growth;
  logic               acs_init, acs_step, mon_update, quiet;
  logic [$clog2(SWITCH_BACK+1)-1:0] quiet_count;
  logic [KW-1:0]      tb_back, tb_k;
  logic [NSTATES-1:0] tb_col;
  logic               tb_start, tb_busy, tb_valid, tb_bit, tb_done;
  logic [NW-1:0]      tb_n_next;
  state_t             tb_oldest;
  logic               avail, at_end;

  assign rd_addr = rd;
  assign avail   = rd < sym_count;
  assign at_end  = rd == nb;
  assign busy    = st != V_IDLE;
  assign stall   = (st == V_FILL || st == V_NEXT) && !at_end && !avail;

  assign acs_init   = start && st == V_IDLE;
  assign acs_step   = (st == V_FILL || st == V_NEXT) && !at_end && avail;
  assign mon_update = acs_step && st == V_NEXT;

  branch_metric_unit u_bmu (.rx(rd_sym), .bm(bm));

  acs_array #(.PM_W(PM_W)) u_acs (
    .clk, .rst_n, .init(acs_init), .init_state(start_state), .step(acs_step),
    .bm, .norm(growth), .pm, .new_pm, .decision
  );

  global_winner #(.PM_W(PM_W)) u_win (
    .metric(new_pm), .win_state, .min_metric(growth)
  );

  survivor_memory #(.DEPTH(NCOL)) u_sm (
    .clk, .rst_n, .clear(acs_init), .we(acs_step), .wdata(decision),
    .back(tb_back), .rdata(tb_col)
  );

  metric_monitor #(.THRESH(SWITCH_BACK), .PM_W(PM_W)) u_mon (
    .clk, .rst_n, .clear(acs_init), .update(mon_update), .growth,
    .count(quiet_count), .quiet
  );

  // A traceback starts right with the ACS step that completes the window
  // (the new column is visible to its first read one cycle later), or, for
  // the flush, as soon as the last slot has been consumed.
  always_comb begin
    tb_start  = 1'b0;
    tb_n_next = n;
    if (acs_step && (st == V_NEXT || NW'(n + 1'b1) == NW'(NCOL))) begin
      tb_start  = 1'b1;
      tb_n_next = n + 1'b1;
    end else if ((st == V_FILL || st == V_NEXT) && at_end && n != '0) begin
      tb_start  = 1'b1;
      tb_n_next = n;
    end
  end

  traceback_unit #(.DEPTH(NCOL)) u_tb (
    .clk, .rst_n, .start(tb_start), .start_state(win_state), .n(tb_n_next),
    .back(tb_back), .col(tb_col), .busy(tb_busy), .bit_valid(tb_valid),
    .bit_k(tb_k), .bit_out(tb_bit), .done(tb_done), .oldest_state(tb_oldest)
  );

  // Steady traceback writes only the oldest bit; the flush writes them all.
  assign dec_addr = rd - LEN_W'(1) - LEN_W'(tb_k);
  assign dec_bit  = tb_bit;
  assign dec_we   = tb_valid && (st == V_FLUSH ||
                                 (st == V_TB && NW'(tb_k) + 1'b1 == tb_n));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= V_IDLE;
      rd          <= '0;
      dec_pos     <= '0;
      nb          <= '0;
      n           <= '0;
      tb_n        <= '0;
      steady      <= 1'b0;
      finish      <= 1'b0;
      switch_back <= 1'b0;
      end_pos     <= '0;
      end_state   <= '0;
    end else begin
      finish <= 1'b0;
      if (tb_start) tb_n <= tb_n_next;
      if (acs_step) begin
        rd <= rd + 1'b1;
        n  <= n + 1'b1;
      end
      unique case (st)
        V_IDLE: if (start) begin
          rd      <= start_pos;
          dec_pos <= start_pos;
          nb      <= pkt_len;
          n       <= '0;
          steady  <= 1'b0;
          st      <= V_FILL;
        end
        V_FILL, V_NEXT: begin
          if (tb_start)
            st <= at_end ? V_FLUSH : V_TB;
          else if (at_end) begin       // nothing left in the window
            finish      <= 1'b1;
            switch_back <= 1'b0;
            end_pos     <= rd;
            end_state   <= win_state;
            st          <= V_IDLE;
          end
        end
        V_TB: if (tb_done) begin
          dec_pos <= dec_pos + 1'b1;
          n       <= n - 1'b1;
          steady  <= 1'b1;
          if (steady && quiet &&
              {1'b0, dec_pos} + 1 + (LEN_W+1)'(END_GUARD) < {1'b0, nb}) begin
            finish      <= 1'b1;
            switch_back <= 1'b1;
            end_pos     <= dec_pos + 1'b1;
            end_state   <= tb_oldest;
            st          <= V_IDLE;
          end else begin
            st <= V_NEXT;
          end
        end
        V_FLUSH: if (tb_done) begin
          finish      <= 1'b1;
          switch_back <= 1'b0;
          end_pos     <= nb;
          end_state   <= tb_oldest;
          n           <= '0;
          st          <= V_IDLE;
        end
        default: st <= V_IDLE;
      endcase
    end
  end

endmodule
