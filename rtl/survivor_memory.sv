// survivor_memory: local-winner history for traceback.
//
// A circular buffer of DEPTH columns, one column of 64 decision bits per
// trellis slot. Writing a column overwrites the oldest, which is the same as
// shifting the whole trellis history one slot to the left. The read port is
// addressed relative to the newest column: `back` = 0 is the column written
// last, `back` = DEPTH-1 the oldest held. `clear` restarts the buffer (the
// contents need no clearing because the decoder never reads columns it has
// not written since).
//
// Timing: one write per cycle; read is combinational.
//
// From the source design: decision bits kept for a 35-slot window (34
// decision columns between 35 trellis states). This design's own choice: a
// circular buffer instead of shifting the history.
module survivor_memory
  import vit_pkg::*;
#(
  parameter int DEPTH = WIN
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      we,
  input  logic [NSTATES-1:0]        wdata,
  input  logic [$clog2(DEPTH)-1:0]  back,
  output logic [NSTATES-1:0]        rdata
);

  localparam int AW = $clog2(DEPTH);

  logic [NSTATES-1:0] mem [DEPTH];
  logic [AW-1:0]      wptr;     // next column to write
  logic [AW-1:0]      newest;
  logic [AW-1:0]      raddr;

  assign newest = (wptr == '0) ? AW'(DEPTH-1) : wptr - 1'b1;
  assign raddr  = (back > newest) ? AW'(DEPTH) + newest - back : newest - back;
  assign rdata  = mem[raddr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
    end else if (clear) begin
      wptr <= '0;
    end else if (we) begin
      wptr <= (wptr == AW'(DEPTH-1)) ? '0 : wptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we && !clear) mem[wptr] <= wdata;
  end

endmodule
