// metric_monitor: decides when bit errors have stopped.
//
// Once traceback is running, every trellis slot reports how much the global
// winner's accumulated path metric grew in that slot (`growth`). The monitor
// counts consecutive slots with zero growth and restarts the count at any
// growth. `quiet` is high once the count has reached THRESH, the cue for
// switching back to the Simple Decoder. The count saturates.
//
// Timing: one `update` per slot; `quiet` and `count` are registered.
//
// From the source design: switching back after 21 slots in which the global
// winner's metric did not change (the setting the source design settles on
// after trying 7 and 35). This design's own choice: measuring the change as
// the growth of the normalised minimum.
module metric_monitor #(
  parameter int THRESH = 21,
  parameter int PM_W   = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         update,
  input  logic [PM_W-1:0]              growth,
  output logic [$clog2(THRESH+1)-1:0]  count,
  output logic                         quiet
);

  localparam int CW = $clog2(THRESH+1);

  assign quiet = (count >= CW'(THRESH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (clear) begin
      count <= '0;
    end else if (update) begin
      if (growth != '0)              count <= '0;
      else if (count != CW'(THRESH)) count <= count + 1'b1;
    end
  end

endmodule
