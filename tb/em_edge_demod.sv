// em_edge_demod: behavioural stand-in for the outside ID checker's
// receiver, used only by testbenches.
//
// The real checker captures the near-field emission with a probe and a
// spectrum analyser and decides each bit from the amplitude at f0 and f1.
// In simulation the ring node is available directly, so this model measures
// the carrier frequency instead: it counts rising edges of rf in each window
// between two rising edges of win_clk (one window per bit when win_clk is
// the ID shift-register clock). At each win_clk edge, count holds the
// number of rf edges seen in the window that just ended, and period_ps the
// last measured rf period in picoseconds (0 before two edges were seen).
module em_edge_demod (
  input  logic        win_clk,
  input  logic        rf,
  output int unsigned count,
  output longint unsigned period_ps
);
  timeunit 1ps;
  timeprecision 1ps;

  int unsigned     edges      = 0;
  int unsigned     edges_mark = 0;
  longint unsigned last_edge  = 0;

  initial begin
    count     = 0;
    period_ps = 0;
  end

  always @(posedge rf) begin
    if (last_edge != 0) period_ps = longint'($time) - last_edge;
    last_edge = longint'($time);
    edges     = edges + 1;
  end

  always @(posedge win_clk) begin
    count      = edges - edges_mark;
    edges_mark = edges;
  end
endmodule
