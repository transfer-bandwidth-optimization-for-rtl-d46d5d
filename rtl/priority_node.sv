// priority_node: one stage of the distributed priority counter.
//
// Every node of the selection tree holds one flip-flop. The root toggles at
// each laser period; a node at depth d toggles when every ancestor's bit is
// 1, which makes the bits along any root-to-leaf path a binary counter
// (root = least significant bit). carry_o = carry_i & p is passed to both
// children. As all nodes of one depth hold the same value, every pixel sees
// every priority pattern once every 2^(log2 N) laser periods, so no pixel is
// favoured over a run of periods.
//
// Interface: clk (laser clock), rst_n (asynchronous, active low, clears p),
// carry_i (from the parent, tie to 1 at the root), p (priority bit, 0 = left
// preferred), carry_o. Timing: p changes at each rising clock edge where
// carry_i is high. The document gives a flip-flop per node forming a
// distributed counter synchronous to the laser; the carry chain is this
// design's own.
module priority_node (
  input  logic clk,
  input  logic rst_n,
  input  logic carry_i,
  output logic p,
  output logic carry_o
);

  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       p <= 1'b0;
    else if (carry_i) p <= ~p;
  end

  assign carry_o = carry_i & p;

endmodule
