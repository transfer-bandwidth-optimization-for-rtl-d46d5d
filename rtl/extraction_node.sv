// extraction_node: one node of the timing-extraction trees.
//
// A node serves all 2*M trees (two per converter) at one position of the
// binary tree. For every tree it holds one select bit and passes either its
// left or its right input on towards the converter. The select bits of tree
// t are loaded from dir (the address bit the selection logic produced at the
// same tree position: 1 = right) at the clock edge that ends a Selection
// period whose tree phase is t, and then stay put for the two periods
// (Tim_path, Conversion) in which that tree carries the edge. The other
// tree keeps its bits, which is what lets the two trees work in antiphase
// at half the laser rate.
//
// Interface: clk, rst_n (asynchronous, active low, selects left),
// tree_phase, dir[M], in_l[2][M], in_r[2][M], out[2][M]. Timing: the mux is
// combinational; only the select bits are registered.
module extraction_node #(
  parameter int unsigned M = router_pkg::M_CONV_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tree_phase,
  input  logic [M-1:0]       dir,
  input  logic [1:0][M-1:0]  in_l,
  input  logic [1:0][M-1:0]  in_r,
  output logic [1:0][M-1:0]  out
);

  timeunit 1ps; timeprecision 1ps;

  logic [1:0][M-1:0] sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_q <= '0;
    else        sel_q[tree_phase] <= dir;
  end

  always_comb begin
    for (int t = 0; t < 2; t++) begin
      for (int x = 0; x < M; x++) begin
        out[t][x] = sel_q[t][x] ? in_r[t][x] : in_l[t][x];
      end
    end
  end

endmodule
