// extraction_logic: the 2*M timing trees that carry delayed edges from the
// pixel demuxes to the external converters.
//
// Instead of N*M wires, each converter is reached through two shared binary
// mux trees of log2(N) levels (L and R, used in alternate laser periods so
// a tree is busy for Tim_path plus Conversion while the other one is being
// set up). Nodes are numbered as a heap like the selection tree (node 1 at
// the converter end, pixel j at leaf N+j), and node i takes its select bits
// from the selection node of the same number.
//
// Interface: clk, rst_n, tree_phase, dir[1..N-1][M] (from selection_logic),
// pin[N][2][M] (pixel demux outputs), conv_l[M], conv_r[M] (the two tree
// outputs per converter). Timing: combinational from pin to the outputs;
// select bits registered at the end of each Selection period.
module extraction_logic #(
  parameter int unsigned N = router_pkg::N_PIX_DEF,
  parameter int unsigned M = router_pkg::M_CONV_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tree_phase,
  input  logic [M-1:0]       dir  [1:N-1],
  input  logic [1:0][M-1:0]  pin  [N],
  output logic [M-1:0]       conv_l,
  output logic [M-1:0]       conv_r
);

  timeunit 1ps; timeprecision 1ps;

  logic [1:0][M-1:0] node [1:2*N-1];

  for (genvar j = 0; j < N; j++) begin : g_leaf
    assign node[N+j] = pin[j];
  end

  for (genvar i = 1; i < N; i++) begin : g_node
    extraction_node #(.M(M)) u_node (
      .clk, .rst_n, .tree_phase,
      .dir (dir[i]),
      .in_l(node[2*i]),
      .in_r(node[2*i+1]),
      .out (node[i])
    );
  end

  assign conv_l = node[1][0];
  assign conv_r = node[1][1];

endmodule
