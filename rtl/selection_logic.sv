// selection_logic: shared tree that picks which triggered pixels reach the
// M time converters in one laser period.
//
// The tree is binary with log2(N) levels. Nodes are numbered as a heap:
// node 1 is the root, node i has children 2i and 2i+1, and pixel j sits at
// leaf N+j. Each node holds
//   * a therm_adder: the saturated thermometric count of triggered pixels
//     (validity bits, vb) below it, passed towards the root;
//   * a select_block: splits the selection bits coming from its parent
//     between its two children, using the children's counts;
//   * a priority_node: one flip-flop of the distributed priority counter.
// The root count is N_trig and is also the root's selection word, so
// converter x (bit x) is used whenever at least x+1 pixels fired. A leaf's
// selection word sb[j] is one-hot (converter x) or zero (not selected).
// Address: for converter x, the bit of depth d (MSB = root) is 1 when the
// node of that depth on x's path sent x to the right; since exactly one node
// per depth carries bit x, it is the OR of the right outputs of that depth.
// The same right-output bit is the mux select (dir) of the matching
// extraction-tree node.
//
// Interface: clk/rst_n (laser clock, asynchronous active-low reset of the
// priority counter), vb[N] (validity bits from the pixel FSMs), sb[N][M]
// (selection bits back to the pixels), n_trig (M-bit thermometric), addr[M]
// (log2 N bits each), dir[node][M] for nodes 1..N-1. Timing: everything but
// the priority counter is combinational and settles within the Selection
// phase; the consumers register it at the end of that period. The structure
// follows the document; the heap numbering and the uniform M-bit node width
// (the constant high bits of the nodes near the pixels are removed by
// synthesis) are this design's own.
// Lint note: rst_n also appears in the assertion's disable condition, which
// a linter reports as a reset used both synchronously and asynchronously;
// the flip-flops use it only as an asynchronous reset.
module selection_logic #(
  parameter int unsigned N = router_pkg::N_PIX_DEF,
  parameter int unsigned M = router_pkg::M_CONV_DEF,
  localparam int unsigned L = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        vb,
  output logic [M-1:0]        sb     [N],
  output logic [M-1:0]        n_trig,
  output logic [L-1:0]        addr   [M],
  output logic [M-1:0]        dir    [1:N-1]
);

  timeunit 1ps; timeprecision 1ps;

  logic [M-1:0] sum   [1:2*N-1];
  logic [M-1:0] sbw   [1:2*N-1];
  logic         pbit  [1:N-1];
  logic         carry [1:N-1];

  // Leaves: a triggered pixel counts as one.
  for (genvar j = 0; j < N; j++) begin : g_leaf
    assign sum[N+j] = {{(M-1){1'b0}}, vb[j]};
    assign sb[j]    = sbw[N+j];
  end

  for (genvar i = 1; i < N; i++) begin : g_node
    therm_adder #(.M(M)) u_add (
      .sum_l(sum[2*i]),
      .sum_r(sum[2*i+1]),
      .sum_o(sum[i])
    );

    select_block #(.M(M)) u_sel (
      .sb_in  (sbw[i]),
      .sigma_l(sum[2*i]),
      .sigma_r(sum[2*i+1]),
      .p      (pbit[i]),
      .sb_l   (sbw[2*i]),
      .sb_r   (sbw[2*i+1])
    );

    if (i == 1) begin : g_root
      priority_node u_pri (.clk, .rst_n, .carry_i(1'b1), .p(pbit[i]), .carry_o(carry[i]));
    end else begin : g_inner
      priority_node u_pri (.clk, .rst_n, .carry_i(carry[i/2]), .p(pbit[i]), .carry_o(carry[i]));
    end

    assign dir[i] = sbw[2*i+1];
  end

  assign sbw[1]  = sum[1];
  assign n_trig  = sum[1];

  // Address bits: depth d holds nodes 2^d .. 2^(d+1)-1.
  always_comb begin
    for (int x = 0; x < M; x++) begin
      addr[x] = '0;
      for (int d = 0; d < L; d++) begin
        for (int i = (1 << d); i < (2 << d); i++) begin
          addr[x][L-1-d] = addr[x][L-1-d] | sbw[2*i+1][x];
        end
      end
    end
  end

  // A pixel is never handed two converters.
  for (genvar j = 0; j < N; j++) begin : g_chk
    a_onehot_sb: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sb[j]))
      else $error("pixel %0d got several converters", j);
  end

endmodule
