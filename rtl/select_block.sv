// select_block: one step of the selection process (one tree node).
//
// Splits the incoming selection bits sb_in between the left and right
// branches. The priority bit p picks the preferred branch (0 = left,
// 1 = right); that branch receives as many of the high bits of sb_in as its
// own thermometric sum sigma reports (all of them if it has enough pixels),
// and the remaining high bits go to the other branch. So the outputs hold
// together exactly as many high bits as sb_in, and a bit position is never
// high on both outputs: each converter is sent down one path only.
// Bit position x stands for converter x, so dir (= sb_r) is the address bit
// this node contributes for each converter: 1 when it went right.
//
// Interface: sb_in, sigma_l, sigma_r (M bits), p; sb_l, sb_r (M bits).
// Combinational. The two rules and the role of P and the sums follow the
// document; which bits of the run go to the preferred side (the top ones) is
// this design's own choice.
module select_block #(
  parameter int unsigned M = router_pkg::M_CONV_DEF
) (
  input  logic [M-1:0] sb_in,
  input  logic [M-1:0] sigma_l,
  input  logic [M-1:0] sigma_r,
  input  logic         p,
  output logic [M-1:0] sb_l,
  output logic [M-1:0] sb_r
);

  timeunit 1ps; timeprecision 1ps;

  logic [M-1:0] sigma_pref, mask, to_pref, to_other;

  assign sigma_pref = p ? sigma_r : sigma_l;

  bit_shifter #(.M(M)) u_shift (
    .sigma      (sigma_pref),
    .sb_in      (sb_in),
    .sigma_shift(mask)
  );

  assign to_pref  = sb_in & mask;
  assign to_other = sb_in & ~mask;

  assign sb_l = p ? to_other : to_pref;
  assign sb_r = p ? to_pref  : to_other;

endmodule
