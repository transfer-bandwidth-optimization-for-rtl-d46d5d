// therm_adder: adder node of the selection tree.
//
// Adds two thermometric counts (bit k high means "at least k+1 triggered
// pixels") and saturates the result at M. Bit k of the sum is the OR, over
// every split i + j = k+1, of "left holds at least i" AND "right holds at
// least j", which is the gate structure of a thermometric adder; a count of
// zero on either side is the constant 1 term. Purely combinational: the
// whole tree settles within the Selection phase.
//
// Interface: sum_l, sum_r (M-bit thermometric, from the two branches),
// sum_o (M-bit thermometric, towards the root). Saturation at M follows the
// document; the sum-of-products form is this design's own.
module therm_adder #(
  parameter int unsigned M = router_pkg::M_CONV_DEF
) (
  input  logic [M-1:0] sum_l,
  input  logic [M-1:0] sum_r,
  output logic [M-1:0] sum_o
);

  timeunit 1ps; timeprecision 1ps;

  // ge_l[i] / ge_r[i]: branch holds at least i pixels (ge[0] = 1).
  logic [M:0] ge_l, ge_r;
  assign ge_l = {sum_l, 1'b1};
  assign ge_r = {sum_r, 1'b1};

  always_comb begin
    for (int k = 0; k < M; k++) begin
      sum_o[k] = 1'b0;
      for (int i = 0; i <= k + 1; i++) begin
        sum_o[k] = sum_o[k] | (ge_l[i] & ge_r[k+1-i]);
      end
    end
  end

endmodule
