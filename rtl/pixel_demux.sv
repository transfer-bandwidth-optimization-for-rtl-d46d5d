// pixel_demux: routes a pixel's delayed timing edge into one of the 2*M
// extraction trees.
//
// Each converter x owns two trees, L (lr = 0) and R (lr = 1), used in
// alternate laser periods. While en is high (Tim_path and Conversion of a
// selected pixel) the delay-line output drives exactly the tree input
// (lr, conv); all other outputs stay low. With en low every output is low,
// so a discarded or idle pixel never disturbs a tree.
//
// Interface: tim (delay-line output), en, conv (converter index), lr (tree),
// tout[lr][x] (tree inputs). Combinational. The function follows the
// document (eight outputs for four converters).
module pixel_demux #(
  parameter int unsigned M = router_pkg::M_CONV_DEF,
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                 tim,
  input  logic                 en,
  input  logic [CW-1:0]        conv,
  input  logic                 lr,
  output logic [1:0][M-1:0]    tout
);

  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    tout = '0;
    if (en) tout[lr][conv] = tim;
  end

endmodule
