// bit_shifter: places the preferred branch's count over the selection bits.
//
// The selection bits reaching a node always form one contiguous run of ones
// (the root receives the thermometric N_trig, and every node splits its run
// into a top part and a bottom part). The preferred branch must receive the
// top min(count(sigma), count(sb_in)) bits of that run. This block bit-
// reverses the thermometric sigma word, so its ones sit at the top of the
// word, and shifts it right by (M-1 - position of the most significant high
// bit of sb_in): the ones then end exactly at that bit. ANDing the result
// with sb_in (done in select_block) gives the preferred branch's bits.
//
// Interface: sigma (M-bit thermometric), sb_in (M-bit, one contiguous run),
// sigma_shift (M-bit mask). Combinational. The document gives the function
// (shift according to the most significant high bit of SB_in); the reversal
// is this design's reading of it.
module bit_shifter #(
  parameter int unsigned M = router_pkg::M_CONV_DEF
) (
  input  logic [M-1:0] sigma,
  input  logic [M-1:0] sb_in,
  output logic [M-1:0] sigma_shift
);

  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned SW = (M > 1) ? $clog2(M) : 1;

  logic [M-1:0]  sigma_rev;
  logic [SW-1:0] msb_pos;

  always_comb begin
    for (int i = 0; i < M; i++) sigma_rev[i] = sigma[M-1-i];
  end

  // Position of the most significant high bit (0 when sb_in is empty; the
  // mask is then irrelevant because it is ANDed with sb_in).
  always_comb begin
    msb_pos = '0;
    for (int i = 0; i < M; i++) begin
      if (sb_in[i]) msb_pos = SW'(i);
    end
  end

  assign sigma_shift = sigma_rev >> (SW'(M - 1) - msb_pos);

endmodule
