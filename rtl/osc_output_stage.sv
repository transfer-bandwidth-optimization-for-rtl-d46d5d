// osc_output_stage: behavioural model of the ring oscillator's output stage
// (analog differential-to-single-ended converter). Not synthesizable in the
// sense of the real circuit: it is a comparator of two analog rails.
//
// clk_o follows osc_p when tune0 = 0 and osc_n when tune0 = 1, so the
// counter after it counts either the rising or the falling edges of the
// oscillation: the delay moves by half an oscillator period (420 ps).
// Modelled as an ideal comparator with no delay.
//
// Interface: osc_p, osc_n (differential in), tune0 (edge select), clk_o.
module osc_output_stage (
  input  logic osc_p,
  input  logic osc_n,
  input  logic tune0,
  output logic clk_o
);

  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    if (tune0) clk_o = osc_n && !osc_p;
    else       clk_o = osc_p && !osc_n;
  end

endmodule
