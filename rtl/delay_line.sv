// delay_line: per-pixel mixed analog/digital delay line (structural, with
// behavioural models for the two analog parts, so not synthesizable as a
// whole).
//
// The line is the pixel's analog memory: it holds the photon's timing edge
// through Dwell, Selection and Tim_path (about 37.5 ns) so that the edge
// leaves only after the router has chosen a path. A photon edge starts the
// ring oscillator; the output stage turns the differential oscillation into
// a single-ended clock, picking its rising or falling edge with tune[0]
// (half-period fine step, 420 ps); the digital block counts
// TUNE_BASE + tune[4:1] of those edges and raises tim_out.
// Delay = (TUNE_BASE + tune[4:1]) * T_osc - (tune[0] ? 0 : T_osc/2).
// With T_osc = 840 ps and tune = 5'b10000 that is 37.38 ns.
//
// Interface: clk, rst_n, tim_in, arm, clr, tune[4:0], running, tim_out,
// as in delay_line_digital. The split into ring oscillator, output stage,
// counter and comparison follows the document; the count base is this
// design's own.
module delay_line #(
  parameter int unsigned OSC_PERIOD_PS = router_pkg::OSC_PERIOD_PS,
  parameter int unsigned TUNE_BASE     = router_pkg::TUNE_BASE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tim_in,
  input  logic       arm,
  input  logic       clr,
  input  logic [4:0] tune,
  output logic       running,
  output logic       tim_out
);

  timeunit 1ps; timeprecision 1ps;

  logic osc_en, osc_p, osc_n, osc_clk;

  ring_osc #(.PERIOD_PS(OSC_PERIOD_PS)) u_osc (
    .en   (osc_en),
    .osc_p(osc_p),
    .osc_n(osc_n)
  );

  osc_output_stage u_stage (
    .osc_p(osc_p),
    .osc_n(osc_n),
    .tune0(tune[0]),
    .clk_o(osc_clk)
  );

  delay_line_digital #(.TUNE_BASE(TUNE_BASE)) u_dig (
    .clk,
    .rst_n,
    .tim_in,
    .arm,
    .clr,
    .osc_clk,
    .tune_coarse(tune[4:1]),
    .osc_en,
    .running,
    .tim_out
  );

endmodule
