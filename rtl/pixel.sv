// pixel: the logic replicated in every pixel of the router (structural; the
// delay line contains behavioural analog models).
//
// Calibration mux -> state machine (digital pulse) and delay line (timing
// edge) -> demux into the extraction trees. The state machine reports vb
// during Selection, takes the one-hot selection bits sb at the end of it,
// arms and clears the delay line, and drives the demux select
// (converter, L/R tree) during Tim_path and Conversion. The quenching
// circuit itself is outside: its two outputs are ph_spad and tim_spad.
//
// Interface: clk, rst_n, ph_spad, tim_spad, cal_en, cal_sel, ph_cal, tim_cal,
// tune[4:0] (shared tuning word), sb[M], tree_phase, vb, tout[2][M],
// state. Timing: as pixel_fsm; the delayed edge appears tim-to-tout after
// the delay set by tune.
// Lint note: the delay line's running flag is not needed here (the state
// machine knows when the line is busy) and is left unused; it is kept on
// the delay line for its own tests.
// rst_n is reported as used both synchronously and asynchronously only
// because the assertion in pixel_fsm names it in its disable condition.
module pixel #(
  parameter int unsigned M             = router_pkg::M_CONV_DEF,
  parameter int unsigned OSC_PERIOD_PS = router_pkg::OSC_PERIOD_PS,
  parameter int unsigned TUNE_BASE     = router_pkg::TUNE_BASE
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ph_spad,
  input  logic                   tim_spad,
  input  logic                   cal_en,
  input  logic                   cal_sel,
  input  logic                   ph_cal,
  input  logic                   tim_cal,
  input  logic [4:0]             tune,
  input  logic [M-1:0]           sb,
  input  logic                   tree_phase,
  output logic                   vb,
  output logic [1:0][M-1:0]      tout,
  output router_pkg::pix_state_e state
);

  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;

  logic          ph, tim;
  logic          sel_en, sel_lr, dl_arm, dl_clr;
  logic [CW-1:0] sel_conv;
  logic          dl_running, dl_out;

  cal_mux u_cal (
    .cal_en, .cal_sel, .ph_spad, .tim_spad, .ph_cal, .tim_cal, .ph, .tim
  );

  pixel_fsm #(.M(M)) u_fsm (
    .clk, .rst_n, .ph, .sb, .tree_phase, .vb, .sel_en, .sel_conv, .sel_lr,
    .dl_arm, .dl_clr, .state
  );

  delay_line #(.OSC_PERIOD_PS(OSC_PERIOD_PS), .TUNE_BASE(TUNE_BASE)) u_dl (
    .clk, .rst_n, .tim_in(tim), .arm(dl_arm), .clr(dl_clr), .tune,
    .running(dl_running), .tim_out(dl_out)
  );

  pixel_demux #(.M(M)) u_demux (
    .tim(dl_out), .en(sel_en), .conv(sel_conv), .lr(sel_lr), .tout
  );

endmodule
