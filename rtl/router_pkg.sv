// router_pkg: constants and types shared by the router-based TCSPC readout.
//
// The router associates N pixels with M external time converters once per
// laser period. Every pixel that saw a photon goes through four phases, each
// one laser period long: Dwell, Selection, Tim_path and Conversion. The
// defaults below are the 32-pixel, four-converter chip run from an 80 MHz
// laser (12.5 ns period) with an 840 ps ring oscillator in each delay line.
// The delay-line count base (TUNE_BASE) is this design's own choice: it puts
// the nominal delay near 37.5 ns with the 4-bit coarse tuning field mid-range.
package router_pkg;

  timeunit 1ps; timeprecision 1ps;

  // Array and converter counts.
  localparam int unsigned N_PIX_DEF  = 32;
  localparam int unsigned M_CONV_DEF = 4;

  // Timing, in picoseconds.
  localparam int unsigned LASER_PERIOD_PS = 12500;  // 80 MHz
  localparam int unsigned OSC_PERIOD_PS   = 840;    // ring oscillator period
  localparam int unsigned DL_TARGET_PS    = 37500;  // Dwell + Selection + Tim_path

  // Delay line: counted oscillations = TUNE_BASE + tune[4:1]; tune[0] selects
  // the edge of the oscillation (half-period fine step).
  localparam int unsigned TUNE_W     = 5;
  localparam int unsigned TUNE_BASE  = 37;
  localparam int unsigned DL_CNT_W   = 6;
  localparam logic [TUNE_W-1:0] TUNE_DEFAULT = 5'b10000;  // 45 periods - 1/2 = 37.38 ns

  // Pixel state, two bits (one phase per laser period).
  typedef enum logic [1:0] {
    ST_DWELL   = 2'd0,
    ST_SELECT  = 2'd1,
    ST_TIMPATH = 2'd2,
    ST_CONV    = 2'd3
  } pix_state_e;

endpackage
