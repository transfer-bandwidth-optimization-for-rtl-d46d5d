// router_top: router-based readout for a multichannel TCSPC detector.
//
// N pixels share M external time converters. Every laser period each
// pixel that saw a photon asks for a converter; the shared selection tree
// counts the requests (saturating at M), hands out the converters to at
// most M of them following a rotating priority, and discards the rest at
// once so they are armed again in the next period. Each pixel's delay line
// holds its photon's timing edge for Dwell + Selection + Tim_path; the
// selected pixels then release it into one of two extraction trees per
// converter (L and R, alternating every period). Four pipelined phases of
// one laser period each mean a new set of up to M measurements every
// period, in step with the laser.
//
// Ports:
//   clk            laser-synchronous clock (80 MHz, 12.5 ns)
//   rst_n          asynchronous active-low reset
//   ph_spad[N]     digital photon pulse of each pixel's quenching circuit
//   tim_spad[N]    timing signal of each pixel's quenching circuit
//   cal_en         calibration mode: test lines replace the detector
//   cal_addr       pixel that receives the test lines in calibration mode
//   ph_cal,tim_cal shared calibration test lines
//   tune[4:0]      delay-line tuning word shared by all pixels
//   conv_l/conv_r  timing edges towards converter x through tree L / R
//   n_trig         thermometric count of requests of the period that just
//                  finished Selection (bit x high: converter x is in use)
//   addr[M]        address of the pixel given converter x in that period
//   out_phase      tree (0 = L, 1 = R) that carries that period's edges
// Timing: a photon in period k gives n_trig/addr/out_phase valid during
// period k+2 (Tim_path) and its edge on conv_l/conv_r during period k+3
// (Conversion), or late in k+2 when the delay line is tuned short.
// The pipeline, the selection tree and the double trees follow the
// document; the output registers and the calibration addressing are this
// design's own.
// Lint note: each pixel's state output is left open here; it exists for
// observing a pixel in its own tests. The package constants that no module
// reads (periods, target delay) document the timing the defaults assume.
// rst_n is reported as used both synchronously and asynchronously only
// because the assertions in pixel_fsm and selection_logic name it in their
// disable condition.
module router_top #(
  parameter int unsigned N             = router_pkg::N_PIX_DEF,
  parameter int unsigned M             = router_pkg::M_CONV_DEF,
  parameter int unsigned OSC_PERIOD_PS = router_pkg::OSC_PERIOD_PS,
  parameter int unsigned TUNE_BASE     = router_pkg::TUNE_BASE,
  localparam int unsigned L = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  ph_spad,
  input  logic [N-1:0]  tim_spad,
  input  logic          cal_en,
  input  logic [L-1:0]  cal_addr,
  input  logic          ph_cal,
  input  logic          tim_cal,
  input  logic [4:0]    tune,
  output logic [M-1:0]  conv_l,
  output logic [M-1:0]  conv_r,
  output logic [M-1:0]  n_trig,
  output logic [L-1:0]  addr [M],
  output logic          out_phase
);

  timeunit 1ps; timeprecision 1ps;

  logic [N-1:0]      vb;
  logic [M-1:0]      sb     [N];
  logic [M-1:0]      n_trig_c;
  logic [L-1:0]      addr_c [M];
  logic [M-1:0]      dir    [1:N-1];
  logic [1:0][M-1:0] pout   [N];
  logic              tree_phase;

  // Tree phase: the two trees of every converter alternate each period.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tree_phase <= 1'b0;
    else        tree_phase <= ~tree_phase;
  end

  for (genvar j = 0; j < N; j++) begin : g_pix
    pixel #(.M(M), .OSC_PERIOD_PS(OSC_PERIOD_PS), .TUNE_BASE(TUNE_BASE)) u_pix (
      .clk, .rst_n,
      .ph_spad   (ph_spad[j]),
      .tim_spad  (tim_spad[j]),
      .cal_en,
      .cal_sel   (cal_addr == L'(j)),
      .ph_cal, .tim_cal, .tune,
      .sb        (sb[j]),
      .tree_phase,
      .vb        (vb[j]),
      .tout      (pout[j]),
      .state     ()
    );
  end

  selection_logic #(.N(N), .M(M)) u_sel (
    .clk, .rst_n, .vb, .sb, .n_trig(n_trig_c), .addr(addr_c), .dir
  );

  extraction_logic #(.N(N), .M(M)) u_ext (
    .clk, .rst_n, .tree_phase, .dir, .pin(pout), .conv_l, .conv_r
  );

  // Result of each Selection period, held during the following Tim_path.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_trig    <= '0;
      out_phase <= 1'b0;
      for (int x = 0; x < M; x++) addr[x] <= '0;
    end else begin
      n_trig    <= n_trig_c;
      out_phase <= tree_phase;
      for (int x = 0; x < M; x++) addr[x] <= addr_c[x];
    end
  end

endmodule
