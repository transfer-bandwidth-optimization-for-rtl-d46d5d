// pixel_fsm: two-bit state machine that runs one pixel through the router
// pipeline, one phase per laser period.
//
//   Dwell      pixel armed; a photon (rising edge of ph) sets the event flag.
//   Selection  entered at the next clock edge if the flag is set; vb is high
//              so the selection logic counts this pixel. At the end of the
//              period the pixel either got one selection bit sb[x] (go to
//              Tim_path, remember converter x and the current tree phase as
//              the demux select) or none (back to Dwell, and the delay line
//              is cleared at that same edge).
//   Tim_path   the extraction trees set up their paths; no action here.
//   Conversion the delayed edge leaves through the demux; at the end the
//              delay line is cleared and the pixel returns to Dwell.
// The event flag is a pair of toggle flip-flops (one clocked by the photon
// pulse, one by the laser clock) that only responds in Dwell, so photons
// arriving while the pixel is busy are ignored.
//
// Interface: clk (laser clock), rst_n (asynchronous, active low, to Dwell),
// ph (digital photon pulse, asynchronous), sb[M] (one-hot or zero, valid at
// the end of Selection), tree_phase (which of the two extraction trees the
// current Selection period fills), vb, sel_en (demux enable in Tim_path and
// Conversion), sel_conv, sel_lr, dl_arm (delay line may start), dl_clr
// (delay line is cleared at the next clock edge), state.
// The phases, vb, sb and the reset of a discarded pixel follow the document;
// the flag circuit and the exact encoding are this design's own.
// Lint note: rst_n also appears in the assertion's disable condition, which
// a linter reports as a reset used both synchronously and asynchronously;
// the flip-flops use it only as an asynchronous reset.
module pixel_fsm #(
  parameter int unsigned M = router_pkg::M_CONV_DEF,
  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ph,
  input  logic [M-1:0]           sb,
  input  logic                   tree_phase,
  output logic                   vb,
  output logic                   sel_en,
  output logic [CW-1:0]          sel_conv,
  output logic                   sel_lr,
  output logic                   dl_arm,
  output logic                   dl_clr,
  output router_pkg::pix_state_e state
);

  timeunit 1ps; timeprecision 1ps;

  router_pkg::pix_state_e state_d;
  logic       ph_flag;
  logic       ph_req, ph_ack;
  logic       selected;
  logic [CW-1:0] conv_idx;

  // Photon event flag: a toggle pair. req toggles on a photon edge while
  // the pixel is in Dwell and the flag is clear; ack copies req at the clock
  // edge that moves the pixel to Selection. flag = req ^ ack.
  always_ff @(posedge ph or negedge rst_n) begin
    if (!rst_n)                                          ph_req <= 1'b0;
    else if (state == router_pkg::ST_DWELL && !ph_flag)  ph_req <= ~ph_req;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                         ph_ack <= 1'b0;
    else if (state == router_pkg::ST_DWELL && ph_flag)  ph_ack <= ph_req;
  end

  assign ph_flag = ph_req ^ ph_ack;

  assign selected = |sb;

  always_comb begin
    conv_idx = '0;
    for (int x = 0; x < M; x++) begin
      if (sb[x]) conv_idx = CW'(x);
    end
  end

  always_comb begin
    state_d = state;
    unique case (state)
      router_pkg::ST_DWELL:   if (ph_flag) state_d = router_pkg::ST_SELECT;
      router_pkg::ST_SELECT:  state_d = selected ? router_pkg::ST_TIMPATH : router_pkg::ST_DWELL;
      router_pkg::ST_TIMPATH: state_d = router_pkg::ST_CONV;
      router_pkg::ST_CONV:    state_d = router_pkg::ST_DWELL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= router_pkg::ST_DWELL;
      sel_conv <= '0;
      sel_lr   <= 1'b0;
    end else begin
      state <= state_d;
      if (state == router_pkg::ST_SELECT && selected) begin
        sel_conv <= conv_idx;
        sel_lr   <= tree_phase;
      end
    end
  end

  assign vb     = (state == router_pkg::ST_SELECT);
  assign sel_en = (state == router_pkg::ST_TIMPATH) || (state == router_pkg::ST_CONV);
  assign dl_arm = (state == router_pkg::ST_DWELL);
  assign dl_clr = (state == router_pkg::ST_SELECT && !selected) || (state == router_pkg::ST_CONV);

  a_sb_only_in_select: assert property (@(posedge clk) disable iff (!rst_n)
    (state != router_pkg::ST_SELECT) |-> (sb == '0))
    else $error("selection bit given to a pixel outside its Selection phase");

endmodule
