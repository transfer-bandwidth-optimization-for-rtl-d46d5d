// delay_line_digital: digital block of the pixel delay line.
//
// A start flip-flop, a counter clocked by the ring oscillator and a
// comparator. The timing edge (tim_in) sets the start state, which closes
// the ring oscillator's loop (osc_en). The counter counts oscillation edges;
// when the count reaches TUNE_BASE + tune[4:1] the timing output tim_out
// rises, the counter returns to zero and the oscillator is stopped. tim_out
// stays high until the pixel clears the line. All flip-flops have a plain
// asynchronous reset; a new run is recognised on the counter's side by the
// start toggle (req) differing from the value it recorded at the last run.
// The start state is a pair of toggle flip-flops: req toggles on the timing
// edge (only while armed and idle), ack copies req at the laser clock edge
// where clr is high, and running = req ^ ack. The line can thus be cleared
// exactly at a clock edge and re-armed right after it, with no pulse
// generator and no photon lost in the next Dwell period.
//
// Interface: clk (laser clock), rst_n (asynchronous, active low),
// tim_in (timing signal), arm (pixel in Dwell), clr (clear at next clock
// edge), osc_clk (single-ended oscillation), tune_coarse (tune[4:1]),
// osc_en (closes the ring), running, tim_out (delayed edge).
// Timing: tim_out rises on the (TUNE_BASE + tune_coarse)-th counted edge.
// Counter, comparison and reset-on-match follow the document; the toggle
// pair, the count base and stopping the oscillator after the match are
// this design's own.
module delay_line_digital #(
  parameter int unsigned CNT_W     = router_pkg::DL_CNT_W,
  parameter int unsigned TUNE_BASE = router_pkg::TUNE_BASE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tim_in,
  input  logic       arm,
  input  logic       clr,
  input  logic       osc_clk,
  input  logic [3:0] tune_coarse,
  output logic       osc_en,
  output logic       running,
  output logic       tim_out
);

  timeunit 1ps; timeprecision 1ps;

  logic             req, ack;
  logic             gen;        // value of req when the current count began
  logic             fired;      // count of generation gen reached the target
  logic             done;
  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] target;

  assign target = CNT_W'(TUNE_BASE) + CNT_W'(tune_coarse);

  always_ff @(posedge tim_in or negedge rst_n) begin
    if (!rst_n)                req <= 1'b0;
    else if (arm && !running)  req <= ~req;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   ack <= 1'b0;
    else if (clr) ack <= req;
  end

  assign running = req ^ ack;

  // Oscillation counter. The first oscillator edge of a new run (gen still
  // holds the previous req) restarts the count at one, so a run that was
  // cleared half-way leaves nothing behind.
  always_ff @(posedge osc_clk or negedge rst_n) begin
    if (!rst_n) begin
      gen   <= 1'b0;
      cnt   <= '0;
      fired <= 1'b0;
    end else if (gen != req) begin
      gen   <= req;
      cnt   <= CNT_W'(1);
      fired <= (target == CNT_W'(1));
    end else if (!fired) begin
      if (cnt + 1'b1 == target) begin
        cnt   <= '0;
        fired <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign done    = fired && (gen == req);
  assign tim_out = running && done;
  assign osc_en  = running && !done;

endmodule
