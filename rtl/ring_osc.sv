// ring_osc: behavioural model of the delay line's differential ring
// oscillator (analog, current-mode-logic stages). Not synthesizable.
//
// When en rises (the start flip-flop closes the loop) the differential pair
// osc_p/osc_n starts from osc_p = 0 and toggles every half period; when en
// falls the loop opens and the pair returns to rest (osc_p = 0, osc_n = 1).
// The 840 ps period follows the document; jitter, process spread and the
// supply are not modelled, and the rest level is this model's choice.
//
// Interface: en (loop closed), osc_p/osc_n (differential output).
module ring_osc #(
  parameter int unsigned PERIOD_PS = router_pkg::OSC_PERIOD_PS
) (
  input  logic en,
  output logic osc_p,
  output logic osc_n
);

  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned HALF_PS = PERIOD_PS / 2;

  logic        osc;
  int unsigned run_id;

  initial begin
    osc    = 1'b0;
    run_id = 0;
  end

  // Every change of en ends the current run; a rising en starts a new one
  // whose first toggle comes half a period later.
  always @(en) begin
    run_id = run_id + 1;
    osc    = 1'b0;
    if (en) begin
      fork
        oscillate(run_id);
      join_none
    end
  end

  task automatic oscillate(input int unsigned id);
    while (id == run_id) begin
      #(HALF_PS);
      if (id == run_id) osc = ~osc;
    end
  endtask

  assign osc_p = osc;
  assign osc_n = ~osc;

endmodule
