// cal_mux: calibration access at the pixel input.
//
// In normal operation (cal_en low) the quenching circuit's digital pulse
// goes to the pixel state machine and its timing signal to the delay line.
// In calibration mode the external, deterministic test lines ph_cal and
// tim_cal are demultiplexed to the one pixel whose cal_sel is high; every
// other pixel then sees no input at all. The delay line, state machine and
// trees of that pixel can so be characterised and tuned without a detector
// (one tuning word serves all pixels). Combinational, no delay.
//
// Interface: cal_en (calibration mode), cal_sel (this pixel addressed,
// decoded in the top from the calibration address), ph_spad/tim_spad
// (quenching circuit), ph_cal/tim_cal (shared test lines), ph/tim (to FSM
// and delay line). The demultiplexer function follows the document; the
// address decoding and the port names are this design's own.
module cal_mux (
  input  logic cal_en,
  input  logic cal_sel,
  input  logic ph_spad,
  input  logic tim_spad,
  input  logic ph_cal,
  input  logic tim_cal,
  output logic ph,
  output logic tim
);

  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    if (cal_en) begin
      ph  = cal_sel & ph_cal;
      tim = cal_sel & tim_cal;
    end else begin
      ph  = ph_spad;
      tim = tim_spad;
    end
  end

endmodule
