// tb_cal_mux: all 64 input combinations. Normal mode passes the detector
// signals; calibration mode passes the test lines to the addressed pixel
// only and blanks the detector.
module tb_cal_mux;
  timeunit 1ps; timeprecision 1ps;
  logic cal_en, cal_sel, ph_spad, tim_spad, ph_cal, tim_cal, ph, tim;
  int checks = 0, failures = 0;

  cal_mux dut (.*);

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic e_ph, e_tim;
      {cal_en, cal_sel, ph_spad, tim_spad, ph_cal, tim_cal} = 6'(v);
      e_ph  = cal_en ? (cal_sel && ph_cal)  : ph_spad;
      e_tim = cal_en ? (cal_sel && tim_cal) : tim_spad;
      #10;
      checks++;
      if (ph !== e_ph || tim !== e_tim) begin
        failures++;
        $display("FAIL inputs %b: ph=%b tim=%b", 6'(v), ph, tim);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
