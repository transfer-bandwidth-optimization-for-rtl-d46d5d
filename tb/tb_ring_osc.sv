// tb_ring_osc: the oscillator model must rest with osc_p = 0, toggle half
// a period (420 ps) after en rises, keep an 840 ps period, stop at once
// when en falls and restart with the same phase relation when re-enabled
// shortly after (even in the middle of a half period).
module tb_ring_osc;
  timeunit 1ps; timeprecision 1ps;
  logic en = 1'b0, osc_p, osc_n;
  int checks = 0, failures = 0;
  longint t_en, last_rise;
  int n_rise;

  ring_osc dut (.en, .osc_p, .osc_n);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  always @(posedge osc_p) begin
    if (n_rise == 0) check($time - t_en == 420, $sformatf("first rise after %0d ps", $time - t_en));
    else             check($time - last_rise == 840, $sformatf("period %0d ps", $time - last_rise));
    last_rise = $time;
    n_rise++;
  end

  always @(osc_p or osc_n) check(osc_p == ~osc_n, "outputs not complementary");

  initial begin
    #1000;
    check(osc_p == 1'b0, "not at rest");
    for (int run = 0; run < 4; run++) begin
      n_rise = 0;
      t_en = $time;
      en = 1'b1;
      #(840 * 10 + 100 + run * 37);
      check(n_rise == 10, $sformatf("%0d rises, expected 10", n_rise));
      en = 1'b0;
      #1;
      check(osc_p == 1'b0, "did not stop");
      #(150 + run * 50);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
