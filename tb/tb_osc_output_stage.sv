// tb_osc_output_stage: with tune0 = 0 the output follows osc_p, with
// tune0 = 1 it follows osc_n (the opposite edge of the oscillation).
module tb_osc_output_stage;
  timeunit 1ps; timeprecision 1ps;
  logic p, n, t0, o;
  int checks = 0, failures = 0;

  osc_output_stage dut (.osc_p(p), .osc_n(n), .tune0(t0), .clk_o(o));

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int k = 0; k < 2; k++) begin
        t0 = k[0]; p = i[0]; n = ~i[0];
        #10;
        checks++;
        if (o !== (k ? n : p)) begin failures++; $display("FAIL p=%b tune0=%b o=%b", p, t0, o); end
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
