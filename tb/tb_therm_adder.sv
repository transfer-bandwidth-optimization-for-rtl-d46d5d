// tb_therm_adder: exhaustive check of the saturating thermometric adder for
// M = 4: every pair of counts 0..4 must give the thermometric code of
// min(a + b, 4).
module tb_therm_adder;
  timeunit 1ps; timeprecision 1ps;
  localparam int M = 4;
  logic [M-1:0] a, b, s;
  int checks = 0, failures = 0;

  therm_adder #(.M(M)) dut (.sum_l(a), .sum_r(b), .sum_o(s));

  function automatic logic [M-1:0] therm(input int n);
    logic [M-1:0] t = '0;
    for (int i = 0; i < M; i++) t[i] = (i < n);
    return t;
  endfunction

  initial begin
    for (int i = 0; i <= M; i++) begin
      for (int j = 0; j <= M; j++) begin
        a = therm(i); b = therm(j);
        #10;
        checks++;
        if (s !== therm((i + j > M) ? M : i + j)) begin
          failures++;
          $display("FAIL %0d + %0d gave %b", i, j, s);
        end
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
