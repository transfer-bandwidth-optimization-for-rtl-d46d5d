// tb_priority_node: three chained nodes (root, child, grandchild) must
// count 0,1,...,7,0,... in binary, root as the least significant bit, one
// step per clock; reset clears them.
module tb_priority_node;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b1;
  logic p0, p1, p2, c0, c1, c2;
  int checks = 0, failures = 0;

  priority_node u0 (.clk, .rst_n, .carry_i(1'b1), .p(p0), .carry_o(c0));
  priority_node u1 (.clk, .rst_n, .carry_i(c0),   .p(p1), .carry_o(c1));
  priority_node dut (.clk, .rst_n, .carry_i(c1),  .p(p2), .carry_o(c2));

  always #6250 clk = ~clk;

  initial begin
    #100 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 20; n++) begin
      checks++;
      if ({p2, p1, p0} !== 3'(n) || c2 !== (n % 8 == 7)) begin
        failures++;
        $display("FAIL step %0d: %b%b%b carry %b", n, p2, p1, p0, c2);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
