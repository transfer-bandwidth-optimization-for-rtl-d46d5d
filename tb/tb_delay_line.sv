// tb_delay_line: the complete delay line (oscillator model, output stage,
// counter). For several tuning words the output edge must come
// (37 + tune[4:1]) * 840 - (tune[0] ? 0 : 420) ps after the timing edge;
// the default word gives 37.38 ns, inside the 37.5 ns budget. A clear at a
// clock edge resets it; a run cleared half-way does not shorten the next.
module tb_delay_line;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b1, tim_in = 1'b0, arm = 1'b1, clr = 1'b0;
  logic [4:0] tune = router_pkg::TUNE_DEFAULT;
  logic running, tim_out;
  int checks = 0, failures = 0;
  longint t_start, t_out;

  delay_line dut (.*);

  always #6250 clk = ~clk;
  always @(posedge tim_out) t_out = $time;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  task automatic edge_in(input int off);
    #(off) tim_in = 1'b1;
    t_start = $time;
    #300 tim_in = 1'b0;
  endtask

  task automatic clear_at_edge();
    @(negedge clk) clr = 1'b1;
    @(posedge clk) #1 clr = 1'b0;
  endtask

  function automatic int expected(input logic [4:0] tw);
    return (37 + int'(tw[4:1])) * 840 - (tw[0] ? 0 : 420);
  endfunction

  initial begin
    logic [4:0] words [6];
    words = '{router_pkg::TUNE_DEFAULT, 5'b00000, 5'b00001, 5'b10001, 5'b11111, 5'b01110};
    #100 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    check(expected(router_pkg::TUNE_DEFAULT) == 37380, "default word is not 37.38 ns");
    foreach (words[w]) begin
      tune = words[w];
      @(posedge clk);
      t_out = 0;
      edge_in(777 + 13 * w);
      #(expected(tune) + 1000);
      check(t_out - t_start == longint'(expected(tune)),
            $sformatf("tune %b: delay %0d expected %0d", tune, t_out - t_start, expected(tune)));
      check(tim_out, "output not held");
      clear_at_edge();
      check(!tim_out && !running, "not cleared");
    end
    tune = router_pkg::TUNE_DEFAULT;
    @(posedge clk);
    edge_in(500);
    #20000;
    clear_at_edge();
    t_out = 0;
    edge_in(100);
    #40000;
    check(t_out - t_start == 37380, $sformatf("after partial run: %0d", t_out - t_start));
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
