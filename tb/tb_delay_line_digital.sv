// tb_delay_line_digital: the digital half of the delay line with an ideal
// oscillator in the testbench (rising edges every 840 ps while osc_en is
// high, the first one 420 ps after it rises). tim_out must rise exactly on
// the (37 + tune_coarse)-th edge, stop the oscillator, stay high until the
// clear edge, ignore timing edges while running or disarmed, and a run
// cleared half-way must leave no partial count behind.
module tb_delay_line_digital;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b1, tim_in = 1'b0, arm = 1'b1, clr = 1'b0, osc_clk = 1'b0;
  logic [3:0] tune_coarse = 4'd8;
  logic osc_en, running, tim_out;
  int checks = 0, failures = 0;
  longint t_start, t_start0, t_out;

  delay_line_digital dut (.*);

  always #6250 clk = ~clk;

  // Ideal oscillator: restarts on every rise of osc_en.
  int unsigned gen = 0;
  always @(osc_en) begin
    gen++;
    osc_clk = 1'b0;
    if (osc_en) fork
      begin
        automatic int unsigned g = gen;
        while (g == gen) begin
          #420; if (g == gen) osc_clk = 1'b1;
          #420; if (g == gen) osc_clk = 1'b0;
        end
      end
    join_none
  end

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

  initial begin
    #100 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    for (int tc = 0; tc < 16; tc += 5) begin
      tune_coarse = 4'(tc);
      @(posedge clk);
      t_out = 0;
      edge_in(1234 + tc);
      t_start0 = t_start;
      check(running && osc_en, "not started");
      edge_in(2000);                      // ignored while running
      #((37 + tc) * 840 + 2000);
      check(t_out - t_start0 == longint'((37 + tc) * 840 - 420),
            $sformatf("tune %0d: delay %0d expected %0d", tc, t_out - t_start0, (37 + tc) * 840 - 420));
      check(tim_out && !osc_en, "output not held or oscillator not stopped");
      clear_at_edge();
      check(!running && !tim_out, "not cleared");
    end
    // Disarmed: no start.
    arm = 1'b0;
    edge_in(500);
    check(!running, "started while disarmed");
    arm = 1'b1;
    // Cleared half-way, then a full run must still take the full count.
    tune_coarse = 4'd8;
    @(posedge clk);
    edge_in(700);
    #15000;
    clear_at_edge();
    check(!running, "half-way clear failed");
    t_out = 0;
    edge_in(800);
    #(45 * 840 + 1000);
    check(t_out - t_start == longint'(45 * 840 - 420),
          $sformatf("after partial run: delay %0d expected %0d", t_out - t_start, 45 * 840 - 420));
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
