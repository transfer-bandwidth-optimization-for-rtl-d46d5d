// tb_pixel: one complete pixel. A photon at a known time in a Dwell period,
// selection for converter 3 on tree L: the delayed edge must leave on
// exactly tout[0][3], 37.38 ns after the photon, during Conversion. A
// discarded photon must produce no edge at all. In calibration mode the
// detector inputs are ignored and the test lines drive the pixel.
module tb_pixel;
  timeunit 1ps; timeprecision 1ps;
  import router_pkg::*;
  localparam int M = 4;
  logic clk = 1'b0, rst_n = 1'b1;
  logic ph_spad = 1'b0, tim_spad = 1'b0, cal_en = 1'b0, cal_sel = 1'b0, ph_cal = 1'b0, tim_cal = 1'b0;
  logic [4:0] tune = TUNE_DEFAULT;
  logic [M-1:0] sb = '0;
  logic tree_phase = 1'b0;
  logic vb;
  logic [1:0][M-1:0] tout;
  pix_state_e state;
  int checks = 0, failures = 0;
  int n_edges = 0;
  longint t_ph, t_edge;
  logic [1:0][M-1:0] last_tout;

  pixel #(.M(M)) dut (.*);

  always #6250 clk = ~clk;

  always @(tout) if (tout != '0) begin
    n_edges++;
    t_edge = $time;
    last_tout = tout;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  task automatic spad(input int off);
    #(off) ph_spad = 1'b1; tim_spad = 1'b1; t_ph = $time;
    #500   ph_spad = 1'b0; tim_spad = 1'b0;
  endtask

  task automatic cal(input int off);
    #(off) ph_cal = 1'b1; tim_cal = 1'b1; t_ph = $time;
    #500   ph_cal = 1'b0; tim_cal = 1'b0;
  endtask

  // Selection period: give the bits late in the period, as the tree would.
  task automatic select(input logic [M-1:0] bits, input logic phase);
    @(posedge clk) #1;
    check(vb && state == ST_SELECT, "not in Selection");
    tree_phase = phase;
    #9000 sb = bits;
    @(posedge clk) #1 sb = '0;
  endtask

  initial begin
    #100 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    // Selected for converter 3, tree L.
    @(posedge clk);
    n_edges = 0;
    spad(4321);
    select(4'b1000, 1'b0);
    check(state == ST_TIMPATH, "not in Tim_path");
    @(posedge clk) #1;
    check(state == ST_CONV, "not in Conversion");
    #12000;
    check(n_edges == 1 && last_tout == (1 << 3), $sformatf("edges %0d on %b", n_edges, last_tout));
    check(t_edge - t_ph == 37380, $sformatf("delay %0d", t_edge - t_ph));
    @(posedge clk) #1;
    check(state == ST_DWELL && tout == '0, "not back in Dwell");
    // Discarded: no edge.
    n_edges = 0;
    spad(2000);
    select(4'b0000, 1'b1);
    check(state == ST_DWELL, "discarded pixel not in Dwell");
    repeat (4) @(posedge clk);
    check(n_edges == 0, "edge from a discarded pixel");
    // Calibration mode: detector ignored, test line used; tree R, conv 1.
    cal_en = 1'b1; cal_sel = 1'b1;
    @(posedge clk);
    n_edges = 0;
    fork spad(1000); join_none
    #3000;
    check(state == ST_DWELL, "detector not ignored in calibration");
    cal(2000);
    select(4'b0010, 1'b1);
    repeat (2) @(posedge clk);
    #1;
    check(n_edges == 1 && last_tout == (1 << (M + 1)), $sformatf("calibration edges %0d on %b", n_edges, last_tout));
    check(t_edge - t_ph == 37380, $sformatf("calibration delay %0d", t_edge - t_ph));
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
