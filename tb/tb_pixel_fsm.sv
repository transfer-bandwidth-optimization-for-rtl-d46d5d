// tb_pixel_fsm: drives one pixel state machine through its phases.
// Scenarios: photon then selected for converter 2 on tree R (Dwell ->
// Selection -> Tim_path -> Conversion -> Dwell, with vb, demux select and
// delay-line clear at the right periods); photon then discarded (back to
// Dwell after one period, clear requested); photons while busy ignored;
// a photon in the first Dwell period after a discard accepted.
module tb_pixel_fsm;
  timeunit 1ps; timeprecision 1ps;
  import router_pkg::*;
  localparam int M = 4;
  logic clk = 1'b0, rst_n = 1'b1, ph = 1'b0, tree_phase = 1'b0;
  logic [M-1:0] sb = '0;
  logic vb, sel_en, sel_lr, dl_arm, dl_clr;
  logic [1:0] sel_conv;
  pix_state_e state;
  int checks = 0, failures = 0;

  pixel_fsm #(.M(M)) dut (.*);

  always #6250 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  task automatic photon(input int off);
    #(off) ph = 1'b1;
    #500   ph = 1'b0;
  endtask

  // Check outputs in the middle of the current period.
  task automatic expect_st(input pix_state_e s, input bit e_vb, input bit e_en, input bit e_arm);
    check(state == s, $sformatf("state %s expected %s", state.name(), s.name()));
    check(vb == e_vb && sel_en == e_en && dl_arm == e_arm,
          $sformatf("vb/sel_en/arm %b%b%b expected %b%b%b", vb, sel_en, dl_arm, e_vb, e_en, e_arm));
  endtask

  initial begin
    #100 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    @(posedge clk); #1000;
    expect_st(ST_DWELL, 0, 0, 1);
    // Selected: photon in this Dwell period.
    photon(3000);
    @(posedge clk); #1000;
    expect_st(ST_SELECT, 1, 0, 0);
    photon(2000);                        // ignored while busy
    tree_phase = 1'b1;
    sb = 4'b0100;
    #4000;
    check(dl_clr == 1'b0, "clear while selected");
    @(posedge clk); #1000;
    sb = '0;
    expect_st(ST_TIMPATH, 0, 1, 0);
    check(sel_conv == 2'd2 && sel_lr == 1'b1, $sformatf("sel %0d/%0d", sel_conv, sel_lr));
    photon(2000);                        // ignored
    @(posedge clk); #1000;
    expect_st(ST_CONV, 0, 1, 0);
    check(dl_clr == 1'b1, "no clear at end of Conversion");
    @(posedge clk); #1000;
    expect_st(ST_DWELL, 0, 0, 1);
    // Busy photons left no trace.
    @(posedge clk); #1000;
    expect_st(ST_DWELL, 0, 0, 1);
    // Discarded.
    photon(5000);
    @(posedge clk); #1000;
    expect_st(ST_SELECT, 1, 0, 0);
    check(dl_clr == 1'b1, "no clear for a discarded pixel");
    @(posedge clk); #1000;
    expect_st(ST_DWELL, 0, 0, 1);
    // Re-armed at once: photon in the first Dwell period after the discard.
    photon(3000);
    @(posedge clk); #1000;
    expect_st(ST_SELECT, 1, 0, 0);
    tree_phase = 1'b0;
    sb = 4'b0001;
    @(posedge clk); #1000;
    sb = '0;
    expect_st(ST_TIMPATH, 0, 1, 0);
    check(sel_conv == 2'd0 && sel_lr == 1'b0, "second select");
    @(posedge clk); @(posedge clk); #1000;
    expect_st(ST_DWELL, 0, 0, 1);
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
