// tb_extraction_node: random inputs and direction bits. The select bits of
// tree t are taken from dir only at clock edges where tree_phase = t and
// held otherwise; each output is the right input where its select bit is 1
// and the left input elsewhere. Reset selects left.
module tb_extraction_node;
  timeunit 1ps; timeprecision 1ps;
  localparam int M = 4;
  logic clk = 1'b0, rst_n = 1'b1, tree_phase = 1'b0;
  logic [M-1:0] dir = '0;
  logic [1:0][M-1:0] in_l = '0, in_r = '0, out;
  logic [1:0][M-1:0] model;
  int checks = 0, failures = 0;

  extraction_node #(.M(M)) dut (.*);

  always #6250 clk = ~clk;

  initial begin
    #100 rst_n = 1'b0;
    #20000;
    model = '0;
    in_l = 8'hA5; in_r = 8'h5A;
    #10;
    checks++;
    if (out !== in_l) begin failures++; $display("FAIL reset does not select left"); end
    rst_n = 1'b1;
    repeat (200) begin
      @(negedge clk);
      tree_phase = 1'($urandom_range(1));
      dir = 4'($urandom_range(15));
      @(posedge clk);
      model[tree_phase] = dir;
      for (int s = 0; s < 3; s++) begin
        #1000;
        in_l = 8'($urandom_range(255)); in_r = 8'($urandom_range(255));
        #10;
        checks++;
        if (out !== ((model & in_r) | (~model & in_l))) begin
          failures++;
          $display("FAIL sel=%b l=%b r=%b out=%b", model, in_l, in_r, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
