// tb_extraction_logic: 32 pixels, 4 converters. Each period picks a pixel
// per converter and tree, loads the direction bits of its path (as the
// selection tree would), then drives a pulse on that pixel's demux output
// and a decoy pulse on another pixel: only the chosen pixel's pulse may
// reach the converter line, and the other tree must keep its own path.
module tb_extraction_logic;
  timeunit 1ps; timeprecision 1ps;
  localparam int N = 32, M = 4, L = 5;
  logic clk = 1'b0, rst_n = 1'b1, tree_phase = 1'b0;
  logic [M-1:0] dir [1:N-1];
  logic [1:0][M-1:0] pin [N];
  logic [M-1:0] conv_l, conv_r;
  int checks = 0, failures = 0;
  int path [2][M];

  extraction_logic #(.N(N), .M(M)) dut (.*);

  always #6250 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t: %s", $time, what); end
  endtask

  initial begin
    for (int i = 1; i < N; i++) dir[i] = '0;
    for (int j = 0; j < N; j++) pin[j] = '0;
    #100 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    for (int t = 0; t < 2; t++) for (int x = 0; x < M; x++) path[t][x] = 0;
    repeat (100) begin
      @(negedge clk);
      tree_phase = ~tree_phase;
      for (int i = 1; i < N; i++) dir[i] = '0;
      for (int x = 0; x < M; x++) begin
        automatic int j = int'($urandom_range(N-1));
        path[tree_phase][x] = j;
        for (int d = 0; d < L; d++)
          dir[(N + j) >> (L - d)][x] = 1'((j >> (L - 1 - d)) & 1);
      end
      @(posedge clk);
      #2000;
      for (int t = 0; t < 2; t++) begin
        for (int x = 0; x < M; x++) begin
          automatic int j = path[t][x];
          automatic int decoy = (j + 1 + int'($urandom_range(N-2))) % N;
          pin[decoy][t][x] = 1'b1;
          #10;
          check((t ? conv_r[x] : conv_l[x]) == 1'b0, $sformatf("decoy %0d reached tree %0d conv %0d", decoy, t, x));
          pin[decoy][t][x] = 1'b0;
          pin[j][t][x] = 1'b1;
          #10;
          check((t ? conv_r[x] : conv_l[x]) == 1'b1, $sformatf("pixel %0d did not reach tree %0d conv %0d", j, t, x));
          pin[j][t][x] = 1'b0;
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
