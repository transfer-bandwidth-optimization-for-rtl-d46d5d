// tb_selection_logic: the 32-pixel, 4-converter selection tree against an
// independent model. Per period the model ranks the requesting pixels by
// (index XOR bit-reversed priority count); the first min(4, requests) win
// and rank r gets converter K-1-r. Checked: each pixel's selection bits,
// n_trig, the address per converter and every node's direction bits
// (1 exactly at the nodes on a winner's path where it went right). Request
// patterns: random at several densities, none, all.
module tb_selection_logic;
  timeunit 1ps; timeprecision 1ps;
  localparam int N = 32, M = 4, L = 5;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] vb = '0;
  logic [M-1:0] sb [N];
  logic [M-1:0] n_trig;
  logic [L-1:0] addr [M];
  logic [M-1:0] dir [1:N-1];
  int checks = 0, failures = 0;
  int n_under = 0, n_over = 0;

  selection_logic #(.N(N), .M(M)) dut (.*);

  always #6250 clk = ~clk;

  function automatic int bitrev(input int v);
    int r = 0;
    for (int b = 0; b < L; b++) if (v & (1 << b)) r |= 1 << (L-1-b);
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int cnt;
    #100 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    cnt = 0;
    repeat (400) begin
      @(posedge clk);
      cnt++;
      begin
        automatic int dens = (cnt % 5 == 0) ? 0 : (cnt % 7 == 0) ? 100 : int'($urandom_range(40, 3));
        for (int j = 0; j < N; j++) vb[j] = ($urandom_range(99) < dens);
      end
      #100;
      begin
        automatic int order[$];
        automatic int key[N];
        automatic int k, kk;
        automatic int win[N];
        automatic logic [M-1:0] therm = '0;
        for (int j = 0; j < N; j++) begin
          win[j] = -1;
          if (vb[j]) begin order.push_back(j); key[j] = j ^ bitrev(cnt % N); end
        end
        order.sort() with (key[item]);
        k = order.size(); kk = (k < M) ? k : M;
        if (k > 0 && k < M) n_under++;
        if (k > M) n_over++;
        for (int x = 0; x < kk; x++) therm[x] = 1'b1;
        check(n_trig == therm, $sformatf("n_trig %b expected %b", n_trig, therm));
        for (int r = 0; r < kk; r++) begin
          win[order[r]] = kk - 1 - r;
          check(addr[kk-1-r] == L'(order[r]), $sformatf("addr[%0d]=%0d expected %0d", kk-1-r, addr[kk-1-r], order[r]));
        end
        for (int j = 0; j < N; j++) begin
          automatic logic [M-1:0] e = '0;
          if (win[j] >= 0) e[win[j]] = 1'b1;
          check(sb[j] == e, $sformatf("sb[%0d]=%b expected %b", j, sb[j], e));
        end
        for (int i = 1; i < N; i++) begin
          automatic logic [M-1:0] e = '0;
          automatic int d = $clog2(i + 1) - 1;
          for (int j = 0; j < N; j++)
            if (win[j] >= 0 && ((N + j) >> (L - d)) == i && ((j >> (L - 1 - d)) & 1)) e[win[j]] = 1'b1;
          check(dir[i] == e, $sformatf("dir[%0d]=%b expected %b", i, dir[i], e));
        end
      end
    end
    check(n_under > 0 && n_over > 0, "densities not covered");
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
