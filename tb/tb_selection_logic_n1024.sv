// tb_selection_logic_n1024: the selection tree at the size of a 32x32 array
// (1024 pixels, 4 converters, 10 levels) against an independent model.
// Per period the model ranks the requesting pixels by (index XOR
// bit-reversed priority count); the first min(4, requests) win and rank r
// gets converter K-1-r. Checked: each pixel's selection bits, n_trig, the
// address per converter and every node's direction bits (1 exactly at the
// nodes on a winner's path where it went right). 1100 periods cover a full
// turn of the 10-bit priority counter. Request densities are drawn per
// period in parts per thousand (none, 1-5 requests, a few percent, all) so
// that both under- and over-subscribed periods occur.
module tb_selection_logic_n1024;
  timeunit 1ps; timeprecision 1ps;
  localparam int N = 1024, M = 4, L = 10;
  localparam int PERIODS = 1100;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] vb = '0;
  logic [M-1:0] sb [N];
  logic [M-1:0] n_trig;
  logic [L-1:0] addr [M];
  logic [M-1:0] dir [1:N-1];
  int checks = 0, failures = 0;
  int n_under = 0, n_over = 0, n_none = 0;

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
    repeat (PERIODS) begin
      @(posedge clk);
      cnt++;
      vb = '0;
      case (cnt % 6)
        0: ;                                                    // no request
        1, 2: repeat ($urandom_range(5, 1)) vb[$urandom_range(N-1)] = 1'b1;
        3: vb = '1;
        default: begin
          automatic int pm = int'($urandom_range(60, 2));       // per mille
          for (int j = 0; j < N; j++) vb[j] = ($urandom_range(999) < pm);
        end
      endcase
      #100;
      begin
        automatic int order[$];
        automatic int key[N];
        automatic int k, kk;
        automatic int win[N];
        automatic logic [M-1:0] therm = '0;
        automatic logic [M-1:0] edir[N];
        for (int j = 0; j < N; j++) begin
          win[j] = -1; edir[j] = '0;
          if (vb[j]) begin order.push_back(j); key[j] = j ^ bitrev(cnt % N); end
        end
        order.sort() with (key[item]);
        k = order.size(); kk = (k < M) ? k : M;
        if (k == 0) n_none++;
        if (k > 0 && k < M) n_under++;
        if (k > M) n_over++;
        for (int x = 0; x < kk; x++) therm[x] = 1'b1;
        check(n_trig == therm, $sformatf("n_trig %b expected %b", n_trig, therm));
        for (int r = 0; r < kk; r++) begin
          automatic int j = order[r];
          win[j] = kk - 1 - r;
          check(addr[kk-1-r] == L'(j), $sformatf("addr[%0d]=%0d expected %0d", kk-1-r, addr[kk-1-r], j));
          // walk the winner's path from the root: node at depth d, went right?
          for (int d = 0; d < L; d++)
            if ((j >> (L - 1 - d)) & 1) edir[(N + j) >> (L - d)][kk-1-r] = 1'b1;
        end
        for (int j = 0; j < N; j++) begin
          automatic logic [M-1:0] e = '0;
          if (win[j] >= 0) e[win[j]] = 1'b1;
          check(sb[j] == e, $sformatf("sb[%0d]=%b expected %b", j, sb[j], e));
        end
        for (int i = 1; i < N; i++)
          check(dir[i] == edir[i], $sformatf("dir[%0d]=%b expected %b", i, dir[i], edir[i]));
      end
    end
    check(n_under > 0 && n_over > 0 && n_none > 0, "densities not covered");
    $display("periods: none=%0d under=%0d over=%0d", n_none, n_under, n_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(PERIODS + 20) * 12500);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
