// tb_router_top_n64: the end-to-end test of tb_router_top run on a 64-pixel
// router (one 6-level selection tree, 4 converters), the size of the linear
// array built from two 32-pixel chips. The chips' master-slave link is not
// modelled: the 64 pixels form a single tree.
//
// Photons are generated at random times inside laser periods; a reference
// model ranks the requesting pixels by (index XOR the priority counter
// bit-reversed), the first min(M, requests) win and rank r gets converter
// K-1-r. n_trig, addr and out_phase are checked one period after Selection,
// and each winner's edge must arrive on its converter's L or R tree at
// photon time + delay-line delay, to the picosecond. The same phases as the
// 32-pixel test run (5 %, 30 %, 100 % rate, short tuning, calibration,
// 10 %) and every mechanism is counted and must occur.
module tb_router_top_n64;

  timeunit 1ps; timeprecision 1ps;

  localparam int N  = 64;
  localparam int M  = router_pkg::M_CONV_DEF;
  localparam int L  = $clog2(N);
  localparam int TP = router_pkg::LASER_PERIOD_PS;
  localparam int TOSC = router_pkg::OSC_PERIOD_PS;
  localparam int MAX_CYC = 1400;

  logic          clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0]  ph_spad = '0, tim_spad = '0;
  logic          cal_en = 1'b0, ph_cal = 1'b0, tim_cal = 1'b0;
  logic [L-1:0]  cal_addr = '0;
  logic [4:0]    tune = router_pkg::TUNE_DEFAULT;
  logic [M-1:0]  conv_l, conv_r, n_trig;
  logic [L-1:0]  addr [M];
  logic          out_phase;

  router_top #(.N(N)) dut (.*);

  always #(TP/2) clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;                         // rising edges since reset release

  // Reference state.
  int      idle_from [N];              // first period in which pixel is Dwell
  bit      req_now   [N];              // photon accepted in current period
  longint  ph_time   [N];              // time of that photon
  longint  exp_t     [2][M];           // expected edge time per tree
  bit      exp_v     [2][M];
  int      exp_end   [2][M];           // last period the edge may arrive in
  int      exp_pix   [M];
  int      exp_k;
  bit      exp_chk;
  int      exp_phase;
  int      sel_count [N];
  int      delay_ps;

  // Mechanism counters.
  int n_under = 0, n_over = 0, n_discard = 0, n_edge_l = 0, n_edge_r = 0;
  int n_busy_ignored = 0, n_rearm = 0, n_edge_timpath = 0, n_cal = 0, n_full = 0;

  function automatic int dl_delay(input logic [4:0] tw);
    return (router_pkg::TUNE_BASE + int'(tw[4:1])) * TOSC - (tw[0] ? 0 : TOSC/2);
  endfunction

  function automatic int bitrev(input int v);
    int r = 0;
    for (int b = 0; b < L; b++) if (v & (1 << b)) r |= 1 << (L-1-b);
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t cyc=%0d: %s", $time, cyc, what);
    end
  endtask

  // Edge monitors on the 2*M converter lines.
  task automatic got_edge(input int t, input int x);
    longint now = $time;
    check(exp_v[t][x], $sformatf("unexpected edge tree %0d conv %0d", t, x));
    if (exp_v[t][x]) begin
      check(now == exp_t[t][x], $sformatf("edge tree %0d conv %0d at %0d, expected %0d",
                                          t, x, now, exp_t[t][x]));
      exp_v[t][x] = 1'b0;
      if (t == 0) n_edge_l++; else n_edge_r++;
      if (cyc < exp_end[t][x]) n_edge_timpath++;
    end
  endtask

  for (genvar x = 0; x < M; x++) begin : g_mon
    always @(posedge conv_l[x]) if (rst_n) got_edge(0, x);
    always @(posedge conv_r[x]) if (rst_n) got_edge(1, x);
  end

  // Photon for pixel j at offset off inside the current period.
  task automatic fire(input int j, input int off);
    fork
      begin
        #(off);
        ph_spad[j] = 1'b1; tim_spad[j] = 1'b1;
        #(1000);
        ph_spad[j] = 1'b0; tim_spad[j] = 1'b0;
      end
    join_none
  endtask

  task automatic fire_cal(input int off);
    fork
      begin
        #(off);
        ph_cal = 1'b1; tim_cal = 1'b1;
        #(1000);
        ph_cal = 1'b0; tim_cal = 1'b0;
      end
    join_none
  endtask

  // Runs at every rising edge (start of period cyc): evaluate the Selection
  // that just ended (period cyc-1, requests from period cyc-2 stored in
  // req_prev), then generate this period's photons.
  bit req_prev [N];
  longint ph_prev [N];

  task automatic do_selection(input int s);
    // s: index of the Selection period that just ended.
    int key [N];
    int order [$];
    int k, kk;
    int c = s % N;
    order = {};
    for (int j = 0; j < N; j++) if (req_prev[j]) order.push_back(j);
    foreach (order[i]) key[order[i]] = order[i] ^ bitrev(c);
    order.sort() with (key[item]);
    k  = order.size();
    kk = (k < M) ? k : M;
    if (k > 0 && k < M) n_under++;
    if (k > M) n_over++;
    if (k >= N/2) n_full++;
    exp_k = kk; exp_chk = 1'b1; exp_phase = s & 1;
    for (int r = 0; r < k; r++) begin
      int j = order[r];
      if (r < kk) begin
        int x = kk - 1 - r;
        int t = s & 1;
        check(!exp_v[t][x], "tree reused while still busy in the model");
        exp_v[t][x]   = 1'b1;
        exp_t[t][x]   = ph_prev[j] + delay_ps;
        exp_end[t][x] = s + 2;
        exp_pix[x]    = j;
        idle_from[j]  = s + 3;
        sel_count[j]++;
      end else begin
        idle_from[j] = s + 1;
        disc_at[j]   = s + 1;
        n_discard++;
      end
    end
  endtask

  int rate_pct;
  bit quiet;
  bit all_fire;
  bit cal_phase;
  int disc_at [N];

  initial begin
    for (int j = 0; j < N; j++) begin
      idle_from[j] = 0; req_now[j] = 0; req_prev[j] = 0; sel_count[j] = 0;
      disc_at[j] = -1;
    end
    for (int t = 0; t < 2; t++) for (int x = 0; x < M; x++) exp_v[t][x] = 0;
    exp_chk = 0;
    delay_ps = dl_delay(tune);
    #(300);
    rst_n = 1'b0;            // falling edge so every asynchronous reset fires
    #(3*TP);
    rst_n = 1'b1;
    forever begin
      @(posedge clk);
      cyc++;
      #1;
      // Expectations whose window ended without an edge.
      for (int t = 0; t < 2; t++) for (int x = 0; x < M; x++)
        if (exp_v[t][x] && exp_end[t][x] < cyc) begin
          check(0, $sformatf("missing edge tree %0d conv %0d", t, x));
          exp_v[t][x] = 0;
        end
      // Selection that just ended used requests of period cyc-2.
      // Selection period cyc-1 has just ended; its results were registered
      // at this edge.
      do_selection(cyc - 1);
      if (exp_chk) begin
        automatic logic [M-1:0] therm = '0;
        for (int x = 0; x < exp_k; x++) therm[x] = 1'b1;
        check(n_trig == therm, $sformatf("n_trig %b expected %b", n_trig, therm));
        check(out_phase == exp_phase[0], "out_phase");
        for (int x = 0; x < exp_k; x++)
          check(addr[x] == L'(exp_pix[x]), $sformatf("addr[%0d]=%0d expected %0d", x, addr[x], exp_pix[x]));
        exp_chk = 0;
      end
      for (int j = 0; j < N; j++) begin
        req_prev[j] = req_now[j]; ph_prev[j] = ph_time[j]; req_now[j] = 0;
      end

      // Stimulus plan.
      quiet = 0; all_fire = 0; cal_phase = 0;
      if      (cyc < 300)  rate_pct = 5;
      else if (cyc < 600)  rate_pct = 30;
      else if (cyc < 664)  begin rate_pct = 100; all_fire = 1; end
      else if (cyc < 672)  quiet = 1;
      else if (cyc == 672) begin quiet = 1; tune = 5'b01110; delay_ps = dl_delay(tune); end
      else if (cyc < 900)  rate_pct = 20;
      else if (cyc < 908)  quiet = 1;
      else if (cyc == 908) begin quiet = 1; tune = router_pkg::TUNE_DEFAULT; delay_ps = dl_delay(tune); cal_en = 1; end
      else if (cyc < 1100) cal_phase = 1;
      else if (cyc < 1108) quiet = 1;
      else if (cyc == 1108) begin quiet = 1; cal_en = 0; end
      else if (cyc < 1300) rate_pct = 10;
      else quiet = 1;

      if (cyc >= 1310) begin
        for (int j = 0; j < N; j++) check(sel_count[j] > 0, $sformatf("pixel %0d never selected", j));
        $display("mechanisms: under=%0d over=%0d full=%0d discard=%0d rearm=%0d busy_ignored=%0d edgeL=%0d edgeR=%0d edge_in_timpath=%0d cal=%0d",
                 n_under, n_over, n_full, n_discard, n_rearm, n_busy_ignored, n_edge_l, n_edge_r, n_edge_timpath, n_cal);
        check(n_under > 0, "no under-subscribed period");
        check(n_over > 0, "no over-subscribed period");
        check(n_full > 0, "no period with half the array requesting");
        check(n_discard > 0, "no discarded pixel");
        check(n_rearm > 0, "no discarded pixel re-armed in the next period");
        check(n_busy_ignored > 0, "no photon ignored by a busy pixel");
        check(n_edge_l > 0 && n_edge_r > 0, "both trees not used");
        check(n_edge_timpath > 0, "no edge released during Tim_path");
        check(n_cal > 0, "no calibration measurement");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end

      if (!quiet && !cal_phase) begin
        for (int j = 0; j < N; j++) begin
          if (all_fire || ($urandom_range(99) < rate_pct)) begin
            automatic int off = (tune == router_pkg::TUNE_DEFAULT) ? int'($urandom_range(11300, 200))
                                                          : int'($urandom_range(11300, 20));
            // keep delayed edges off the clock edges
            if (off > 900 && off < 1020) off = 1100;
            fire(j, off - 1);
            if (idle_from[j] <= cyc) begin
              req_now[j] = 1; ph_time[j] = $time + off - 1;
              if (disc_at[j] == cyc) n_rearm++;
              idle_from[j] = cyc + 1000;
            end else n_busy_ignored++;
          end
        end
      end else if (cal_phase) begin
        // Calibration: one test pulse per period to the addressed pixel;
        // detector inputs toggle too and must be ignored.
        automatic int j = int'($urandom_range(N-1));
        automatic int off = int'($urandom_range(11000, 200));
        if ($urandom_range(1)) begin
          cal_addr = L'(j);
          fire_cal(off - 1);
          for (int q = 0; q < 3; q++) fire(int'($urandom_range(N-1)), int'($urandom_range(11300, 200)));
          if (idle_from[j] <= cyc) begin
            req_now[j] = 1; ph_time[j] = $time + off - 1; n_cal++;
            idle_from[j] = cyc + 1000;
          end
        end
      end
    end
  end

  // Watchdog.
  initial begin
    #(longint'(MAX_CYC + 20) * TP);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
