// tb_select_block: exhaustive check of one selection step for M = 4.
// For every contiguous selection run that the two branches can absorb,
// both priority values and all branch counts: the outputs are disjoint,
// hold as many high bits as the input, the preferred branch receives the
// top min(its count, run length) bits and the other the rest.
module tb_select_block;
  timeunit 1ps; timeprecision 1ps;
  localparam int M = 4;
  logic [M-1:0] sb_in, sl, sr, ol, or_;
  logic p;
  int checks = 0, failures = 0;

  select_block #(.M(M)) dut (.sb_in, .sigma_l(sl), .sigma_r(sr), .p, .sb_l(ol), .sb_r(or_));

  function automatic logic [M-1:0] therm(input int n);
    logic [M-1:0] t = '0;
    for (int i = 0; i < M; i++) t[i] = (i < n);
    return t;
  endfunction

  initial begin
    for (int lo = 0; lo < M; lo++)
    for (int hi = lo - 1; hi < M; hi++)
    for (int kl = 0; kl <= M; kl++)
    for (int kr = 0; kr <= M; kr++)
    for (int pp = 0; pp < 2; pp++) begin
      automatic int n = hi - lo + 1;
      if (n <= kl + kr && (hi >= lo || lo == 0)) begin
        logic [M-1:0] e_pref, e_oth;
        int kp, take;
        sb_in = '0;
        for (int i = lo; i <= hi; i++) sb_in[i] = 1'b1;
        sl = therm(kl); sr = therm(kr); p = pp[0];
        kp = pp ? kr : kl;
        take = (kp < n) ? kp : n;
        e_pref = '0;
        for (int i = hi - take + 1; i <= hi; i++) e_pref[i] = 1'b1;
        e_oth = sb_in & ~e_pref;
        #10;
        checks++;
        if ((pp ? or_ : ol) !== e_pref || (pp ? ol : or_) !== e_oth || (ol & or_) != 0) begin
          failures++;
          $display("FAIL sb_in=%b sl=%b sr=%b p=%0d: l=%b r=%b", sb_in, sl, sr, pp, ol, or_);
        end
      end
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
