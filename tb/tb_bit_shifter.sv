// tb_bit_shifter: for every contiguous run of selection bits and every
// thermometric count, the shifted mask ANDed with the run must be the top
// min(count, run length) bits of the run.
module tb_bit_shifter;
  timeunit 1ps; timeprecision 1ps;
  localparam int M = 4;
  logic [M-1:0] sigma, sb_in, sh;
  int checks = 0, failures = 0;

  bit_shifter #(.M(M)) dut (.sigma(sigma), .sb_in(sb_in), .sigma_shift(sh));

  initial begin
    for (int lo = 0; lo < M; lo++) begin
      for (int hi = lo; hi < M; hi++) begin
        for (int k = 0; k <= M; k++) begin
          logic [M-1:0] exp_bits;
          int take;
          sb_in = '0;
          for (int i = lo; i <= hi; i++) sb_in[i] = 1'b1;
          sigma = '0;
          for (int i = 0; i < k; i++) sigma[i] = 1'b1;
          take = (k < hi - lo + 1) ? k : hi - lo + 1;
          exp_bits = '0;
          for (int i = hi - take + 1; i <= hi; i++) exp_bits[i] = 1'b1;
          #10;
          checks++;
          if ((sh & sb_in) !== exp_bits) begin
            failures++;
            $display("FAIL run %0d..%0d k=%0d: got %b expected %b", lo, hi, k, sh & sb_in, exp_bits);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
