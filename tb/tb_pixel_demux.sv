// tb_pixel_demux: every converter, tree and enable value with the timing
// input high and low: exactly the addressed output follows the input when
// enabled, all outputs are low otherwise.
module tb_pixel_demux;
  timeunit 1ps; timeprecision 1ps;
  localparam int M = 4;
  logic tim, en, lr;
  logic [1:0] conv;
  logic [1:0][M-1:0] tout;
  int checks = 0, failures = 0;

  pixel_demux #(.M(M)) dut (.*);

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [1:0][M-1:0] e;
      {tim, en, lr, conv} = 5'(v);
      e = '0;
      if (en) e[lr][conv] = tim;
      #10;
      checks++;
      if (tout !== e) begin failures++; $display("FAIL tim=%b en=%b lr=%b conv=%0d: %b", tim, en, lr, conv, tout); end
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
