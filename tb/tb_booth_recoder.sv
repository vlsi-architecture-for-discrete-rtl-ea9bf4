// tb_booth_recoder: checks all eight bit triples against the radix-4 Booth
// digit table (digit = -2*y[i+1] + y[i] + y[i-1]).
`timescale 1ns/1ps
module tb_booth_recoder;
  logic [2:0] y;
  logic sx, s2x, comp;
  int checks = 0, failures = 0, digit, got;
  booth_recoder dut (.y, .sx, .s2x, .comp);
  initial begin : watchdog
    #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      y = 3'(v); #1;
      digit = -2 * int'(y[2]) + int'(y[1]) + int'(y[0]);
      got = (sx ? 1 : 0) + (s2x ? 2 : 0);
      if (comp) got = -got;
      checks++;
      if (got != digit || (sx && s2x) || (digit == 0 && comp)) begin
        failures++; $display("FAIL y=%b sx=%b s2x=%b comp=%b", y, sx, s2x, comp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
