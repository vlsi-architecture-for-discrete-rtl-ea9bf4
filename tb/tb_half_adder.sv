// tb_half_adder: exhaustive check of the one-bit half adder against a+b.
`timescale 1ns/1ps
module tb_half_adder;
  logic a, b, s, co;
  int checks = 0, failures = 0;
  half_adder dut (.a, .b, .s, .co);
  initial begin : watchdog
    #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v); #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b))) begin failures++; $display("FAIL %b%b", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
