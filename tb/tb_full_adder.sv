// tb_full_adder: exhaustive check of the one-bit full adder against a+b+ci.
`timescale 1ns/1ps
module tb_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;
  full_adder dut (.a, .b, .ci, .s, .co);
  initial begin : watchdog
    #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v); #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b) + int'(ci))) begin failures++; $display("FAIL %b%b%b", a, b, ci); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
