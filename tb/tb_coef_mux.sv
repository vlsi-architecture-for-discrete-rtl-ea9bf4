// tb_coef_mux: random check that the coefficient multiplexer gives the
// high-pass word in the first half (phase_lo = 0) and the low-pass word in
// the second.
`timescale 1ns/1ps
module tb_coef_mux;
  import dwt_pkg::*;
  word_t h, l, y;
  logic phase_lo;
  int checks = 0, failures = 0;
  coef_mux dut (.h, .l, .phase_lo, .y);
  initial begin : watchdog
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 200; i++) begin
      h = word_t'($urandom); l = word_t'($urandom); phase_lo = 1'($urandom); #1;
      checks++;
      if (y !== (phase_lo ? l : h)) begin failures++; $display("FAIL"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
