// tb_shift_complement: exhaustive check of the Booth shift-and-complement
// cell: selected bit (x if sx, the lower bit x2 if s2x) inverted by comp.
`timescale 1ns/1ps
module tb_shift_complement;
  logic x, sx, x2, s2x, comp, q, e;
  int checks = 0, failures = 0;
  shift_complement dut (.x, .sx, .x2, .s2x, .comp, .q);
  initial begin : watchdog
    #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 32; v++) begin
      {x, sx, x2, s2x, comp} = 5'(v);
      if (sx && s2x) continue;          // the recoder never sets both
      #1;
      e = sx ? x : s2x ? x2 : 1'b0;
      if (comp) e = !e;
      checks++;
      if (q !== e) begin failures++; $display("FAIL v=%b q=%b", 5'(v), q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
