// tb_counter3: the 3-bit counter counts 0..7 and wraps while enabled,
// holds while disabled and returns to 0 on reset.
`timescale 1ns/1ps
module tb_counter3;
  logic clk = 0, rst = 1, en = 0;
  logic [2:0] q;
  int checks = 0, failures = 0, model = 0;
  counter3 dut (.clk, .rst, .en, .q);
  always #5 clk = ~clk;
  initial begin : watchdog
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 100; i++) begin
      en = ($urandom_range(3) != 0);
      if (i == 60) rst = 1; else rst = 0;
      @(posedge clk);
      if (rst) model = 0; else if (en) model = (model + 1) % 8;
      #1;
      checks++;
      if (int'(q) != model) begin failures++; $display("FAIL i=%0d q=%0d model=%0d", i, q, model); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
