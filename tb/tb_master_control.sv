// tb_master_control: with one tick per two clocks, the control unit must be
// enabled exactly from the sixth sample cycle after reset (after five fill
// cycles) and stay enabled; repeated after a second reset with irregular
// ticks.
`timescale 1ns/1ps
module tb_master_control;
  logic clk = 0, rst = 1, tick = 0, cu_en;
  int checks = 0, failures = 0, ticks;
  master_control dut (.clk, .rst, .tick, .cu_en);
  always #5 clk = ~clk;
  initial begin : watchdog
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int run = 0; run < 2; run++) begin
      rst = 1; tick = 0;
      @(negedge clk); @(negedge clk); rst = 0; ticks = 0;
      for (int i = 0; i < 80; i++) begin
        tick = (run == 0) ? (i % 2 == 1) : 1'($urandom);
        #1;
        checks++;
        if (cu_en != (ticks >= 5)) begin failures++; $display("FAIL run=%0d i=%0d ticks=%0d en=%b", run, i, ticks, cu_en); end
        @(posedge clk);
        if (tick) ticks++;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
