// tb_control_unit: checks the operands routed to the six taps in every slot
// of the schedule: x(n-j) from the delay line in slots 0,2,4,6; registers
// R1,R3,R5,R7,R9,R11 in slots 3,7; R6,R10,R14,R18,R22,R26 in slot 5; zeros
// in slot 1 and while disabled.
`timescale 1ns/1ps
module tb_control_unit;
  import dwt_pkg::*;
  logic clk = 0, rst = 1, en = 0, tick = 0;
  word_t z [TAPS];
  word_t rb [RB_LEN];
  word_t x [TAPS];
  src_t src;
  int checks = 0, failures = 0, slot = 0, e;
  int mid_reg[TAPS] = '{1, 3, 5, 7, 9, 11};
  int bot_reg[TAPS] = '{6, 10, 14, 18, 22, 26};
  control_unit dut (.clk, .rst, .en, .tick, .z, .rb, .x, .src);
  always #5 clk = ~clk;
  initial begin : watchdog
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    foreach (z[j]) z[j] = '0;
    foreach (rb[k]) rb[k] = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 200; i++) begin
      en = (i >= 5);
      tick = (i % 2 == 1);
      foreach (z[j]) z[j] = word_t'($urandom);
      foreach (rb[k]) rb[k] = word_t'($urandom);
      #1;
      for (int j = 0; j < TAPS; j++) begin
        if (!en || slot == 1) e = 0;
        else if (slot % 2 == 0) e = int'(z[j]);
        else if (slot == 3 || slot == 7) e = int'(rb[mid_reg[j] - 1]);
        else e = int'(rb[bot_reg[j] - 1]);
        checks++;
        if (int'(x[j]) != e) begin failures++; if (failures < 10) $display("FAIL slot=%0d tap=%0d", slot, j); end
      end
      @(posedge clk);
      if (en && tick) slot = (slot + 1) % 8;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
