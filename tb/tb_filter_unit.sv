// tb_filter_unit: the six-tap filter. First the worked example of the
// design description (samples 2,1,2,1,2,1; high-pass coefficients
// 1,2,1,2,1,2; low-pass -1,-2,-1,-2,-1,-2) must give 12 (000C) in the
// high-pass half and -12 (FFF4) in the low-pass half; then random
// coefficient sets and operands are checked against sum_j coef_j*x[j] with
// the tap-by-tap +/-32767 clamp.
`timescale 1ns/1ps
module tb_filter_unit;
  import dwt_pkg::*;
  logic clk = 0, load = 0, phase_lo = 0;
  word_t h_in = '0, l_in = '0;
  word_t x [TAPS];
  sum_t y;
  int checks = 0, failures = 0;
  int gc[TAPS], hc[TAPS];
  filter_unit dut (.clk, .load, .h_in, .l_in, .phase_lo, .x, .y);
  always #5 clk = ~clk;
  initial begin : watchdog
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic load_coefs();
    for (int j = 0; j < TAPS; j++) begin
      @(negedge clk); load = 1; h_in = word_t'(gc[j]); l_in = word_t'(hc[j]);
    end
    @(negedge clk); load = 0;
  endtask

  function automatic int model(bit lo);
    int acc = 0, t;
    for (int j = 0; j < TAPS; j++) begin
      t = acc + (lo ? hc[j] : gc[j]) * int'(x[j]);
      acc = (j == 0) ? t : (t > 32767 ? 32767 : (t < -32767 ? -32767 : t));
    end
    return acc;
  endfunction

  initial begin
    foreach (x[j]) x[j] = '0;
    gc = '{1, 2, 1, 2, 1, 2};
    hc = '{-1, -2, -1, -2, -1, -2};
    load_coefs();
    x = '{8'sd2, 8'sd1, 8'sd2, 8'sd1, 8'sd2, 8'sd1};
    phase_lo = 0; #1; checks++; if (y !== 16'h000C) begin failures++; $display("FAIL hi %h", y); end
    phase_lo = 1; #1; checks++; if (y !== 16'hFFF4) begin failures++; $display("FAIL lo %h", y); end
    for (int t = 0; t < 30; t++) begin
      for (int j = 0; j < TAPS; j++) begin
        gc[j] = $urandom_range(255) - 128; hc[j] = $urandom_range(255) - 128;
      end
      load_coefs();
      for (int i = 0; i < 20; i++) begin
        foreach (x[j]) x[j] = word_t'($urandom);
        phase_lo = 1'($urandom); #1;
        checks++;
        if (int'(y) != model(phase_lo)) begin failures++; $display("FAIL t=%0d y=%0d m=%0d", t, y, model(phase_lo)); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
