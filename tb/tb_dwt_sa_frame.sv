// tb_dwt_sa_frame: row pass of a 512 x 512 image through the DWT chip.
//
// Each image row is streamed as 512 samples followed by 38 zero samples that
// drain the pipeline (550 sample cycles per row), with a short reset between
// rows that keeps the loaded coefficients. The image is generated (a 4-bit
// pattern, centred on zero) and the filters are a six-tap Daubechies pair
// scaled to small integers: low-pass h = 1,3,2,-1,0,0 and its mirror
// high-pass g_k = (-1)^k h_(5-k). Every b, d, f and g output of every row is
// compared with the pyramid algorithm computed from the row (same clamping
// rules as the chip). Per row, at least 512 coefficients (256 b, 128 d,
// 64 f, 64 g) must come out within the 550 cycles. The reset between rows
// costs one more sample cycle (two clocks), so the frame takes 512 x 551
// sample cycles; the testbench reports that total.
`timescale 1ns/1ps
module tb_dwt_sa_frame;
  import dwt_pkg::*;

  localparam int ROWS  = 512;
  localparam int COLS  = 512;
  localparam int DRAIN = 38;
  localparam int NS    = COLS + DRAIN;

  logic clk = 1'b0, rst = 1'b1, coef_load = 1'b0;
  word_t h = '0, l = '0, d = '0;
  logic phase_lo, s_valid;
  sum_t s;
  out_kind_t s_kind;

  int checks = 0, failures = 0;
  longint total_cycles = 0;

  dwt_sa dut (.clk, .rst, .coef_load, .h, .l, .d, .phase_lo, .s, .s_kind, .s_valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (ROWS * (2 * NS + 8) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hc[6] = '{1, 3, 2, -1, 0, 0};
  int gc[6];
  int x[NS];
  int C[NS], B[NS], E[NS], D[NS], G[NS], F[NS];
  int nc, ne, ng;

  function automatic int clamp(int v, int lim);
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  function automatic int fir(int cf[6], int v[], int n, int len);
    int acc = 0;
    for (int j = 0; j < 6; j++) begin
      int idx = n - j;
      int val = (idx >= 0 && idx < len) ? v[idx] : 0;
      acc = (j == 0) ? cf[0] * val : clamp(acc + cf[j] * val, 32767);
    end
    return acc;
  endfunction

  task automatic build_reference();
    int xv[] = new[NS];
    int cv[] = new[NS];
    int ev[] = new[NS];
    foreach (x[k]) xv[k] = x[k];
    nc = (NS - 6) / 2 + 1;
    for (int m = 0; m < nc; m++) begin
      B[m] = fir(gc, xv, 5 + 2*m, NS);
      C[m] = clamp(fir(hc, xv, 5 + 2*m, NS), 127);
      cv[m] = C[m];
    end
    ne = nc / 2;
    for (int k = 0; k < ne; k++) begin
      D[k] = fir(gc, cv, 1 + 2*k, nc);
      E[k] = clamp(fir(hc, cv, 1 + 2*k, nc), 127);
      ev[k] = E[k];
    end
    ng = ne / 2;
    for (int i = 0; i < ng; i++) begin
      F[i] = fir(gc, ev, 2*i - 1, ne);
      G[i] = clamp(fir(hc, ev, 2*i - 1, ne), 127);
    end
  endtask

  int q;
  always @(posedge clk) begin
    if (rst) q <= 0;
    else if (phase_lo) begin
      q <= q + 1;
      d <= word_t'((q + 1 < NS) ? x[q + 1] : 0);
    end
  end

  task automatic check(string what, int got, int exp, int row);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL row %0d %s: got %0d expected %0d (cycle %0d)", row, what, got, exp, q);
    end
  endtask

  initial begin
    int ib, id, i_f, ig;
    for (int k = 0; k < 6; k++) gc[k] = ((k % 2) ? -1 : 1) * hc[5 - k];

    // load coefficients once, under reset
    @(negedge clk);
    for (int j = 0; j < 6; j++) begin
      coef_load = 1'b1; h = word_t'(gc[j]); l = word_t'(hc[j]);
      @(negedge clk);
    end
    coef_load = 1'b0;

    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < NS; c++)
        x[c] = (c < COLS) ? (((r * 7 + c * 3) ^ (r * c / 16)) % 16) - 8 : 0;
      build_reference();
      rst = 1'b1;
      d = word_t'(x[0]);
      @(negedge clk); @(negedge clk);
      rst = 1'b0;
      ib = 0; id = 0; i_f = 0; ig = -1;
      while (q < NS) begin
        @(posedge clk);
        if (s_valid) begin
          unique case (s_kind)
            OUT_B: begin if (ib < nc) check("b", int'(s), B[ib], r); ib++; end
            OUT_D: begin if (id < ne) check("d", int'(s), D[id], r); id++; end
            OUT_F: begin if (i_f < ng) check("f", int'(s), F[i_f], r); i_f++; end
            OUT_G: begin if (ig < ng) check("g", int'(s), (ig < 0) ? 0 : G[ig], r); ig++; end
            default: begin checks++; failures++; end
          endcase
        end
      end
      total_cycles += NS + 1;
      checks++;
      if (ib < COLS/2 || id < COLS/4 || i_f < COLS/8 || ig < COLS/8) begin
        failures++;
        $display("FAIL row %0d: b=%0d d=%0d f=%0d g=%0d within %0d cycles", r, ib, id, i_f, ig, NS);
      end
    end
    $display("rows %0d, samples per row %0d: %0d sample cycles (%0d per row with reset)", ROWS, COLS, total_cycles, NS + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
