// tb_dwt_sa: end-to-end test of the three-octave DWT chip at its default size.
//
// Two runs, each after a reset with a fresh coefficient load: a normal run
// (small coefficients, mostly small samples with occasional large ones so the
// 8-bit register-bank clamp engages) and a stress run (large coefficients and
// samples so the 16-bit partial-sum clamp engages). The reference is the
// pyramid algorithm written directly from the filter equations:
//   C[m] = lo(x, 5+2m)        B[m] = hi(x, 5+2m)       first octave
//   E[k] = lo(C, 1+2k)        D[k] = hi(C, 1+2k)       second octave
//   G[i] = lo(E, 2i-1)        F[i] = hi(E, 2i-1)       third octave
// where hi/lo(v, n) = sum_j g_j/h_j * v[n-j], partial sums clamped at
// +/-32767 tap by tap, low-pass values clamped to +/-127, and values before
// the first one zero. Outputs are collected per kind and compared in order;
// the time of the first third-octave coefficient whose operands all come
// from real samples (sample cycle 5+38 counting the first sample as 1) and
// the eight-cycle output period are checked, and every mechanism (each
// output kind, the idle-slot R4 output, both clamps, a coefficient reload)
// must occur.
`timescale 1ns/1ps
module tb_dwt_sa;
  import dwt_pkg::*;

  localparam int NS = 400;          // samples per run
  localparam int MAXO = NS;

  logic clk = 1'b0, rst = 1'b1, coef_load = 1'b0;
  word_t h = '0, l = '0, d = '0;
  logic phase_lo, s_valid;
  sum_t s;
  out_kind_t s_kind;

  int checks = 0, failures = 0;
  int n_b, n_d, n_f, n_g, n_sat8, n_sat16, n_reload;

  dwt_sa dut (.clk, .rst, .coef_load, .h, .l, .d, .phase_lo, .s, .s_kind, .s_valid);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int gc[6], hc[6];
  int x[NS];
  int C[MAXO], B[MAXO], E[MAXO], D[MAXO], G[MAXO], F[MAXO];

  function automatic int clamp(int v, int lim);
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  // six-tap filter over v[n], v[n-1], .. v[n-5]; out-of-range indices read 0
  function automatic int fir(int cf[6], int v[], int n, int len, ref int nsat);
    int acc = 0, t;
    for (int j = 0; j < 6; j++) begin
      int idx = n - j;
      int val = (idx >= 0 && idx < len) ? v[idx] : 0;
      if (j == 0) acc = cf[0] * val;
      else begin
        t = acc + cf[j] * val;
        if (t != clamp(t, 32767)) nsat++;
        acc = clamp(t, 32767);
      end
    end
    return acc;
  endfunction

  function automatic int lo8(int v, ref int nsat);
    if (v != clamp(v, 127)) nsat++;
    return clamp(v, 127);
  endfunction

  int nc, ne, ng;
  task automatic build_reference();
    int dummy = 0;
    int xv[] = new[NS];
    int cv[] = new[MAXO];
    int ev[] = new[MAXO];
    foreach (x[k]) xv[k] = x[k];
    nc = (NS - 6) / 2 + 1;
    for (int m = 0; m < nc; m++) begin
      B[m] = fir(gc, xv, 5 + 2*m, NS, n_sat16);
      C[m] = lo8(fir(hc, xv, 5 + 2*m, NS, dummy), n_sat8);
      cv[m] = C[m];
    end
    ne = nc / 2;
    for (int k = 0; k < ne; k++) begin
      D[k] = fir(gc, cv, 1 + 2*k, nc, n_sat16);
      E[k] = lo8(fir(hc, cv, 1 + 2*k, nc, dummy), n_sat8);
      ev[k] = E[k];
    end
    ng = ne / 2;
    for (int i = 0; i < ng; i++) begin
      F[i] = fir(gc, ev, 2*i - 1, ne, n_sat16);
      G[i] = lo8(fir(hc, ev, 2*i - 1, ne, dummy), n_sat8);
    end
  endtask

  int q;   // sample-cycle index since reset release
  always @(posedge clk) begin
    if (rst) q <= 0;
    else if (phase_lo) begin
      q <= q + 1;
      d <= word_t'((q + 1 < NS) ? x[q + 1] : 0);
    end
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, q);
    end
  endtask

  task automatic run(bit stress, int seed);
    int ib, id, i_f, ig, first_full_f, last_f_q, wanted;
    void'($urandom(seed));
    for (int j = 0; j < 6; j++) begin
      gc[j] = stress ? ($urandom_range(254) - 127) : ($urandom_range(8) - 4);
      hc[j] = stress ? ($urandom_range(254) - 127) : ($urandom_range(8) - 4);
    end
    if (stress) begin gc[0] = 127; gc[1] = 127; gc[2] = 127; end
    for (int k = 0; k < NS; k++) begin
      if (stress)                        x[k] = $urandom_range(255) - 128;
      else if ($urandom_range(15) == 0)  x[k] = $urandom_range(254) - 127;
      else                               x[k] = $urandom_range(40) - 20;
    end
    build_reference();

    // reset, load the six coefficient pairs while reset is held
    rst = 1'b1;
    @(negedge clk);
    for (int j = 0; j < 6; j++) begin
      coef_load = 1'b1; h = word_t'(gc[j]); l = word_t'(hc[j]);
      @(negedge clk);
    end
    coef_load = 1'b0;
    n_reload++;
    d = word_t'(x[0]);
    @(negedge clk);
    rst = 1'b0;

    ib = 0; id = 0; i_f = 0; ig = -1; first_full_f = -1; last_f_q = -1;
    while (q < NS + 2) begin
      @(posedge clk);
      if (s_valid) begin
        unique case (s_kind)
          OUT_B: begin if (ib < nc) check("b", int'(s), B[ib]); ib++; n_b++; end
          OUT_D: begin if (id < ne) check("d", int'(s), D[id]); id++; n_d++; end
          OUT_F: begin
            if (i_f < ng) check("f", int'(s), F[i_f]);
            if (i_f == 4) first_full_f = q;
            if (last_f_q >= 0) check("f period", q - last_f_q, 8);
            last_f_q = q; i_f++; n_f++;
          end
          OUT_G: begin
            if (ig < ng) check("g", int'(s), (ig < 0) ? 0 : G[ig]);
            ig++; n_g++;
          end
          default: begin checks++; failures++; $display("FAIL: kind NONE while valid"); end
        endcase
      end
    end
    // first third-octave result on real data only: sample cycle 5+38
    // (1-based), i.e. index 42 from the first sample
    check("first full f cycle", first_full_f, 42);
    wanted = (NS - 5) / 2;
    checks++;
    if (ib < wanted - 1) begin failures++; $display("FAIL: only %0d b outputs", ib); end
  endtask

  initial begin
    n_b = 0; n_d = 0; n_f = 0; n_g = 0; n_sat8 = 0; n_sat16 = 0; n_reload = 0;
    run(1'b0, 11);
    run(1'b1, 23);
    $display("mechanisms: b=%0d d=%0d f=%0d g(R4 in idle slot)=%0d rb_clamp=%0d sum_clamp=%0d loads=%0d",
             n_b, n_d, n_f, n_g, n_sat8, n_sat16, n_reload);
    checks++; if (n_b == 0)     begin failures++; $display("FAIL: no b output"); end
    checks++; if (n_d == 0)     begin failures++; $display("FAIL: no d output"); end
    checks++; if (n_f == 0)     begin failures++; $display("FAIL: no f output"); end
    checks++; if (n_g == 0)     begin failures++; $display("FAIL: no g output"); end
    checks++; if (n_sat8 == 0)  begin failures++; $display("FAIL: 8-bit clamp never hit"); end
    checks++; if (n_sat16 == 0) begin failures++; $display("FAIL: 16-bit clamp never hit"); end
    checks++; if (n_reload < 2) begin failures++; $display("FAIL: no reload"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
