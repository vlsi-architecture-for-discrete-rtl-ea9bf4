// booth_mult: 8 x 8 signed radix-4 Booth multiplier, 16-bit product.
//
// The multiplier y is split into four overlapping bit triples
// {y[2r+1], y[2r], y[2r-1]} (y[-1] = 0); a Booth recoder (BRC) turns each
// triple into a digit in {-2,-1,0,+1,+2}. For every row, nine
// shift-and-complement cells (SAC) pick bit k or bit k-1 of the multiplicand x
// (times one or times two) and invert it for negative digits; the missing
// "+1" of the two's-complement negation is added as a separate correction
// word whose bit 2r is the row's COMP. The four sign-extended rows, shifted
// by 2r, and the correction word are summed by four ripple rows of full
// adders with a half adder in bit 0.
//
// The document fixes the algorithm (Table 3.5), the cell types and the 8x8
// size; it does not give the array wiring (that figure is missing), so the
// summation order and the separate correction word are this design's own.
// Combinational, no clock.
module booth_mult
  import dwt_pkg::*;
(
  input  word_t x,   // multiplicand
  input  word_t y,   // multiplier (recoded)
  output sum_t  z
);
  localparam int unsigned ROWS = DATA_W / 2;

  logic [DATA_W:0]   yx;                 // y with the implicit y[-1] = 0
  logic [DATA_W:0]   xe;                 // x sign-extended to 9 bits
  logic [ROWS-1:0]   sx, s2x, comp;
  logic [DATA_W:0]   pp   [ROWS];        // 9-bit partial products
  logic [SUM_W-1:0]  row  [ROWS];        // sign-extended, shifted rows
  logic [SUM_W-1:0]  corr;               // negation corrections
  logic [SUM_W-1:0]  acc  [ROWS+1];

  assign yx = {y, 1'b0};
  assign xe = {x[DATA_W-1], x};

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    booth_recoder u_brc (
      .y   (yx[2*r+2 -: 3]),
      .sx  (sx[r]),
      .s2x (s2x[r]),
      .comp(comp[r])
    );
    for (genvar k = 0; k <= DATA_W; k++) begin : g_sac
      shift_complement u_sac (
        .x   (xe[k]),
        .sx  (sx[r]),
        .x2  ((k == 0) ? 1'b0 : xe[(k == 0) ? 0 : k-1]),
        .s2x (s2x[r]),
        .comp(comp[r]),
        .q   (pp[r][k])
      );
    end
    assign row[r] = SUM_W'({{(SUM_W-DATA_W-1){pp[r][DATA_W]}}, pp[r]} << (2*r));
  end

  always_comb begin
    corr = '0;
    for (int r = 0; r < ROWS; r++) corr[2*r] = comp[r];
  end

  assign acc[0] = corr;
  for (genvar r = 0; r < ROWS; r++) begin : g_sum
    ripple_adder #(.W(SUM_W)) u_add (.a(acc[r]), .b(row[r]), .s(acc[r+1]));
  end

  assign z = sum_t'(acc[ROWS]);
endmodule
