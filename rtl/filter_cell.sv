// filter_cell: stage 2..6 of the six-tap filter.
//
// Same as the left cell (H and L coefficient registers, coefficient
// multiplexer driven by the half of the sample cycle, Booth multiplier),
// plus the adder that adds this tap's product to the partial sum b coming
// from the previous cell. Partial sums are 16 bits wide as in the cell
// schematic; the adder clamps to +/-32767 instead of wrapping, following the
// document's statement that overflowing intermediate results are clamped to
// the extreme values.
//
// Coefficients load through the same shift chain as in filter_cell_left.
// The arithmetic path is combinational.
module filter_cell
  import dwt_pkg::*;
(
  input  logic  clk,
  input  logic  load,
  input  word_t h_in,
  input  word_t l_in,
  output word_t h_q,
  output word_t l_q,
  input  logic  phase_lo,
  input  word_t d,        // operand
  input  sum_t  b,        // partial sum from the previous cell
  output sum_t  s         // partial sum to the next cell
);
  word_t coef;
  sum_t  prod;

  always_ff @(posedge clk) begin
    if (load) begin
      h_q <= h_in;
      l_q <= l_in;
    end
  end

  coef_mux   u_mux  (.h(h_q), .l(l_q), .phase_lo(phase_lo), .y(coef));
  booth_mult u_mult (.x(d), .y(coef), .z(prod));

  always_comb s = sat_sum((SUM_W+1)'(signed'(prod)) + (SUM_W+1)'(signed'(b)));
endmodule
