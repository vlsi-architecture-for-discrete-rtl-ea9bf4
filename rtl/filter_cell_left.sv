// filter_cell_left: first stage of the six-tap filter.
//
// Holds one high-pass and one low-pass coefficient register, chooses one of
// them with the coefficient multiplexer according to the half of the sample
// cycle, and multiplies the chosen coefficient by the operand the control
// unit routes to this tap. It has no incoming partial sum, so unlike the
// other five cells it has no adder: its 16-bit product is the partial sum
// handed to the next cell (this split into two cell types follows the
// document).
//
// Coefficient loading (the document says one pair is loaded per clock cycle;
// the shift chain is this design's own): on each clock edge with `load` high
// the registers take h_in/l_in, which come from the next cell of the chain
// (or from the pins for the last cell), while h_q/l_q pass the old values
// on. Reset does not touch the coefficients.
// The arithmetic path is combinational.
module filter_cell_left
  import dwt_pkg::*;
(
  input  logic  clk,
  input  logic  load,
  input  word_t h_in,
  input  word_t l_in,
  output word_t h_q,
  output word_t l_q,
  input  logic  phase_lo,
  input  word_t d,        // operand (sample or intermediate result)
  output sum_t  s         // partial sum to the next cell
);
  word_t coef;

  always_ff @(posedge clk) begin
    if (load) begin
      h_q <= h_in;
      l_q <= l_in;
    end
  end

  coef_mux   u_mux  (.h(h_q), .l(l_q), .phase_lo(phase_lo), .y(coef));
  booth_mult u_mult (.x(d), .y(coef), .z(s));
endmodule
