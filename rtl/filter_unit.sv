// filter_unit (FU): six-tap FIR filter shared by the high-pass and low-pass
// computations.
//
// Tap j (0..5) multiplies operand x[j] by coefficient g_j (first half of the
// sample cycle, phase_lo = 0) or h_j (second half, phase_lo = 1), and the
// six products are accumulated through the chain of cells: one
// filter_cell_left followed by five filter_cells passing 16-bit partial
// sums, as in the document's filter schematic. The result
//   y = sum_j coef_j * x[j]
// is combinational; the surrounding design registers it (output register in
// the first half, register bank in the second), which gives the one-cycle
// filter latency the schedule assumes.
//
// Coefficient loading: each clock edge with `load` high shifts one
// (high, low) pair from h_in/l_in into tap 5 and moves every tap's pair one
// tap down, so after six edges the first pair given sits in tap 0. Loading
// six pairs in six clock cycles through two 8-bit buses follows the
// document; the shift-chain order is this design's choice.
module filter_unit
  import dwt_pkg::*;
(
  input  logic  clk,
  input  logic  load,
  input  word_t h_in,
  input  word_t l_in,
  input  logic  phase_lo,
  input  word_t x [TAPS],
  output sum_t  y
);
  word_t hq [TAPS];
  word_t lq [TAPS];
  word_t hi [TAPS];
  word_t li [TAPS];
  sum_t  ps [TAPS];

  for (genvar j = 0; j < TAPS; j++) begin : g_chain
    if (j == TAPS-1) begin : g_last
      assign hi[j] = h_in;
      assign li[j] = l_in;
    end else begin : g_mid
      assign hi[j] = hq[j+1];
      assign li[j] = lq[j+1];
    end
  end

  filter_cell_left u_cell0 (
    .clk, .load,
    .h_in(hi[0]), .l_in(li[0]), .h_q(hq[0]), .l_q(lq[0]),
    .phase_lo, .d(x[0]), .s(ps[0])
  );

  for (genvar j = 1; j < TAPS; j++) begin : g_cell
    filter_cell u_cell (
      .clk, .load,
      .h_in(hi[j]), .l_in(li[j]), .h_q(hq[j]), .l_q(lq[j]),
      .phase_lo, .d(x[j]), .b(ps[j-1]), .s(ps[j])
    );
  end

  assign y = ps[TAPS-1];
endmodule
