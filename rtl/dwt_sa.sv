// dwt_sa: three-octave 1-D discrete wavelet transform, systolic array chip.
//
// One six-tap filter computes every coefficient of a three-level pyramid
// decomposition. Each sample cycle is split in two halves: the filter first
// multiplies by the high-pass coefficients g0..g5, then by the low-pass
// coefficients h0..h5 with the same multipliers. An eight-cycle schedule
// interleaves the octaves: in slots 0,2,4,6 the filter reads the input window
// (first octave, b and c), in slots 3 and 7 six earlier first-octave
// low-pass results from the register bank (second octave, d and e), in
// slot 5 six second-octave low-pass results (third octave, f and g) and
// slot 1 is idle. High-pass results leave the chip at once; every low-pass
// result enters the 26-word register bank, which is where later octaves find
// their operands. The third-octave low-pass g leaves in the idle slot four
// cycles later, read from register R4.
//
// Clocking: `clk` runs at twice the sample rate. `phase_lo` is 0 in the
// high-pass half and 1 in the low-pass half; a sample cycle ends on the
// clock edge that closes the low-pass half. The input sample `d` must be
// stable during both halves and is taken into the input delay line at that
// edge. After reset the line fills for five sample cycles and the schedule
// starts in the sixth (slot 0); the input sample of that cycle is x(5) if the
// first sample after reset is x(0).
//
// Coefficients: each clock edge with `coef_load` high takes one pair
// (h = high-pass g_j, l = low-pass h_j); give the pairs for j = 0..5 on six
// consecutive clocks, normally while `rst` is held. Reset does not clear
// them, so a loaded filter survives later resets.
//
// Output: `s` (16 bits) is updated at the end of every high-pass half while
// the schedule runs, `s_valid` pulses for one clock after the update and
// `s_kind` tells which coefficient it is (b, d, f or g).
// Arithmetic: 8-bit samples and coefficients, 16-bit products and partial
// sums clamped at +/-32767, low-pass results clamped to +/-127 when stored
// in the 8-bit register bank.
//
// The datapath, schedule, register allocation and output multiplexing
// follow the document; the doubled clock in place of the two clock levels,
// the loading protocol, reset behaviour and the output tags are this
// design's choices.
module dwt_sa
  import dwt_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      coef_load,
  input  word_t     h,
  input  word_t     l,
  input  word_t     d,
  output logic      phase_lo,
  output sum_t      s,
  output out_kind_t s_kind,
  output logic      s_valid
);
  logic  tick, hi_tick, cu_en;
  word_t z  [TAPS];
  word_t rb [RB_LEN];
  word_t x  [TAPS];
  src_t  src;
  sum_t  y;

  always_ff @(posedge clk) begin
    if (rst) phase_lo <= 1'b0;
    else     phase_lo <= ~phase_lo;
  end
  assign tick    = phase_lo;    // edge closing the low-pass half
  assign hi_tick = ~phase_lo;   // edge closing the high-pass half

  input_delay u_id (.clk, .rst, .tick, .din(d), .z);

  master_control u_mc (.clk, .rst, .tick, .cu_en);

  control_unit u_cu (.clk, .rst, .en(cu_en), .tick, .z, .rb, .x, .src);

  filter_unit u_fu (
    .clk, .load(coef_load), .h_in(h), .l_in(l),
    .phase_lo, .x, .y
  );

  register_bank u_rb (.clk, .rst, .tick, .din(sat_word(y)), .r(rb));

  output_select u_out (
    .clk, .rst, .hi_tick, .en(cu_en), .src, .y_hi(y), .r4(rb[3]),
    .s, .kind(s_kind), .s_valid
  );
endmodule
