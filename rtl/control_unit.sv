// control_unit (CU): routes operands to the six filter taps.
//
// Six cu_switch instances, one per tap j. Switch j chooses between
//   TOP  z[j]          sample x(n-j) from the input delay line (1st octave)
//   MID  R(1+2j)       low-pass result of 1+2j cycles ago      (2nd octave)
//   BOT  R(6+4j)       low-pass result of 6+4j cycles ago      (3rd octave)
//   GND  zero                                                  (idle slot)
// according to the eight-cycle schedule: TOP in slots 0,2,4,6, MID in slots
// 3 and 7, BOT in slot 5, GND in slot 1 (schedule cycles 1..8 of the
// document's Table 3.1 are slots 0..7 here). The register taps are read off
// the forward register allocation: R1,R3,..,R11 hold the six most recent
// first-octave low-pass results in a second-octave slot, and R6,R10,..,R26
// the six most recent second-octave low-pass results in a third-octave slot.
// `src` is the source of the current slot (all switches agree).
module control_unit
  import dwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  logic  tick,
  input  word_t z  [TAPS],
  input  word_t rb [RB_LEN],
  output word_t x  [TAPS],
  output src_t  src
);
  src_t srcs [TAPS];

  for (genvar j = 0; j < TAPS; j++) begin : g_sw
    cu_switch u_sw (
      .clk, .rst, .en, .tick,
      .top(z[j]),
      .mid(rb[2*j]),
      .bot(rb[5 + 4*j]),
      .q  (x[j]),
      .src(srcs[j])
    );
  end

  assign src = srcs[0];
endmodule
