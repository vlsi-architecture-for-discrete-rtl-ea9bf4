// cu_switch: one word-level switch of the control unit.
//
// A 3-bit counter tracks the slot of the eight-cycle schedule; it advances on
// each `tick` while the master control enables the unit and is held at 0
// before. The slot decodes into one of four select lines, named after the
// schedule labels of the document: 2k (TOP, the input delay line), 4k+3
// (MID, a second-octave register-bank tap), 8k+5 (BOT, a third-octave tap)
// and 8k+1 (GND, zero: the idle slot). The selector forwards the chosen word
// to this switch's filter tap; while disabled it forwards zero.
// The select is an AND-OR of select lines and data words, the function of
// the document's bit-level selector. `src` reports the decoded source.
module cu_switch
  import dwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  logic  tick,
  input  word_t top,
  input  word_t mid,
  input  word_t bot,
  output word_t q,
  output src_t  src
);
  logic [2:0] slot;
  logic       sel_t, sel_m, sel_b;

  counter3 u_cnt (.clk, .rst, .en(en && tick), .q(slot));

  always_comb begin
    src   = en ? slot_src(slot) : SRC_GND;
    sel_t = (src == SRC_TOP);
    sel_m = (src == SRC_MID);
    sel_b = (src == SRC_BOT);
    q     = (top & {DATA_W{sel_t}}) | (mid & {DATA_W{sel_m}}) | (bot & {DATA_W{sel_b}});
  end
endmodule
