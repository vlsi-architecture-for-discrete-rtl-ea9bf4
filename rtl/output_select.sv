// output_select: output register and multiplexer of the chip.
//
// At the end of the first half of each sample cycle (`hi_tick`) the register
// takes the high-pass filter result y_hi, tagged by the slot's source:
// TOP -> first-octave b, MID -> second-octave d, BOT -> third-octave f.
// In the idle slot (GND) the filter result is zero and the register instead
// takes register R4, which at that moment holds the third-octave low-pass
// result g computed four cycles earlier; this multiplexing lets the two
// outputs of the third-octave slot leave one per cycle, as the document
// describes. R4 is 8 bits and is sign-extended. While the control unit is
// disabled the kind is OUT_NONE and s is zero. `s_valid` pulses for one
// clock when a new word has been registered. The tags and the strobe are
// this design's additions for a user without the schedule at hand.
module output_select
  import dwt_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      hi_tick,
  input  logic      en,
  input  src_t      src,
  input  sum_t      y_hi,
  input  word_t     r4,
  output sum_t      s,
  output out_kind_t kind,
  output logic      s_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      s       <= '0;
      kind    <= OUT_NONE;
      s_valid <= 1'b0;
    end else begin
      s_valid <= hi_tick && en;
      if (hi_tick) begin
        if (!en) begin
          s    <= '0;
          kind <= OUT_NONE;
        end else begin
          unique case (src)
            SRC_TOP: begin s <= y_hi; kind <= OUT_B; end
            SRC_MID: begin s <= y_hi; kind <= OUT_D; end
            SRC_BOT: begin s <= y_hi; kind <= OUT_F; end
            SRC_GND: begin s <= SUM_W'(r4); kind <= OUT_G; end
          endcase
        end
      end
    end
  end
endmodule
