// dwt_pkg: word widths, schedule constants and shared types of the
// three-octave systolic DWT array (DWT-SA).
//
// Samples, coefficients and register-bank words are 8-bit two's complement;
// products and filter partial sums are 16 bits. The schedule repeats every
// eight sample cycles (Table 3.1 order): even slots take the input window
// (first octave), slots 3 and 7 take the register-bank "middle" taps (second
// octave), slot 5 the "bottom" taps (third octave) and slot 1 is idle.
// Saturation limits follow the symmetric ranges the design documents
// (+/-127 for 8-bit words); the 16-bit limit of +/-32767 is this design's
// own choice, by analogy.
package dwt_pkg;

  localparam int unsigned DATA_W = 8;    // sample / coefficient / RB word
  localparam int unsigned SUM_W  = 16;   // product and partial-sum width
  localparam int unsigned TAPS   = 6;    // filter length
  localparam int unsigned ID_LEN = 5;    // input delay registers
  localparam int unsigned RB_LEN = 26;   // register bank length (FRA)

  typedef logic signed [DATA_W-1:0] word_t;
  typedef logic signed [SUM_W-1:0]  sum_t;

  // Source chosen by a control-unit switch in one sample cycle.
  typedef enum logic [1:0] {
    SRC_TOP = 2'd0,   // input delay line (first octave)
    SRC_MID = 2'd1,   // register bank, second-octave taps
    SRC_BOT = 2'd2,   // register bank, third-octave taps
    SRC_GND = 2'd3    // zero: idle slot
  } src_t;

  // Which coefficient is on the output bus.
  typedef enum logic [2:0] {
    OUT_NONE = 3'd0,
    OUT_B    = 3'd1,  // first-octave high-pass
    OUT_D    = 3'd2,  // second-octave high-pass
    OUT_F    = 3'd3,  // third-octave high-pass
    OUT_G    = 3'd4   // third-octave low-pass (taken from RB4)
  } out_kind_t;

  // Slot decode of the 3-bit schedule counter (labels of Fig. 3.6 / 4.13).
  function automatic src_t slot_src(input logic [2:0] slot);
    if (!slot[0])           return SRC_TOP;  // 2k
    else if (slot[1])       return SRC_MID;  // 4k+3
    else if (slot[2])       return SRC_BOT;  // 8k+5
    else                    return SRC_GND;  // 8k+1
  endfunction

  // Clamp a 16-bit partial sum into the 8-bit register-bank range.
  function automatic word_t sat_word(input sum_t v);
    if (v > 127)       return word_t'(127);
    else if (v < -127) return word_t'(-127);
    else               return word_t'(v);
  endfunction

  // Clamp a 17-bit sum into the 16-bit partial-sum range.
  function automatic sum_t sat_sum(input logic signed [SUM_W:0] v);
    if (v > 32767)       return sum_t'(32767);
    else if (v < -32767) return sum_t'(-32767);
    else                 return sum_t'(v);
  endfunction

endpackage
