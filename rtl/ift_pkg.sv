// ift_pkg: number formats, constants and fixed-point helpers shared by the
// IFT (iterative feedback tuning) microcontroller.
//
// Two number formats are used, both signed two's complement:
//   * word_t  : 12-bit Q2.10 (2 integer bits including sign, 10 fraction
//               bits). This is the width of the ADC, the DAC words, the
//               reference and the error memory, as in the original design,
//               which chose 12 bits to match 12-bit converters and Q(1,-10).
//               Signed representation is this design's choice.
//   * fx_t    : 32-bit Q11.20, the internal width of the PI controllers, the
//               plant model, the gradient filters and the parameters. The
//               original design widened intermediate results per operation
//               (e.g. u as (7,-31)); one common internal format with
//               saturation is this design's simplification.
//   * acc_t   : 44-bit Q23.20 for the gradient sums dJ/drho, which add up N
//               products.
// All multiplications round toward minus infinity (arithmetic shift) and
// saturate to the result width.
package ift_pkg;

  localparam int unsigned WORD_W = 12;
  localparam int unsigned WORD_F = 10;
  localparam int unsigned FX_W   = 32;
  localparam int unsigned FX_F   = 20;
  localparam int unsigned ACC_W  = 44;

  typedef logic signed [WORD_W-1:0] word_t;
  typedef logic signed [FX_W-1:0]   fx_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  localparam fx_t FX_MAX = {1'b0, {(FX_W-1){1'b1}}};
  localparam fx_t FX_MIN = {1'b1, {(FX_W-1){1'b0}}};

  // Real constant to Q11.20 (elaboration time only).
  function automatic fx_t fx_from_real(input real v);
    return fx_t'($rtoi(v * real'(longint'(1) << FX_F)));
  endfunction

  // Saturate a 64-bit value to fx_t.
  function automatic fx_t fx_sat64(input logic signed [63:0] v);
    if (v > 64'(FX_MAX)) return FX_MAX;
    if (v < 64'(FX_MIN)) return FX_MIN;
    return fx_t'(v);
  endfunction

  function automatic fx_t fx_add(input fx_t a, input fx_t b);
    return fx_sat64(64'(a) + 64'(b));
  endfunction

  function automatic fx_t fx_sub(input fx_t a, input fx_t b);
    return fx_sat64(64'(a) - 64'(b));
  endfunction

  // Q11.20 * Q11.20 -> Q11.20, saturating.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [63:0] prod;
    prod = 64'(a) * 64'(b);
    return fx_sat64(prod >>> FX_F);
  endfunction

  // Q2.10 word -> Q11.20.
  function automatic fx_t word_to_fx(input word_t w);
    return fx_t'(w) <<< (FX_F - WORD_F);
  endfunction

  // Q11.20 -> Q2.10 word, truncating the extra fraction bits and saturating.
  function automatic word_t fx_to_word(input fx_t v);
    fx_t s;
    s = v >>> (FX_F - WORD_F);
    if (s > fx_t'(2**(WORD_W-1) - 1)) return word_t'(2**(WORD_W-1) - 1);
    if (s < -fx_t'(2**(WORD_W-1)))    return word_t'(-(2**(WORD_W-1)));
    return word_t'(s);
  endfunction

  // Status bundle the top brings out.
  typedef struct packed {
    logic exp2;        // 1 while experiment#2 (gradient experiment) runs
    logic x_event;     // strobe: exp#1 ended with error above tolerance
    logic repeat1;     // strobe: exp#1 ended within tolerance and restarts
    logic upd_event;   // strobe: parameter update computed
    logic latched;     // strobe: update accepted into the parameter latch
    logic armed;       // tuning button pressed, waiting for an update
  } ift_status_t;

endpackage
