// fxp_pkg: number format and cell arithmetic shared by every module of the
// partitioned matrix engine.
//
// Matrix elements are 32-bit two's-complement fixed-point numbers with 16
// fraction bits (Q15.16). The 32-bit word length is the operand length the
// design targets; the fixed-point format and the number of fraction bits are
// this design's own choice, since only the word length is given.
//
// fx_mul truncates the 64-bit product towards minus infinity (arithmetic
// shift). fx_div truncates towards zero and returns 0 for a zero divisor
// (the algorithms assume strongly nonsingular matrices, so a zero pivot never
// occurs in valid use).
package fxp_pkg;

  localparam int unsigned W    = 32;  // word length
  localparam int unsigned FRAC = 16;  // fraction bits

  typedef logic signed [W-1:0] word_t;

  localparam word_t FX_ONE = word_t'(1 << FRAC);

  function automatic word_t fx_mul(input word_t a, input word_t b);
    logic signed [2*W-1:0] p;
    p = 64'(a) * 64'(b);
    return word_t'(p >>> FRAC);
  endfunction

  function automatic word_t fx_div(input word_t a, input word_t b);
    logic signed [2*W-1:0] n;
    logic signed [2*W-1:0] d;
    n = 64'(a) <<< FRAC;
    d = 64'(b);
    if (b == '0) return '0;
    return word_t'(n / d);
  endfunction

endpackage
