// p2spt_pkg: shared constants and helper functions of the P2SPT echo canceller.
//
// The canceller works on 12-bit two's-complement samples (Q1.11, 2048 = 1.0),
// keeps one 7-bit signed "counter coefficient" per tap and folds its 32 taps
// onto a single tap unit clocked at 32 x the 16 kHz sample rate (512 kHz).
// The counter c of a tap is turned into a filter coefficient by splitting |c|
// into NB base-4 digits p(i); digit i weights the power of two 2^-BASE_EXP[i]
// by 0, 1, 2 or 4 (p = 0..3), so the filter needs shifters and adders only.
// Sizes 32 / 12 / 7 / 3 are those of the published design; the base exponents
// {9,7,5} are this implementation's choice.
package p2spt_pkg;

  localparam int unsigned TAPS_DEF = 32;  // filter length, one tap per clock
  localparam int unsigned XW_DEF   = 12;  // sample word
  localparam int unsigned CW_DEF   = 7;   // counter coefficient word
  localparam int unsigned NB_DEF   = 3;   // number of power-of-two bases


  // Ternary sign used by the sign-sign update: -1, 0 or +1.
  typedef enum logic [1:0] {
    SGN_ZERO = 2'b00,
    SGN_POS  = 2'b01,
    SGN_NEG  = 2'b11
  } sgn_t;

  // Ternary sign of a two's-complement word, given its sign bit and
  // whether it is zero (so the function serves any word width).
  function automatic sgn_t sgn_of(input logic is_neg, input logic is_zero);
    if (is_zero)     return SGN_ZERO;
    else if (is_neg) return SGN_NEG;
    else             return SGN_POS;
  endfunction

  // Product of two ternary signs.
  function automatic sgn_t sgn_mul(input sgn_t a, input sgn_t b);
    if (a == SGN_ZERO || b == SGN_ZERO) return SGN_ZERO;
    else if (a == b)                    return SGN_POS;
    else                                return SGN_NEG;
  endfunction

endpackage
