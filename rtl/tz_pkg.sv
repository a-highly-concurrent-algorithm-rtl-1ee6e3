// tz_pkg: word type and fixed-point arithmetic shared by the Toeplitz solver.
//
// The solver works on real numbers held as signed two's-complement fixed
// point with FRAC fractional bits in a WIDTH-bit word (Q15.16 by default).
// The word width and number format are this design's choice; the source
// algorithm is stated for real matrices only.
//
//   fx_mul(a, b) : (a * b) >>> FRAC, rounding toward minus infinity, result
//                  wraps to WIDTH bits.
//   fx_div(a, b) : (a << FRAC) / b, rounding toward zero, saturated to the
//                  word range; division by zero saturates to the largest
//                  magnitude with the sign of a.
// Both are purely combinational.
package tz_pkg;

  parameter int unsigned WIDTH = 32;
  parameter int unsigned FRAC  = 16;

  typedef logic signed [WIDTH-1:0]   word_t;
  typedef logic signed [2*WIDTH-1:0] dword_t;

  localparam word_t WORD_MAX = {1'b0, {(WIDTH-1){1'b1}}};
  localparam word_t WORD_MIN = {1'b1, {(WIDTH-1){1'b0}}};

  function automatic word_t fx_mul(word_t a, word_t b);
    dword_t p;
    p = dword_t'(a) * dword_t'(b);
    return word_t'(p >>> FRAC);
  endfunction

  function automatic word_t fx_div(word_t a, word_t b);
    dword_t n;
    dword_t q;
    if (b == '0) begin
      return a[WIDTH-1] ? WORD_MIN : WORD_MAX;
    end
    n = dword_t'(a) <<< FRAC;
    q = n / dword_t'(b);
    if (q > dword_t'(WORD_MAX)) return WORD_MAX;
    if (q < dword_t'(WORD_MIN)) return WORD_MIN;
    return word_t'(q);
  endfunction

endpackage
