// Shared types and helpers of the aging-aware adaptive FIR filter.
//
// bypass_e selects which bypassing array multiplier sits inside an
// aging-aware multiplier, and therefore which operand the adaptive hold
// logic inspects: the multiplicand for column bypassing, the multiplier for
// row bypassing. The helper functions implement the sign-magnitude wrapping
// the filter uses to run signed samples through the unsigned arrays, and the
// saturation used on every fixed-point result. Neither the encoding nor the
// number format is fixed by the design description; both are choices of
// this implementation.
package aafir_pkg;

  typedef enum logic {
    BYPASS_COLUMN = 1'b0,
    BYPASS_ROW    = 1'b1
  } bypass_e;

  // Magnitude of a two's-complement value (the most negative value maps to
  // 2**(W-1), which still fits in W unsigned bits).
  function automatic logic [31:0] magnitude(input logic signed [31:0] v);
    return (v < 0) ? 32'(-v) : 32'(v);
  endfunction

  // Clamp a wide signed value into a W-bit two's-complement range.
  function automatic logic signed [63:0] saturate(input logic signed [63:0] v,
                                                  input int unsigned w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
