// mbda_pkg: constants and helpers shared by the MBDA adaptive filter.
//
// The default sizes are the main configuration evaluated for the filter:
// p = L = 128 taps/block length, M = 64 memory blocks (R = p/M = 2 taps per
// block) and B = 16-bit input words. The partial-product width, its fraction
// bits and the step-size shift are this design's own choices; the published
// architecture gives no number for them.
//
// sat_to() clamps a wide two's-complement value into a narrower signed width;
// every adder that narrows its result in this design goes through it.
package mbda_pkg;

  localparam int unsigned P_DEF        = 128; // taps p
  localparam int unsigned L_DEF        = 128; // block length L
  localparam int unsigned M_DEF        = 64;  // number of WAFS memories M
  localparam int unsigned B_DEF        = 16;  // input word length B
  localparam int unsigned PW_DEF       = 24;  // partial-product / output width (own choice)
  localparam int unsigned FRAC_DEF     = 20;  // fraction bits of PW-wide values (own choice)
  localparam int unsigned MU_SHIFT_DEF = 9;   // 0.5*R*mu/L = 2^-MU_SHIFT (own choice)

  // Clamp v into a w-bit signed range (w <= 63).
  function automatic logic signed [63:0] sat_to(input logic signed [63:0] v,
                                                input int unsigned w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (w - 1));
    if (v > hi)      return hi;
    else if (v < lo) return lo;
    else             return v;
  endfunction

endpackage
