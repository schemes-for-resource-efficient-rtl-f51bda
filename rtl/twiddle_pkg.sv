// twiddle_pkg: constants and types shared by the twiddle-factor generators.
//
// All trigonometric values are signed fixed-point words of TW_W bits with
// TW_W-2 fractional bits, so that +1.0 (needed for cos(0)) is exactly
// representable and the range is [-2.0, 2.0). The 24-bit word length is the
// one used for the silicon sizing of the twiddle-factor schemes; the number
// format itself is a choice of this design.
package twiddle_pkg;

  // Word length of every sine/cosine value and twiddle component.
  parameter int unsigned TW_W = 24;

  // The twiddle-generation schemes that the top level can select between.
  typedef enum logic [1:0] {
    SCHEME_1LEVEL = 2'd0,  // one quarter-wave LUT, no multiplies
    SCHEME_2LEVEL = 2'd1,  // coarse + one fine resolution, 4 multiplies
    SCHEME_3LEVEL = 2'd2,  // coarse + two fine resolutions, 8 multiplies
    SCHEME_KLEVEL = 2'd3   // coarse + K-1 fine resolutions
  } scheme_e;

  // Pipeline latency, in clock cycles from a valid angle index to a valid
  // twiddle factor, of each generator: one cycle of table read, two cycles
  // (products, then sums) per angle addition, one cycle of quadrant folding.
  function automatic int unsigned gen_latency(int unsigned levels);
    return 2 * levels;
  endfunction

endpackage
