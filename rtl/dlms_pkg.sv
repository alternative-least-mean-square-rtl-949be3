// dlms_pkg: shared default sizes of the delayed-LMS adaptive filters.
//
// The numbers follow the published evaluation: 12-bit two's complement input,
// output and coefficients, filters of 4, 8 and 16 taps (16 is the default
// here), a power-of-two step size of 2^-7 applied as a shift, and a hybrid
// filter built from three-tap sections. The position of the coefficient
// binary point (COEF_FRAC) is this design's own choice: 6 fraction bits give
// coefficients in -32 .. +31.98 with a step of 1/64, so that updates of size
// 2^-7 * e * x are not lost in rounding.
package dlms_pkg;

  localparam int unsigned DEF_TAPS         = 16;
  localparam int unsigned DEF_DATA_W       = 12;
  localparam int unsigned DEF_COEF_W       = 12;
  localparam int unsigned DEF_COEF_FRAC    = 6;
  localparam int unsigned DEF_MU_SHIFT     = 7;
  localparam int unsigned DEF_SECTION_TAPS = 3;

  // Width of the full-precision sum of TAPS products of DATA_W x COEF_W bits.
  function automatic int unsigned acc_width(int unsigned data_w, int unsigned coef_w,
                                            int unsigned taps);
    return data_w + coef_w + ((taps > 1) ? $clog2(taps) : 0);
  endfunction

endpackage
