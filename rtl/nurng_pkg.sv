// nurng_pkg: configuration shared by the floating point converter, the ICDF
// lookup unit and the top of the nonuniform random number generator.
//
// The defaults are the hardware configuration of the design: a 32-bit uniform
// input vector (M), a 20-bit mantissa (MANT_BW), exponents saturating at 54
// (MAX_EXP), k = 3 mantissa bits selecting one of 2^k subsections per octave,
// 54 growing octaves in part 0 and 4 diminishing octaves in part 1, and
// coefficients c0 / c1 quantised to 46 / 23 bits so that the multiply-add fits
// one 18x25+48 bit DSP slice. The 48-bit result width and the number of
// fractional bits of the shipped normal table (COEF_FRAC) are this
// implementation's choices.
package nurng_pkg;

  localparam int unsigned M        = 32;  // width of one uniform input vector
  localparam int unsigned MANT_BW  = 20;  // mantissa bits (hidden leading 1)
  localparam int unsigned MAX_EXP  = 54;  // largest floating point exponent
  localparam int unsigned K        = 3;   // subsection bits taken from the mantissa
  localparam int unsigned N_OCT0   = 54;  // octaves in part 0 (growing)
  localparam int unsigned N_OCT1   = 4;   // octaves in part 1 (diminishing)
  localparam int unsigned C0_W     = 46;  // width of coefficient c0
  localparam int unsigned C1_W     = 23;  // width of coefficient c1
  localparam int unsigned OUT_W    = 48;  // width of the nonuniform output
  localparam int unsigned COEF_FRAC = 41; // fractional bits of c0 and of the output

  // Width of the exponent field that can hold 0 .. max_exp.
  function automatic int unsigned exp_width(int unsigned max_exp);
    return $clog2(max_exp + 1);
  endfunction

  // Width of the exponent part of the input vector (Symm., Part, exponent part,
  // mantissa part, MSB to LSB).
  function automatic int unsigned exp_part_width(int unsigned m, int unsigned mant_bw);
    return m - mant_bw - 2;
  endfunction

endpackage
