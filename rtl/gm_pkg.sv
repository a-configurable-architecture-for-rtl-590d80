// gm_pkg: widths, sizes and shared arithmetic helpers of the geometric moment generator.
//
// All data in the design is pseudo floating point: a two's complement mantissa with a separate
// unsigned radix-2 exponent, called the scale-factor (value = mantissa * 2**scale_factor).
// The widths below are the top-level parameters of the reference configuration: 270-bit
// filter operands and matrix multiplication data, 33-bit coefficient mantissas, 302-bit
// accumulator data, 14-bit scale-factors, 8-bit pixels, 512x512 images and moment orders up to
// 59 in each direction. COEF_EW (the width of the exact integer coefficients kept inside the
// coefficient generator) is this design's own number: 297 bits hold every coefficient up to
// order 59 with sign.
package gm_pkg;

  localparam int W       = 270;  // filter operand / matrix multiplication data width
  localparam int SFW     = 14;   // scale-factor width
  localparam int PIXW    = 8;    // pixel width
  localparam int CW      = 33;   // coefficient mantissa width
  localparam int AW      = 302;  // product / accumulator width (W + CW - 1)
  localparam int MAXORD  = 59;   // maximum moment order in each direction
  localparam int NMAX    = 512;  // maximum image width
  localparam int MMAX    = 512;  // maximum image height
  localparam int COEF_EW = 297;  // exact coefficient width inside the coefficient generator

  // Scale-factor arithmetic saturates nowhere: 14 bits are far more than the largest exponent
  // that a 512x512 image at order 59 can produce (about 2**10).
  typedef logic [SFW-1:0] sf_t;

endpackage
