// csc_pkg: pixel types and colour-conversion constants shared by the
// anaglyph composer, the RGB-to-YCbCr converter and the top level.
//
// Pixels are 8 bits per colour channel, the range that the offsets of
// 16 and 128 in the conversion equations are written for. The nine
// conversion coefficients are kept in thousandths, exactly as the
// equations print them:
//   Y  =  0.299 R + 0.587 G + 0.114 B +  16
//   Cb = -0.169 R - 0.331 G + 0.500 B + 128
//   Cr =  0.500 R - 0.419 G - 0.081 B + 128
// fix_coef() turns a coefficient into a signed fixed-point constant with
// a chosen number of fraction bits, rounding to nearest; the fraction
// width itself is a parameter of the converter and is this design's own
// choice.
package csc_pkg;

  localparam int unsigned PIX_W = 8;
  localparam int unsigned PIX_MAX = (1 << PIX_W) - 1;

  typedef logic [PIX_W-1:0] pix_t;

  typedef struct packed {
    pix_t r;
    pix_t g;
    pix_t b;
  } rgb_t;

  typedef struct packed {
    pix_t y;
    pix_t cb;
    pix_t cr;
  } ycbcr_t;

  // Output channel index: 0 = Y, 1 = Cb, 2 = Cr.
  // Input channel index:  0 = R, 1 = G,  2 = B.
  localparam int K_MILLI [3][3] = '{
    '{ 299,  587,  114},
    '{-169, -331,  500},
    '{ 500, -419,  -81}
  };

  localparam int OFFSET [3] = '{16, 128, 128};

  // round(k_milli / 1000 * 2**frac), half away from zero
  function automatic int fix_coef(int k_milli, int unsigned frac);
    longint num;
    num = longint'(k_milli) * (longint'(1) << frac);
    if (num >= 0) return int'((num + 500) / 1000);
    else          return -int'((-num + 500) / 1000);
  endfunction

endpackage
