// mfmult_pkg: types and constants shared by the multi-format multiplier.
//
// The multiplier core is a 64x64 radix-16 unsigned multiplier (17 partial
// products, one per recoded digit) that is reused for one binary64 product or
// for two binary32 products side by side. The format codes, the widths of the
// partial-product array and the IEEE 754 field sizes live here.
package mfmult_pkg;

  // Operation format (the 'frmt' input). Encoding is this design's choice.
  typedef enum logic [1:0] {
    FMT_INT64 = 2'd0,  // 64x64 unsigned -> 128-bit product
    FMT_FP64  = 2'd1,  // one binary64 product
    FMT_FP32  = 2'd2   // two binary32 products (dual lane)
  } frmt_e;

  localparam int unsigned N        = 64;        // operand width
  localparam int unsigned PW       = 2 * N;     // product / array width
  localparam int unsigned NDIG     = N / 4 + 1; // radix-16 digits: ceil((n+1)/4) = 17
  localparam int unsigned MW       = N + 3;     // width of a multiple |d|*X, d <= 8
  localparam int unsigned NROWS    = NDIG + 2;  // PPs + negation-bit row + constant row

  // IEEE 754 binary64 / binary32 fields
  localparam int unsigned B64_EW   = 11;
  localparam int unsigned B64_FW   = 52;
  localparam int unsigned B64_BIAS = 1023;
  localparam int unsigned B32_EW   = 8;
  localparam int unsigned B32_FW   = 23;
  localparam int unsigned B32_BIAS = 127;

  // Exponent datapath width: the biased sum Ex+Ey-B with one guard bit and a
  // sign bit, so that overflow/underflow of the result is visible.
  localparam int unsigned XW       = B64_EW + 2;

  // A radix-16 recoded digit in sign-magnitude form, magnitude 0..8.
  typedef struct packed {
    logic       neg;
    logic [3:0] mag;
  } r16_digit_t;

endpackage
