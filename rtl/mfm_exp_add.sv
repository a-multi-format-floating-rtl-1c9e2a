// mfm_exp_add: sign and exponent handling, first part (stage 1).
//
// For a floating-point product the sign is the XOR of the operand signs and
// the biased exponent is E_P = E_X + E_Y - B. The result is kept EW+2 bits
// wide in two's complement (one guard bit for overflow, one sign bit for
// underflow) and is corrected by +1 later, in stage 3, when the significand
// product turns out to be in [2, 4) (see mfm_exp_select).
//
// The bias is an input so that one 11-bit instance serves binary64 (B =
// 1023) and the upper binary32 lane (B = 127, exponents zero-extended), as
// the paper describes; a second instance with EW = 8 serves the lower
// binary32 lane.
//
// Purely combinational.
module mfm_exp_add #(
  parameter int unsigned EW = 11   // exponent field width
) (
  input  logic                 sx,
  input  logic                 sy,
  input  logic [EW-1:0]        ex,
  input  logic [EW-1:0]        ey,
  input  logic [EW-1:0]        bias,
  output logic                 sp,
  output logic signed [EW+1:0] ep
);

  assign sp = sx ^ sy;
  assign ep = $signed({2'b00, ex}) + $signed({2'b00, ey}) - $signed({2'b00, bias});

endmodule
