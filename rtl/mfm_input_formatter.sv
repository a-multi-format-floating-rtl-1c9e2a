// mfm_input_formatter: routes the operand bits to the significand datapath
// and to the sign/exponent units according to the format (stage 1).
//
//   INT64: X = a, Y = b (64-bit unsigned integers).
//   FP64 : X, Y = 53-bit significands (hidden bit, fraction) aligned to bit 0.
//   FP32 : a = {W, X}, b = {Z, Y} (two binary32 operands per word). The
//          24-bit significands of X and Y go to bit 0, those of W and Z to
//          bit 32 of the multiplicand and multiplier words. The 'hi' sign and
//          exponent outputs carry W, Z (upper lane), the 'lo' outputs X, Y.
//
// The hidden bit is 1 when the biased exponent is non-zero and 0 otherwise.
// The 'hi' exponent outputs are 11 bits wide and are shared by binary64 and
// the upper binary32 lane (zero-extended); 'hi_bias' is the matching bias.
// The paper names this block and says what it does; the bit placement
// follows its description of the operand alignment.
//
// Purely combinational.
module mfm_input_formatter
  import mfmult_pkg::*;
(
  input  frmt_e              frmt,
  input  logic [N-1:0]       a,
  input  logic [N-1:0]       b,
  output logic [N-1:0]       x,
  output logic [N-1:0]       y,
  output logic               dual,
  output logic               s_hi_x, s_hi_y,
  output logic [B64_EW-1:0]  e_hi_x, e_hi_y,
  output logic [B64_EW-1:0]  hi_bias,
  output logic               s_lo_x, s_lo_y,
  output logic [B32_EW-1:0]  e_lo_x, e_lo_y
);

  // 53-bit binary64 significand, 24-bit binary32 significand
  function automatic logic [52:0] sig64(input logic [63:0] v);
    return {|v[62:52], v[51:0]};
  endfunction
  function automatic logic [23:0] sig32(input logic [31:0] v);
    return {|v[30:23], v[22:0]};
  endfunction

  assign dual = (frmt == FMT_FP32);

  always_comb begin
    x = '0; y = '0;
    s_hi_x = 1'b0; s_hi_y = 1'b0; e_hi_x = '0; e_hi_y = '0;
    s_lo_x = 1'b0; s_lo_y = 1'b0; e_lo_x = '0; e_lo_y = '0;
    hi_bias = B64_EW'(B64_BIAS);
    unique case (frmt)
      FMT_FP64: begin
        x      = N'(sig64(a));
        y      = N'(sig64(b));
        s_hi_x = a[63];       s_hi_y = b[63];
        e_hi_x = a[62:52];    e_hi_y = b[62:52];
      end
      FMT_FP32: begin
        x      = {8'd0, sig32(a[63:32]), 8'd0, sig32(a[31:0])};
        y      = {8'd0, sig32(b[63:32]), 8'd0, sig32(b[31:0])};
        s_hi_x = a[63];       s_hi_y = b[63];
        e_hi_x = B64_EW'(a[62:55]);
        e_hi_y = B64_EW'(b[62:55]);
        hi_bias = B64_EW'(B32_BIAS);
        s_lo_x = a[31];       s_lo_y = b[31];
        e_lo_x = a[30:23];    e_lo_y = b[30:23];
      end
      default: begin
        x = a;
        y = b;
      end
    endcase
  end

endmodule
