// mfm_output_formatter: packs the normalized product and the exponents into
// the two 64-bit result ports, and optionally delivers a binary64 result in
// binary32 form (stage 3).
//
//   INT64: {p_h, p_l} = 128-bit product.
//   FP64 : p_h = {sign, exponent[10:0], pn[104:53]}; p_l = 0. With
//          reduce_en = 1 and a result that binary32 represents exactly (see
//          b64_to_b32_reducer), p_h = {32'b0, binary32 result} and
//          reduced = 1.
//   FP32 : p_h = {upper-lane binary32 (W*Z), lower-lane binary32 (X*Y)};
//          p_l = 0.
//
// Exponents are written as the low bits of the computed biased exponent:
// overflow, underflow, zero, infinity and NaN are not treated specially, as in
// the paper's unit. The port layout is the paper's; zero on the unused
// p_l and the reduce_en control are this design's choices.
//
// Purely combinational.
module mfm_output_formatter
  import mfmult_pkg::*;
(
  input  frmt_e              frmt,
  input  logic               reduce_en,
  input  logic [PW-1:0]      pn,
  input  logic               s_hi,
  input  logic signed [XW-1:0]   e_hi,
  input  logic               s_lo,
  input  logic signed [B32_EW+1:0] e_lo,
  output logic [N-1:0]       p_h,
  output logic [N-1:0]       p_l,
  output logic               reduced
);

  logic [63:0] r64;
  logic [31:0] r32_hi, r32_lo, red32;
  logic        fits;

  assign r64    = {s_hi, e_hi[B64_EW-1:0], pn[104:53]};
  assign r32_hi = {s_hi, e_hi[B32_EW-1:0], pn[110:88]};
  assign r32_lo = {s_lo, e_lo[B32_EW-1:0], pn[46:24]};

  b64_to_b32_reducer u_reduce (
    .b64  (r64),
    .fits (fits),
    .b32  (red32)
  );

  always_comb begin
    p_h     = '0;
    p_l     = '0;
    reduced = 1'b0;
    unique case (frmt)
      FMT_FP64: begin
        if (reduce_en && fits) begin
          p_h     = {32'd0, red32};
          reduced = 1'b1;
        end else begin
          p_h = r64;
        end
      end
      FMT_FP32: p_h = {r32_hi, r32_lo};
      default: begin
        p_h = pn[PW-1:N];
        p_l = pn[N-1:0];
      end
    endcase
  end

endmodule
