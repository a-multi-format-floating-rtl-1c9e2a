// mfmult: three-stage pipelined multi-format multiplier.
//
// One 64x64 radix-16 multiplier array serves three operations, chosen per
// issue by 'frmt':
//   INT64 : 64x64 unsigned -> 128-bit product on {p_h, p_l}
//   FP64  : one binary64 product on p_h
//   FP32  : two binary32 products per cycle: a = {W, X}, b = {Z, Y},
//           p_h = {W*Z, X*Y}
// For FP64 with reduce_en = 1 the result is returned as binary32 in
// p_h[31:0] (out_reduced = 1) whenever it is exactly representable there.
//
// Pipeline (registers after each stage, one issue per cycle, latency 3):
//   stage 1  input formatter, radix-16 recoding of Y, odd multiples
//            3X/5X/7X, sign XOR and exponent sums (two lanes)
//   stage 2  partial-product generation and carry-save tree
//   stage 3  rounding injection, twin carry-propagate adders, normalization
//            mux, speculative exponent increment and select, output
//            formatter (with the binary64 -> binary32 reducer)
// An operation presented with in_valid = 1 at clock edge k appears with
// out_valid = 1 after edge k+3. There is no stall: the unit accepts a new
// operation every cycle.
//
// FP rounding is to nearest with ties away from zero (no sticky bit);
// subnormals are treated as zero-hidden-bit operands and not rounded
// specially; overflow, underflow, infinities and NaNs are not handled. These
// limits are the paper's. The stage boundaries follow the paper's
// pipeline; the valid pipeline, the synchronous active-low reset of the
// valid bits only, and holding the data registers when no operation is
// issued are this design's choices.
module mfmult
  import mfmult_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  frmt_e        frmt,
  input  logic         reduce_en,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         out_valid,
  output frmt_e        out_frmt,
  output logic [N-1:0] p_h,
  output logic [N-1:0] p_l,
  output logic         out_reduced
);

  // ---------------------------------------------------------------- stage 1
  logic [N-1:0]        x, y;
  logic                dual;
  logic                s_hi_x, s_hi_y, s_lo_x, s_lo_y;
  logic [B64_EW-1:0]   e_hi_x, e_hi_y, hi_bias;
  logic [B32_EW-1:0]   e_lo_x, e_lo_y;
  r16_digit_t          dig [NDIG];
  logic [MW-1:0]       x3, x5, x7;
  logic                sp_hi, sp_lo;
  logic signed [XW-1:0]       ep_hi;
  logic signed [B32_EW+1:0]   ep_lo;

  mfm_input_formatter u_infmt (
    .frmt, .a, .b, .x, .y, .dual,
    .s_hi_x, .s_hi_y, .e_hi_x, .e_hi_y, .hi_bias,
    .s_lo_x, .s_lo_y, .e_lo_x, .e_lo_y
  );

  r16_recoder u_recode (.y, .dig);

  r16_odd_multiples u_odd (.x, .x3, .x5, .x7);

  mfm_exp_add #(.EW(B64_EW)) u_exp_hi (
    .sx(s_hi_x), .sy(s_hi_y), .ex(e_hi_x), .ey(e_hi_y), .bias(hi_bias),
    .sp(sp_hi), .ep(ep_hi)
  );

  mfm_exp_add #(.EW(B32_EW)) u_exp_lo (
    .sx(s_lo_x), .sy(s_lo_y), .ex(e_lo_x), .ey(e_lo_y), .bias(B32_EW'(B32_BIAS)),
    .sp(sp_lo), .ep(ep_lo)
  );

  // stage 1 -> 2 registers
  logic                      v1, red1, dual1;
  frmt_e                     frmt1;
  r16_digit_t                dig1 [NDIG];
  logic [N-1:0]              x1;
  logic [MW-1:0]             x3_1, x5_1, x7_1;
  logic                      sp_hi1, sp_lo1;
  logic signed [XW-1:0]      ep_hi1;
  logic signed [B32_EW+1:0]  ep_lo1;

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
    if (in_valid) begin
      frmt1  <= frmt;
      red1   <= reduce_en;
      dual1  <= dual;
      dig1   <= dig;
      x1     <= x;
      x3_1   <= x3;
      x5_1   <= x5;
      x7_1   <= x7;
      sp_hi1 <= sp_hi;
      sp_lo1 <= sp_lo;
      ep_hi1 <= ep_hi;
      ep_lo1 <= ep_lo;
    end
  end

  // ---------------------------------------------------------------- stage 2
  logic [PW-1:0] rows [NROWS];
  logic [PW-1:0] csum, ccarry;

  r16_ppgen u_ppgen (
    .dig(dig1), .x(x1), .x3(x3_1), .x5(x5_1), .x7(x7_1), .dual(dual1), .rows
  );

  r16_csa_tree u_tree (.rows, .dual(dual1), .sum(csum), .carry(ccarry));

  // stage 2 -> 3 registers
  logic                      v2, red2;
  frmt_e                     frmt2;
  logic [PW-1:0]             sum2, carry2;
  logic                      sp_hi2, sp_lo2;
  logic signed [XW-1:0]      ep_hi2;
  logic signed [B32_EW+1:0]  ep_lo2;

  always_ff @(posedge clk) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
    if (v1) begin
      frmt2  <= frmt1;
      red2   <= red1;
      sum2   <= csum;
      carry2 <= ccarry;
      sp_hi2 <= sp_hi1;
      sp_lo2 <= sp_lo1;
      ep_hi2 <= ep_hi1;
      ep_lo2 <= ep_lo1;
    end
  end

  // ---------------------------------------------------------------- stage 3
  logic [PW-1:0]             pn;
  logic                      inc_hi, inc_lo;
  logic signed [XW-1:0]      e_hi;
  logic signed [B32_EW+1:0]  e_lo;
  logic [N-1:0]              ph_d, pl_d;
  logic                      red_d;

  mfm_norm_round u_round (
    .sum(sum2), .carry(carry2), .frmt(frmt2), .pn, .inc_hi, .inc_lo
  );

  mfm_exp_select #(.EW(B64_EW)) u_esel_hi (.ep(ep_hi2), .inc(inc_hi), .ep_out(e_hi));
  mfm_exp_select #(.EW(B32_EW)) u_esel_lo (.ep(ep_lo2), .inc(inc_lo), .ep_out(e_lo));

  mfm_output_formatter u_outfmt (
    .frmt(frmt2), .reduce_en(red2), .pn,
    .s_hi(sp_hi2), .e_hi, .s_lo(sp_lo2), .e_lo,
    .p_h(ph_d), .p_l(pl_d), .reduced(red_d)
  );

  // output registers
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v2;
    if (v2) begin
      out_frmt    <= frmt2;
      p_h         <= ph_d;
      p_l         <= pl_d;
      out_reduced <= red_d;
    end
  end

endmodule
