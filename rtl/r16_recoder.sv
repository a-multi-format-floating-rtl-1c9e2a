// r16_recoder: carry-free recoding of a 64-bit unsigned multiplier Y into 17
// radix-16 digits of the minimally redundant set {-8, ..., 8}.
//
// Each 4-bit group Y_i (bits 4i+3..4i) produces a transfer digit t_(i+1),
// which is the group's most significant bit, and a digit
//   d_i = Y_i - 16*t_(i+1) + t_i ,   t_0 = 0,
// so that sum(d_i * 16^i) = Y. The 17th digit is the last transfer, t_16 =
// Y[63]. No carry ripples: each digit depends only on five bits of Y.
// Digits are returned in sign-magnitude form (neg, mag). A zero digit always
// has neg = 0.
//
// In dual binary32 mode the two 24-bit significands sit at bits 0 and 32 of Y
// with zero bits between them, so the top group of each lane has MSB 0 and no
// transfer crosses from one lane into the other: the same recoder serves all
// formats.
//
// Purely combinational.
module r16_recoder
  import mfmult_pkg::*;
(
  input  logic [N-1:0]     y,
  output r16_digit_t       dig [NDIG]
);

  always_comb begin
    for (int i = 0; i < NDIG; i++) begin
      logic [3:0] grp;
      logic       t_in, t_out;
      logic signed [5:0] d;
      grp   = (i < NDIG - 1) ? y[4*i +: 4] : 4'd0;
      t_in  = (i == 0) ? 1'b0 : y[4*i - 1];
      t_out = grp[3];
      d     = $signed({2'b00, grp}) - $signed({1'b0, t_out, 4'b0000}) + $signed({5'b00000, t_in});
      dig[i].neg = d[5];
      dig[i].mag = d[5] ? 4'(-d) : d[3:0];
    end
  end

endmodule
