// r16_ppgen: radix-16 partial-product generation with sign-extension
// reduction and dual-lane blanking.
//
// For each recoded digit d_i the magnitude selects one multiple of the
// multiplicand (0, X, 2X, 3X, 4X, 5X, 6X = 2*3X, 7X, 8X); an XOR array
// complements it when d_i is negative (one's complement), and the missing +1
// of the two's complement goes into a separate negation-bit row at the PP's
// least significant position. Sign extension is not replicated: each PP
// carries the inverted sign bit just above its field, and one constant row
// holds the sum of the -2^k corrections of all PPs (standard sign-extension
// reduction). Output: NROWS = 19 rows of 128 bits (17 PPs, negation bits,
// constant) whose sum modulo 2^128 is X*Y.
//
// Dual binary32 mode (dual = 1): X holds X at bits 0..23 and W at bits
// 32..55, Y holds Y at bits 0..23 and Z at bits 32..55. Digits 0..7 belong to
// the lower product X*Y and use only bits 31..0 of each multiple; digits
// 8..16 belong to the upper product W*Z and use only bits 66..32 of each
// multiple, placed so that W*Z lands at bit 64. The sign-extension
// correction is done separately for each 64-bit half, so the lower half of
// the array sums to X*Y and the upper half to W*Z, provided that the
// reduction tree and the final adder do not pass carries from bit 63 into
// bit 64 (see r16_csa_tree, mfm_norm_round).
//
// The selection follows the paper's partial-product generator (mux of multiples + XOR
// array); the separate negation-bit row, the field widths used for the
// blanking and the exact constants are this design's choices.
//
// Purely combinational (stage 2 of the pipeline).
module r16_ppgen
  import mfmult_pkg::*;
(
  input  r16_digit_t    dig [NDIG],
  input  logic [N-1:0]  x,
  input  logic [MW-1:0] x3,
  input  logic [MW-1:0] x5,
  input  logic [MW-1:0] x7,
  input  logic          dual,
  output logic [PW-1:0] rows [NROWS]
);

  localparam int unsigned LO_FW = 32;       // field of a lower-lane PP
  localparam int unsigned HI_FW = MW - 32;  // field of an upper-lane PP (35)

  // Sum of the sign-extension corrections, -sum(2^(pos_i + width_i)).
  function automatic logic [PW-1:0] se_const(input bit dual_mode);
    logic [PW-1:0] k, lo, hi;
    k = '0; lo = '0; hi = '0;
    for (int i = 0; i < NDIG; i++) begin
      int p;
      if (!dual_mode) begin
        p = 4*i + MW;
        if (p < PW) k = k - (PW'(1) << p);
      end else if (i < NDIG/2) begin
        p = 4*i + LO_FW;
        lo = lo - (PW'(1) << p);
      end else begin
        p = 4*i + 32 + HI_FW;
        if (p < PW) hi = hi - (PW'(1) << p);
      end
    end
    if (dual_mode) k = {hi[PW-1:N], lo[N-1:0]};
    return k;
  endfunction

  localparam logic [PW-1:0] K_SINGLE = se_const(1'b0);
  localparam logic [PW-1:0] K_DUAL   = se_const(1'b1);

  logic [MW-1:0] x1;
  assign x1 = MW'(x);

  always_comb begin
    logic [PW-1:0] negrow;
    negrow = '0;
    for (int i = 0; i < NDIG; i++) begin
      logic [MW-1:0] m;
      logic [PW-1:0] f;
      int            pos;
      logic          ns;   // inverted sign, placed above the field
      // multiple selection (Fig. 1 mux)
      unique case (dig[i].mag)
        4'd0:    m = '0;
        4'd1:    m = x1;
        4'd2:    m = x1 << 1;
        4'd3:    m = x3;
        4'd4:    m = x1 << 2;
        4'd5:    m = x5;
        4'd6:    m = x3 << 1;
        4'd7:    m = x7;
        default: m = x1 << 3;
      endcase
      // blanking, complement, inverted sign above the field
      ns = ~dig[i].neg;
      if (!dual) begin
        f   = PW'(m ^ {MW{dig[i].neg}}) | (PW'(ns) << MW);
        pos = 4*i;
      end else if (i < NDIG/2) begin
        f   = PW'(m[LO_FW-1:0] ^ {LO_FW{dig[i].neg}}) | (PW'(ns) << LO_FW);
        pos = 4*i;
      end else begin
        f   = PW'(m[MW-1:32] ^ {HI_FW{dig[i].neg}}) | (PW'(ns) << HI_FW);
        pos = 4*i + 32;
      end
      rows[i] = f << pos;
      negrow[pos] = dig[i].neg;
    end
    rows[NDIG]     = negrow;
    rows[NDIG + 1] = dual ? K_DUAL : K_SINGLE;
  end

endmodule
