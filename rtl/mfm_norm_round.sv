// mfm_norm_round: combined rounding and normalization of the product
// (stage 3 of the pipeline).
//
// The product arrives in carry-save form (sum, carry). Rather than add,
// normalize and then round with a second carry-propagate addition, both
// possible roundings are computed in parallel:
//   P1 = sum + carry + R1   (correct if the leading 1 is in the upper position)
//   P0 = sum + carry + R0   (correct if the leading 1 is one position lower)
// Each injection vector has a single 1 per lane, so it is merged by a row of
// half adders (a 3:2 CSA with a sparse third input) ahead of the adder. The
// MSB of P1 then drives the normalization mux: P1 as it is, or P0 shifted
// left by one. The significand is read from the top bits of the mux output
// and everything below is truncated, which gives round-to-nearest with ties
// rounded away from zero (there is no sticky bit, so ties are not broken to
// even).
//
//   format  lead 1 at   R1 bit   R0 bit   significand after mux
//   INT64   -           none     none     pn = P0 (full 128-bit product)
//   FP64    105 / 104   52       51       pn[105:53]
//   FP32    111 / 110   87       86       pn[111:88]   (upper lane, W*Z)
//           47 / 46     23       22       pn[47:24]    (lower lane, X*Y)
//
// In FP32 mode both the CSA and the adders are split at bit 64 and each lane
// has its own mux select. inc_hi / inc_lo report that the upper position was
// taken, i.e. that the exponent must be incremented.
//
// The FP32 vectors and the FP64 behaviour follow the paper. For FP64 the
// paper places R1/R0 at bits 53/52 in one sentence but rounds by "adding
// '1' in position 52" before truncating at bit 53 in another, and its FP32
// vectors sit one bit below the truncation point; bits 52/51 are used here,
// consistent with the latter two.
//
// Purely combinational.
module mfm_norm_round
  import mfmult_pkg::*;
(
  input  logic [PW-1:0] sum,
  input  logic [PW-1:0] carry,
  input  frmt_e         frmt,
  output logic [PW-1:0] pn,      // normalized (and rounded) product
  output logic          inc_hi,  // FP64 or upper FP32: leading 1 in upper position
  output logic          inc_lo   // lower FP32: leading 1 in upper position
);

  localparam logic [PW-1:0] R1_FP64 = PW'(1) << 52;
  localparam logic [PW-1:0] R0_FP64 = PW'(1) << 51;
  localparam logic [PW-1:0] R1_FP32 = (PW'(1) << 87) | (PW'(1) << 23);
  localparam logic [PW-1:0] R0_FP32 = (PW'(1) << 86) | (PW'(1) << 22);

  logic          dual;
  logic [PW-1:0] r1, r0;
  logic [PW-1:0] p1, p0;

  assign dual = (frmt == FMT_FP32);

  always_comb begin
    unique case (frmt)
      FMT_FP64: begin r1 = R1_FP64; r0 = R0_FP64; end
      FMT_FP32: begin r1 = R1_FP32; r0 = R0_FP32; end
      default:  begin r1 = '0;      r0 = '0;      end
    endcase
  end

  // Injection CSA followed by a carry-propagate adder that is split at bit
  // 64 in dual mode.
  function automatic logic [PW-1:0] add3(input logic [PW-1:0] s, c, r, input logic split);
    logic [PW-1:0] hs, hc;
    logic [N:0]    lo;
    logic [N-1:0]  hi;
    hs = s ^ c ^ r;
    hc = ((s & c) | (s & r) | (c & r)) << 1;
    if (split) hc[N] = 1'b0;
    lo = {1'b0, hs[N-1:0]} + {1'b0, hc[N-1:0]};
    hi = hs[PW-1:N] + hc[PW-1:N] + N'(lo[N] & !split);
    return {hi, lo[N-1:0]};
  endfunction

  assign p1 = add3(sum, carry, r1, dual);
  assign p0 = add3(sum, carry, r0, dual);

  always_comb begin
    inc_hi = 1'b0;
    inc_lo = 1'b0;
    pn     = p0;
    unique case (frmt)
      FMT_FP64: begin
        inc_hi = p1[105];
        pn     = inc_hi ? p1 : (p0 << 1);
      end
      FMT_FP32: begin
        inc_hi = p1[111];
        inc_lo = p1[47];
        pn[PW-1:N] = inc_hi ? p1[PW-1:N] : (p0[PW-1:N] << 1);
        pn[N-1:0]  = inc_lo ? p1[N-1:0]  : (p0[N-1:0]  << 1);
      end
      default: ;
    endcase
  end

endmodule
