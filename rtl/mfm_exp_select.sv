// mfm_exp_select: sign and exponent handling, second part (stage 3).
//
// The exponent sum from stage 1 is incremented speculatively while the
// rounding adders work; once the normalization decision 'inc' (the MSB of
// the rounded product P1) is known, a mux picks E_P or E_P + 1. This keeps
// the exponent increment off the path that follows the significand adders.
//
// Purely combinational.
module mfm_exp_select #(
  parameter int unsigned EW = 11   // exponent field width
) (
  input  logic signed [EW+1:0] ep,
  input  logic                 inc,
  output logic signed [EW+1:0] ep_out
);

  logic signed [EW+1:0] ep_plus1;

  assign ep_plus1 = ep + (EW+2)'(1);
  assign ep_out   = inc ? ep_plus1 : ep;

endmodule
