// r16_odd_multiples: pre-computation of the odd multiples of the multiplicand
// needed by radix-16 digit multiplication.
//
// 3X = X + 2X, 5X = X + 4X and 7X = 8X - X are formed by three independent
// carry-propagate adders; 2X, 4X, 6X (= 2*3X) and 8X are plain shifts and are
// produced by the partial-product generator, not here. The results are
// MW = 67 bits wide, enough for 8X of a 64-bit X.
//
// Two details are this design's choices. The paper writes the third
// adder as "8X + X = 7X"; it is built here as 8X - X, which is what gives 7X.
// The adders are written as '+'/'-' and left to synthesis.
//
// Purely combinational (stage 1 of the pipeline).
module r16_odd_multiples
  import mfmult_pkg::*;
(
  input  logic [N-1:0]  x,
  output logic [MW-1:0] x3,
  output logic [MW-1:0] x5,
  output logic [MW-1:0] x7
);

  logic [MW-1:0] x1;
  assign x1 = MW'(x);

  assign x3 = x1 + (x1 << 1);
  assign x5 = x1 + (x1 << 2);
  assign x7 = (x1 << 3) - x1;

endmodule
