// b64_to_b32_reducer: error-free reduction of a binary64 number to binary32.
//
// A binary64 value can be written exactly as binary32 when its biased
// exponent, rebiased for binary32, lies in 1..254 and its 29 least
// significant fraction bits are zero (the remaining 23 fit the binary32
// fraction). The checks are:
//   E32 = E64 - 896          (896 = 1023 - 127) must be > 0
//   E64 - 1151 < 0           (1151 = 896 + 255), i.e. E32 <= 254
//   M[28:0] == 0             (OR tree over the 29 fraction LSBs)
// Because the 7 LSBs of 896 are zero, E32 needs only a 5-bit adder on E64's
// top four bits (E64[10:7] - 7); the upper-bound check needs a full 12-bit
// adder since 1151 is odd. The sign passes through unchanged.
//
// Outputs: 'fits' and the binary32 encoding 'b32' (meaningful only when
// fits = 1). Zero, subnormal, infinite and NaN inputs do not fit.
//
// The range checks and the OR tree follow the paper. The paper selects
// on the sign of E32 alone (E32 >= 0) in its hardware description but asks
// for E32 > 0 in its algorithm; the algorithm is followed here, with an
// 8-input NOR that excludes E32 = 0.
//
// Purely combinational.
module b64_to_b32_reducer (
  input  logic [63:0] b64,
  output logic        fits,
  output logic [31:0] b32
);

  logic        s;
  logic [10:0] e64;
  logic [51:0] m;
  logic [4:0]  e32_hi;   // (E64 >> 7) - 7, 5-bit two's complement
  logic [7:0]  e32;
  logic [11:0] ub;       // E64 - 1151, 12-bit two's complement
  logic        e32_neg, e32_zero, ub_neg, m_lsb_nz;

  assign s   = b64[63];
  assign e64 = b64[62:52];
  assign m   = b64[51:0];

  assign e32_hi   = {1'b0, e64[10:7]} + 5'b11001;          // -7
  assign e32_neg  = e32_hi[4];
  assign e32      = {e32_hi[0], e64[6:0]};
  assign e32_zero = (e32 == 8'd0);
  assign ub       = {1'b0, e64} + 12'd2945;                // -1151 mod 4096
  assign ub_neg   = ub[11];
  assign m_lsb_nz = |m[28:0];

  assign fits = !e32_neg && !e32_zero && ub_neg && !m_lsb_nz;
  assign b32  = {s, e32, m[51:29]};

endmodule
