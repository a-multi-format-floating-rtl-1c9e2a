// r16_csa_tree: carry-save reduction of the partial-product array to two
// operands (sum and carry vectors).
//
// A Wallace-style tree of 3:2 carry-save adders (full adders, one per
// column) reduces NR rows of PW bits to two, level by level: each level
// groups the rows in threes and passes the 0-2 leftover rows on unchanged.
// For the default 19 rows (17 PPs, negation bits, sign-extension constant)
// the heights are 19, 13, 9, 6, 4, 3, 2: six full-adder delays.
//
// Sectioning: when 'dual' is set, the carries produced in column 63 are not
// passed to column 64, so the lower and upper 64-bit halves of the array are
// reduced independently (two binary32 products). Everything is modulo 2^PW.
//
// The paper allows 3:2 or 4:2 compressors; this tree uses 3:2 only.
//
// Purely combinational (stage 2 of the pipeline).
module r16_csa_tree
  import mfmult_pkg::*;
#(
  parameter int unsigned NR  = NROWS,  // rows to reduce
  parameter int unsigned W   = PW,     // row width
  parameter int unsigned CUT = N       // column not fed by carries in dual mode
) (
  input  logic [W-1:0] rows [NR],
  input  logic         dual,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  function automatic int unsigned next_cnt(input int unsigned c);
    return 2 * (c / 3) + (c % 3);
  endfunction

  function automatic int unsigned num_levels(input int unsigned c);
    int unsigned l, n;
    l = 0; n = c;
    while (n > 2) begin
      n = next_cnt(n);
      l++;
    end
    return l;
  endfunction

  function automatic int unsigned cnt_at(input int unsigned c, input int unsigned lev);
    int unsigned n;
    n = c;
    for (int unsigned l = 0; l < lev; l++) n = next_cnt(n);
    return n;
  endfunction

  localparam int unsigned NLEV = num_levels(NR);

  // Mask that removes the carry entering column CUT in dual mode.
  logic [W-1:0] cmask;
  always_comb begin
    cmask = '1;
    if (dual) cmask[CUT] = 1'b0;
  end

  // One array per level, so that no signal feeds itself.
  for (genvar l = 0; l < NLEV; l++) begin : g_lev
    localparam int unsigned CIN  = cnt_at(NR, l);
    localparam int unsigned NGRP = CIN / 3;
    localparam int unsigned COUT = next_cnt(CIN);
    logic [W-1:0] in_rows  [CIN];
    logic [W-1:0] out_rows [COUT];
    if (l == 0) begin : g_first
      for (genvar r = 0; r < CIN; r++) begin : g_r
        assign in_rows[r] = rows[r];
      end
    end else begin : g_next
      for (genvar r = 0; r < CIN; r++) begin : g_r
        assign in_rows[r] = g_lev[l-1].out_rows[r];
      end
    end
    for (genvar g = 0; g < NGRP; g++) begin : g_csa
      logic [W-1:0] a, b, c;
      assign a = in_rows[3*g];
      assign b = in_rows[3*g+1];
      assign c = in_rows[3*g+2];
      assign out_rows[2*g]   = a ^ b ^ c;
      assign out_rows[2*g+1] = (((a & b) | (a & c) | (b & c)) << 1) & cmask;
    end
    for (genvar r = 3*NGRP; r < CIN; r++) begin : g_pass
      assign out_rows[r - NGRP] = in_rows[r];
    end
  end

  assign sum   = g_lev[NLEV-1].out_rows[0];
  assign carry = g_lev[NLEV-1].out_rows[1];

endmodule
