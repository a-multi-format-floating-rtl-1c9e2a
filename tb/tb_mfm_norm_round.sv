// tb_mfm_norm_round: checks rounding injection, the twin adders and the
// normalization mux.
//
// A product P is formed in the testbench from random significands and split
// into a random carry-save pair (carry random, sum = P - carry, per 64-bit
// half in FP32 mode). Expected results:
//   INT64: pn == P
//   FP64 : significand P rounded half-up to 53 bits; inc_hi = 1 when the
//          rounded value has its leading 1 at bit 105 of the product scale
//   FP32 : the same per lane at 24 bits (leading 1 at 111 / 47)
// The reference rounds the exact product directly (shift, add the round bit)
// instead of through two adders and a mux. The binade is decided as the unit
// specifies: by the leading bit of P + 2^(sw-1), i.e. of the product rounded
// as if its leading 1 were in the upper position. This differs from true
// half-up rounding only for products whose upper sw bits are all ones with a
// zero round bit: those round up to the next power of two. Directed products
// for that case, and for rounding that carries into the next binade, are
// included.
module tb_mfm_norm_round;
  import mfmult_pkg::*;

  logic [127:0] sum, carry, pn;
  frmt_e        frmt;
  logic         inc_hi, inc_lo;

  mfm_norm_round dut (.*);

  int checks = 0, failures = 0;
  int n_carry_over = 0;

  // half-up rounding of a product of two SW-bit significands, returns the
  // SW-bit significand and whether the exponent increases
  function automatic logic [63:0] rnd(input logic [127:0] p, input int sw, output logic inc);
    logic [127:0] r;
    int           lead;
    r    = p + (128'(1) << (sw - 1));
    lead = r[2*sw-1] ? 2*sw-1 : 2*sw-2;
    r = (p >> (lead - sw + 1)) + 128'(p[lead - sw]);
    inc = (lead == 2*sw-1);
    if (r[sw]) begin r = r >> 1; inc = 1'b1; end
    return r[63:0];
  endfunction

  task automatic split(input logic [127:0] p, input logic dual);
    carry = {$urandom, $urandom, $urandom, $urandom};
    if (dual) begin
      sum[63:0]   = p[63:0] - carry[63:0];
      sum[127:64] = p[127:64] - carry[127:64];
    end else begin
      sum = p - carry;
    end
  endtask

  task automatic run_int(input logic [63:0] x, input logic [63:0] y);
    logic [127:0] p;
    p = 128'(x) * 128'(y);
    frmt = FMT_INT64;
    split(p, 1'b0);
    #1;
    checks++;
    if (pn != p) begin failures++; $display("FAIL int64 %h exp %h", pn, p); end
  endtask

  task automatic run_fp64(input logic [52:0] x, input logic [52:0] y);
    logic [127:0] p;
    logic [63:0]  s;
    logic         inc;
    p = 128'(x) * 128'(y);
    s = rnd(p, 53, inc);
    if (!p[105] && inc) n_carry_over++;  // rounding moved it up a binade
    frmt = FMT_FP64;
    split(p, 1'b0);
    #1;
    checks++;
    if (pn[105:53] != s[52:0] || inc_hi != inc) begin
      failures++;
      $display("FAIL fp64 p=%h sig %h exp %h inc %0d exp %0d", p, pn[105:53], s[52:0], inc_hi, inc);
    end
  endtask

  task automatic run_fp32(input logic [23:0] w, input logic [23:0] z,
                          input logic [23:0] x, input logic [23:0] y);
    logic [127:0] p;
    logic [63:0]  sh, sl;
    logic         ih, il;
    p = {16'd0, 48'(w) * 48'(z), 16'd0, 48'(x) * 48'(y)};
    sh = rnd(128'(48'(w) * 48'(z)), 24, ih);
    sl = rnd(128'(48'(x) * 48'(y)), 24, il);
    frmt = FMT_FP32;
    split(p, 1'b1);
    #1;
    checks++;
    if (pn[111:88] != sh[23:0] || pn[47:24] != sl[23:0] || inc_hi != ih || inc_lo != il) begin
      failures++;
      $display("FAIL fp32 hi %h exp %h lo %h exp %h inc %0d%0d exp %0d%0d",
               pn[111:88], sh[23:0], pn[47:24], sl[23:0], inc_hi, inc_lo, ih, il);
    end
  endtask

  initial begin
    run_int('1, '1);
    // products just below 2^105 / 2^47 that round up into the next binade
    run_fp64(53'h1f_ffff_ffff_ffff, 53'h10_0000_0000_0001);
    run_fp64(53'h16_a09e_667f_3bcd, 53'h16_a09e_667f_3bcd);
    run_fp64(53'h1f_ffff_ffff_ffff, 53'h10_0000_0000_0000);
    run_fp64(53'h1f_ffff_ffff_fffe, 53'h10_0000_0000_0001);
    run_fp32(24'hffffff, 24'h800001, 24'hb504f3, 24'hb504f3);
    for (int i = 0; i < 2000; i++) begin
      run_int({$urandom, $urandom}, {$urandom, $urandom});
      run_fp64({1'b1, 20'($urandom), 32'($urandom)}, {1'b1, 20'($urandom), 32'($urandom)});
      run_fp32({1'b1, 23'($urandom)}, {1'b1, 23'($urandom)}, {1'b1, 23'($urandom)}, {1'b1, 23'($urandom)});
    end
    $display("rounding carried into the upper binade (fp64): %0d", n_carry_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
