// tb_mfmult: end-to-end test of the pipelined multi-format multiplier at its
// default (and only) configuration.
//
// Random operations of all formats are issued back to back, with random
// idle cycles and format changes between consecutive issues. Every result
// is compared with a reference computed without the radix-16 datapath:
//   INT64  128-bit product of the operands (SystemVerilog '*')
//   FP64   $realtobits($bitstoreal(a) * $bitstoreal(b)) (random operands
//          almost never produce an exact tie, where the unit's ties-away
//          rounding would differ from the simulator's ties-to-even)
//   FP32   exact 48-bit significand product rounded half-up per lane
//   FP64 + reduce_en  operands with short significands whose product is
//          exactly representable in binary32 (and some that are not)
// The latency of every result is checked to be exactly 3 cycles. The test
// counts how often each mechanism occurred (each format, single-lane FP32,
// reduction taken / refused, both normalization positions in each lane,
// back-to-back issue, format switch, idle cycles) and fails if one never did.
module tb_mfmult;
  import mfmult_pkg::*;

  localparam int NOPS    = 4000;
  localparam int LAT     = 3;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid;
  frmt_e        frmt;
  logic         reduce_en;
  logic [63:0]  a, b;
  logic         out_valid;
  frmt_e        out_frmt;
  logic [63:0]  p_h, p_l;
  logic         out_reduced;

  mfmult dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    longint      t_issue;
    frmt_e       f;
    logic [63:0] ph, pl;
    logic        red;
    logic        lo_only;  // single FP32 issue: only the lower lane is checked
  } exp_t;
  exp_t q[$];

  // mechanism counters
  int n_int, n_fp64, n_fp32, n_fp32_single, n_red_yes, n_red_no;
  int n_hi_shift, n_hi_noshift, n_lo_shift, n_lo_noshift;
  int n_b2b, n_switch, n_idle;

  function automatic logic [31:0] fp32_ref(input logic [31:0] x, input logic [31:0] y,
                                            output logic top);
    logic [47:0] p;
    logic [24:0] sig;
    int          e;
    p   = {1'b1, x[22:0]} * {1'b1, y[22:0]};
    e   = int'(x[30:23]) + int'(y[30:23]) - 127;
    top = p[47];
    if (p[47]) begin sig = {1'b0, p[47:24]} + p[23]; e = e + 1; end
    else       begin sig = {1'b0, p[46:23]} + p[22]; end
    if (sig[24]) begin sig = sig >> 1; e = e + 1; end
    return {x[31] ^ y[31], e[7:0], sig[22:0]};
  endfunction

  function automatic logic [31:0] rand_fp32();
    logic [7:0] e;
    e = 8'(77 + $urandom_range(0, 100));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  function automatic logic [63:0] rand_fp64();
    logic [10:0] e;
    e = 11'(623 + $urandom_range(0, 800));
    return {1'($urandom), e, 20'($urandom), 32'($urandom)};
  endfunction

  // binary64 value with a 12-bit significand and an exponent in binary32 range
  function automatic logic [63:0] short_fp64(input int erange);
    logic [10:0] e;
    e = 11'(1023 - erange + $urandom_range(0, 2 * erange));
    return {1'($urandom), e, 11'($urandom), 41'd0};
  endfunction

  frmt_e last_f;
  logic  last_valid = 1'b0;

  task automatic issue();
    exp_t  x;
    int    kind;
    logic  t1, t2;
    logic [127:0] prod;
    kind = $urandom_range(0, 5);
    in_valid  = 1'b1;
    reduce_en = 1'b0;
    x.lo_only = 1'b0;
    x.red     = 1'b0;
    x.pl      = '0;
    unique case (kind)
      0: begin
        frmt = FMT_INT64;
        case ($urandom_range(0, 3))
          0: begin a = '1; b = '1; end
          1: begin a = {$urandom, $urandom}; b = 64'h8888_8888_8888_8888; end
          default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
        endcase
        prod = 128'(a) * 128'(b);
        x.ph = prod[127:64]; x.pl = prod[63:0];
        n_int++;
      end
      1: begin
        frmt = FMT_FP64;
        a = rand_fp64(); b = rand_fp64();
        x.ph = $realtobits($bitstoreal(a) * $bitstoreal(b));
        if ({1'b1, a[51:0]} * {1'b1, b[51:0]} >= (106'(1) << 105)) n_hi_shift++; else n_hi_noshift++;
        n_fp64++;
      end
      2, 3: begin
        frmt = FMT_FP32;
        a = {rand_fp32(), rand_fp32()};
        b = {rand_fp32(), rand_fp32()};
        if (kind == 3) begin
          a[63:32] = '0; b[63:32] = '0; x.lo_only = 1'b1; n_fp32_single++;
          x.ph = {32'd0, fp32_ref(a[31:0], b[31:0], t2)};
        end else begin
          x.ph = {fp32_ref(a[63:32], b[63:32], t1), fp32_ref(a[31:0], b[31:0], t2)};
          if (t1) n_hi_shift++; else n_hi_noshift++;
          n_fp32++;
        end
        if (t2) n_lo_shift++; else n_lo_noshift++;
      end
      default: begin
        real r;
        logic [63:0] rb;
        frmt = FMT_FP64;
        reduce_en = 1'b1;
        if ($urandom_range(0, 3) != 0) begin
          a = short_fp64(60); b = short_fp64(60);
        end else if ($urandom_range(0, 1) == 0) begin
          a = short_fp64(60); b = rand_fp64();
        end else begin
          a = short_fp64(60); b = short_fp64(60); b[62:52] = 11'(1023 + 100);
          a[62:52] = 11'(1023 + 100);
        end
        r = $bitstoreal(a) * $bitstoreal(b);
        rb = $realtobits(r);
        // binary32 holds it exactly: fraction LSBs zero, exponent in range
        if (rb[28:0] == 0 && int'(rb[62:52]) - 896 >= 1 && int'(rb[62:52]) - 896 <= 254) begin
          x.ph  = {32'd0, rb[63], 8'(int'(rb[62:52]) - 896), rb[51:29]};
          x.red = 1'b1;
          n_red_yes++;
        end else begin
          x.ph = rb;
          n_red_no++;
        end
        n_fp64++;
      end
    endcase
    if (last_valid) begin
      n_b2b++;
      if (last_f != frmt) n_switch++;
    end
    last_f = frmt;
    x.f = frmt;
    x.t_issue = cycle;
    q.push_back(x);
  endtask

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: result with no operation outstanding");
      end else begin
        e = q.pop_front();
        if (cycle - e.t_issue != longint'(LAT)) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cycle - e.t_issue, LAT);
        end
        if (out_frmt != e.f || out_reduced != e.red || p_l != e.pl ||
            (e.lo_only ? (p_h[31:0] != e.ph[31:0]) : (p_h != e.ph))) begin
          failures++;
          if (failures < 10)
            $display("FAIL: frmt %s red %0d/%0d p_h %h exp %h p_l %h exp %h",
                     e.f.name(), out_reduced, e.red, p_h, e.ph, p_l, e.pl);
        end
      end
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; frmt = FMT_INT64; reduce_en = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < NOPS; i++) begin
      @(posedge clk);
      #1;
      if ($urandom_range(0, 7) == 0) begin
        in_valid = 1'b0; last_valid = 1'b0; n_idle++;
        i--;
      end else begin
        issue();
        last_valid = 1'b1;
      end
    end
    @(posedge clk); #1 in_valid = 1'b0;
    repeat (LAT + 2) @(posedge clk);
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    $display("mechanisms: int64=%0d fp64=%0d fp32dual=%0d fp32single=%0d reduced=%0d kept64=%0d",
             n_int, n_fp64, n_fp32, n_fp32_single, n_red_yes, n_red_no);
    $display("            hi lead-upper=%0d hi lead-lower=%0d lo lead-upper=%0d lo lead-lower=%0d b2b=%0d switch=%0d idle=%0d",
             n_hi_shift, n_hi_noshift, n_lo_shift, n_lo_noshift, n_b2b, n_switch, n_idle);
    checks++;
    if (n_int == 0 || n_fp64 == 0 || n_fp32 == 0 || n_fp32_single == 0 || n_red_yes == 0 ||
        n_red_no == 0 || n_hi_shift == 0 || n_hi_noshift == 0 || n_lo_shift == 0 ||
        n_lo_noshift == 0 || n_b2b == 0 || n_switch == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * NOPS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
