// tb_mfmult_formats: the per-format streams used to compare the formats'
// throughput and energy: int64, binary64, dual binary32 and single binary32.
//
// For each format a block of NOPS operations with pseudo-random operands is
// issued on consecutive cycles. The test checks every result (same
// references as tb_mfmult), that the block completes in exactly NOPS + 3
// cycles (one issue per cycle, latency 3), and reports the multiplications
// completed per cycle: 1 for int64, binary64 and single binary32, 2 for dual
// binary32.
module tb_mfmult_formats;
  import mfmult_pkg::*;

  localparam int NOPS = 1000;
  localparam int LAT  = 3;
  localparam int SPAN = NOPS - 1 + LAT;  // first issue to last result

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
  int nres = 0;
  longint cycle = 0, t_last = 0;
  always @(posedge clk) cycle <= cycle + 1;
  logic lo_only;

  logic [63:0] qh[$], ql[$];
  string       fname [4] = '{"int64", "binary64", "binary32 dual", "binary32 single"};

  function automatic logic [31:0] fp32_ref(input logic [31:0] x, input logic [31:0] y);
    logic [47:0] p;
    logic [24:0] sig;
    int          e;
    p = {1'b1, x[22:0]} * {1'b1, y[22:0]};
    e = int'(x[30:23]) + int'(y[30:23]) - 127;
    if (p[47]) begin sig = {1'b0, p[47:24]} + p[23]; e = e + 1; end
    else       begin sig = {1'b0, p[46:23]} + p[22]; end
    if (sig[24]) begin sig = sig >> 1; e = e + 1; end
    return {x[31] ^ y[31], e[7:0], sig[22:0]};
  endfunction

  function automatic logic [31:0] rand_fp32();
    return {1'($urandom), 8'(77 + $urandom_range(0, 100)), 23'($urandom)};
  endfunction

  function automatic logic [63:0] rand_fp64();
    return {1'($urandom), 11'(623 + $urandom_range(0, 800)), 20'($urandom), 32'($urandom)};
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [63:0] eh, el;
      eh = qh.pop_front();
      el = ql.pop_front();
      nres++;
      t_last = cycle;
      checks++;
      if ((lo_only ? p_h[31:0] != eh[31:0] : p_h != eh) || p_l != el) begin
        failures++;
        if (failures < 10) $display("FAIL %s p_h=%h exp %h p_l=%h exp %h", out_frmt.name(), p_h, eh, p_l, el);
      end
    end
  end

  task automatic stream(input int kind);
    longint t0, t1;
    logic [127:0] prod;
    nres = 0;
    lo_only = (kind == 3);
    @(posedge clk);
    for (int i = 0; i < NOPS; i++) begin
      #1;
      if (i == 0) t0 = cycle;
      in_valid = 1'b1;
      unique case (kind)
        0: begin
          frmt = FMT_INT64; a = {$urandom, $urandom}; b = {$urandom, $urandom};
          prod = 128'(a) * 128'(b);
          qh.push_back(prod[127:64]); ql.push_back(prod[63:0]);
        end
        1: begin
          frmt = FMT_FP64; a = rand_fp64(); b = rand_fp64();
          qh.push_back($realtobits($bitstoreal(a) * $bitstoreal(b))); ql.push_back('0);
        end
        2: begin
          frmt = FMT_FP32; a = {rand_fp32(), rand_fp32()}; b = {rand_fp32(), rand_fp32()};
          qh.push_back({fp32_ref(a[63:32], b[63:32]), fp32_ref(a[31:0], b[31:0])}); ql.push_back('0);
        end
        default: begin
          frmt = FMT_FP32; a = {32'd0, rand_fp32()}; b = {32'd0, rand_fp32()};
          qh.push_back({32'd0, fp32_ref(a[31:0], b[31:0])}); ql.push_back('0);
        end
      endcase
      @(posedge clk);
    end
    #1 in_valid = 1'b0;
    while (nres < NOPS) @(posedge clk);
    #1;
    t1 = t_last;
    checks++;
    // NOPS issues on consecutive cycles, the last one LAT cycles later
    if (t1 - t0 != longint'(SPAN)) begin
      failures++;
      $display("FAIL: %s took %0d cycles for %0d operations", fname[kind], t1 - t0, NOPS);
    end
    $display("%s: %0d operations in %0d cycles (issue to last result), %0d multiplication(s) per cycle",
             fname[kind], NOPS, t1 - t0, kind == 2 ? 2 : 1);
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; frmt = FMT_INT64; reduce_en = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 4; k++) stream(k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * NOPS) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
