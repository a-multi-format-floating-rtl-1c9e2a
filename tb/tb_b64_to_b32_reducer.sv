// tb_b64_to_b32_reducer: checks the binary64 -> binary32 reduction.
//
// Directed values around both exponent bounds (biased binary64 exponents
// 896, 897, 1150, 1151), zero, infinity, and values with one non-zero bit
// among the 29 fraction LSBs, plus random values. The reference decides from
// the real value: a number fits when its rebiased exponent lies in 1..254
// and its fraction needs no more than 23 bits; the expected binary32 is then
// built field by field.
module tb_b64_to_b32_reducer;

  logic [63:0] b64;
  logic        fits;
  logic [31:0] b32;

  b64_to_b32_reducer dut (.*);

  int checks = 0, failures = 0;

  task automatic run(input logic [63:0] v);
    int          e;
    logic        f;
    logic [31:0] r;
    b64 = v;
    e = int'(v[62:52]) - 1023;        // unbiased exponent
    f = (v[28:0] == 0) && (e >= -126) && (e <= 127);
    r = {v[63], 8'(e + 127), v[51:29]};
    #1;
    checks++;
    if (fits != f || (f && b32 != r)) begin
      failures++;
      $display("FAIL b64=%h fits=%0d exp %0d b32=%h exp %h", v, fits, f, b32, r);
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++) begin
      run({1'(s), 11'd896,  52'd0});
      run({1'(s), 11'd897,  52'd0});
      run({1'(s), 11'd1150, 52'hf_ffff_e000_0000});
      run({1'(s), 11'd1151, 52'd0});
      run({1'(s), 11'd0,    52'd0});
      run({1'(s), 11'd2047, 52'd0});
      run({1'(s), 11'd1023, 52'd1 << 28});
      run({1'(s), 11'd1023, 52'd1 << 29});
      run({1'(s), 11'd1023, 52'd1});
    end
    for (int i = 0; i < 2000; i++) begin
      run({1'($urandom), 11'($urandom_range(850, 1200)), 23'($urandom), 29'd0});
      run({1'($urandom), 11'($urandom), 20'($urandom), 32'($urandom)});
    end
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
