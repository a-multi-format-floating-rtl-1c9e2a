// tb_r16_recoder: checks the radix-16 recoding.
//
// For random and corner multipliers Y it checks that every digit lies in
// {-8..8}, that a zero digit is never marked negative, and that
// sum(d_i * 16^i) == Y, evaluated with signed 128-bit arithmetic.
module tb_r16_recoder;
  import mfmult_pkg::*;

  logic [63:0] y;
  r16_digit_t  dig [NDIG];

  r16_recoder dut (.*);

  int checks = 0, failures = 0;

  task automatic run(input logic [63:0] v);
    logic signed [127:0] acc;
    logic                bad;
    y = v;
    #1;
    acc = '0;
    bad = 1'b0;
    for (int i = NDIG - 1; i >= 0; i--) begin
      if (dig[i].mag > 4'd8 || (dig[i].mag == 0 && dig[i].neg)) bad = 1'b1;
      acc = acc * 16 + (dig[i].neg ? -$signed({124'd0, dig[i].mag}) : $signed({124'd0, dig[i].mag}));
    end
    checks++;
    if (bad || acc != $signed({64'd0, v})) begin
      failures++;
      $display("FAIL y=%h value=%h bad=%0d", v, acc, bad);
    end
  endtask

  initial begin
    run('0); run('1); run(64'h8888_8888_8888_8888); run(64'h7777_7777_7777_7777);
    run(64'h8000_0000_0000_0000); run(64'hffff_ffff_0000_0001);
    for (int i = 0; i < 5000; i++) run({$urandom, $urandom});
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
