// tb_r16_ppgen: checks the partial-product array.
//
// X and Y are random (plus corner values); Y is recoded by a reference
// recoding computed in the testbench, the odd multiples are computed here
// with '*', and the sum of the 19 output rows is compared with the product:
//   single mode: sum mod 2^128 == X*Y
//   dual mode  : lower half of the sum (mod 2^64) == X*Y of the 24-bit lower
//                operands, upper half == W*Z of the 24-bit upper operands,
//                when each half is summed on its own.
module tb_r16_ppgen;
  import mfmult_pkg::*;

  r16_digit_t    dig [NDIG];
  logic [63:0]   x;
  logic [MW-1:0] x3, x5, x7;
  logic          dual;
  logic [127:0]  rows [NROWS];

  r16_ppgen dut (.*);

  int checks = 0, failures = 0;

  task automatic recode(input logic [63:0] y);
    int v;
    for (int i = 0; i < NDIG; i++) begin
      v = (i < 16 ? int'(y[4*i +: 4]) : 0) - (i < 16 ? 16 * int'(y[4*i+3]) : 0)
          + (i > 0 ? int'(y[4*i-1]) : 0);
      dig[i].neg = (v < 0);
      dig[i].mag = 4'(v < 0 ? -v : v);
    end
  endtask

  task automatic run(input logic [63:0] xv, input logic [63:0] yv, input logic d);
    logic [127:0] s, lo, hi;
    x = xv; dual = d;
    x3 = MW'(xv) * 3; x5 = MW'(xv) * 5; x7 = MW'(xv) * 7;
    recode(yv);
    #1;
    checks++;
    if (!d) begin
      s = '0;
      foreach (rows[r]) s = s + rows[r];
      if (s != 128'(xv) * 128'(yv)) begin
        failures++;
        $display("FAIL single x=%h y=%h sum=%h exp=%h", xv, yv, s, 128'(xv) * 128'(yv));
      end
    end else begin
      lo = '0; hi = '0;
      foreach (rows[r]) begin
        lo = lo + {64'd0, rows[r][63:0]};
        hi = hi + {64'd0, rows[r][127:64]};
      end
      if (lo[63:0] != 64'(xv[23:0]) * 64'(yv[23:0]) || hi[63:0] != 64'(xv[55:32]) * 64'(yv[55:32])) begin
        failures++;
        $display("FAIL dual x=%h y=%h lo=%h hi=%h", xv, yv, lo[63:0], hi[63:0]);
      end
    end
  endtask

  initial begin
    run('1, '1, 1'b0);
    run(64'h1, 64'h8888_8888_8888_8888, 1'b0);
    run('0, '1, 1'b0);
    for (int i = 0; i < 2000; i++)
      run({$urandom, $urandom}, {$urandom, $urandom}, 1'b0);
    for (int i = 0; i < 2000; i++)
      run({8'd0, 24'($urandom), 8'd0, 24'($urandom)}, {8'd0, 24'($urandom), 8'd0, 24'($urandom)}, 1'b1);
    run({8'd0, 24'hffffff, 8'd0, 24'hffffff}, {8'd0, 24'hffffff, 8'd0, 24'hffffff}, 1'b1);
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
