// tb_r16_csa_tree: checks the carry-save reduction tree at its default size
// (19 rows of 128 bits).
//
// Random rows are reduced and sum + carry is compared with the sum of the
// rows modulo 2^128. In dual mode each 64-bit half must hold the sum of the
// rows' halves modulo 2^64 on its own, and no carry may enter bit 64.
module tb_r16_csa_tree;
  import mfmult_pkg::*;

  logic [127:0] rows [NROWS];
  logic         dual;
  logic [127:0] sum, carry;

  r16_csa_tree dut (.*);

  int checks = 0, failures = 0;

  task automatic run(input logic d, input bit ones);
    logic [127:0] ref_s;
    logic [63:0]  lo, hi;
    logic [127:0] o;
    dual = d;
    ref_s = '0; lo = '0; hi = '0;
    foreach (rows[r]) begin
      rows[r] = ones ? '1 : {$urandom, $urandom, $urandom, $urandom};
      ref_s = ref_s + rows[r];
      lo = lo + rows[r][63:0];
      hi = hi + rows[r][127:64];
    end
    #1;
    o = sum + carry;
    checks++;
    if (!d && o != ref_s) begin
      failures++;
      $display("FAIL single: %h expected %h", o, ref_s);
    end
    if (d && ((sum[63:0] + carry[63:0]) != lo || (sum[127:64] + carry[127:64]) != hi || carry[64])) begin
      failures++;
      $display("FAIL dual: lo %h exp %h, hi %h exp %h", sum[63:0] + carry[63:0], lo,
               sum[127:64] + carry[127:64], hi);
    end
  endtask

  initial begin
    run(1'b0, 1'b1);
    run(1'b1, 1'b1);
    for (int i = 0; i < 3000; i++) run(1'($urandom), 1'b0);
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
