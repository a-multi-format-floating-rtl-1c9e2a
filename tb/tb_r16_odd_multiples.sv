// tb_r16_odd_multiples: checks 3X, 5X and 7X against '*' for random and
// corner multiplicands.
module tb_r16_odd_multiples;
  import mfmult_pkg::*;

  logic [63:0]   x;
  logic [MW-1:0] x3, x5, x7;

  r16_odd_multiples dut (.*);

  int checks = 0, failures = 0;

  task automatic run(input logic [63:0] v);
    x = v;
    #1;
    checks++;
    if (x3 != MW'(v) * 3 || x5 != MW'(v) * 5 || x7 != MW'(v) * 7) begin
      failures++;
      $display("FAIL x=%h 3x=%h 5x=%h 7x=%h", v, x3, x5, x7);
    end
  endtask

  initial begin
    run('0); run('1); run(64'h8000_0000_0000_0000);
    for (int i = 0; i < 3000; i++) run({$urandom, $urandom});
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
