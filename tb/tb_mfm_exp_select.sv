// tb_mfm_exp_select: checks the speculative exponent increment and select
// for the 11-bit and 8-bit instances over their whole input ranges.
module tb_mfm_exp_select;

  logic signed [12:0] ep11, out11;
  logic signed [9:0]  ep8, out8;
  logic               inc;

  mfm_exp_select #(.EW(11)) dut11 (.ep(ep11), .inc, .ep_out(out11));
  mfm_exp_select #(.EW(8))  dut8  (.ep(ep8),  .inc, .ep_out(out8));

  int checks = 0, failures = 0;

  initial begin
    for (int i = -1000; i < 3000; i++) begin
      ep11 = 13'(i);
      ep8  = 10'(i / 8);
      inc  = 1'(i % 3 == 0);
      #1;
      checks++;
      if (int'(out11) != i + int'(inc) || int'(out8) != i / 8 + int'(inc)) begin
        failures++;
        $display("FAIL ep=%0d inc=%0d out=%0d out8=%0d", i, inc, out11, out8);
      end
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
