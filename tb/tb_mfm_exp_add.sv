// tb_mfm_exp_add: checks the product sign and the biased exponent sum for
// the 11-bit instance (binary64 bias 1023 and binary32 bias 127) and the
// 8-bit instance (bias 127), including sums that overflow or underflow the
// exponent field.
module tb_mfm_exp_add;

  logic        sx, sy, sp11, sp8;
  logic [10:0] ex11, ey11, bias11;
  logic [7:0]  ex8, ey8;
  logic signed [12:0] ep11;
  logic signed [9:0]  ep8;

  mfm_exp_add #(.EW(11)) dut11 (.sx, .sy, .ex(ex11), .ey(ey11), .bias(bias11), .sp(sp11), .ep(ep11));
  mfm_exp_add #(.EW(8))  dut8  (.sx, .sy, .ex(ex8),  .ey(ey8),  .bias(8'd127), .sp(sp8),  .ep(ep8));

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < 3000; i++) begin
      sx = 1'($urandom); sy = 1'($urandom);
      ex11 = 11'($urandom); ey11 = 11'($urandom);
      bias11 = (i % 2 != 0) ? 11'd1023 : 11'd127;
      ex8 = 8'($urandom); ey8 = 8'($urandom);
      if (i == 0) begin ex11 = '1; ey11 = '1; ex8 = '1; ey8 = '1; end
      if (i == 1) begin ex11 = '0; ey11 = '0; ex8 = '0; ey8 = '0; end
      #1;
      checks++;
      if (sp11 != (sx ^ sy) || sp8 != (sx ^ sy) ||
          int'(ep11) != int'(ex11) + int'(ey11) - int'(bias11) ||
          int'(ep8) != int'(ex8) + int'(ey8) - 127) begin
        failures++;
        $display("FAIL ex=%0d ey=%0d bias=%0d ep=%0d | ex8=%0d ey8=%0d ep8=%0d",
                 ex11, ey11, bias11, ep11, ex8, ey8, ep8);
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
