// tb_mfm_input_formatter: checks operand routing for the three formats.
//
// Random operands, with exponent fields forced to zero now and then so that
// the hidden-bit rule (1 for a non-zero exponent, 0 otherwise) is exercised.
module tb_mfm_input_formatter;
  import mfmult_pkg::*;

  frmt_e       frmt;
  logic [63:0] a, b, x, y;
  logic        dual, s_hi_x, s_hi_y, s_lo_x, s_lo_y;
  logic [10:0] e_hi_x, e_hi_y, hi_bias;
  logic [7:0]  e_lo_x, e_lo_y;

  mfm_input_formatter dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [23:0] s32(input logic [31:0] v);
    return {v[30:23] != 0, v[22:0]};
  endfunction

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic ok;
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (i % 7 == 0) begin a[62:52] = '0; a[30:23] = '0; end
      if (i % 5 == 0) begin b[62:55] = '0; end
      frmt = frmt_e'(i % 3);
      #1;
      unique case (frmt)
        FMT_INT64: ok = x == a && y == b && !dual;
        FMT_FP64:  ok = x == {11'd0, a[62:52] != 0, a[51:0]} && y == {11'd0, b[62:52] != 0, b[51:0]} &&
                        !dual && s_hi_x == a[63] && s_hi_y == b[63] && e_hi_x == a[62:52] &&
                        e_hi_y == b[62:52] && hi_bias == 11'd1023;
        default:   ok = x == {8'd0, s32(a[63:32]), 8'd0, s32(a[31:0])} &&
                        y == {8'd0, s32(b[63:32]), 8'd0, s32(b[31:0])} && dual &&
                        s_hi_x == a[63] && s_hi_y == b[63] && e_hi_x == {3'd0, a[62:55]} &&
                        e_hi_y == {3'd0, b[62:55]} && hi_bias == 11'd127 &&
                        s_lo_x == a[31] && s_lo_y == b[31] && e_lo_x == a[30:23] && e_lo_y == b[30:23];
      endcase
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL frmt=%s a=%h b=%h x=%h y=%h", frmt.name(), a, b, x, y);
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
