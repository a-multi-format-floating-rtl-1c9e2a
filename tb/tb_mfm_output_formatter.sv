// tb_mfm_output_formatter: checks result packing for the three formats and
// the binary64 -> binary32 selection.
//
// For FP64 with reduce_en the normalized significand and exponent are chosen
// so that the result is exactly representable in binary32 (about half the
// time) or not; the expected p_h is built field by field.
module tb_mfm_output_formatter;
  import mfmult_pkg::*;

  frmt_e              frmt;
  logic               reduce_en;
  logic [127:0]       pn;
  logic               s_hi, s_lo;
  logic signed [12:0] e_hi;
  logic signed [9:0]  e_lo;
  logic [63:0]        p_h, p_l;
  logic               reduced;

  mfm_output_formatter dut (.*);

  int checks = 0, failures = 0;
  int n_red = 0, n_keep = 0;

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [63:0] eh, el;
      logic        er;
      logic [63:0] r64;
      pn = {$urandom, $urandom, $urandom, $urandom};
      s_hi = 1'($urandom); s_lo = 1'($urandom);
      e_hi = 13'($urandom_range(1, 2046));
      e_lo = 10'($urandom_range(1, 254));
      frmt = frmt_e'(i % 3);
      reduce_en = 1'($urandom);
      if (frmt == FMT_FP64 && reduce_en && $urandom_range(0, 1) == 1) begin
        pn[81:53] = '0;                              // 29 fraction LSBs zero
        e_hi = 13'($urandom_range(880, 1160));       // around the binary32 range
      end
      el = '0; er = 1'b0;
      r64 = {s_hi, e_hi[10:0], pn[104:53]};
      unique case (frmt)
        FMT_INT64: begin eh = pn[127:64]; el = pn[63:0]; end
        FMT_FP64: begin
          if (reduce_en && pn[81:53] == 0 && e_hi >= 897 && e_hi <= 1150) begin
            eh = {32'd0, s_hi, 8'(e_hi - 896), pn[104:82]};
            er = 1'b1;
            n_red++;
          end else begin
            eh = r64;
            if (reduce_en) n_keep++;
          end
        end
        default: eh = {s_hi, e_hi[7:0], pn[110:88], s_lo, e_lo[7:0], pn[46:24]};
      endcase
      #1;
      checks++;
      if (p_h != eh || p_l != el || reduced != er) begin
        failures++;
        $display("FAIL frmt=%s p_h=%h exp %h p_l=%h exp %h red=%0d exp %0d",
                 frmt.name(), p_h, eh, p_l, el, reduced, er);
      end
    end
    checks++;
    if (n_red == 0 || n_keep == 0) begin
      failures++;
      $display("FAIL: reduction taken %0d times, refused %0d times", n_red, n_keep);
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
