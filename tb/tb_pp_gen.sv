// tb_pp_gen: exhaustive check of the partial-product generator.
// For every 5-bit a_ext, b bit and sign-row flag, sext(pp) + corr must equal
// +b*a (positive row) or -b*a (sign row), with a_ext read as two's complement.
module tb_pp_gen;
  logic [4:0] a_ext;
  logic       b_bit, s_b;
  logic [4:0] pp;
  logic       corr;
  int checks = 0, failures = 0;

  pp_gen dut (.a_ext(a_ext), .b_bit(b_bit), .s_b(s_b), .pp(pp), .corr(corr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 2; b++)
        for (int s = 0; s < 2; s++) begin
          int av, expv, got;
          a_ext = 5'(a); b_bit = 1'(b); s_b = 1'(s);
          #1;
          av   = (a >= 16) ? a - 32 : a;
          expv = (s != 0) ? -(b * av) : b * av;
          got  = int'(signed'(pp)) + int'(corr);
          checks++;
          if (got !== expv) begin
            failures++;
            $display("FAIL a=%0d b=%0d s=%0d got=%0d exp=%0d", av, b, s, got, expv);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
