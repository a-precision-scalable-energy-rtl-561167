// tb_bit_split_unit: L = 32 bit-split unit against an integer reference.
// Random and extreme nibble vectors in 4-bit and 2-bit mode, all four
// signedness combinations.
module tb_bit_split_unit;
  localparam int L = 32;
  logic [L-1:0][3:0] a, b;
  logic mode_2b, a_sgn, b_sgn;
  logic signed [13:0] sum;
  int checks = 0, failures = 0;

  bit_split_unit #(.L(L)) dut (.a(a), .b(b), .mode_2b(mode_2b), .a_sgn(a_sgn),
                               .b_sgn(b_sgn), .sum(sum));

  function automatic int fv(input logic [3:0] x, input int lsb, input int w, input logic s);
    int v;
    v = 0;
    for (int i = 0; i < w; i++) if (x[lsb+i]) v += (1 << i);
    if (s && x[lsb+w-1]) v -= (1 << w);
    return v;
  endfunction

  function automatic int ref_sum();
    int r;
    r = 0;
    for (int l = 0; l < L; l++)
      if (mode_2b) r += fv(a[l],0,2,a_sgn)*fv(b[l],0,2,b_sgn) + fv(a[l],2,2,a_sgn)*fv(b[l],2,2,b_sgn);
      else         r += fv(a[l],0,4,a_sgn)*fv(b[l],0,4,b_sgn);
    return r;
  endfunction

  task automatic check(input string what);
    int expv;
    #1;
    expv = ref_sum();
    checks++;
    if (int'(sum) != expv) begin
      failures++;
      $display("FAIL %s mode_2b=%0b sa=%0b sb=%0b got=%0d exp=%0d", what, mode_2b, a_sgn, b_sgn, sum, expv);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cfg = 0; cfg < 8; cfg++) begin
      {mode_2b, a_sgn, b_sgn} = 3'(cfg);
      for (int n = 0; n < 50; n++) begin
        for (int l = 0; l < L; l++) begin a[l] = 4'($urandom); b[l] = 4'($urandom); end
        check("random");
      end
      // extremes: all-ones and most-negative patterns
      a = '1; b = '1;                check("ones");
      a = {L{4'h8}}; b = {L{4'h8}};  check("min");
      a = {L{4'hA}}; b = {L{4'hA}};  check("2b-min");
      a = {L{4'h7}}; b = {L{4'h8}};  check("max*min");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
