// tb_bsc_vector: length-32 BSC vector in 8-, 4- and 2-bit mode against the
// integer dot-product reference, all signedness combinations, random and
// extreme operands.
module tb_bsc_vector;
  import bsc_pkg::*;
  import tb_bsc_ref_pkg::*;
  logic [31:0][15:0] feat, wgt;
  mode_e mode;
  sign_cfg_t sgn;
  logic signed [23:0] dot;
  int checks = 0, failures = 0;

  bsc_vector dut (.feat(feat), .wgt(wgt), .mode(mode), .sgn(sgn), .dot(dot));

  task automatic check(input string what);
    longint expv;
    #1;
    expv = dot_ref(feat, wgt, 32, int'(mode), sgn.a_signed, sgn.b_signed);
    checks++;
    if (longint'(dot) != expv) begin
      failures++;
      $display("FAIL %s mode=%0d sgn=%b got=%0d exp=%0d", what, mode, sgn, dot, expv);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 3; m++)
      for (int s = 0; s < 4; s++) begin
        mode = mode_e'(m);
        sgn  = sign_cfg_t'(s);
        for (int n = 0; n < 60; n++) begin
          feat = rand_vec(); wgt = rand_vec();
          check("random");
        end
        feat = '1;                 wgt = '1;                 check("ones");
        feat = {32{16'h8888}};     wgt = {32{16'h8888}};     check("min");
        feat = {32{16'haaaa}};     wgt = {32{16'haaaa}};     check("2b-min");
        feat = {32{16'h00ff}};     wgt = {32{16'h0080}};     check("8b");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
