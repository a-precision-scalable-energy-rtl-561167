// tb_bsc_pe: one processing element. Checks the one-clock result latency of
// the output buffer, that the weight is held while wgt_load is low, the
// accumulate (acc) path of the output buffer, the feature/tag pass-through to
// the next PE, and all three precision modes.
module tb_bsc_pe;
  import bsc_pkg::*;
  import tb_bsc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  mode_e mode;
  sign_cfg_t sgn;
  logic [31:0][15:0] feat_in, wgt_in, feat_out;
  feat_tag_t tag_in, tag_out, out_tag;
  logic wgt_load, out_valid;
  logic signed [31:0] out_data;
  int checks = 0, failures = 0, cyc = 0;

  bsc_pe dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    logic [31:0][15:0] w, f;
    longint expv, accv;
    mode = MODE_8B; sgn = '0; feat_in = '0; wgt_in = '0; tag_in = '0; wgt_load = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      mode = mode_e'(m);
      sgn  = sign_cfg_t'($urandom % 4);
      w = rand_vec();
      // load weight together with the first feature
      f = rand_vec();
      @(negedge clk);
      wgt_in = w; wgt_load = 1; feat_in = f; tag_in = '{valid:1, acc:0, psum:0, last:0, pix:16'(m)};
      @(negedge clk);
      // after one edge: input buffer holds f, output not yet
      chk(feat_out == f && tag_out.valid && tag_out.pix == 16'(m), "feature pass-through");
      chk(!out_valid, "no early result");
      wgt_load = 0; wgt_in = rand_vec();   // must be ignored
      tag_in = '0;
      @(negedge clk);
      expv = dot_ref(f, w, 32, m, sgn.a_signed, sgn.b_signed);
      chk(out_valid && longint'(out_data) == expv && out_tag.pix == 16'(m), "result after one clock");
      // stream 5 features with acc=1 after a first one with acc=0
      accv = 0;
      for (int j = 0; j < 6; j++) begin
        f = rand_vec();
        accv += dot_ref(f, w, 32, m, sgn.a_signed, sgn.b_signed);
        feat_in = f; tag_in = '{valid:1, acc:(j != 0), psum:0, last:0, pix:16'(j)};
        @(negedge clk);
      end
      tag_in = '0;
      @(negedge clk);
      chk(out_valid && longint'(out_data) == accv, "accumulated result with held weight");
      @(negedge clk);
      chk(!out_valid, "valid drops");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
