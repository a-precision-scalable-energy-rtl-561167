// tb_post_unit: accumulate-or-load, ReLU only on the last tile and only when
// enabled, write enable and addresses from the tag, over random inputs.
module tb_post_unit;
  import bsc_pkg::*;
  localparam int NP = 32;
  logic relu_en;
  logic [NP-1:0] in_valid, ps_wr_en;
  feat_tag_t [NP-1:0] in_tag;
  logic [NP-1:0][31:0] in_data, ps_rd_data, ps_wr_data;
  logic [NP-1:0][5:0] ps_rd_addr, ps_wr_addr;
  int checks = 0, failures = 0, relu_hits = 0;

  post_unit #(.N_PE(NP), .ABITS(6)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      relu_en = 1'($urandom);
      for (int k = 0; k < NP; k++) begin
        in_valid[k] = 1'($urandom);
        in_tag[k] = '{valid:1, acc:0, psum:1'($urandom), last:1'($urandom), pix:16'($urandom)};
        in_data[k] = 32'($signed($urandom % 20001) - 10000);
        ps_rd_data[k] = 32'($signed($urandom % 20001) - 10000);
      end
      #1;
      for (int k = 0; k < NP; k++) begin
        longint e;
        e = longint'(signed'(in_data[k])) + (in_tag[k].psum ? longint'(signed'(ps_rd_data[k])) : 0);
        if (relu_en && in_tag[k].last && e < 0) begin e = 0; relu_hits++; end
        checks++;
        if (longint'(signed'(ps_wr_data[k])) != e || ps_wr_en[k] != in_valid[k] ||
            ps_rd_addr[k] != in_tag[k].pix[5:0] || ps_wr_addr[k] != in_tag[k].pix[5:0]) begin
          failures++;
          $display("FAIL lane %0d got=%0d exp=%0d", k, signed'(ps_wr_data[k]), e);
        end
      end
    end
    checks++;
    if (relu_hits == 0) begin failures++; $display("FAIL ReLU never clipped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
