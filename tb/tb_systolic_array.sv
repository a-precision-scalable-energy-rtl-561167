// tb_systolic_array: the full 32-PE array, driven directly.
//
// Phases: (1) 8-bit signed, two weight tiles back to back (40 then 32
// features), (2) 4-bit mixed signedness, two tiles of 8 features separated by
// the 32-clock weight cycle, (3) 2-bit unsigned, one tile whose features
// accumulate in the PE output buffers (acc). Every PE result is compared with
// the integer reference, and its timing is checked: PE #k delivers the result
// of a feature presented in cycle p at cycle p + k + 2.
module tb_systolic_array;
  import bsc_pkg::*;
  import tb_bsc_ref_pkg::*;
  localparam int NP = 32;
  logic clk = 0, rst_n = 0;
  mode_e mode;
  sign_cfg_t sgn;
  logic [31:0][15:0] feat_in, wgt_bus;
  feat_tag_t tag_in;
  logic wgt_start;
  logic [NP-1:0] out_valid;
  feat_tag_t [NP-1:0] out_tag;
  logic [NP-1:0][31:0] out_data;
  int checks = 0, failures = 0, cyc = 0, outputs = 0, expected_outputs = 0;

  logic [31:0][15:0] W [8][NP];
  logic [31:0][15:0] F [512];
  int tile_of [512];
  int pres_cyc [512];
  longint model [NP];
  int nfeat = 0;

  systolic_array dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < NP; k++) if (out_valid[k]) begin
      int id;
      longint e;
      id = int'(out_tag[k].pix);
      e = dot_ref(F[id], W[tile_of[id]][k], 32, int'(mode), sgn.a_signed, sgn.b_signed);
      model[k] = out_tag[k].acc ? model[k] + e : e;
      outputs++;
      checks++;
      if (longint'(signed'(out_data[k])) != model[k] || cyc != pres_cyc[id] + k + 2) begin
        failures++;
        $display("FAIL pe=%0d id=%0d got=%0d exp=%0d cyc=%0d exp_cyc=%0d", k, id,
                 signed'(out_data[k]), model[k], cyc, pres_cyc[id] + k + 2);
      end
    end
  end

  // One tile: weights on the bus for 32 clocks, n features from the same clock.
  task automatic run_tile(input int t, input int n, input logic use_acc);
    int p;
    for (int k = 0; k < NP; k++) W[t][k] = rand_vec();
    p = (n > NP) ? n : NP;
    for (int c = 0; c < p; c++) begin
      wgt_start = (c == 0);
      wgt_bus   = (c < NP) ? W[t][c] : rand_vec();
      if (c < n) begin
        F[nfeat] = rand_vec();
        tile_of[nfeat] = t;
        pres_cyc[nfeat] = cyc;
        feat_in = F[nfeat];
        tag_in = '{valid:1, acc:(use_acc && c != 0), psum:0, last:0, pix:16'(nfeat)};
        nfeat++;
        expected_outputs += NP;
      end else begin
        feat_in = rand_vec();
        tag_in = '0;
      end
      @(negedge clk);
    end
    wgt_start = 0;
    tag_in = '0;
  endtask

  initial begin
    mode = MODE_8B; sgn = '0; feat_in = '0; wgt_bus = '0; tag_in = '0; wgt_start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    mode = MODE_8B; sgn = '{a_signed:1, b_signed:1};
    run_tile(0, 40, 0);
    run_tile(1, 32, 0);
    repeat (40) @(negedge clk);
    mode = MODE_4B; sgn = '{a_signed:0, b_signed:1};
    run_tile(2, 8, 0);
    run_tile(3, 8, 0);
    repeat (40) @(negedge clk);
    mode = MODE_2B; sgn = '0;
    run_tile(4, 20, 1);
    repeat (40) @(negedge clk);
    checks++;
    if (outputs != expected_outputs) begin
      failures++;
      $display("FAIL outputs=%0d expected=%0d", outputs, expected_outputs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
