// tb_bsc_accel_top: end-to-end test of the accelerator core at its default
// size (32 PEs, vector length 32, default buffer depths).
//
// Each job: the host writes n_tiles x 32 weight vectors and n_tiles x n_pix
// feature vectors into the buffers, starts the job, waits for done and reads
// back all n_pix x 32 outputs, which must equal
//   O[k][j] = sum_t dot(I[t*n_pix + j], W[t*32 + k])   (ReLU'd if enabled)
// computed with the integer reference. The job time must be
// n_tiles * max(n_pix, 32) + 37 clocks.
// Mechanisms counted (each must occur): 8-, 4- and 2-bit mode, signed and
// unsigned operands, partial-sum accumulation over tiles, back-to-back tiles
// (n_pix >= 32), tiles separated by the weight cycle (n_pix < 32), weight
// reload, ReLU clipping a negative sum, and a job continuing the partial
// sums of the previous one (psum_cont), and convolution jobs where the
// sequencer forms the sliding windows (3x3 on 10x10, and 2x2 over two
// channel splits of a 9-row, 7-column map).
module tb_bsc_accel_top;
  import bsc_pkg::*;
  import tb_bsc_ref_pkg::*;
  localparam int NP = 32;
  logic clk = 0, rst_n = 0;
  mode_e mode;
  sign_cfg_t sgn;
  logic relu_en, start, busy, done, psum_cont, conv_en;
  logic [7:0] conv_iw, conv_ih, conv_kw, conv_kh;
  logic [15:0] n_pix, n_tiles;
  logic wb_we, ib_we;
  logic [8:0] wb_waddr;
  logic [9:0] ib_waddr;
  logic [31:0][15:0] wb_wdata, ib_wdata;
  logic [5:0] ps_addr;
  logic [NP-1:0][31:0] ps_rdata;
  int checks = 0, failures = 0;
  int n_mode[3], n_signed = 0, n_unsigned = 0, n_accum = 0, n_b2b = 0, n_gap = 0,
      n_reload = 0, n_relu = 0, n_cont = 0, n_conv = 0;

  logic [31:0][15:0] W [512];
  logic [31:0][15:0] I [1024];
  longint prev_sum [NP][64];

  bsc_accel_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic job(input mode_e m, input sign_cfg_t s, input logic relu,
                     input int n, input int t, input logic cont = 0);
    int p, cycles;
    // host writes the buffers
    for (int a = 0; a < t * NP; a++) begin
      W[a] = rand_vec();
      @(negedge clk);
      wb_we = 1; wb_waddr = 9'(a); wb_wdata = W[a];
    end
    for (int a = 0; a < t * n; a++) begin
      I[a] = rand_vec();
      @(negedge clk);
      wb_we = 0;
      ib_we = 1; ib_waddr = 10'(a); ib_wdata = I[a];
    end
    @(negedge clk);
    wb_we = 0; ib_we = 0;
    mode = m; sgn = s; relu_en = relu; n_pix = 16'(n); n_tiles = 16'(t); psum_cont = cont; start = 1;
    @(negedge clk);
    start = 0;
    mode = mode_e'(2'd3 - 2'(m));   // must not matter after start (latched)
    sgn = ~s; relu_en = ~relu; psum_cont = ~cont;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    p = (n > NP) ? n : NP;
    chk(cycles == t * p + 37, $sformatf("job time %0d, expected %0d", cycles, t * p + 37));
    // read back and compare
    for (int j = 0; j < n; j++) begin
      ps_addr = 6'(j);
      #1;
      for (int k = 0; k < NP; k++) begin
        longint e;
        e = cont ? prev_sum[k][j] : 0;
        for (int tt = 0; tt < t; tt++)
          e += dot_ref(I[tt * n + j], W[tt * NP + k], 32, int'(m), s.a_signed, s.b_signed);
        if (relu && e < 0) begin e = 0; n_relu++; end
        prev_sum[k][j] = e;
        checks++;
        if (longint'(signed'(ps_rdata[k])) != e) begin
          failures++;
          if (failures < 10)
            $display("FAIL mode=%0d pix=%0d ch=%0d got=%0d exp=%0d", m, j, k, signed'(ps_rdata[k]), e);
        end
      end
    end
    n_mode[int'(m)]++;
    if (cont) n_cont++;
    if (s.a_signed || s.b_signed) n_signed++; else n_unsigned++;
    if (t > 1) begin
      n_accum++;
      n_reload += t - 1;
      if (n >= NP) n_b2b++; else n_gap++;
    end
  endtask

  // Convolution job: CS channel splits of an IH x IW feature map stored as
  // word cs*IH*IW + ih*IW + iw, KH x KW kernel, stride 1, no padding.
  task automatic conv_job(input mode_e m, input sign_cfg_t s, input logic relu,
                          input int cs, input int ih, input int iw, input int kh, input int kw);
    int oh, ow, n, t, p, cycles;
    oh = ih - kh + 1; ow = iw - kw + 1; n = oh * ow; t = cs * kh * kw;
    for (int a = 0; a < t * NP; a++) begin
      W[a] = rand_vec();
      @(negedge clk);
      wb_we = 1; wb_waddr = 9'(a); wb_wdata = W[a];
    end
    for (int a = 0; a < cs * ih * iw; a++) begin
      I[a] = rand_vec();
      @(negedge clk);
      wb_we = 0;
      ib_we = 1; ib_waddr = 10'(a); ib_wdata = I[a];
    end
    @(negedge clk);
    wb_we = 0; ib_we = 0;
    mode = m; sgn = s; relu_en = relu; n_pix = 16'(n); n_tiles = 16'(t); psum_cont = 0;
    conv_en = 1; conv_iw = 8'(iw); conv_ih = 8'(ih); conv_kw = 8'(kw); conv_kh = 8'(kh);
    start = 1;
    @(negedge clk);
    start = 0; conv_en = 0; conv_iw = 0; conv_kh = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    p = (n > NP) ? n : NP;
    chk(cycles == t * p + 37, $sformatf("conv job time %0d, expected %0d", cycles, t * p + 37));
    for (int y = 0; y < oh; y++)
      for (int x = 0; x < ow; x++) begin
        ps_addr = 6'(y * ow + x);
        #1;
        for (int k = 0; k < NP; k++) begin
          longint e;
          e = 0;
          for (int c = 0; c < cs; c++)
            for (int dy = 0; dy < kh; dy++)
              for (int dx = 0; dx < kw; dx++)
                e += dot_ref(I[c * ih * iw + (y + dy) * iw + (x + dx)],
                             W[((c * kh + dy) * kw + dx) * NP + k], 32, int'(m),
                             s.a_signed, s.b_signed);
          if (relu && e < 0) begin e = 0; n_relu++; end
          checks++;
          if (longint'(signed'(ps_rdata[k])) != e) begin
            failures++;
            if (failures < 10)
              $display("FAIL conv oh=%0d ow=%0d ch=%0d got=%0d exp=%0d", y, x, k, signed'(ps_rdata[k]), e);
          end
        end
      end
    n_mode[int'(m)]++;
    n_conv++;
  endtask

  initial begin
    conv_en = 0; conv_iw = 0; conv_ih = 0; conv_kw = 0; conv_kh = 0;
    mode = MODE_8B; sgn = '0; relu_en = 0; start = 0; psum_cont = 0; n_pix = 1; n_tiles = 1;
    wb_we = 0; ib_we = 0; wb_waddr = '0; ib_waddr = '0; wb_wdata = '0; ib_wdata = '0;
    ps_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    job(MODE_8B, '{a_signed:1, b_signed:1}, 1, 40, 2);
    job(MODE_4B, '{a_signed:0, b_signed:1}, 0, 8, 3);
    job(MODE_2B, '{a_signed:1, b_signed:1}, 1, 64, 1);
    job(MODE_8B, '{a_signed:0, b_signed:0}, 0, 32, 4);
    job(MODE_4B, '{a_signed:1, b_signed:1}, 1, 33, 2);
    job(MODE_2B, '{a_signed:0, b_signed:1}, 0, 5, 2);
    job(MODE_2B, '{a_signed:0, b_signed:1}, 1, 5, 1, 1);   // continues the previous job's sums
    conv_job(MODE_8B, '{a_signed:1, b_signed:1}, 0, 1, 10, 10, 3, 3);
    conv_job(MODE_4B, '{a_signed:0, b_signed:1}, 1, 2, 9, 7, 2, 2);
    $display("mechanisms: 8b=%0d 4b=%0d 2b=%0d signed=%0d unsigned=%0d accum=%0d back_to_back=%0d gapped=%0d weight_reloads=%0d relu_clips=%0d continued=%0d conv=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_signed, n_unsigned, n_accum, n_b2b, n_gap, n_reload, n_relu, n_cont, n_conv);
    chk(n_mode[0] > 0, "8-bit mode used");
    chk(n_mode[1] > 0, "4-bit mode used");
    chk(n_mode[2] > 0, "2-bit mode used");
    chk(n_signed > 0 && n_unsigned > 0, "signed and unsigned used");
    chk(n_accum > 0, "psum accumulation used");
    chk(n_b2b > 0, "back-to-back tiles used");
    chk(n_gap > 0, "gapped tiles used");
    chk(n_reload > 0, "weight reload used");
    chk(n_relu > 0, "ReLU clipped");
    chk(n_cont > 0, "job continued from stored sums");
    chk(n_conv > 0, "convolution addressing used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
