// tb_array_seq: checks the sequencer's buffer addresses, read enables, tags
// and wgt_start cycle by cycle against the schedule (tile t starts every
// max(n_pix, 32) clocks; feature k and weight k are read in clock k of the
// tile; tags and wgt_start follow one clock later), and that done pulses
// n_tiles * max(n_pix, 32) + 37 clocks after start. psum_cont marks the
// first tile's tags as accumulating. Convolution jobs check the sliding-
// window input addresses.
module tb_array_seq;
  import bsc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, psum_cont = 0, conv_en = 0;
  logic [7:0] conv_iw = 0, conv_ih = 0, conv_kw = 0, conv_kh = 0;
  logic [15:0] n_pix, n_tiles;
  logic busy, done, ib_re, wb_re, wgt_start;
  logic [9:0] ib_raddr;
  logic [8:0] wb_raddr;
  feat_tag_t tag_out;
  int checks = 0, failures = 0;

  array_seq dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what, input int r);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at run cycle %0d", what, r); end
  endtask

  task automatic job(input int n, input int t, input logic cont);
    int p, total;
    logic exp_ib_re, exp_wb_re, prev_ib_re, prev_wstart;
    int prev_k, prev_t;
    p = (n > 32) ? n : 32;
    total = t * p + 37;
    @(negedge clk);
    n_pix = 16'(n); n_tiles = 16'(t); psum_cont = cont; start = 1;
    @(negedge clk);
    start = 0; psum_cont = ~cont;
    prev_ib_re = 0; prev_wstart = 0; prev_k = 0; prev_t = 0;
    // cycle r counts cycles after the start cycle (r = 0 is the first run cycle)
    for (int r = 0; r < total; r++) begin
      int tt, k;
      tt = r / p; k = r % p;
      exp_ib_re = (r < t * p) && (k < n);
      exp_wb_re = (r < t * p) && (k < 32);
      chk(busy == (r < total - 1), "busy", r);
      chk(ib_re == exp_ib_re, "ib_re", r);
      chk(wb_re == exp_wb_re, "wb_re", r);
      if (exp_ib_re) chk(ib_raddr == 10'(tt * n + k), "ib_raddr", r);
      if (exp_wb_re) chk(wb_raddr == 9'(tt * 32 + k), "wb_raddr", r);
      // registered outputs describe the previous cycle's issue
      chk(tag_out.valid == prev_ib_re, "tag valid", r);
      if (prev_ib_re)
        chk(tag_out.pix == 16'(prev_k) && tag_out.psum == (prev_t != 0 || cont) &&
            tag_out.last == (prev_t == t - 1) && !tag_out.acc, "tag fields", r);
      chk(wgt_start == prev_wstart, "wgt_start", r);
      chk(done == (r == total - 1), "done", r);
      prev_ib_re = exp_ib_re; prev_wstart = exp_wb_re && (k == 0);
      prev_k = k; prev_t = tt;
      @(negedge clk);
    end
    chk(!busy && !done, "idle after done", total);
  endtask

  // Convolution addressing: every feature read must be
  // cs*IH*IW + (oh+kh)*IW + (ow+kw) for tile (cs,kh,kw) and pixel (oh,ow).
  task automatic conv_job(input int cs, input int ih, input int iw, input int kh, input int kw);
    int oh, ow, n, t, p, total, seen;
    oh = ih - kh + 1; ow = iw - kw + 1; n = oh * ow; t = cs * kh * kw;
    p = (n > 32) ? n : 32;
    total = t * p + 37;
    @(negedge clk);
    n_pix = 16'(n); n_tiles = 16'(t); psum_cont = 0; start = 1;
    conv_en = 1; conv_iw = 8'(iw); conv_ih = 8'(ih); conv_kw = 8'(kw); conv_kh = 8'(kh);
    @(negedge clk);
    start = 0; conv_en = 0; conv_iw = 0; conv_ih = 0; conv_kw = 0; conv_kh = 0;
    seen = 0;
    for (int r = 0; r < total; r++) begin
      int tt, k, c, dy, dx, y, x;
      tt = r / p; k = r % p;
      c = tt / (kh * kw); dy = (tt / kw) % kh; dx = tt % kw;
      y = k / ow; x = k % ow;
      if ((r < t * p) && (k < n)) begin
        chk(ib_re && ib_raddr == 10'(c * ih * iw + (y + dy) * iw + (x + dx)), "conv address", r);
        seen++;
      end
      @(negedge clk);
    end
    chk(seen == t * n, "conv reads", total);
  endtask

  initial begin
    n_pix = 1; n_tiles = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    job(40, 3, 0);   // back to back, period 40
    job(32, 2, 1);   // back to back, period 32
    job(8, 3, 0);    // gapped, period 32
    job(1, 1, 1);
    conv_job(1, 10, 10, 3, 3);
    conv_job(2, 9, 7, 2, 2);
    conv_job(3, 4, 5, 1, 2);
    job(8, 2, 0);   // matrix addressing again after a convolution
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
