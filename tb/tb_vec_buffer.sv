// tb_vec_buffer: write random words, read them back with the one-clock read
// latency, check that rdata holds while re is low and that a same-address
// read during a write returns the old word.
module tb_vec_buffer;
  localparam int W = 512, D = 256;
  logic clk = 0, we = 0, re = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  vec_buffer #(.W(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < D; a++) begin
      we = 1; waddr = 8'(a); wdata = rnd(); model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom % D;
      re = 1; raddr = 8'(a);
      @(negedge clk);
      chk(rdata == model[a], "read back");
      re = 0; raddr = 8'($urandom);
      @(negedge clk);
      chk(rdata == model[a], "hold while re low");
    end
    // read-during-write, same address
    re = 1; raddr = 8'd5; we = 1; waddr = 8'd5; wdata = rnd();
    @(negedge clk);
    chk(rdata == model[5], "old data on collision");
    model[5] = wdata; we = 0;
    @(negedge clk);
    chk(rdata == model[5], "new data after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
