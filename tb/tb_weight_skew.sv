// tb_weight_skew: load[k] must be high exactly k clocks after start, once.
module tb_weight_skew;
  localparam int N = 32;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] load;
  int checks = 0, failures = 0;

  weight_skew dut (.clk(clk), .rst_n(rst_n), .start(start), .load(load));
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      @(negedge clk);
      start = 1;
      for (int t = 0; t < N + 3; t++) begin
        #1;
        checks++;
        if (load !== ((t < N) ? (N'(1) << t) : '0)) begin
          failures++;
          $display("FAIL t=%0d load=%h", t, load);
        end
        @(negedge clk);
        start = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
