// tb_psum_buffer: 32 banks written in parallel at independent addresses,
// read back through the per-bank ports (combinational) and the host port.
module tb_psum_buffer;
  localparam int NP = 32, D = 64;
  logic clk = 0;
  logic [NP-1:0][5:0] rd_addr, wr_addr;
  logic [NP-1:0][31:0] rd_data, wr_data, host_data;
  logic [NP-1:0] wr_en;
  logic [5:0] host_addr;
  logic [31:0] model [NP][D];
  int checks = 0, failures = 0;

  psum_buffer #(.N_PE(NP), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = '0; rd_addr = '0; wr_addr = '0; wr_data = '0; host_addr = '0;
    @(negedge clk);
    // fill every word: bank k writes address (a + k) mod D in step a
    for (int a = 0; a < D; a++) begin
      for (int k = 0; k < NP; k++) begin
        wr_en[k] = 1; wr_addr[k] = 6'((a + k) % D); wr_data[k] = $urandom;
        model[k][(a + k) % D] = wr_data[k];
      end
      @(negedge clk);
    end
    wr_en = '0;
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < NP; k++) rd_addr[k] = 6'($urandom);
      host_addr = 6'($urandom);
      #1;
      for (int k = 0; k < NP; k++) begin
        checks += 2;
        if (rd_data[k] != model[k][rd_addr[k]]) begin failures++; $display("FAIL bank %0d", k); end
        if (host_data[k] != model[k][host_addr]) begin failures++; $display("FAIL host %0d", k); end
      end
      // random partial update
      for (int k = 0; k < NP; k++) begin
        wr_en[k] = 1'($urandom); wr_addr[k] = 6'($urandom); wr_data[k] = $urandom;
        if (wr_en[k]) model[k][wr_addr[k]] = wr_data[k];
      end
      @(negedge clk);
      wr_en = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
