// psum_buffer: partial-sum buffer of the global buffer.
//
// N_PE banks, one per PE of the array, each DEPTH words of AW bits; word p of
// bank k holds the partial sum of output channel k at output pixel p. Every
// bank has its own read and write port for the accumulation unit, so all PEs
// can update their partial sums in the same clock, and a shared host read
// port returns one pixel of all banks at once.
//
// Timing: reads are combinational (register-file style), so the accumulation
// unit can read, add and write back in one cycle; writes happen at the edge.
//
// The description names the psum buffer only; banking, depth and ports are
// this design's choices.
module psum_buffer #(
  parameter int unsigned N_PE  = 32,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned AW    = 32,
  parameter int unsigned ABITS = $clog2(DEPTH)
) (
  input  logic                         clk,
  input  logic [N_PE-1:0][ABITS-1:0]   rd_addr,
  output logic [N_PE-1:0][AW-1:0]      rd_data,
  input  logic [N_PE-1:0]              wr_en,
  input  logic [N_PE-1:0][ABITS-1:0]   wr_addr,
  input  logic [N_PE-1:0][AW-1:0]      wr_data,
  input  logic [ABITS-1:0]             host_addr,
  output logic [N_PE-1:0][AW-1:0]      host_data
);

  for (genvar k = 0; k < N_PE; k++) begin : g_bank
    logic [AW-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_en[k]) mem[wr_addr[k]] <= wr_data[k];
    end
    assign rd_data[k]   = mem[rd_addr[k]];
    assign host_data[k] = mem[host_addr];
  end

endmodule
