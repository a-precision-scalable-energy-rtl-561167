// vec_buffer: one bank of the global buffer holding whole vectors.
//
// Used twice in the accelerator: as the input (feature) buffer and as the
// weight buffer. Each word is one vector of the array's dataflow (32 x 16 bits
// at the default size). One write port for the host/DMA side and one read port
// for the array sequencer.
//
// Timing: synchronous, SRAM-like. A write with we=1 stores wdata at the edge.
// A read with re=1 in cycle t returns the word in rdata from edge t on (one
// cycle latency); rdata holds its value while re=0. Reading and writing the
// same address in one cycle returns the old word.
//
// The description names the buffers only; depth, ports and latency are this
// design's choices.
module vec_buffer #(
  parameter int unsigned W     = 512,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
