// post_unit: accumulation and ReLU unit between the PE array and the psum
// buffer.
//
// One lane per PE. When PE k delivers a result (valid), the lane reads the
// stored partial sum of that output pixel from bank k, adds the result to it
// (or starts from zero when the tag's `psum` bit is clear, i.e. for the first
// channel/kernel tile of an output), and writes the sum back. On the final
// tile (`last`) with relu_en set, negative sums are written as zero. A
// convolution split into tiles along the channel and kernel-window
// directions is thus summed here, one matrix operation per tile.
//
// Timing: combinational read-add; the write lands at the next edge, one cycle
// after the PE output buffer was loaded. A lane handles one result per clock.
//
// The description names a "ReLU / Pooling / Accum." block without further
// detail. Accumulation and ReLU are implemented; pooling is not, because the
// pooling kind and window are not given.
module post_unit
  import bsc_pkg::*;
#(
  parameter int unsigned N_PE  = 32,
  parameter int unsigned AW    = 32,
  parameter int unsigned ABITS = 6
) (
  input  logic                        relu_en,
  input  logic [N_PE-1:0]             in_valid,
  input  feat_tag_t [N_PE-1:0]        in_tag,
  input  logic [N_PE-1:0][AW-1:0]     in_data,
  output logic [N_PE-1:0][ABITS-1:0]  ps_rd_addr,
  input  logic [N_PE-1:0][AW-1:0]     ps_rd_data,
  output logic [N_PE-1:0]             ps_wr_en,
  output logic [N_PE-1:0][ABITS-1:0]  ps_wr_addr,
  output logic [N_PE-1:0][AW-1:0]     ps_wr_data
);

  always_comb begin
    for (int k = 0; k < N_PE; k++) begin
      logic signed [AW-1:0] s;
      ps_rd_addr[k] = in_tag[k].pix[ABITS-1:0];
      ps_wr_addr[k] = in_tag[k].pix[ABITS-1:0];
      ps_wr_en[k]   = in_valid[k];
      s = signed'(in_data[k]) + (in_tag[k].psum ? signed'(ps_rd_data[k]) : '0);
      if (relu_en && in_tag[k].last && s < 0) s = '0;
      ps_wr_data[k] = s;
    end
  end

endmodule
