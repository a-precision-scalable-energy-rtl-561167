// bsc_pe: processing element of the vector systolic array.
//
// Input buffer -> BSC vector -> adder -> output buffer, as in the PE of the
// array's dataflow. The input buffer holds one feature vector and one weight
// vector (L x 16 bits each). The feature register is reloaded every clock from
// the previous PE (or from the array input for PE #0) and drives the next PE,
// so features ripple one PE per clock. The weight register loads only when
// `wgt_load` is high and otherwise holds its vector (weight-stationary).
// The output buffer is an accumulator fed back into the adder: for a valid
// feature it loads the dot product, or adds it to its previous value when the
// feature's tag has `acc` set.
//
// Timing: a feature presented at feat_in in cycle t is held in the input
// buffer from edge t, and its result is in the output buffer from edge t+1
// (out_valid high for one cycle). A weight presented with wgt_load in cycle t
// is used from cycle t+1 on, i.e. for the feature captured at the same edge.
//
// The buffer / vector / accumulating-output structure follows the design
// description; the tag sideband, the `acc` control and the reset values are
// this design's choices.
module bsc_pe
  import bsc_pkg::*;
#(
  parameter int unsigned L  = 32,
  parameter int unsigned DW = 24,
  parameter int unsigned AW = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  mode_e                 mode,
  input  sign_cfg_t             sgn,
  // feature chain
  input  logic [L-1:0][15:0]    feat_in,
  input  feat_tag_t             tag_in,
  output logic [L-1:0][15:0]    feat_out,
  output feat_tag_t             tag_out,
  // weight load
  input  logic [L-1:0][15:0]    wgt_in,
  input  logic                  wgt_load,
  // output buffer
  output logic                  out_valid,
  output feat_tag_t             out_tag,
  output logic signed [AW-1:0]  out_data
);

  logic [L-1:0][15:0]   feat_q, wgt_q;
  feat_tag_t            tag_q;
  logic signed [DW-1:0] dot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feat_q <= '0;
      tag_q  <= '0;
      wgt_q  <= '0;
    end else begin
      feat_q <= feat_in;
      tag_q  <= tag_in;
      if (wgt_load) wgt_q <= wgt_in;
    end
  end

  assign feat_out = feat_q;
  assign tag_out  = tag_q;

  bsc_vector #(.L(L), .DW(DW)) u_vec (
    .feat (feat_q),
    .wgt  (wgt_q),
    .mode (mode),
    .sgn  (sgn),
    .dot  (dot)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= tag_q.valid;
      if (tag_q.valid) begin
        out_tag  <= tag_q;
        out_data <= (tag_q.acc ? out_data : '0) + AW'(dot);
      end
    end
  end

endmodule
