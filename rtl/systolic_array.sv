// systolic_array: precision-scalable vector systolic PE array.
//
// N_PE processing elements (bsc_pe) in a chain. Feature vectors enter PE #0
// and move one PE per clock towards PE #(N_PE-1), each carrying its tag. The
// weight vectors share one bus; weight_skew gives PE #k the load strobe k
// clocks after `wgt_start`, so weight k lands in PE #k at the same edge as the
// first feature of the cycle. Each PE keeps its weight until the next start
// (weight-stationary), and every PE writes one result per feature into its
// output buffer. For a 32 x 32 matrix product O = W x I with W row k held by
// PE #k and feature j (column j of I) entering at clock j, PE #k produces
// O(k, j) at clock j + k + 2 after the first feature is presented.
//
// Interface: all PEs share mode and signedness. Per PE k: out_valid[k],
// out_tag[k] (the feature's tag) and out_data[k] (signed, AW bits).
//
// PE count, vector length, feature chaining and 0..31-clock weight delays
// follow the design description; the shared weight bus with load tokens is
// this design's choice.
module systolic_array
  import bsc_pkg::*;
#(
  parameter int unsigned N_PE = 32,
  parameter int unsigned L    = 32,
  parameter int unsigned DW   = 24,
  parameter int unsigned AW   = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  mode_e                     mode,
  input  sign_cfg_t                 sgn,
  input  logic [L-1:0][15:0]        feat_in,
  input  feat_tag_t                 tag_in,
  input  logic [L-1:0][15:0]        wgt_bus,
  input  logic                      wgt_start,
  output logic [N_PE-1:0]           out_valid,
  output feat_tag_t [N_PE-1:0]      out_tag,
  output logic [N_PE-1:0][AW-1:0]   out_data
);

  logic [N_PE:0][L-1:0][15:0] feat_chain;
  feat_tag_t [N_PE:0]         tag_chain;
  logic [N_PE-1:0]            wgt_load;

  assign feat_chain[0] = feat_in;
  assign tag_chain[0]  = tag_in;

  weight_skew #(.N_PE(N_PE)) u_skew (
    .clk   (clk),
    .rst_n (rst_n),
    .start (wgt_start),
    .load  (wgt_load)
  );

  for (genvar k = 0; k < N_PE; k++) begin : g_pe
    logic signed [AW-1:0] pe_out;
    bsc_pe #(.L(L), .DW(DW), .AW(AW)) u_pe (
      .clk       (clk),
      .rst_n     (rst_n),
      .mode      (mode),
      .sgn       (sgn),
      .feat_in   (feat_chain[k]),
      .tag_in    (tag_chain[k]),
      .feat_out  (feat_chain[k+1]),
      .tag_out   (tag_chain[k+1]),
      .wgt_in    (wgt_bus),
      .wgt_load  (wgt_load[k]),
      .out_valid (out_valid[k]),
      .out_tag   (out_tag[k]),
      .out_data  (pe_out)
    );
    assign out_data[k] = pe_out;
  end

endmodule
