// bsc_vector: bit-split-and-combination (BSC) vector MAC of length L.
//
// Four L x bit-split units (#0..#3), a shifter behind each and one adder
// compute the dot product of a feature vector and a weight vector of L 16-bit
// elements:
//   8-bit mode: sum over L of a[7:0]*b[7:0]. The 8-bit operands are split into
//               nibbles; unit #0 takes a_lo*b_lo, #1 a_hi*b_lo, #2 a_lo*b_hi,
//               #3 a_hi*b_hi, shifted left by 0, 4, 4 and 8. Low nibbles are
//               unsigned, high nibbles carry the operand's signedness.
//   4-bit mode: unit #k takes nibble k of every element (4*L products in all),
//               no shifting.
//   2-bit mode: unit #k takes nibble k and forms two 2b x 2b products in it
//               (8*L products in all), no shifting.
// The unit split, the 0/4/4/8 shifts and the element width follow the design
// description. Which nibble pair goes to which unit, and using bits [7:0] of
// an element in 8-bit mode, are this design's choices.
//
// Interface: purely combinational. `mode` and `sgn` apply to the whole vector.
// `dot` is a DW-bit two's-complement result.
module bsc_vector
  import bsc_pkg::*;
#(
  parameter int unsigned L     = 32,
  parameter int unsigned DW = 24
) (
  input  logic [L-1:0][15:0] feat,
  input  logic [L-1:0][15:0] wgt,
  input  mode_e              mode,
  input  sign_cfg_t          sgn,
  output logic signed [DW-1:0] dot
);

  localparam int unsigned UW = 9 + $clog2(L);

  logic [3:0][L-1:0][3:0] ua, ub;     // operands of unit #k
  logic [3:0]             ua_sgn, ub_sgn;
  logic signed [UW-1:0]   usum [4];
  logic                   is_8b, is_2b;

  assign is_8b = (mode == MODE_8B);
  assign is_2b = (mode == MODE_2B);

  always_comb begin
    for (int l = 0; l < L; l++) begin
      if (is_8b) begin
        ua[0][l] = feat[l][3:0];  ub[0][l] = wgt[l][3:0];
        ua[1][l] = feat[l][7:4];  ub[1][l] = wgt[l][3:0];
        ua[2][l] = feat[l][3:0];  ub[2][l] = wgt[l][7:4];
        ua[3][l] = feat[l][7:4];  ub[3][l] = wgt[l][7:4];
      end else begin
        for (int k = 0; k < 4; k++) begin
          ua[k][l] = feat[l][4*k +: 4];
          ub[k][l] = wgt[l][4*k +: 4];
        end
      end
    end
    if (is_8b) begin
      ua_sgn = {sgn.a_signed, 1'b0, sgn.a_signed, 1'b0};
      ub_sgn = {sgn.b_signed, sgn.b_signed, 1'b0, 1'b0};
    end else begin
      ua_sgn = {4{sgn.a_signed}};
      ub_sgn = {4{sgn.b_signed}};
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_unit
    bit_split_unit #(.L(L), .OUT_W(UW)) u_bsu (
      .a       (ua[k]),
      .b       (ub[k]),
      .mode_2b (is_2b),
      .a_sgn   (ua_sgn[k]),
      .b_sgn   (ub_sgn[k]),
      .sum     (usum[k])
    );
  end

  // Shifters and combining adder.
  always_comb begin
    logic signed [DW-1:0] p0, p1, p2, p3;
    p0 = DW'(usum[0]);
    p1 = DW'(usum[1]);
    p2 = DW'(usum[2]);
    p3 = DW'(usum[3]);
    if (is_8b) dot = p0 + (p1 <<< 4) + (p2 <<< 4) + (p3 <<< 8);
    else       dot = p0 + p1 + p2 + p3;
  end

endmodule
