// bit_split_unit: L x bit-split unit with same-shift partial-product
// accumulation.
//
// Each of the L lanes is a signed/unsigned 4-bit x 4-bit multiplier built from
// four partial-product generators (pp-gen 0..3, one per bit of b). Instead of
// adding the four rows inside each lane, the rows with the same shift are summed
// across all L lanes first (four column adders), and only the four sums are
// shifted (by 0, 1, 2, 3) and added. The result is the dot product
//   sum_l a_l * b_l                      (4-bit mode), or
//   sum_l a_l[1:0]*b_l[1:0] + a_l[3:2]*b_l[3:2]   (2-bit mode).
//
// 2-bit mode: the two diagonal 2b x 2b blocks of the 4x4 multiplier are kept,
// the cross terms are gated off and the a field is sign-extended into the
// gated positions. Rows 0,1 see a[1:0], rows 2,3 see a[3:2], and rows 2,3 are
// shifted by 0 and 1 (not 2 and 3) so both products land at the same weight and
// are summed without shifting. This alignment is this design's choice; the
// description only says the 2-bit results are gained without shifting.
//
// Signedness: a_sgn / b_sgn say whether the nibbles (or 2-bit fields) of a / b
// are two's complement. A signed b makes its top row (row 3, or rows 1 and 3 in
// 2-bit mode) a negative-weight row.
//
// Interface: purely combinational; `sum` is two's complement, OUT_W bits.
module bit_split_unit #(
  parameter int unsigned L     = 32,
  parameter int unsigned OUT_W = 9 + $clog2(L)
) (
  input  logic [L-1:0][3:0]  a,       // feature nibbles
  input  logic [L-1:0][3:0]  b,       // weight nibbles
  input  logic               mode_2b, // 1: two 2b x 2b products per lane
  input  logic               a_sgn,
  input  logic               b_sgn,
  output logic signed [OUT_W-1:0] sum
);

  localparam int unsigned RW = 6 + $clog2(L);  // width of one same-shift row sum

  logic [L-1:0][3:0][4:0] pp;     // [lane][row] partial products
  logic [L-1:0][3:0]      corr;   // [lane][row] correction bits
  logic [3:0]             s_b;    // per-row sign-row flag
  logic signed [RW-1:0]   row_sum [4];

  always_comb begin
    for (int j = 0; j < 4; j++)
      s_b[j] = b_sgn & (mode_2b ? (j == 1 || j == 3) : (j == 3));
  end

  for (genvar l = 0; l < L; l++) begin : g_lane
    logic [4:0] a_lo, a_hi, a_full;
    // Sign extension into the gated bit positions.
    assign a_full = {a_sgn & a[l][3], a[l]};
    assign a_lo   = {{3{a_sgn & a[l][1]}}, a[l][1:0]};
    assign a_hi   = {{3{a_sgn & a[l][3]}}, a[l][3:2]};
    for (genvar j = 0; j < 4; j++) begin : g_row
      pp_gen u_pp (
        .a_ext (mode_2b ? ((j < 2) ? a_lo : a_hi) : a_full),
        .b_bit (b[l][j]),
        .s_b   (s_b[j]),
        .pp    (pp[l][j]),
        .corr  (corr[l][j])
      );
    end
  end

  // Same-shift accumulation across the L lanes.
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      row_sum[j] = '0;
      for (int l = 0; l < L; l++)
        row_sum[j] = row_sum[j] + RW'(signed'(pp[l][j])) + RW'({4'b0, corr[l][j]});
    end
  end

  // Shift by 0,1,2,3 (4-bit) or 0,1,0,1 (2-bit) and add.
  always_comb begin
    logic signed [OUT_W-1:0] r0, r1, r2, r3;
    r0 = OUT_W'(row_sum[0]);
    r1 = OUT_W'(row_sum[1]);
    r2 = OUT_W'(row_sum[2]);
    r3 = OUT_W'(row_sum[3]);
    if (mode_2b) sum = r0 + (r1 <<< 1) + r2 + (r3 <<< 1);
    else         sum = r0 + (r1 <<< 1) + (r2 <<< 2) + (r3 <<< 3);
  end

endmodule
