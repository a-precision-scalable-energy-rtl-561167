// pp_gen: partial-product generator of the signed bit-split unit.
//
// One row of a 4-bit x 4-bit multiplier: the b bit b_x gates the five bits of
// the sign-extended a operand {s_a, a3, a2, a1, a0}. A NAND per bit forms the
// inverted product and a multiplexer, steered by S_bx, picks the NAND output
// (row with negative weight, i.e. the sign bit of a signed b) or its inverse,
// the plain AND (positive row). The inverted row needs +1 to become the
// negation of the product; that +1 is handed to the adder tree as `corr` at the
// row's least significant weight instead of being added here.
//
// Interface: purely combinational. `pp` is a 5-bit two's-complement value that
// the adder tree sign-extends. Row value = sext(pp) + corr = (s_b ? -1 : 1) *
// (b_bit * a_ext).
//
// The NAND / NOT / mux structure follows the design description. The
// correction bit is taken as S_bx itself, which keeps the identity exact also
// when b_x is 0 (the inverted row is then all ones, i.e. -1, and needs the +1).
module pp_gen (
  input  logic [4:0] a_ext,   // {s_a, a3..a0}
  input  logic       b_bit,   // b_x
  input  logic       s_b,     // S_bx: this row is the sign row of b
  output logic [4:0] pp,      // p4..p0
  output logic       corr     // +1 correction for the inverted row
);

  logic [4:0] nand_o;

  always_comb begin
    for (int i = 0; i < 5; i++) begin
      nand_o[i] = ~(b_bit & a_ext[i]);
      pp[i]     = s_b ? nand_o[i] : ~nand_o[i];
    end
    corr = s_b;
  end

endmodule
