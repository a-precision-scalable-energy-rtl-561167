// bsc_pkg: types and constants shared by the bit-split-and-combination (BSC)
// vector systolic accelerator.
//
// A vector element is 16 bits wide for both operands. In 8-bit mode an element
// holds one 8-bit value in bits [7:0]; in 4-bit mode four 4-bit values (nibble k
// in bits [4k+3:4k]); in 2-bit mode eight 2-bit values (field m in bits
// [2m+1:2m]). The vector length of 32, the 32 PEs and the 16-bit element width
// follow the design description; the encodings and result widths are this
// implementation's choice.
package bsc_pkg;

  // Precision mode of a multiply-accumulate.
  typedef enum logic [1:0] {
    MODE_8B = 2'd0,   // 1 x (8b x 8b) per element
    MODE_4B = 2'd1,   // 4 x (4b x 4b) per element
    MODE_2B = 2'd2    // 8 x (2b x 2b) per element
  } mode_e;

  localparam int unsigned BSC_L   = 32;  // BSC vector length (elements)
  localparam int unsigned BSC_NPE = 32;  // PEs in the systolic array
  localparam int unsigned BSC_EW  = 16;  // bits per vector element
  localparam int unsigned BSC_VW  = BSC_L * BSC_EW;  // 512-bit vector word
  localparam int unsigned BSC_DW  = 24;  // signed width of one vector dot product
  localparam int unsigned BSC_AW  = 32;  // signed width of PE output / partial sums

  // Operand signedness, applied to the whole vector.
  typedef struct packed {
    logic a_signed;   // feature operand is two's complement
    logic b_signed;   // weight operand is two's complement
  } sign_cfg_t;

  // Sideband that travels with a feature vector through the array.
  typedef struct packed {
    logic        valid;  // the feature register holds a vector
    logic        acc;    // add result to the PE output buffer instead of loading it
    logic        psum;   // add result to the stored partial sum in the psum buffer
    logic        last;   // final contribution: apply ReLU if enabled
    logic [15:0] pix;    // output column (pixel) index
  } feat_tag_t;

endpackage
