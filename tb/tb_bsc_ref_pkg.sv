// tb_bsc_ref_pkg: reference arithmetic for the BSC accelerator testbenches.
//
// dot_ref() computes the dot product of two vectors of 16-bit elements the
// plain way, from the integer values of the packed operands, with no use of
// the bit-split decomposition: 8-bit mode uses bits [7:0] of each element,
// 4-bit mode its four nibbles, 2-bit mode its eight 2-bit fields. Each field
// is read as two's complement or unsigned according to the signedness flags.
package tb_bsc_ref_pkg;

  function automatic int field_val(input logic [15:0] e, input int lsb,
                                   input int w, input logic is_signed);
    int v;
    v = 0;
    for (int i = 0; i < w; i++) if (e[lsb+i]) v += (1 << i);
    if (is_signed && e[lsb+w-1]) v -= (1 << w);
    return v;
  endfunction

  // mode: 0 = 8-bit, 1 = 4-bit, 2 = 2-bit
  function automatic longint dot_ref(input logic [31:0][15:0] f,
                                     input logic [31:0][15:0] w,
                                     input int n, input int mode,
                                     input logic a_s, input logic b_s);
    longint acc;
    int fw, nf;
    acc = 0;
    fw  = (mode == 0) ? 8 : (mode == 1) ? 4 : 2;
    nf  = (mode == 0) ? 1 : (mode == 1) ? 4 : 8;
    for (int l = 0; l < n; l++)
      for (int m = 0; m < nf; m++)
        acc += longint'(field_val(f[l], m*fw, fw, a_s)) *
               longint'(field_val(w[l], m*fw, fw, b_s));
    return acc;
  endfunction

  function automatic logic [31:0][15:0] rand_vec();
    logic [31:0][15:0] v;
    for (int l = 0; l < 32; l++) v[l] = 16'($urandom);
    return v;
  endfunction

endpackage
