// aes_mix_columns -- MixColumns on a 128-bit state, combinational.
//
// Each 32-bit column (a0,a1,a2,a3) is multiplied by the fixed polynomial
// 03x^3 + x^2 + x + 02 modulo x^4 + 1:
//   b_r = 02*a_r ^ 03*a_(r+1) ^ a_(r+2) ^ a_(r+3)   (indices mod 4).
// The multiplication units are xtime (shift and conditional XOR of 1b)
// and xtime ^ a for 03; one set per column, as one multiplier set per
// data stream in the design description.
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t din,
  output block_t dout
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t a [4];
    for (genvar r = 0; r < 4; r++) begin : g_in
      assign a[r] = din[127-32*c-8*r -: 8];
    end
    for (genvar r = 0; r < 4; r++) begin : g_out
      assign dout[127-32*c-8*r -: 8] =
        xtime(a[r]) ^ mul3(a[(r+1)%4]) ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
  end

endmodule
