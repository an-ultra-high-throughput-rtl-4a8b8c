// aes_inv_mix_columns -- InvMixColumns on a 128-bit state, combinational.
//
// Each column (a0,a1,a2,a3) is multiplied by 0Bx^3 + 0Dx^2 + 09x + 0E
// modulo x^4 + 1:
//   b_r = 0E*a_r ^ 0B*a_(r+1) ^ 0D*a_(r+2) ^ 09*a_(r+3)   (indices mod 4).
// The multiplication units reuse xtime: with x2 = 02*a, x4 = 04*a and
// x8 = 08*a, 09*a = x8^a, 0B*a = x8^x2^a, 0D*a = x8^x4^a, 0E*a = x8^x4^x2.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  block_t din,
  output block_t dout
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t a [4], x2 [4], x4 [4], x8 [4];
    for (genvar r = 0; r < 4; r++) begin : g_in
      assign a[r]  = din[127-32*c-8*r -: 8];
      assign x2[r] = xtime(a[r]);
      assign x4[r] = xtime(x2[r]);
      assign x8[r] = xtime(x4[r]);
    end
    for (genvar r = 0; r < 4; r++) begin : g_out
      localparam int R1 = (r + 1) % 4;
      localparam int R2 = (r + 2) % 4;
      localparam int R3 = (r + 3) % 4;
      assign dout[127-32*c-8*r -: 8] =
          (x8[r]  ^ x4[r]  ^ x2[r])          // 0E
        ^ (x8[R1] ^ x2[R1] ^ a[R1])          // 0B
        ^ (x8[R2] ^ x4[R2] ^ a[R2])          // 0D
        ^ (x8[R3] ^ a[R3]);                  // 09
    end
  end

endmodule
