// aes_sub_bytes -- SubBytes on a whole 128-bit state, combinational.
//
// Sixteen aes_sbox instances, one per state byte; byte i of din (bits
// [127-8i -: 8]) is substituted into the same position of dout.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  block_t din,
  output block_t dout
);

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_sbox u_sbox (
      .din  (din [127-8*i -: 8]),
      .dout (dout[127-8*i -: 8])
    );
  end

endmodule
