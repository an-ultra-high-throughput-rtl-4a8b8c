// aes_inv_sub_bytes -- InvSubBytes on a whole 128-bit state,
// combinational: sixteen aes_inv_sbox instances, one per byte position.
module aes_inv_sub_bytes
  import aes_pkg::*;
(
  input  block_t din,
  output block_t dout
);

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    aes_inv_sbox u_sbox (
      .din  (din [127-8*i -: 8]),
      .dout (dout[127-8*i -: 8])
    );
  end

endmodule
