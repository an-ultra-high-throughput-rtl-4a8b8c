// aes_key_expand -- one step of the AES-128 key schedule, combinational.
//
// From round key k = (w0,w1,w2,w3) and round constant rconin it forms the
// next round key (w4,w5,w6,w7):
//   t  = SubWord(RotWord(w3)) ^ {rconin, 00, 00, 00}
//   w4 = w0 ^ t, w5 = w1 ^ w4, w6 = w2 ^ w5, w7 = w3 ^ w6.
// As in the key expansion schematic, four byte S-boxes substitute the
// bytes of the last word and the rest is byte-wide XORs (16 of them for
// the key bytes plus one for the round constant). The key is computed on
// the fly next to the data path, so no key memory is needed.
//
// Interface: din (current round key), rconin -> key_out (next round key).
module aes_key_expand
  import aes_pkg::*;
(
  input  block_t din,
  input  byte_t  rconin,
  output block_t key_out
);

  logic [31:0] w [4];
  logic [31:0] rot, sub, t;
  logic [31:0] n [4];

  for (genvar i = 0; i < 4; i++) begin : g_word
    assign w[i] = din[127-32*i -: 32];
  end

  assign rot = {w[3][23:0], w[3][31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_sbox
    aes_sbox u_sbox (
      .din  (rot[31-8*b -: 8]),
      .dout (sub[31-8*b -: 8])
    );
  end

  assign t    = sub ^ {rconin, 24'h0};
  assign n[0] = w[0] ^ t;
  assign n[1] = w[1] ^ n[0];
  assign n[2] = w[2] ^ n[1];
  assign n[3] = w[3] ^ n[2];

  assign key_out = {n[0], n[1], n[2], n[3]};

endmodule
