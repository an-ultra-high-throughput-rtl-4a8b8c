// aes_inv_key_expand -- one step of the AES-128 key schedule run
// backwards, combinational.
//
// From round key (w4,w5,w6,w7) of round r and rconin = rcon(r) it
// recovers the round key (w0,w1,w2,w3) of round r-1:
//   w3 = w7 ^ w6, w2 = w6 ^ w5, w1 = w5 ^ w4,
//   w0 = w4 ^ SubWord(RotWord(w3)) ^ {rconin, 00, 00, 00}.
// Like the forward step it needs four byte S-boxes and byte-wide XORs.
// It lets the decryption pipeline start from the last round key and
// produce every earlier round key on the fly.
//
// Interface: din (round key r), rconin -> key_out (round key r-1).
module aes_inv_key_expand
  import aes_pkg::*;
(
  input  block_t din,
  input  byte_t  rconin,
  output block_t key_out
);

  logic [31:0] n [4];
  logic [31:0] w [4];
  logic [31:0] rot, sub;

  for (genvar i = 0; i < 4; i++) begin : g_word
    assign n[i] = din[127-32*i -: 32];
  end

  assign w[3] = n[3] ^ n[2];
  assign w[2] = n[2] ^ n[1];
  assign w[1] = n[1] ^ n[0];
  assign rot  = {w[3][23:0], w[3][31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_sbox
    aes_sbox u_sbox (
      .din  (rot[31-8*b -: 8]),
      .dout (sub[31-8*b -: 8])
    );
  end

  assign w[0] = n[0] ^ sub ^ {rconin, 24'h0};

  assign key_out = {w[0], w[1], w[2], w[3]};

endmodule
