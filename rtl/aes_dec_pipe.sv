// aes_dec_pipe -- fully pipelined, loop-unrolled AES-128 decryption core
// (the FIPS-197 inverse cipher), the counterpart of aes_enc_pipe.
//
// It takes a ciphertext together with the LAST round key of its cipher
// key (round key 10, which aes_enc_pipe delivers on key_out) and runs the
// ten inverse rounds one after another in hardware. Each inverse round
// derives the round key it needs from the one before it with the key
// schedule run backwards, so, as in the encryption core, keys travel with
// the blocks, no key memory exists and every block may use its own key.
//
// Input stage: ct XOR last round key, registered with that key. Then NR
// inverse rounds; inverse round j (1..NR) uses encryption round key
// NR-j, derived with rcon(NR+1-j), and the last one has no
// InvMixColumns. key_out is round key 0, i.e. the cipher key.
//
// Timing as aes_enc_pipe: 1 + NR*3 = 31 register stages (1 + NR with
// INNER_REGS = 0), one block per clock, no back-pressure; rst (active
// high, asynchronous) drops every block in flight.
//
// The inverse operations (InvSubBytes through the shared 129-record table,
// InvMixColumns with multiplier units) are named in the design
// description; the decryption pipeline built from them, its last-round-key
// input and the backward key schedule are this implementation's own.
module aes_dec_pipe
  import aes_pkg::*;
#(
  parameter int unsigned NR         = NR_ROUNDS,
  parameter bit          INNER_REGS = 1'b1
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  block_t ct,
  input  block_t last_key,
  output logic   out_valid,
  output block_t pt,
  output block_t key_out
);

  logic   v [NR+1];
  block_t d [NR+1];
  block_t k [NR+1];

  aes_round_reg u_in_reg (.clk, .rst, .vin(in_valid), .d(ct ^ last_key), .k(last_key),
                          .vout(v[0]), .qd(d[0]), .qk(k[0]));

  for (genvar j = 1; j <= NR; j++) begin : g_round
    aes_inv_round #(.FINAL(j == NR), .INNER_REGS(INNER_REGS)) u_round (
      .clk, .rst,
      .vin    (v[j-1]),
      .din    (d[j-1]),
      .keyin  (k[j-1]),
      .rconin (rcon(NR + 1 - j)),
      .vout   (v[j]),
      .dout   (d[j]),
      .keyout (k[j])
    );
  end

  assign out_valid = v[NR];
  assign pt        = d[NR];
  assign key_out   = k[NR];

endmodule
