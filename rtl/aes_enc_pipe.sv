// aes_enc_pipe -- fully pipelined, loop-unrolled AES-128 encryption core.
//
// The ten AES-128 rounds are laid out one after another in hardware
// (aes_round instances), each a pipeline section with its own registers,
// so a new 128-bit plaintext block, with its own 128-bit key, can enter on
// every clock cycle and a ciphertext block leaves on every cycle once the
// pipeline is full: throughput is 128 bits per clock. The round keys are
// computed on the fly inside each round and travel with the block, so no
// key memory and no key set-up phase are needed.
//
// Input stage: the initial AddRoundKey (plaintext XOR key) is registered
// together with the key. Then NR rounds follow; the last one skips
// MixColumns. Round r receives the round constant rcon(r) = 02^(r-1).
//
// Timing: a block passes through 1 + NR*3 = 31 register stages (1 + NR
// with INNER_REGS = 0). in_valid/pt/key sampled at one rising clk edge are
// on out_valid/ct right after the 31st rising edge, counting the sampling
// edge as the first, i.e. 30 clock periods later. There is no
// back-pressure: out_valid is a one-cycle
// pulse per block. key_out is the last round key of the block on ct.
// rst (active high, asynchronous) clears every pipeline register and so
// drops all blocks in flight.
//
// The unrolled pipeline, one block per cycle, registers inside each round
// and key expansion beside each round follow the design description; the
// valid flag, the registered initial key addition and the uniform
// three-step final round are this implementation's own choices.
module aes_enc_pipe
  import aes_pkg::*;
#(
  parameter int unsigned NR         = NR_ROUNDS,
  parameter bit          INNER_REGS = 1'b1
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  block_t pt,
  input  block_t key,
  output logic   out_valid,
  output block_t ct,
  output block_t key_out
);

  logic   v [NR+1];
  block_t d [NR+1];
  block_t k [NR+1];

  // Input register with the initial AddRoundKey.
  aes_round_reg u_in_reg (.clk, .rst, .vin(in_valid), .d(pt ^ key), .k(key),
                          .vout(v[0]), .qd(d[0]), .qk(k[0]));

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_round #(.FINAL(r == NR), .INNER_REGS(INNER_REGS)) u_round (
      .clk, .rst,
      .vin    (v[r-1]),
      .din    (d[r-1]),
      .keyin  (k[r-1]),
      .rconin (rcon(r)),
      .vout   (v[r]),
      .dout   (d[r]),
      .keyout (k[r])
    );
  end

  assign out_valid = v[NR];
  assign ct        = d[NR];
  assign key_out   = k[NR];

endmodule
