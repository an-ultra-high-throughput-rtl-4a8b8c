// aes_inv_round -- one pipelined round of the AES-128 inverse cipher with
// its backward key step.
//
// Data path, in order: InvShiftRows and InvSubBytes, then AddRoundKey,
// then InvMixColumns (the FIPS-197 inverse cipher order). It mirrors
// aes_round: with INNER_REGS = 1 a register follows each of the three
// steps (3 cycles per round, one block per cycle); with INNER_REGS = 0 only
// the last register remains.
//
// keyin is the round key used by the previous inverse round (encryption
// round r+1); aes_inv_key_expand with rconin = rcon(r+1) turns it into the
// key of encryption round r during the first step, and the key then moves
// with the block. keyout is the key this round used. FINAL = 1 builds the
// last inverse round, which has no InvMixColumns (a plain register stage
// takes its place).
//
// Interface and timing as aes_round; rst clears every register
// asynchronously.
module aes_inv_round
  import aes_pkg::*;
#(
  parameter bit FINAL      = 1'b0,
  parameter bit INNER_REGS = 1'b1
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   vin,
  input  block_t din,
  input  block_t keyin,
  input  byte_t  rconin,
  output logic   vout,
  output block_t dout,
  output block_t keyout
);

  block_t ishr, isub, kprev;
  block_t s1_d, s1_k, s2_in, s2_d, s2_k, s3_out;
  logic   s1_v, s2_v;

  // Step 1: InvShiftRows, InvSubBytes; backward key step alongside.
  aes_inv_shift_rows  u_ishr (.din(din),   .dout(ishr));
  aes_inv_sub_bytes   u_isub (.din(ishr),  .dout(isub));
  aes_inv_key_expand  u_key  (.din(keyin), .rconin(rconin), .key_out(kprev));

  if (INNER_REGS) begin : g_reg1
    aes_round_reg u_reg1 (.clk, .rst, .vin(vin), .d(isub), .k(kprev),
                          .vout(s1_v), .qd(s1_d), .qk(s1_k));
  end else begin : g_wire1
    assign s1_v = vin;
    assign s1_d = isub;
    assign s1_k = kprev;
  end

  // Step 2: AddRoundKey.
  aes_add_round_key u_ark (.din(s1_d), .kin(s1_k), .dout(s2_in));

  if (INNER_REGS) begin : g_reg2
    aes_round_reg u_reg2 (.clk, .rst, .vin(s1_v), .d(s2_in), .k(s1_k),
                          .vout(s2_v), .qd(s2_d), .qk(s2_k));
  end else begin : g_wire2
    assign s2_v = s1_v;
    assign s2_d = s2_in;
    assign s2_k = s1_k;
  end

  // Step 3: InvMixColumns (skipped in the final round), then the output
  // register.
  if (FINAL) begin : g_nomix
    assign s3_out = s2_d;
  end else begin : g_mix
    aes_inv_mix_columns u_imix (.din(s2_d), .dout(s3_out));
  end

  aes_round_reg u_reg3 (.clk, .rst, .vin(s2_v), .d(s3_out), .k(s2_k),
                        .vout(vout), .qd(dout), .qk(keyout));

endmodule
