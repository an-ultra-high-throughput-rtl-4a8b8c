// aes_round -- one pipelined AES-128 encryption round with its key step.
//
// Data path, in order: SubBytes and ShiftRows, then MixColumns, then
// AddRoundKey. With INNER_REGS = 1 (the default) a register follows each
// of the three steps, as in the one-round pipeline structure of the
// design: the round takes 3 clock cycles and accepts a new block every
// cycle. With INNER_REGS = 0 only the last register remains (the round of
// the RTL schematic, one register per round, latency 1).
//
// The round key is produced next to the data: aes_key_expand turns the
// key that arrives with the block (keyin, the previous round key) into
// this round's key during the first step, and the key then moves through
// the same registers as the state, so every block carries its own key
// schedule and consecutive blocks may use different keys. keyout is the
// key used by this round, handed on to the next round.
//
// FINAL = 1 builds the last round, whose MixColumns step is replaced by a
// plain register stage, keeping the latency of every round the same.
//
// Interface: vin/din/keyin/rconin in, vout/dout/keyout out, all registered
// on clk; rst clears every register asynchronously.
module aes_round
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

  block_t sub, shr, knext;
  block_t s1_d, s1_k, s2_in, s2_out, s2_d, s2_k, s3_out;
  logic   s1_v, s2_v;

  // Step 1: SubBytes, ShiftRows; key expansion alongside.
  aes_sub_bytes   u_sub (.din(din),   .dout(sub));
  aes_shift_rows  u_shr (.din(sub),   .dout(shr));
  aes_key_expand  u_key (.din(keyin), .rconin(rconin), .key_out(knext));

  if (INNER_REGS) begin : g_reg1
    aes_round_reg u_reg1 (.clk, .rst, .vin(vin), .d(shr), .k(knext),
                          .vout(s1_v), .qd(s1_d), .qk(s1_k));
  end else begin : g_wire1
    assign s1_v = vin;
    assign s1_d = shr;
    assign s1_k = knext;
  end

  // Step 2: MixColumns (skipped in the final round).
  assign s2_in = s1_d;
  if (FINAL) begin : g_nomix
    assign s2_out = s2_in;
  end else begin : g_mix
    aes_mix_columns u_mix (.din(s2_in), .dout(s2_out));
  end

  if (INNER_REGS) begin : g_reg2
    aes_round_reg u_reg2 (.clk, .rst, .vin(s1_v), .d(s2_out), .k(s1_k),
                          .vout(s2_v), .qd(s2_d), .qk(s2_k));
  end else begin : g_wire2
    assign s2_v = s1_v;
    assign s2_d = s2_out;
    assign s2_k = s1_k;
  end

  // Step 3: AddRoundKey, then the round's output register.
  aes_add_round_key u_ark (.din(s2_d), .kin(s2_k), .dout(s3_out));

  aes_round_reg u_reg3 (.clk, .rst, .vin(s2_v), .d(s3_out), .k(s2_k),
                        .vout(vout), .qd(dout), .qk(keyout));

endmodule
