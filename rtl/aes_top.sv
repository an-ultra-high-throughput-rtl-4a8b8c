// aes_top -- AES-128 encryption and decryption pipelines side by side.
//
// enc_*: aes_enc_pipe, the fully pipelined encryption core: one 128-bit
// plaintext block with its own 128-bit key in per clock, the ciphertext
// and the block's last round key out 31 register stages later.
// dec_*: aes_dec_pipe, the matching decryption core: one ciphertext with
// the last round key of its cipher key in per clock, the plaintext and the
// cipher key out 31 register stages later. enc_key_out can be stored and
// fed to dec_last_key to decrypt with the same key.
//
// The two pipelines are independent and may run at the same time; they
// share clk and the asynchronous, active-high rst. See aes_enc_pipe and
// aes_dec_pipe for the pipeline structure and timing.
module aes_top
  import aes_pkg::*;
#(
  parameter int unsigned NR         = NR_ROUNDS,
  parameter bit          INNER_REGS = 1'b1
) (
  input  logic   clk,
  input  logic   rst,
  // encryption
  input  logic   enc_in_valid,
  input  block_t enc_pt,
  input  block_t enc_key,
  output logic   enc_out_valid,
  output block_t enc_ct,
  output block_t enc_key_out,
  // decryption
  input  logic   dec_in_valid,
  input  block_t dec_ct,
  input  block_t dec_last_key,
  output logic   dec_out_valid,
  output block_t dec_pt,
  output block_t dec_key_out
);

  aes_enc_pipe #(.NR(NR), .INNER_REGS(INNER_REGS)) u_enc (
    .clk, .rst,
    .in_valid  (enc_in_valid),
    .pt        (enc_pt),
    .key       (enc_key),
    .out_valid (enc_out_valid),
    .ct        (enc_ct),
    .key_out   (enc_key_out)
  );

  aes_dec_pipe #(.NR(NR), .INNER_REGS(INNER_REGS)) u_dec (
    .clk, .rst,
    .in_valid  (dec_in_valid),
    .ct        (dec_ct),
    .last_key  (dec_last_key),
    .out_valid (dec_out_valid),
    .pt        (dec_pt),
    .key_out   (dec_key_out)
  );

endmodule
