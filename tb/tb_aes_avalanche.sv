// tb_aes_avalanche -- avalanche (strict avalanche criterion) sweep and
// the NIST frequency and runs statistics of one ciphertext block.
//
// Key 0f1571c9 47d9e859 0cb7add6 af7f6798 and plaintext 01234567 89abcdef
// fedcba98 76543210 are encrypted, then the same plaintext with each of
// its 128 bits flipped in turn: 129 blocks streamed back-to-back through
// aes_top, one per clock. Every ciphertext is checked against the
// reference model and decrypted again by the decryption pipeline. The
// testbench then reports the share of ciphertext bits that flip per
// plaintext bit (each must lie between 25 % and 75 %, the mean between
// 45 % and 55 %), the known 68-bit distance for the flip of bit 7 of
// plaintext byte 11 (53.125 %), and the count of ones and of runs in the
// base ciphertext (frequency and runs tests).
module tb_aes_avalanche;
  import aes_model_pkg::*;

  localparam int LAT = 31;
  localparam int NB  = 129;

  logic         clk = 0, rst;
  logic         enc_in_valid, enc_out_valid, dec_out_valid;
  logic [127:0] enc_pt, enc_key, enc_ct, enc_key_out, dec_pt, dec_key_out;
  int checks = 0, failures = 0;

  aes_top dut (
    .clk, .rst,
    .enc_in_valid, .enc_pt, .enc_key, .enc_out_valid, .enc_ct, .enc_key_out,
    .dec_in_valid (enc_out_valid),
    .dec_ct       (enc_ct),
    .dec_last_key (enc_key_out),
    .dec_out_valid, .dec_pt, .dec_key_out
  );

  always #5 clk = ~clk;

  logic [127:0] pts [NB], cts [NB];
  int           n_ct = 0, n_pt = 0;
  int           first_out = -1, last_out = -1, cyc = 0;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  always @(posedge clk) begin
    #1;
    cyc++;
    if (enc_out_valid && n_ct < NB) begin
      cts[n_ct] = enc_ct;
      if (first_out < 0) first_out = cyc;
      last_out = cyc;
      n_ct++;
    end
    if (dec_out_valid && n_pt < NB) begin
      checks++;
      if (dec_pt !== pts[n_pt]) fail($sformatf("round trip of block %0d", n_pt));
      n_pt++;
    end
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] key, base;
    int flips, total, ones, runs;
    real pct;
    init_model();
    key  = 128'h0f1571c947d9e8590cb7add6af7f6798;
    base = 128'h0123456789abcdeffedcba9876543210;
    pts[0] = base;
    for (int b = 0; b < 128; b++) pts[b+1] = base ^ (128'h1 << b);
    rst = 1; enc_in_valid = 0; enc_pt = '0; enc_key = key;
    #23 rst = 0;
    for (int n = 0; n < NB; n++) begin
      @(negedge clk);
      enc_in_valid = 1; enc_pt = pts[n];
    end
    @(negedge clk);
    enc_in_valid = 0;
    repeat (2 * LAT + 5) @(negedge clk);

    checks++;
    if (n_ct != NB || n_pt != NB) fail($sformatf("%0d ciphertexts, %0d plaintexts back", n_ct, n_pt));
    checks++;
    if (last_out - first_out != NB - 1) fail("ciphertexts not on consecutive cycles");
    for (int n = 0; n < NB; n++) begin
      checks++;
      if (cts[n] !== m_encrypt(pts[n], key)) fail($sformatf("ciphertext %0d", n));
    end
    checks++;
    if (cts[0] !== 128'hff0b844a0853bf7c6934ab4364148fb9) fail("base ciphertext");

    total = 0;
    for (int b = 0; b < 128; b++) begin
      flips = $countones(cts[0] ^ cts[b+1]);
      total += flips;
      checks++;
      if (flips < 32 || flips > 96) fail($sformatf("plaintext bit %0d flips %0d output bits", b, flips));
    end
    pct = 100.0 * total / (128.0 * 128.0);
    $display("mean avalanche over 128 single-bit flips: %0.2f %%", pct);
    checks++;
    if (pct < 45.0 || pct > 55.0) fail("mean avalanche outside 45..55 %");
    // plaintext byte 11 (0x98) bit 7 is bit 39 of the word (byte 15 is bits 7:0)
    flips = $countones(cts[0] ^ cts[39+1]);
    $display("flip of plaintext byte 11, bit 7: %0d of 128 bits (%0.3f %%)", flips, 100.0 * flips / 128.0);
    checks++;
    if (flips != 68) fail("avalanche of byte 11 bit 7");

    ones = $countones(cts[0]);
    runs = 1;
    for (int i = 0; i < 127; i++) if (cts[0][i] != cts[0][i+1]) runs++;
    $display("base ciphertext: %0d ones, %0d zeros, %0d runs", ones, 128 - ones, runs);
    checks++;
    if (ones != 63 || runs != 63) fail("frequency/runs counts of the base ciphertext");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
