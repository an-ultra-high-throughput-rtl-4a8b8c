// tb_aes_top -- end-to-end test of aes_top at its default parameters:
// every plaintext is encrypted by the encryption pipeline, and the
// testbench feeds each ciphertext, with the last round key that comes out
// beside it, straight into the decryption pipeline. So both pipelines run
// at the same time, and each block makes a full round trip.
//
// Checked on every cycle:
//   * encryption output against the reference model, 30 edges after the
//     plaintext was sampled (31 register stages);
//   * decryption output against the original plaintext and cipher key,
//     61 edges after the plaintext was sampled (31 + 31 stages).
// Stimulus and counted events: FIPS-197 and three row-by-row printed known
// answers with the avalanche count between two of them, a 200-block
// back-to-back stream with a new key per block (both pipelines full at
// once), a stream with idle cycles, and an asynchronous reset with both
// pipelines full. An event that never happened is a failure.
module tb_aes_top;
  import aes_model_pkg::*;

  localparam int LAT  = 31;
  localparam int MAXC = 4096;

  logic         clk = 0, rst;
  logic         enc_in_valid, enc_out_valid, dec_out_valid;
  logic [127:0] enc_pt, enc_key, enc_ct, enc_key_out, dec_pt, dec_key_out;

  int checks = 0, failures = 0;

  // decryption inputs wired to the encryption outputs
  aes_top dut (
    .clk, .rst,
    .enc_in_valid, .enc_pt, .enc_key, .enc_out_valid, .enc_ct, .enc_key_out,
    .dec_in_valid (enc_out_valid),
    .dec_ct       (enc_ct),
    .dec_last_key (enc_key_out),
    .dec_out_valid, .dec_pt, .dec_key_out
  );

  always #5 clk = ~clk;

  logic         sb_v  [MAXC];
  logic [127:0] sb_pt [MAXC], sb_k [MAXC], sb_ct [MAXC], got_ct [MAXC];
  int           cycle = 0, flush_to = -1, put_idx;
  int           kat_i [5];

  int n_enc = 0, n_dec = 0, n_both = 0, n_bubbles = 0, n_key_changes = 0, n_resets = 0;
  int run = 0, max_run = 0;
  logic [127:0] last_key = '0;
  logic         last_v = 0;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic put(input logic v, input logic [127:0] p, input logic [127:0] k);
    @(negedge clk);
    enc_in_valid = v; enc_pt = p; enc_key = k;
    put_idx = cycle;
    sb_v[cycle] = v; sb_pt[cycle] = p; sb_k[cycle] = k;
    sb_ct[cycle] = v ? m_encrypt(p, k) : '0;
    if (v && last_v && k != last_key) n_key_changes++;
    if (!v && last_v) n_bubbles++;
    if (v) last_key = k;
    last_v = v;
  endtask

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      int ie, id;
      ie = cycle - (LAT - 1);
      id = cycle - (2 * LAT - 1);
      if (ie >= 0) begin
        logic ev;
        ev = sb_v[ie] && ie > flush_to;
        checks++;
        if (enc_out_valid !== ev) fail($sformatf("enc_out_valid=%b at cycle %0d", enc_out_valid, cycle));
        if (ev && enc_out_valid) begin
          checks++;
          if (enc_ct !== sb_ct[ie]) fail($sformatf("enc_ct of input %0d", ie));
          got_ct[ie] = enc_ct;
        end
      end
      if (id >= 0) begin
        logic ev;
        ev = sb_v[id] && id > flush_to;
        checks++;
        if (dec_out_valid !== ev) fail($sformatf("dec_out_valid=%b at cycle %0d", dec_out_valid, cycle));
        if (ev && dec_out_valid) begin
          checks++;
          if (dec_pt !== sb_pt[id]) fail($sformatf("dec_pt of input %0d: %032h expected %032h", id, dec_pt, sb_pt[id]));
          checks++;
          if (dec_key_out !== sb_k[id]) fail($sformatf("dec_key_out of input %0d", id));
        end
      end
      if (enc_out_valid) n_enc++;
      if (dec_out_valid) n_dec++;
      if (enc_in_valid && enc_out_valid && dec_out_valid) n_both++;
      if (dec_out_valid) begin
        run++;
        if (run > max_run) max_run = run;
      end else run = 0;
    end
    cycle++;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k_tab;
    for (int i = 0; i < MAXC; i++) begin sb_v[i] = 0; sb_pt[i] = '0; sb_k[i] = '0; sb_ct[i] = '0; end
    init_model();
    rst = 1; enc_in_valid = 0; enc_pt = '0; enc_key = '0;
    #23 rst = 0;

    k_tab = rows_to_cols(128'h0f470caf15d9b77f71e8ad67c959d698);
    put(1, 128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f); kat_i[0] = put_idx;
    put(1, 128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c); kat_i[1] = put_idx;
    put(1, rows_to_cols(128'h0189fe7623abdc5445cdba3267ef9810), k_tab); kat_i[2] = put_idx;
    put(1, rows_to_cols(128'h0189fe7623abdc5445cdba3267ef1810), k_tab); kat_i[3] = put_idx;
    put(1, rows_to_cols(128'h0189fe7623abdc0445cdba3267ef9810), k_tab); kat_i[4] = put_idx;
    for (int n = 0; n < 200; n++)
      put(1, {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    for (int n = 0; n < 200; n++)
      put(($urandom % 3) != 0, {$urandom, $urandom, $urandom, $urandom},
          (n % 5 == 0) ? {$urandom, $urandom, $urandom, $urandom} : k_tab);
    for (int n = 0; n < 70; n++)
      put(1, {$urandom, $urandom, $urandom, $urandom}, k_tab);
    @(negedge clk);
    flush_to = cycle - 1;
    enc_in_valid = 0; sb_v[cycle] = 0;
    #2 rst = 1; n_resets++;
    #1 checks++;
    if (enc_out_valid !== 0 || dec_out_valid !== 0 || enc_ct !== '0 || dec_pt !== '0)
      fail("reset did not clear the outputs");
    @(posedge clk); #2 rst = 0;
    for (int n = 0; n < 50; n++)
      put(1, {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    for (int n = 0; n < 2 * LAT + 5; n++) put(0, '0, '0);

    checks++;
    if (got_ct[kat_i[0]] !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) fail("FIPS-197 C.1");
    checks++;
    if (got_ct[kat_i[1]] !== 128'h3925841d02dc09fbdc118597196a0b32) fail("FIPS-197 B");
    checks++;
    if (got_ct[kat_i[2]] !== rows_to_cols(128'hff0869640b53341484bfab8f4a7c43b9)) fail("printed vector 1");
    checks++;
    if (got_ct[kat_i[3]] !== rows_to_cols(128'hebcab49637969b316a68a998e040fd80)) fail("printed vector 2");
    checks++;
    if (got_ct[kat_i[4]] !== rows_to_cols(128'h3f2e4c97ee7c1a11057ce9775a3509cc)) fail("printed vector 3");
    checks++;
    if ($countones(got_ct[kat_i[2]] ^ got_ct[kat_i[3]]) != 68) fail("avalanche count");

    $display("encrypted=%0d decrypted=%0d cycles with both pipelines streaming=%0d longest decrypt run=%0d bubbles=%0d key changes=%0d resets=%0d",
             n_enc, n_dec, n_both, max_run, n_bubbles, n_key_changes, n_resets);
    checks++; if (max_run < 200)      fail("no back-to-back run of 200 blocks through both pipelines");
    checks++; if (n_both == 0)        fail("pipelines never both full");
    checks++; if (n_bubbles == 0)     fail("no bubble");
    checks++; if (n_key_changes == 0) fail("no key change between consecutive blocks");
    checks++; if (n_resets == 0)      fail("no reset in flight");
    checks++; if (n_dec == 0)         fail("no block made the round trip");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
