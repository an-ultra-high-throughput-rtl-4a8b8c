// tb_aes_dec_pipe -- test of the AES-128 decryption pipeline at its
// default size. Plaintexts and keys are drawn at random; the reference
// model encrypts them and computes the last round key, which the pipeline
// receives. Each output cycle is compared with the input sampled 30 edges
// earlier (31 register stages): valid flag, recovered plaintext and
// recovered cipher key. Covered: the FIPS-197 C.1 vector, a back-to-back
// stream with a new key per block, idle cycles, and an asynchronous reset
// with a full pipeline.
module tb_aes_dec_pipe;
  import aes_model_pkg::*;

  localparam int LAT  = 31;
  localparam int MAXC = 2048;

  logic         clk = 0, rst;
  logic         in_valid, out_valid;
  logic [127:0] ct, last_key, pt, key_out;
  int checks = 0, failures = 0;

  aes_dec_pipe dut (.clk, .rst, .in_valid, .ct, .last_key, .out_valid, .pt, .key_out);

  always #5 clk = ~clk;

  logic         sb_v  [MAXC];
  logic [127:0] sb_pt [MAXC], sb_k [MAXC];
  int           cycle = 0, flush_to = -1;
  int           n_out = 0, run = 0, max_run = 0, n_bubbles = 0, n_resets = 0;
  logic         last_v = 0;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  function automatic logic [127:0] last_round_key(input logic [127:0] k);
    for (int r = 1; r <= 10; r++) k = m_next_key(k, r);
    return k;
  endfunction

  task automatic put(input logic v, input logic [127:0] p, input logic [127:0] k);
    @(negedge clk);
    in_valid = v;
    ct       = v ? m_encrypt(p, k) : '0;
    last_key = v ? last_round_key(k) : '0;
    sb_v[cycle] = v; sb_pt[cycle] = p; sb_k[cycle] = k;
    if (!v && last_v) n_bubbles++;
    last_v = v;
  endtask

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      int i;
      i = cycle - (LAT - 1);
      if (i >= 0) begin
        logic ev;
        ev = sb_v[i] && i > flush_to;
        checks++;
        if (out_valid !== ev) fail($sformatf("out_valid=%b at cycle %0d", out_valid, cycle));
        if (ev && out_valid) begin
          checks++;
          if (pt !== sb_pt[i]) fail($sformatf("pt of input %0d: %032h expected %032h", i, pt, sb_pt[i]));
          checks++;
          if (key_out !== sb_k[i]) fail($sformatf("key_out of input %0d", i));
        end
      end
      if (out_valid) begin
        n_out++; run++;
        if (run > max_run) max_run = run;
      end else run = 0;
    end
    cycle++;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < MAXC; i++) begin sb_v[i] = 0; sb_pt[i] = '0; sb_k[i] = '0; end
    init_model();
    rst = 1; in_valid = 0; ct = '0; last_key = '0;
    #23 rst = 0;
    // FIPS-197 C.1: the model must agree with the published ciphertext
    checks++;
    if (m_encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) fail("reference model");
    put(1, 128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f);
    for (int n = 0; n < 100; n++)
      put(1, {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    for (int n = 0; n < 100; n++)
      put(($urandom % 3) != 0, {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    for (int n = 0; n < 40; n++)
      put(1, {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    @(negedge clk);
    flush_to = cycle - 1;
    in_valid = 0; sb_v[cycle] = 0;
    #2 rst = 1; n_resets++;
    #1 checks++;
    if (out_valid !== 0 || pt !== '0) fail("reset did not clear the output");
    @(posedge clk); #2 rst = 0;
    for (int n = 0; n < 40; n++)
      put(1, {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    for (int n = 0; n < LAT + 5; n++) put(0, '0, '0);
    $display("blocks out=%0d longest run=%0d bubbles=%0d resets=%0d", n_out, max_run, n_bubbles, n_resets);
    checks++; if (max_run < 100)  fail("no back-to-back run of 100 blocks");
    checks++; if (n_bubbles == 0) fail("no bubble");
    checks++; if (n_resets == 0)  fail("no reset in flight");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
