// tb_aes_enc_pipe -- test of the AES-128 encryption pipeline at its default
// size (10 rounds, three register steps per round, 31-cycle latency).
//
// Every input cycle is recorded in a scoreboard; each output cycle is
// compared with the input sampled 30 edges earlier (31 register stages,
// the sampling edge included), so the check
// covers the ciphertext, the last round key, the valid flag and the
// latency at once. The stimulus:
//   * FIPS-197 known answers and three published known answers whose
//     blocks are printed row by row (reordered into port order here),
//     plus the bit-flip (avalanche) count between two of them;
//   * a long back-to-back stream, one block per cycle, which fills every
//     pipeline stage and checks the one-block-per-cycle rate;
//   * a stream with idle cycles (bubbles) and a fresh key for every block;
//   * an asynchronous reset while the pipeline is full, after which no
//     block in flight may appear.
// Each of these events is counted; one that never happened is a failure.
module tb_aes_enc_pipe;
  import aes_model_pkg::*;

  localparam int LAT  = 31;
  localparam int MAXC = 4096;

  logic         clk = 0, rst;
  logic         in_valid, out_valid;
  logic [127:0] pt, key, ct, key_out;
  int checks = 0, failures = 0;

  aes_enc_pipe dut (.clk, .rst, .in_valid, .pt, .key, .out_valid, .ct, .key_out);

  always #5 clk = ~clk;

  // scoreboard, indexed by the cycle the block was applied
  logic         sb_v  [MAXC];
  logic [127:0] sb_ct [MAXC], sb_k [MAXC];
  int           cycle = 0;
  int           flush_from = -1, flush_to = -1;  // inputs lost to the reset

  // events
  int n_out = 0, n_full_cycles = 0, n_bubbles = 0, n_key_changes = 0, n_resets = 0;
  int run = 0, max_run = 0;
  logic [127:0] last_key = '0;
  logic         last_v = 0;

  logic [127:0] got_ct [MAXC];
  int           kat_i [5];
  int           put_idx;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Drive one cycle of input (v=0 leaves an idle slot).
  task automatic put(input logic v, input logic [127:0] p, input logic [127:0] k);
    @(negedge clk);
    in_valid = v; pt = p; key = k;
    put_idx      = cycle;
    sb_v[cycle]  = v;
    sb_ct[cycle] = v ? m_encrypt(p, k) : '0;
    sb_k[cycle]  = k;
    if (v && last_v && k != last_key) n_key_changes++;
    if (!v && last_v) n_bubbles++;
    if (v) begin last_key = k; end
    last_v = v;
  endtask

  // Output monitor: compare with the input of LAT cycles ago.
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      int i;
      i = cycle - (LAT - 1);
      if (i >= 0) begin
        logic ev;
        ev = sb_v[i] && !(i >= flush_from && i <= flush_to);
        checks++;
        if (out_valid !== ev) fail($sformatf("out_valid=%b at cycle %0d, expected %b", out_valid, cycle, ev));
        if (ev && out_valid) begin
          checks++;
          if (ct !== sb_ct[i])
            fail($sformatf("ct of input %0d: %032h, expected %032h", i, ct, sb_ct[i]));
          checks++;
          if (key_out !== m_next_key(m_next_key(m_next_key(m_next_key(m_next_key(
                 m_next_key(m_next_key(m_next_key(m_next_key(m_next_key(sb_k[i], 1), 2), 3), 4),
                 5), 6), 7), 8), 9), 10))
            fail($sformatf("key_out of input %0d", i));
          got_ct[i] = ct;
        end
      end else begin
        checks++;
        if (out_valid !== 1'b0) fail("output before the pipeline could deliver one");
      end
      if (out_valid) begin
        n_out++; run++;
        if (run > max_run) max_run = run;
      end else run = 0;
      if (out_valid && in_valid) n_full_cycles++;
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
    logic [127:0] k_tab, p1, p4, p7, p;
    int stream_start;
    for (int i = 0; i < MAXC; i++) begin sb_v[i] = 0; sb_ct[i] = '0; sb_k[i] = '0; end
    init_model();
    rst = 1; in_valid = 0; pt = '0; key = '0;
    #23 rst = 0;
    cycle = 0;

    // known answers: FIPS-197 C.1 and B, then three printed row by row
    k_tab = rows_to_cols(128'h0f470caf15d9b77f71e8ad67c959d698);
    p1    = rows_to_cols(128'h0189fe7623abdc5445cdba3267ef9810);
    p4    = rows_to_cols(128'h0189fe7623abdc5445cdba3267ef1810);
    p7    = rows_to_cols(128'h0189fe7623abdc0445cdba3267ef9810);
    put(1, 128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f); kat_i[0] = put_idx;
    put(1, 128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c); kat_i[1] = put_idx;
    put(1, p1, k_tab); kat_i[2] = put_idx;
    put(1, p4, k_tab); kat_i[3] = put_idx;
    put(1, p7, k_tab); kat_i[4] = put_idx;

    // back-to-back stream with a new key every block
    for (int n = 0; n < 200; n++)
      put(1, {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    // stream with bubbles
    for (int n = 0; n < 200; n++)
      put(($urandom % 3) != 0, {$urandom, $urandom, $urandom, $urandom},
          (n % 5 == 0) ? {$urandom, $urandom, $urandom, $urandom} : k_tab);
    // fill the pipeline, then reset it asynchronously
    for (int n = 0; n < 40; n++)
      put(1, {$urandom, $urandom, $urandom, $urandom}, k_tab);
    @(negedge clk);
    flush_from = 0; flush_to = cycle - 1;  // everything in flight is lost
    in_valid = 0;
    sb_v[cycle] = 0;
    #2 rst = 1; n_resets++;
    #1 checks++;
    if (out_valid !== 0 || ct !== '0) fail("reset did not clear the output");
    @(posedge clk); #2 rst = 0;
    // after the reset: a short stream, then drain
    for (int n = 0; n < 50; n++)
      put(1, {$urandom, $urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom, $urandom});
    for (int n = 0; n < LAT + 5; n++) put(0, '0, '0);

    // known-answer ciphertexts
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
    // avalanche: one plaintext bit apart, 68 of 128 output bits differ (53.125 %)
    checks++;
    if ($countones(got_ct[kat_i[2]] ^ got_ct[kat_i[3]]) != 68) fail("avalanche count");
    $display("avalanche: %0d of 128 bits flipped", $countones(got_ct[kat_i[2]] ^ got_ct[kat_i[3]]));

    // mechanisms exercised
    $display("blocks out=%0d longest back-to-back run=%0d full-pipeline cycles=%0d bubbles=%0d key changes=%0d resets=%0d",
             n_out, max_run, n_full_cycles, n_bubbles, n_key_changes, n_resets);
    checks++; if (max_run < 200)        fail("no back-to-back run of 200 blocks (one per cycle)");
    checks++; if (n_full_cycles == 0)   fail("pipeline never full");
    checks++; if (n_bubbles == 0)       fail("no bubble");
    checks++; if (n_key_changes == 0)   fail("no key change between consecutive blocks");
    checks++; if (n_resets == 0)        fail("no reset in flight");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
