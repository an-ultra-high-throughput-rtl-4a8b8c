// tb_aes_key_expand -- walks the full AES-128 key schedule of the FIPS-197
// example key through the key step (round keys 1 and 10 are the published
// values) and checks random keys and rounds against the reference.
module tb_aes_key_expand;
  import aes_model_pkg::*;

  logic [127:0] din, key_out;
  logic [7:0]   rconin;
  int checks = 0, failures = 0;

  aes_key_expand dut (.din, .rconin, .key_out);

  function automatic logic [7:0] rc(input int r);
    logic [7:0] c = 8'h01;
    for (int i = 1; i < r; i++) c = m_mul(c, 8'h02);
    return c;
  endfunction

  task automatic check(input logic [127:0] exp, input string what);
    checks++;
    if (key_out !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, key_out, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k;
    k = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int r = 1; r <= 10; r++) begin
      din = k; rconin = rc(r);
      #1;
      if (r == 1)  check(128'ha0fafe1788542cb123a339392a6c7605, "round key 1");
      if (r == 10) check(128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "round key 10");
      check(m_next_key(k, r), $sformatf("round key %0d", r));
      k = key_out;
    end
    for (int n = 0; n < 100; n++) begin
      int r;
      r = 1 + int'($urandom % 10);
      din = {$urandom, $urandom, $urandom, $urandom}; rconin = rc(r);
      #1 check(m_next_key(din, r), "random key");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
