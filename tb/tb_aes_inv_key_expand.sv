// tb_aes_inv_key_expand -- runs the FIPS-197 key schedule backwards from
// round key 10 to the cipher key, and checks that the backward step undoes
// the reference forward step for random keys and rounds.
module tb_aes_inv_key_expand;
  import aes_model_pkg::*;

  logic [127:0] din, key_out;
  logic [7:0]   rconin;
  int checks = 0, failures = 0;

  aes_inv_key_expand dut (.din, .rconin, .key_out);

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
    int r;
    k = 128'hd014f9a8c9ee2589e13f0cc8b6630ca6;
    for (r = 10; r >= 1; r--) begin
      din = k; rconin = rc(r);
      #1;
      if (r == 2) check(128'ha0fafe1788542cb123a339392a6c7605, "round key 1");
      if (r == 1) check(128'h2b7e151628aed2a6abf7158809cf4f3c, "cipher key");
      k = key_out;
    end
    for (int n = 0; n < 100; n++) begin
      logic [127:0] kp;
      r  = 1 + int'($urandom % 10);
      kp = {$urandom, $urandom, $urandom, $urandom};
      din = m_next_key(kp, r); rconin = rc(r);
      #1 check(kp, "random key");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
