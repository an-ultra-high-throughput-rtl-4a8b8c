// tb_aes_add_round_key -- AddRoundKey on random state/key pairs and the
// FIPS-197 round-1 example.
module tb_aes_add_round_key;
  logic [127:0] din, kin, dout;
  int checks = 0, failures = 0;

  aes_add_round_key dut (.din, .kin, .dout);

  task automatic check(input logic [127:0] exp);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %032h ^ %032h = %032h, expected %032h", din, kin, dout, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 128'h046681e5e0cb199a48f8d37a2806264c;
    kin = 128'ha0fafe1788542cb123a339392a6c7605;
    #1 check(128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int n = 0; n < 100; n++) begin
      logic [127:0] e;
      din = {$urandom, $urandom, $urandom, $urandom};
      kin = {$urandom, $urandom, $urandom, $urandom};
      for (int b = 0; b < 128; b++) e[b] = (din[b] != kin[b]);
      #1 check(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
