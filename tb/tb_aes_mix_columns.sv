// tb_aes_mix_columns -- MixColumns against the reference GF(2^8) product
// on random states, the FIPS-197 round-1 example and known column vectors.
module tb_aes_mix_columns;
  import aes_model_pkg::*;

  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  aes_mix_columns dut (.din, .dout);

  task automatic check(input logic [127:0] exp);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL mix_columns(%032h) = %032h, expected %032h", din, dout, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 128'hd4bf5d30e0b452aeb84111f11e2798e5;
    #1 check(128'h046681e5e0cb199a48f8d37a2806264c);
    din = 128'hdb135345f20a225c01010101c6c6c6c6;
    #1 check(128'h8e4da1bc9fdc589d01010101c6c6c6c6);
    for (int n = 0; n < 100; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      #1 check(m_mix_columns(din));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
