// tb_aes_sub_bytes -- random 128-bit states through SubBytes, compared
// byte by byte with the reference S-box.
module tb_aes_sub_bytes;
  import aes_model_pkg::*;

  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  aes_sub_bytes dut (.din, .dout);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (dout !== m_sub_bytes(din)) begin
        failures++;
        $display("FAIL sub_bytes(%032h) = %032h, expected %032h", din, dout, m_sub_bytes(din));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
