// tb_aes_inv_sbox -- exhaustive check of the inverse S-box: for every
// byte y, the reference S-box of the output must give y back, and a few
// FIPS-197 inverse S-box values are checked directly.
module tb_aes_inv_sbox;
  import aes_model_pkg::*;

  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  aes_inv_sbox dut (.din, .dout);

  task automatic expect8(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init_model();
    for (int y = 0; y < 256; y++) begin
      din = 8'(y);
      #1;
      expect8(SB[dout], 8'(y), $sformatf("sbox(inv_sbox(%02h))", y));
    end
    din = 8'h63; #1; expect8(dout, 8'h00, "inv_sbox(63)");
    din = 8'h00; #1; expect8(dout, 8'h52, "inv_sbox(00)");
    din = 8'hed; #1; expect8(dout, 8'h53, "inv_sbox(ed)");
    din = 8'hff; #1; expect8(dout, 8'h7d, "inv_sbox(ff)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
