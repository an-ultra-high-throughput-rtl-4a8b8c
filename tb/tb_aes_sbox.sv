// tb_aes_sbox -- exhaustive check of the S-box against the reference model
// (inverse found by search, affine map from its definition) for all 256
// inputs, plus FIPS-197 spot values.
module tb_aes_sbox;
  import aes_model_pkg::*;

  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  aes_sbox dut (.din, .dout);

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
    for (int i = 0; i < 256; i++) begin
      din = 8'(i);
      #1;
      expect8(dout, m_sbox(8'(i)), $sformatf("sbox(%02h)", i));
    end
    din = 8'h00; #1; expect8(dout, 8'h63, "sbox(00)");
    din = 8'h53; #1; expect8(dout, 8'hed, "sbox(53)");
    din = 8'h01; #1; expect8(dout, 8'h7c, "sbox(01)");
    din = 8'hff; #1; expect8(dout, 8'h16, "sbox(ff)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
