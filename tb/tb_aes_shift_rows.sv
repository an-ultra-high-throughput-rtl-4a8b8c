// tb_aes_shift_rows -- ShiftRows against the reference (row r rotated by
// r columns), on random states and the FIPS-197 round-1 example.
module tb_aes_shift_rows;
  import aes_model_pkg::*;

  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  aes_shift_rows dut (.din, .dout);

  task automatic check(input logic [127:0] exp);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL shift_rows(%032h) = %032h, expected %032h", din, dout, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1 check(128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int n = 0; n < 100; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      #1 check(m_shift_rows(din));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
