// tb_aes_inv_sub_bytes -- the inverse transform on random states: the forward
// reference model applied to its output must return the input.
module tb_aes_inv_sub_bytes;
  import aes_model_pkg::*;

  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  aes_inv_sub_bytes dut (.din, .dout);

  task automatic check(input logic [127:0] back);
    checks++;
    if (back !== din) begin
      failures++;
      $display("FAIL inv_sub_bytes(%032h) = %032h, forward gives %032h", din, dout, back);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      #1 check(m_sub_bytes(dout));
    end
    din = 128'hd42711aee0bf98f1b8b45de51e415230;
    #1; checks++;
    if (dout !== 128'h193de3bea0f4e22b9ac68d2ae9f84808) begin failures++; $display("FAIL FIPS-197 example"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
