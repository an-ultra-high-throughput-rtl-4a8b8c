// tb_aes_inv_mix_columns -- the inverse transform on random states: the forward
// reference model applied to its output must return the input.
module tb_aes_inv_mix_columns;
  import aes_model_pkg::*;

  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  aes_inv_mix_columns dut (.din, .dout);

  task automatic check(input logic [127:0] back);
    checks++;
    if (back !== din) begin
      failures++;
      $display("FAIL inv_mix_columns(%032h) = %032h, forward gives %032h", din, dout, back);
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
      #1 check(m_mix_columns(dout));
    end
    din = 128'h046681e5e0cb199a48f8d37a2806264c;
    #1; checks++;
    if (dout !== 128'hd4bf5d30e0b452aeb84111f11e2798e5) begin failures++; $display("FAIL FIPS-197 example"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
