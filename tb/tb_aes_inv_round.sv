// tb_aes_inv_round -- one middle and one final inverse round, fed a
// random state and round key on every cycle. Three cycles later the
// outputs must satisfy the forward reference round: the key out is the
// round key the reference schedule expands into the key in, and
// re-encrypting the state out with it gives back the state in. An
// asynchronous reset must empty the round.
module tb_aes_inv_round;
  import aes_model_pkg::*;

  localparam int LAT = 3;
  logic         clk = 0, rst;
  logic         vin;
  logic [127:0] din, keyin;
  logic [7:0]   rconin;
  logic         vout_m, vout_f;
  logic [127:0] dout_m, keyout_m, dout_f, keyout_f;
  int checks = 0, failures = 0;

  aes_inv_round #(.FINAL(1'b0)) dut_mid (.clk, .rst, .vin, .din, .keyin, .rconin,
                                         .vout(vout_m), .dout(dout_m), .keyout(keyout_m));
  aes_inv_round #(.FINAL(1'b1)) dut_fin (.clk, .rst, .vin, .din, .keyin, .rconin,
                                         .vout(vout_f), .dout(dout_f), .keyout(keyout_f));

  always #5 clk = ~clk;

  logic         ev  [256];
  logic [127:0] ed  [256], ekp [256];

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    rst = 1; vin = 0; din = '0; keyin = '0; rconin = 8'h01;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (cyc = 0; cyc < 100 + LAT; cyc++) begin
      @(negedge clk);
      if (cyc >= LAT) begin
        int i;
        i = cyc - LAT;
        checks++;
        if (vout_m !== ev[i] || vout_f !== ev[i]) begin
          failures++; $display("FAIL valid at input %0d", i);
        end
        if (ev[i]) begin
          checks++;
          if (keyout_m !== ekp[i] || keyout_f !== ekp[i]) begin
            failures++; $display("FAIL key at input %0d", i);
          end
          checks++;
          if (m_shift_rows(m_sub_bytes(m_mix_columns(dout_m) ^ ekp[i])) !== ed[i]) begin
            failures++; $display("FAIL middle inverse round %0d", i);
          end
          checks++;
          if (m_shift_rows(m_sub_bytes(dout_f ^ ekp[i])) !== ed[i]) begin
            failures++; $display("FAIL final inverse round %0d", i);
          end
        end
      end
      if (cyc < 100) begin
        int r;
        logic [127:0] kp;
        r  = 1 + int'($urandom % 10);
        kp = {$urandom, $urandom, $urandom, $urandom};
        vin    = ($urandom % 4) != 0;
        din    = {$urandom, $urandom, $urandom, $urandom};
        keyin  = m_next_key(kp, r);
        rconin = 8'h01;
        for (int j = 1; j < r; j++) rconin = m_mul(rconin, 8'h02);
        ev[cyc]  = vin;
        ed[cyc]  = din;
        ekp[cyc] = kp;
      end else begin
        vin = 0;
      end
    end
    vin = 1;
    repeat (2) @(negedge clk);
    #2 rst = 1;
    #1;
    checks++;
    if (vout_m !== 0 || dout_m !== '0 || keyout_m !== '0) begin
      failures++; $display("FAIL reset did not clear the round");
    end
    vin = 0;
    #1 rst = 0;
    repeat (LAT + 1) begin
      @(negedge clk);
      checks++;
      if (vout_m !== 0 || vout_f !== 0) begin
        failures++; $display("FAIL block survived reset");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
