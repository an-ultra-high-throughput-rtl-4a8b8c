// tb_aes_round_reg -- the pipeline register: loads on the rising edge,
// holds between edges, and is cleared at once by rst without a clock edge.
module tb_aes_round_reg;
  logic         clk = 0, rst, vin, vout;
  logic [127:0] d, k, qd, qk;
  int checks = 0, failures = 0;

  aes_round_reg dut (.clk, .rst, .vin, .d, .k, .vout, .qd, .qk);

  always #5 clk = ~clk;

  task automatic check(input logic v, input logic [127:0] ed, input logic [127:0] ek, input string what);
    checks++;
    if (vout !== v || qd !== ed || qk !== ek) begin
      failures++;
      $display("FAIL %s: got %b %032h %032h", what, vout, qd, qk);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] pd, pk, od, ok;
    logic ov;
    od = '0; ok = '0; ov = 0;
    rst = 1; vin = 0; d = '0; k = '0;
    #12 check(0, '0, '0, "in reset");
    rst = 0;
    for (int n = 0; n < 50; n++) begin
      @(negedge clk);
      pd = {$urandom, $urandom, $urandom, $urandom};
      pk = {$urandom, $urandom, $urandom, $urandom};
      d = pd; k = pk; vin = n[0];
      #1 check(ov, od, ok, "holds before edge");
      @(posedge clk); #1;
      check(n[0], pd, pk, "load");
      ov = n[0]; od = pd; ok = pk;
    end
    // asynchronous clear between clock edges
    @(negedge clk); #2 rst = 1;
    #1 check(0, '0, '0, "async clear");
    @(posedge clk); #1 check(0, '0, '0, "held in clear");
    rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
