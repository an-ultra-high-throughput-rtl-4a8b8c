// aes_round_reg -- pipeline register for the state and its round key.
//
// Holds a 128-bit state (d -> qd), the 128-bit key that travels with it
// (k -> qk) and a valid flag (vin -> vout). All three load on every rising
// clk edge and are cleared to zero at once while rst is high
// (asynchronous, active-high clear, as the register of the round
// schematic). The valid flag is this design's own addition: it marks
// which pipeline slots hold a block.
module aes_round_reg
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   vin,
  input  block_t d,
  input  block_t k,
  output logic   vout,
  output block_t qd,
  output block_t qk
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      vout <= 1'b0;
      qd   <= '0;
      qk   <= '0;
    end else begin
      vout <= vin;
      qd   <= d;
      qk   <= k;
    end
  end

endmodule
