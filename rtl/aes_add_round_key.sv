// aes_add_round_key -- AddRoundKey: bitwise XOR of state and round key,
// combinational. Interface: din, kin -> dout.
module aes_add_round_key
  import aes_pkg::*;
(
  input  block_t din,
  input  block_t kin,
  output block_t dout
);

  assign dout = din ^ kin;

endmodule
