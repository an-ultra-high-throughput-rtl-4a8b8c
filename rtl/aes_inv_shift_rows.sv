// aes_inv_shift_rows -- InvShiftRows on a 128-bit state, pure wiring.
//
// Row r is rotated right by r byte positions: output byte (row r, column
// c) takes input byte (row r, column (c - r) mod 4), i.e. output byte i =
// input byte (i - 4*(i%4)) mod 16.
module aes_inv_shift_rows
  import aes_pkg::*;
(
  input  block_t din,
  output block_t dout
);

  for (genvar i = 0; i < 16; i++) begin : g_byte
    assign dout[127-8*i -: 8] = din[127-8*((i + 16 - 4*(i % 4)) % 16) -: 8];
  end

endmodule
