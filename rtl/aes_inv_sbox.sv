// aes_inv_sbox -- one AES inverse S-box (InvSubBytes on a single byte),
// combinational.
//
// The inverse S-box undoes the seed (affine) function first and then
// takes the GF(2^8) inverse from the same 129-record table as aes_sbox:
// because each record holds a number and its inverse, one table serves
// the S-box and the inverse S-box alike. The shared lookup is
// aes_pkg::table_inverse.
//
// Interface: din -> dout, no clock. Output equals the FIPS-197 inverse
// S-box.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  byte_t din,
  output byte_t dout
);

  assign dout = table_inverse(inv_seed_fn(din));

endmodule
