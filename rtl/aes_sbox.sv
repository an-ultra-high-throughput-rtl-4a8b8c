// aes_sbox -- one AES S-box (SubBytes on a single byte), combinational.
//
// The S-box output is seed_fn(inverse(x)), where the inverse in GF(2^8)
// (with 00 mapped to 00) comes from a table that holds each number only
// together with its inverse: 129 records instead of a 256-entry table (see
// aes_pkg for how the records are formed). The incoming byte is compared
// with both fields of every record; the record that holds it supplies the
// other field. Exactly one record matches any byte, so the result is a
// plain OR of the matching records (aes_pkg::table_inverse, shared with
// the inverse S-box). The seed function is the AES affine
// transform with constant 63, applied to the looked-up entry.
//
// The record count (129), the idea of storing a number or its inverse
// only once and the seed function applied to each entry follow the design
// description; the generator-based ordering of the records and the
// compare-both-fields lookup are this implementation's own choices.
//
// Interface: din -> dout, no clock. Output equals the FIPS-197 S-box.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t din,
  output byte_t dout
);

  assign dout = seed_fn(table_inverse(din));

endmodule
