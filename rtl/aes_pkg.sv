// aes_pkg -- types, constants and GF(2^8) helpers shared by the AES-128
// encryption pipeline.
//
// Byte order: a 128-bit state or key word carries byte 0 in bits [127:120]
// and byte 15 in bits [7:0]. Byte i sits in row (i mod 4), column (i div 4)
// of the 4x4 AES state, so the column words are [127:96], [95:64], [63:32]
// and [31:0]. This is the usual FIPS-197 order.
//
// The S-box inverse table: every non-zero element of GF(2^8) is a power
// 3^k of the generator 3, and its multiplicative inverse is 3^(255-k). For
// k = 1..127 the exponent 255-k lies in 128..254, so the records
// {3^k, 3^(255-k)} cover each inverse pair exactly once. Together with the
// self-inverse records {00,00} and {01,01} this gives 129 records: each
// number is stored together with its inverse, and never a second time.
// The table is computed here at elaboration; nothing is read from a file.
package aes_pkg;

  localparam int unsigned NR_ROUNDS     = 10;   // rounds of AES-128
  localparam int unsigned INV_RECORDS   = 129;  // records in the inverse table
  localparam logic [7:0]  SBOX_SEED     = 8'h63; // constant of the seed (affine) function

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;

  // One record of the inverse table: a number and its inverse.
  typedef struct packed {
    byte_t num;
    byte_t inv;
  } inv_rec_t;

  typedef inv_rec_t [INV_RECORDS-1:0] inv_table_t;

  // Multiply by x (i.e. by 02) modulo x^8 + x^4 + x^3 + x + 1.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Multiply by 03.
  function automatic byte_t mul3(input byte_t a);
    return xtime(a) ^ a;
  endfunction

  // Round constant of round r (1..10): 02^(r-1).
  function automatic byte_t rcon(input int unsigned r);
    byte_t c;
    c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction

  // Builds the 129-record inverse table described above.
  function automatic inv_table_t build_inv_table();
    inv_table_t t;
    byte_t      pw [256];
    pw[0] = 8'h01;
    for (int k = 1; k < 256; k++) pw[k] = mul3(pw[k-1]);
    t[0] = '{num: 8'h00, inv: 8'h00};
    for (int k = 0; k < 128; k++)
      t[k+1] = '{num: pw[k], inv: pw[(255 - k) % 255]};
    return t;
  endfunction

  localparam inv_table_t INV_TABLE = build_inv_table();

  // Seed function of the S-box: the AES affine transform,
  // b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i, c = 63.
  function automatic byte_t seed_fn(input byte_t b);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]}
             ^ {b[3:0], b[7:4]} ^ SBOX_SEED;
  endfunction

  // Inverse of the seed function, used by the inverse S-box:
  // b = rotl(s,1) ^ rotl(s,3) ^ rotl(s,6) ^ 05.
  function automatic byte_t inv_seed_fn(input byte_t s);
    return {s[6:0], s[7]} ^ {s[4:0], s[7:5]} ^ {s[1:0], s[7:2]} ^ 8'h05;
  endfunction

  // Inverse-table lookup shared by the S-box and the inverse S-box: the
  // record holding x in either field gives the other field.
  function automatic byte_t table_inverse(input byte_t x);
    byte_t r;
    r = '0;
    for (int i = 0; i < INV_RECORDS; i++) begin
      if (x == INV_TABLE[i].num) r |= INV_TABLE[i].inv;
      else if (x == INV_TABLE[i].inv) r |= INV_TABLE[i].num;
    end
    return r;
  endfunction

endpackage
