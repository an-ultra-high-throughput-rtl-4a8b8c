// aes_model_pkg -- reference model of AES-128 encryption for the
// testbenches. It is written independently of the RTL: field products by
// shift-and-add, the inverse by exhaustive search, the S-box affine map
// bit by bit from its definition, and the cipher on a byte array
// state[row][col].
package aes_model_pkg;

  function automatic logic [7:0] m_mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] m_inv(input logic [7:0] a);
    if (a == 0) return 8'h00;
    for (int y = 1; y < 256; y++) if (m_mul(a, 8'(y)) == 8'h01) return 8'(y);
    return 8'h00;
  endfunction

  function automatic logic [7:0] m_sbox(input logic [7:0] a);
    logic [7:0] b, s;
    b = m_inv(a);
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ ((8'h63 >> i) & 1);
    return s;
  endfunction

  // Lookup table filled once by init_model() to keep simulations quick.
  logic [7:0] SB [256];
  bit         ready = 0;

  function automatic void init_model();
    if (!ready) begin
      for (int i = 0; i < 256; i++) SB[i] = m_sbox(8'(i));
      ready = 1;
    end
  endfunction

  function automatic logic [7:0] get(input logic [127:0] w, input int r, input int c);
    return w[127 - 8*(4*c + r) -: 8];
  endfunction

  function automatic logic [127:0] m_sub_bytes(input logic [127:0] s);
    logic [127:0] o;
    init_model();
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = SB[s[127-8*i -: 8]];
    return o;
  endfunction

  function automatic logic [127:0] m_shift_rows(input logic [127:0] s);
    logic [127:0] o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127 - 8*(4*c + r) -: 8] = get(s, r, (c + r) % 4);
    return o;
  endfunction

  function automatic logic [127:0] m_mix_columns(input logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = m_mul(8'h02, get(s, r, c)) ^ m_mul(8'h03, get(s, (r+1)%4, c))
                                  ^ get(s, (r+2)%4, c) ^ get(s, (r+3)%4, c);
    return o;
  endfunction

  function automatic logic [127:0] m_next_key(input logic [127:0] k, input int round);
    logic [31:0] w [8];
    logic [31:0] t;
    logic [7:0]  rc;
    init_model();
    rc = 8'h01;
    for (int i = 1; i < round; i++) rc = m_mul(rc, 8'h02);
    for (int i = 0; i < 4; i++) w[i] = k[127-32*i -: 32];
    t = {SB[w[3][23:16]] ^ rc, SB[w[3][15:8]], SB[w[3][7:0]], SB[w[3][31:24]]};
    w[4] = w[0] ^ t;
    for (int i = 5; i < 8; i++) w[i] = w[i-4] ^ w[i-1];
    return {w[4], w[5], w[6], w[7]};
  endfunction

  function automatic logic [127:0] m_encrypt(input logic [127:0] pt, input logic [127:0] key);
    logic [127:0] s, k;
    k = key;
    s = pt ^ key;
    for (int r = 1; r <= 10; r++) begin
      k = m_next_key(k, r);
      s = m_shift_rows(m_sub_bytes(s));
      if (r < 10) s = m_mix_columns(s);
      s ^= k;
    end
    return s;
  endfunction

  // Reorders a block printed row by row (row 0 bytes first) into the
  // column-major byte order of the ports.
  function automatic logic [127:0] rows_to_cols(input logic [127:0] x);
    logic [127:0] o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127 - 8*(4*c + r) -: 8] = x[127 - 8*(4*r + c) -: 8];
    return o;
  endfunction

endpackage
