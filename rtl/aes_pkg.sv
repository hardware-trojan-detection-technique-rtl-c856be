// aes_pkg: types and pure functions of the AES-128 encryption datapath.
//
// A 128-bit block is held as in the AES standard: bits [127:120] are byte 0,
// the first byte of the hex string, and the state is filled column by column
// (byte 4*c + r sits in row r, column c). The S-box is not typed in as a
// table: gen_sbox() builds it when the design is elaborated from its
// definition, the multiplicative inverse in GF(2^8) (computed as a^254 by
// square-and-multiply) followed by the affine map
//   s = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63,
// so the hardware sees a 256-entry ROM per byte lane. The functions carry no
// state; the modules that call them add the pipeline registers.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef logic [255:0][7:0] sbox_table_t;

  localparam int unsigned ROUNDS = 10;  // AES-128

  // multiply by x in GF(2^8), polynomial x^8 + x^4 + x^3 + x + 1
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t acc = 8'h00;
    byte_t p   = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc = acc ^ p;
      p = xtime(p);
    end
    return acc;
  endfunction

  // a^254 = a^-1 for a != 0, and 0 for a == 0
  function automatic byte_t gf_inv(input byte_t a);
    byte_t sq = a;
    byte_t r  = 8'h01;
    for (int i = 1; i < 8; i++) begin
      sq = gf_mul(sq, sq);     // a^(2^i)
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(input byte_t b, input int unsigned n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic byte_t sbox_calc(input byte_t a);
    byte_t b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic sbox_table_t gen_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(byte_t'(i));
    return t;
  endfunction

  localparam sbox_table_t SBOX = gen_sbox();

  // byte k of a block, k = 0 is the most significant byte
  function automatic byte_t get_byte(input block_t s, input int unsigned k);
    return s[127 - 8*k -: 8];
  endfunction

  function automatic block_t sub_bytes(input block_t s);
    block_t o;
    for (int k = 0; k < 16; k++) o[127 - 8*k -: 8] = SBOX[get_byte(s, k)];
    return o;
  endfunction

  // row r is rotated left by r columns
  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = get_byte(s, 4*((c + r) % 4) + r);
    return o;
  endfunction

  function automatic word_t mix_column(input word_t w);
    byte_t a0 = w[31:24];
    byte_t a1 = w[23:16];
    byte_t a2 = w[15:8];
    byte_t a3 = w[7:0];
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++) o[127 - 32*c -: 32] = mix_column(s[127 - 32*c -: 32]);
    return o;
  endfunction

  // round constant of key-expansion step r (r = 1..10): x^(r-1) in GF(2^8)
  function automatic byte_t rcon(input int unsigned r);
    byte_t c = 8'h01;
    for (int i = 1; i < 16; i++) if (i < r) c = xtime(c);
    return c;
  endfunction

  // next AES-128 round key from the previous one
  function automatic block_t next_round_key(input block_t k, input byte_t rc);
    word_t w0 = k[127:96];
    word_t w1 = k[95:64];
    word_t w2 = k[63:32];
    word_t w3 = k[31:0];
    word_t t  = {SBOX[w3[23:16]] ^ rc, SBOX[w3[15:8]], SBOX[w3[7:0]], SBOX[w3[31:24]]};
    word_t n0 = w0 ^ t;
    word_t n1 = w1 ^ n0;
    word_t n2 = w2 ^ n1;
    word_t n3 = w3 ^ n2;
    return {n0, n1, n2, n3};
  endfunction

endpackage
