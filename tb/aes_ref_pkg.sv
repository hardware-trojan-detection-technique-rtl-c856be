// aes_ref_pkg: behavioural AES-128 reference for the testbenches, written
// independently of aes_pkg. It works on a byte array state[16] (index =
// 4*column + row), finds S-box inverses by searching for the y with
// x*y = 1 in GF(2^8), and multiplies by the MixColumns constants with a
// generic shift-and-add multiplier.
package aes_ref_pkg;

  typedef logic [7:0] bytes16_t [16];

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r = 0;
    logic [7:0] x = a;
    logic [7:0] y = b;
    while (y != 0) begin
      if (y[0]) r ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1b) : (x << 1);
      y = y >> 1;
    end
    return r;
  endfunction

  function automatic logic [7:0] sb(input logic [7:0] x);
    logic [7:0] inv = 0;
    logic [7:0] s;
    for (int y = 1; y < 256; y++) if (x != 0 && mul(x, 8'(y)) == 8'h01) inv = 8'(y);
    s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = s[i] ^ inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s;
  endfunction

  function automatic bytes16_t to_bytes(input logic [127:0] v);
    bytes16_t b;
    for (int i = 0; i < 16; i++) b[i] = v[127-8*i -: 8];
    return b;
  endfunction

  function automatic logic [127:0] from_bytes(input bytes16_t b);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127-8*i -: 8] = b[i];
    return v;
  endfunction

  // all 11 round keys
  function automatic void expand(input logic [127:0] key, output logic [127:0] rk [11]);
    logic [7:0] w [44][4];
    logic [7:0] t [4];
    logic [7:0] tmp;
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) w[i][j] = key[127-32*i-8*j -: 8];
    for (int i = 4; i < 44; i++) begin
      for (int j = 0; j < 4; j++) t[j] = w[i-1][j];
      if (i % 4 == 0) begin
        tmp = t[0]; t[0] = t[1]; t[1] = t[2]; t[2] = t[3]; t[3] = tmp;
        for (int j = 0; j < 4; j++) t[j] = sb(t[j]);
        t[0] ^= rc;
        rc = mul(rc, 8'h02);
      end
      for (int j = 0; j < 4; j++) w[i][j] = w[i-4][j] ^ t[j];
    end
    for (int r = 0; r < 11; r++)
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) rk[r][127-32*i-8*j -: 8] = w[4*r+i][j];
  endfunction

  function automatic logic [127:0] round(input logic [127:0] s, input logic [127:0] k, input bit last);
    bytes16_t a = to_bytes(s);
    bytes16_t b;
    bytes16_t c;
    for (int i = 0; i < 16; i++) a[i] = sb(a[i]);
    for (int col = 0; col < 4; col++) for (int row = 0; row < 4; row++) b[4*col+row] = a[4*((col+row)%4)+row];
    if (last) c = b;
    else for (int col = 0; col < 4; col++) begin
      c[4*col+0] = mul(b[4*col],2) ^ mul(b[4*col+1],3) ^ b[4*col+2] ^ b[4*col+3];
      c[4*col+1] = b[4*col] ^ mul(b[4*col+1],2) ^ mul(b[4*col+2],3) ^ b[4*col+3];
      c[4*col+2] = b[4*col] ^ b[4*col+1] ^ mul(b[4*col+2],2) ^ mul(b[4*col+3],3);
      c[4*col+3] = mul(b[4*col],3) ^ b[4*col+1] ^ b[4*col+2] ^ mul(b[4*col+3],2);
    end
    return from_bytes(c) ^ k;
  endfunction

  // states S0..S10 of one encryption
  function automatic void encrypt(input logic [127:0] msg, input logic [127:0] key, output logic [127:0] st [11]);
    logic [127:0] rk [11];
    expand(key, rk);
    st[0] = msg ^ rk[0];
    for (int r = 1; r <= 10; r++) st[r] = round(st[r-1], rk[r], r == 10);
  endfunction

endpackage
