// AES-128 arithmetic shared by the S-box, round and key-expansion blocks.
//
// Bytes are elements of GF(2^8) with m(x) = x^8 + x^4 + x^3 + x + 1. The
// S-box is the multiplicative inverse (0 maps to 0) followed by the affine
// map b' = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63; the
// 256-entry table is computed from that definition at elaboration time.
// A 128-bit block is a 4x4 byte matrix stored column by column with byte 0
// (row 0, column 0) in bits [127:120], as in FIPS-197.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [127:0] block_t;

  localparam int ROUNDS = 10;   // AES-128

  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // a^254 = a^-1 for a != 0, and 0 for a == 0
  function automatic byte_t gf_inv(input byte_t a);
    byte_t r, sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // exponent 254 = 0b1111_1110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(input byte_t b, input int n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic byte_t sbox_calc(input byte_t a);
    byte_t b;
    b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  typedef byte_t sbox_table_t [256];

  function automatic sbox_table_t sbox_build();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(byte_t'(i));
    return t;
  endfunction

  // byte at row r, column c of a block
  function automatic byte_t blk_get(input block_t s, input int r, input int c);
    return s[127 - 8 * (4 * c + r) -: 8];
  endfunction

endpackage
