// aes_pkg -- types, constants and constant functions shared by the AES-128
// CTR accelerator.
//
// The S-box is not pasted in as a table: make_sbox_table() computes it at
// elaboration time from its definition, the multiplicative inverse in
// GF(2^8) (modulus x^8+x^4+x^3+x+1, 0x00 mapped to 0x00) followed by the
// affine transform b_i = x_i ^ x_(i+4) ^ x_(i+5) ^ x_(i+6) ^ x_(i+7) ^ c_i
// with c = 0x63. The ROM module that uses it therefore synthesises to a
// 256 x 8 look-up table. xtime() is multiplication by {02} in GF(2^8).
//
// Byte order used throughout the design: a 128-bit block holds AES byte 0
// in bits [127:120] and byte 15 in bits [7:0]; byte i sits in row i%4 and
// column i/4 of the 4x4 state, as in FIPS-197.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [127:0] block_t;
  typedef logic [31:0]  word_t;

  // AES-128: 10 rounds (key size / rounds table of the standard).
  localparam int unsigned NUM_ROUNDS = 10;

  // Cycle budget of one block encryption: 1 load + 1 initial AddRoundKey
  // + 10 rounds x 3 cycles + 1 output cycle.
  localparam int unsigned CIPHER_CYCLES = 33;

  // Width of one RAM bank word.
  localparam int unsigned MEM_DW = 32;

  typedef byte_t sbox_table_t [256];

  // Multiplication by x ({02}) in GF(2^8).
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General multiplication in GF(2^8), shift-and-add.
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t acc = 8'h00;
    byte_t aa  = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= aa;
      aa = xtime(aa);
    end
    return acc;
  endfunction

  // Multiplicative inverse as a^254; gives 0 for 0.
  function automatic byte_t gf_inv(input byte_t a);
    byte_t r = 8'h01;
    byte_t p = a;
    // 254 = 0b11111110
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, p);
      p = gf_mul(p, p);
    end
    return r;
  endfunction

  function automatic byte_t sbox_affine(input byte_t x);
    byte_t b;
    for (int i = 0; i < 8; i++)
      b[i] = x[i] ^ x[(i+4)%8] ^ x[(i+5)%8] ^ x[(i+6)%8] ^ x[(i+7)%8];
    return b ^ 8'h63;
  endfunction

  function automatic sbox_table_t make_sbox_table();
    sbox_table_t t;
    for (int i = 0; i < 256; i++)
      t[i] = sbox_affine(gf_inv(byte_t'(i)));
    return t;
  endfunction

  // Round constant used to derive round key r (r = 1..10) from key r-1.
  function automatic byte_t rcon(input logic [3:0] r);
    byte_t c = 8'h01;
    for (int i = 1; i < 11; i++)
      if (i < int'(r)) c = xtime(c);
    return c;
  endfunction

  // Byte i of a block (AES order).
  function automatic byte_t get_byte(input block_t b, input int i);
    return b[127-8*i -: 8];
  endfunction

endpackage
