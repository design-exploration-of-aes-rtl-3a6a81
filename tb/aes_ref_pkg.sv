// aes_ref_pkg -- behavioural AES-128 reference for the testbenches.
//
// Written independently of the RTL's package: the S-box inverse is found by
// exhaustive search for b with a*b = 1, the affine transform is computed
// with byte rotations (s = b ^ rotl1(b) ^ rotl2(b) ^ rotl3(b) ^ rotl4(b)
// ^ 0x63), the key schedule keeps all 44 words, and the state is held as a
// 4x4 byte matrix. Also gives CTR-mode helpers.
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] u128;
  typedef u8 mat_t [4][4];      // [row][col]

  function automatic u8 rmul(input u8 a, input u8 b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= (16'h11b << (i - 8));
    return p[7:0];
  endfunction

  function automatic u8 rotl(input u8 b, input int n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic u8 ref_sbox(input u8 a);
    u8 inv = 8'h00;
    if (a != 0)
      for (int b = 1; b < 256; b++)
        if (rmul(a, u8'(b)) == 8'h01) inv = u8'(b);
    return inv ^ rotl(inv, 1) ^ rotl(inv, 2) ^ rotl(inv, 3) ^ rotl(inv, 4) ^ 8'h63;
  endfunction

  // Cached table: the search above is slow.
  u8  sbox_cache [256];
  bit sbox_ready = 0;

  function automatic u8 sb(input u8 a);
    if (!sbox_ready) begin
      for (int i = 0; i < 256; i++) sbox_cache[i] = ref_sbox(u8'(i));
      sbox_ready = 1;
    end
    return sbox_cache[a];
  endfunction

  function automatic mat_t to_mat(input u128 b);
    mat_t m;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        m[r][c] = b[127 - 8*(4*c + r) -: 8];
    return m;
  endfunction

  function automatic u128 from_mat(input mat_t m);
    u128 b;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        b[127 - 8*(4*c + r) -: 8] = m[r][c];
    return b;
  endfunction

  function automatic u128 ref_subbytes(input u128 b);
    mat_t m = to_mat(b);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) m[r][c] = sb(m[r][c]);
    return from_mat(m);
  endfunction

  function automatic u128 ref_shiftrows(input u128 b);
    mat_t m = to_mat(b);
    mat_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) o[r][c] = m[r][(c + r) % 4];
    return from_mat(o);
  endfunction

  function automatic u128 ref_mixcolumns(input u128 b);
    mat_t m = to_mat(b);
    mat_t o;
    for (int c = 0; c < 4; c++) begin
      o[0][c] = rmul(2, m[0][c]) ^ rmul(3, m[1][c]) ^ m[2][c] ^ m[3][c];
      o[1][c] = m[0][c] ^ rmul(2, m[1][c]) ^ rmul(3, m[2][c]) ^ m[3][c];
      o[2][c] = m[0][c] ^ m[1][c] ^ rmul(2, m[2][c]) ^ rmul(3, m[3][c]);
      o[3][c] = rmul(3, m[0][c]) ^ m[1][c] ^ m[2][c] ^ rmul(2, m[3][c]);
    end
    return from_mat(o);
  endfunction

  typedef u128 rkeys_t [11];

  function automatic rkeys_t ref_expand(input u128 key);
    logic [31:0] w [44];
    logic [31:0] t;
    u8           rc = 8'h01;
    rkeys_t      rk;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb(t[31:24]), sb(t[23:16]), sb(t[15:8]), sb(t[7:0])};
        t[31:24] ^= rc;
        rc = rmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic u128 ref_encrypt_rk(input rkeys_t rk, input u128 pt);
    u128 s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = ref_shiftrows(ref_subbytes(s));
      if (r != 10) s = ref_mixcolumns(s);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic u128 ref_encrypt(input u128 key, input u128 pt);
    return ref_encrypt_rk(ref_expand(key), pt);
  endfunction

  function automatic u128 rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
