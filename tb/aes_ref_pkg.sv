// aes_ref_pkg: a behavioural AES-128 reference model for the testbenches.
//
// It is written independently of the RTL: the S-box is found by searching
// for each byte's multiplicative inverse and applying the affine map bit by
// bit, the state is a 4x4 row/column matrix, and all field products go
// through a generic shift-and-add multiply. Call ref_init() once before use.
// Byte k of a 128-bit block (k = 0 is bits [127:120]) is row k%4, column k/4.
package aes_ref_pkg;

  typedef logic [7:0] mat_t [4][4];   // [row][column]

  logic [7:0]   sbox_tab     [256];
  logic [7:0]   inv_sbox_tab [256];
  logic [127:0] rk_tab       [11];    // round keys of the last ref_expand

  function automatic logic [7:0] fmul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction

  function automatic void ref_init();
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv = 8'h00, s;
      for (int y = 1; y < 256; y++) if (fmul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
      s ^= 8'h63;
      sbox_tab[x] = s;
      inv_sbox_tab[s] = 8'(x);
    end
  endfunction

  function automatic mat_t to_mat(logic [127:0] b);
    mat_t m;
    for (int k = 0; k < 16; k++) m[k%4][k/4] = b[127-8*k -: 8];
    return m;
  endfunction

  function automatic logic [127:0] from_mat(mat_t m);
    logic [127:0] b;
    for (int k = 0; k < 16; k++) b[127-8*k -: 8] = m[k%4][k/4];
    return b;
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] b, bit inv);
    mat_t m = to_mat(b);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
      m[r][c] = inv ? inv_sbox_tab[m[r][c]] : sbox_tab[m[r][c]];
    return from_mat(m);
  endfunction

  function automatic logic [127:0] shift_rows(logic [127:0] b, bit inv);
    mat_t m = to_mat(b), o;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
      if (inv) o[r][(c+r)%4] = m[r][c];
      else     o[r][c] = m[r][(c+r)%4];
    return from_mat(o);
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] b, bit inv);
    mat_t m = to_mat(b), o;
    logic [7:0] k [4];
    if (inv) k = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else     k = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r][c] = 8'h00;
        for (int j = 0; j < 4; j++) o[r][c] ^= fmul(k[(j - r + 4) % 4], m[j][c]);
      end
    return from_mat(o);
  endfunction

  // Fills rk_tab[0..10] from the cipher key (FIPS-197 word recurrence).
  function automatic void ref_expand(logic [127:0] key);
    logic [31:0] w [44];
    logic [7:0]  rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox_tab[t[31:24]], sbox_tab[t[23:16]], sbox_tab[t[15:8]], sbox_tab[t[7:0]]};
        t ^= {rc, 24'h0};
        rc = fmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk_tab[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    logic [127:0] s;
    ref_expand(key);
    s = pt ^ rk_tab[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != 10) s = mix_columns(s, 0);
      s ^= rk_tab[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] key, logic [127:0] ct);
    logic [127:0] s;
    ref_expand(key);
    s = ct ^ rk_tab[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1) ^ rk_tab[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
