// aes_ref_pkg: behavioural AES reference model for the testbenches.
//
// Works on a flat byte array in FIPS-197 order (byte k = row k%4, column k/4)
// and is written independently of the RTL: the S-box comes from a search for
// the multiplicative inverse followed by the bitwise affine formula
// b'_i = b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i, and the cipher
// follows the textbook round order.
package aes_ref_pkg;

  typedef logic [7:0] b8;
  typedef b8 blk_t [16];
  typedef logic [31:0] w32;

  function automatic b8 ref_mul(input b8 a, input b8 b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic b8 ref_sbox(input b8 x);
    b8 inv, y;
    b8 cst;
    cst = 8'h63;
    inv = 8'h00;
    for (int k = 1; k < 256; k++) if (x != 0 && ref_mul(x, b8'(k)) == 8'h01) inv = b8'(k);
    for (int i = 0; i < 8; i++)
      y[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ cst[i];
    return y;
  endfunction

  function automatic b8 ref_inv_sbox(input b8 y);
    b8 r;
    r = 0;
    for (int k = 0; k < 256; k++) if (ref_sbox(b8'(k)) == y) r = b8'(k);
    return r;
  endfunction

  // Key schedule: words w[0 .. 4*(nr+1)-1].
  function automatic void ref_expand(input b8 key [32], input int nk, output w32 w [60]);
    int nr;
    w32 t;
    b8 rc;
    nr = nk + 6;
    rc = 8'h01;
    for (int i = 0; i < nk; i++) w[i] = {key[4*i], key[4*i+1], key[4*i+2], key[4*i+3]};
    for (int i = nk; i < 4 * (nr + 1); i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = ref_mul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
      end
      w[i] = w[i-nk] ^ t;
    end
  endfunction

  function automatic void add_rk(inout blk_t s, input w32 w [60], input int rnd);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) s[4*c+r] ^= w[4*rnd+c][31-8*r -: 8];
  endfunction

  function automatic blk_t ref_encrypt(input blk_t pt, input b8 key [32], input int nk);
    w32 w [60];
    blk_t s, t;
    int nr;
    nr = nk + 6;
    ref_expand(key, nk, w);
    s = pt;
    add_rk(s, w, 0);
    for (int rnd = 1; rnd <= nr; rnd++) begin
      for (int k = 0; k < 16; k++) s[k] = ref_sbox(s[k]);
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) t[4*c+r] = s[4*((c+r)%4)+r];
      s = t;
      if (rnd != nr)
        for (int c = 0; c < 4; c++) begin
          b8 a0, a1, a2, a3;
          a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
          s[4*c]   = ref_mul(a0, 2) ^ ref_mul(a1, 3) ^ a2 ^ a3;
          s[4*c+1] = a0 ^ ref_mul(a1, 2) ^ ref_mul(a2, 3) ^ a3;
          s[4*c+2] = a0 ^ a1 ^ ref_mul(a2, 2) ^ ref_mul(a3, 3);
          s[4*c+3] = ref_mul(a0, 3) ^ a1 ^ a2 ^ ref_mul(a3, 2);
        end
      add_rk(s, w, rnd);
    end
    return s;
  endfunction

endpackage
