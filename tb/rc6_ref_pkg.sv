// rc6_ref_pkg: behavioural RC6-w/r/b reference model for the testbenches,
// for any word size w up to 64. Values are kept in 64-bit variables and
// masked to w bits after every operation.
package rc6_ref_pkg;

  typedef logic [63:0] u64;

  function automatic u64 msk(input u64 x, input int w);
    return (w == 64) ? x : (x & ((64'd1 << w) - 1));
  endfunction

  function automatic u64 rol(input u64 x, input u64 n, input int w);
    int k;
    k = int'(n % u64'(w));
    if (k == 0) return msk(x, w);
    return msk((x << k) | (msk(x, w) >> (w - k)), w);
  endfunction

  function automatic u64 pconst(input int w);
    case (w)
      16: return 64'hB7E1;
      32: return 64'hB7E15163;
      default: return 64'hB7E151628AED2A6B;
    endcase
  endfunction

  function automatic u64 qconst(input int w);
    case (w)
      16: return 64'h9E37;
      32: return 64'h9E3779B9;
      default: return 64'h9E3779B97F4A7C15;
    endcase
  endfunction

  // Key schedule from key bytes; S gets 2r+4 words.
  function automatic void rc6_ref_schedule(input logic [7:0] key [32], input int b, input int w,
                                       input int r, output u64 s [68]);
    u64 l [32];
    u64 a, bb;
    int c, t, v, i, j;
    c = (8 * b + w - 1) / w;
    if (c < 1) c = 1;
    for (int k = 0; k < c; k++) l[k] = 0;
    for (int k = b - 1; k >= 0; k--) l[k / (w / 8)] = msk((l[k / (w / 8)] << 8) + u64'(key[k]), w);
    t = 2 * r + 4;
    s[0] = pconst(w);
    for (int k = 1; k < t; k++) s[k] = msk(s[k-1] + qconst(w), w);
    a = 0; bb = 0; i = 0; j = 0;
    v = 3 * ((c > t) ? c : t);
    for (int k = 0; k < v; k++) begin
      a = rol(msk(s[i] + a + bb, w), 3, w);
      s[i] = a;
      bb = rol(msk(l[j] + a + bb, w), msk(a + bb, w), w);
      l[j] = bb;
      i = (i + 1) % t;
      j = (j + 1) % c;
    end
  endfunction

  function automatic void rc6_ref_round(inout u64 a, inout u64 b, inout u64 c, inout u64 d,
                                    input u64 s0, input u64 s1, input int w);
    u64 t, u, tmp;
    int lgw;
    lgw = $clog2(w);
    t = rol(msk(b * msk(2 * b + 1, w), w), u64'(lgw), w);
    u = rol(msk(d * msk(2 * d + 1, w), w), u64'(lgw), w);
    a = msk(rol(a ^ t, u, w) + s0, w);
    c = msk(rol(c ^ u, t, w) + s1, w);
    tmp = a; a = b; b = c; c = d; d = tmp;
  endfunction

  function automatic void rc6_ref_encrypt(inout u64 blk [4], input u64 s [68], input int w, input int r);
    u64 a, b, c, d;
    a = blk[0]; b = blk[1]; c = blk[2]; d = blk[3];
    b = msk(b + s[0], w);
    d = msk(d + s[1], w);
    for (int i = 1; i <= r; i++) rc6_ref_round(a, b, c, d, s[2*i], s[2*i+1], w);
    a = msk(a + s[2*r+2], w);
    c = msk(c + s[2*r+3], w);
    blk[0] = a; blk[1] = b; blk[2] = c; blk[3] = d;
  endfunction

endpackage
