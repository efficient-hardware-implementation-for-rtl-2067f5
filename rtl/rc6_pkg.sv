// rc6_pkg: constants and word operations shared by the RC6 blocks.
//
// Words are W bits wide (W = 16, 32 or 64). The magic constants Pw and Qw are
// the top W bits of the 64-bit binary expansions of e - 2 and phi - 1, made
// odd, which gives B7E1 / 9E37 for W = 16 and B7E15163 / 9E3779B9 for W = 32.
// Rotations use the low log2(W) bits of the amount; all arithmetic is modulo
// 2^W.
package rc6_pkg;

  localparam logic [63:0] P64 = 64'hB7E1_5162_8AED_2A6B;
  localparam logic [63:0] Q64 = 64'h9E37_79B9_7F4A_7C15;

  function automatic logic [63:0] magic_p(input int w);
    return (P64 >> (64 - w)) | 64'd1;
  endfunction

  function automatic logic [63:0] magic_q(input int w);
    return (Q64 >> (64 - w)) | 64'd1;
  endfunction

  // Number of W-bit key words for a key of b bytes (at least one).
  function automatic int key_words(input int w, input int b);
    int c;
    c = (8 * b + w - 1) / w;
    return (c < 1) ? 1 : c;
  endfunction

  // Iterations of the key mixing loop: 3 * max(c, 2r + 4).
  function automatic int mix_steps(input int c, input int r);
    return 3 * ((c > 2 * r + 4) ? c : 2 * r + 4);
  endfunction

endpackage
