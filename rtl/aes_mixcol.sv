// aes_mixcol: MixColumns on one 32-bit state column (InvMixColumns when
// INVERSE = 1).
//
// The column (a0..a3, a0 in bits 31:24) is multiplied in GF(2^8) by the
// circulant matrix with first row {02 03 01 01}, or {0e 0b 0d 09} for the
// inverse. Four instances, one per column, sit after ShiftRows in the core so
// that a whole round completes in one clock. Combinational.
module aes_mixcol
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  word_t din,
  output word_t dout
);

  byte_t a [4];
  byte_t m [4];
  byte_t c0, c1, c2, c3;

  assign c0 = INVERSE ? 8'h0e : 8'h02;
  assign c1 = INVERSE ? 8'h0b : 8'h03;
  assign c2 = INVERSE ? 8'h0d : 8'h01;
  assign c3 = INVERSE ? 8'h09 : 8'h01;

  always_comb begin
    for (int i = 0; i < 4; i++) a[i] = din[31-8*i -: 8];
    for (int i = 0; i < 4; i++) begin
      m[i] = gmul(a[i], c0) ^ gmul(a[(i+1)%4], c1) ^
             gmul(a[(i+2)%4], c2) ^ gmul(a[(i+3)%4], c3);
    end
  end

  assign dout = {m[0], m[1], m[2], m[3]};

endmodule
