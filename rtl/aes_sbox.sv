// aes_sbox: one AES S-box, a combinational 8-bit to 8-bit lookup.
//
// The table is built at elaboration time by aes_pkg::gen_sbox() from the
// S-box definition (inverse in GF(2^8), then the affine map), so no data file
// is needed. With INVERSE = 1 the same module gives the inverse S-box used by
// the decryption path. The encryption data path uses 16 of these for one full
// round per clock, and the key expansion another four; lookup is purely
// combinational (no latency).
module aes_sbox
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  byte_t din,
  output byte_t dout
);

  localparam sbox_table_t TABLE = INVERSE ? gen_inv_sbox() : gen_sbox();

  assign dout = TABLE[din];

endmodule
