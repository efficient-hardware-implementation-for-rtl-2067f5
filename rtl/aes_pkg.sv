// aes_pkg: types, constants and GF(2^8) helpers shared by the AES core.
//
// The 128-bit state is held as four 32-bit columns, column 0 first, the way
// the core's data_in and result ports present it. Inside a column the first
// byte (row 0) sits in bits 31:24. The S-box is not stored as a literal table:
// gen_sbox() builds it at elaboration time from its definition (the
// multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, followed by the
// affine map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63), and
// gen_inv_sbox() inverts that table. Key lengths of 128, 192 and 256 bits are
// covered by the nk()/nr() helpers (Nk = key words, Nr = Nk + 6 rounds).
package aes_pkg;

  typedef logic [7:0]  byte_t;
  typedef logic [31:0] word_t;
  typedef word_t       state_t [4];   // state_t[c] is column c

  // Which input the addkey multiplexer passes to AddRoundKey.
  typedef enum logic [1:0] {
    RT_INITIAL = 2'b00,   // data_in (initial key addition)
    RT_MIDDLE  = 2'b01,   // MixColumns output (rounds 1 .. Nr-1)
    RT_FINAL   = 2'b10    // ShiftRows output (last round, no MixColumns)
  } round_type_e;

  function automatic int nk(input int keylength);
    return keylength / 32;
  endfunction

  function automatic int nr(input int keylength);
    return keylength / 32 + 6;
  endfunction

  // Multiply by x in GF(2^8).
  function automatic byte_t xtime(input byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product (shift-and-add).
  function automatic byte_t gmul(input byte_t a, input byte_t b);
    byte_t p;
    byte_t aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (square and multiply); 0 maps to 0.
  function automatic byte_t ginv(input byte_t a);
    byte_t r;
    byte_t sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, sq);   // exponent 254 = 8'b1111_1110
      sq = gmul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(input byte_t b, input int n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic byte_t sbox_calc(input byte_t a);
    byte_t b;
    b = ginv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  typedef byte_t sbox_table_t [256];

  function automatic sbox_table_t gen_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(byte_t'(i));
    return t;
  endfunction

  function automatic sbox_table_t gen_inv_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[sbox_calc(byte_t'(i))] = byte_t'(i);
    return t;
  endfunction


endpackage
