// aes_addkey: the round-input multiplexer ("addkeymux") followed by
// AddRoundKey.
//
// round_type picks what is XORed with the 128-bit round key: the plaintext
// block for the initial key addition, the MixColumns output for a middle
// round, or the ShiftRows output for the last round (which skips
// MixColumns). The XOR is applied column by column. Combinational; the core
// registers the result as the new state.
module aes_addkey
  import aes_pkg::*;
(
  input  round_type_e round_type,
  input  state_t      data_in,
  input  state_t      mixcol_out,
  input  state_t      shiftrow_out,
  input  state_t      roundkey,
  output state_t      dout
);

  state_t sel;

  always_comb begin
    unique case (round_type)
      RT_INITIAL: sel = data_in;
      RT_MIDDLE:  sel = mixcol_out;
      RT_FINAL:   sel = shiftrow_out;
      default:    sel = data_in;
    endcase
    for (int c = 0; c < 4; c++) dout[c] = sel[c] ^ roundkey[c];
  end

endmodule
