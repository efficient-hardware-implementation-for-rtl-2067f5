// aes_shiftrow: the ShiftRows step (or InvShiftRows when INVERSE = 1).
//
// Row r of the state is rotated left by r byte positions (right for the
// inverse). With the state held as four columns, output column c row r takes
// input column (c + r) mod 4 (or (c - r) mod 4) row r. Pure wiring, no delay.
module aes_shiftrow
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  state_t din,
  output state_t dout
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        if (INVERSE) dout[c][31-8*r -: 8] = din[(c + 4 - r) % 4][31-8*r -: 8];
        else         dout[c][31-8*r -: 8] = din[(c + r) % 4][31-8*r -: 8];
      end
    end
  end

endmodule
