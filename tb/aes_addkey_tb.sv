// aes_addkey_tb: for each round type, checks that the selected input (plain
// text, MixColumns or ShiftRows output) is XORed with the round key.
module aes_addkey_tb;
  import aes_pkg::*;

  int checks = 0, failures = 0;
  round_type_e rt;
  state_t d_in, mc, sr, rk, dout;

  aes_addkey dut (.round_type(rt), .data_in(d_in), .mixcol_out(mc), .shiftrow_out(sr),
                  .roundkey(rk), .dout(dout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    state_t exp;
    for (int n = 0; n < 300; n++) begin
      for (int c = 0; c < 4; c++) begin
        d_in[c] = $urandom; mc[c] = $urandom; sr[c] = $urandom; rk[c] = $urandom;
      end
      rt = round_type_e'(n % 3);
      #1;
      for (int c = 0; c < 4; c++) begin
        case (n % 3)
          0: exp[c] = d_in[c] ^ rk[c];
          1: exp[c] = mc[c] ^ rk[c];
          default: exp[c] = sr[c] ^ rk[c];
        endcase
        checks++;
        if (dout[c] !== exp[c]) begin
          failures++;
          $display("FAIL type %0d column %0d: %08h vs %08h", n % 3, c, dout[c], exp[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
