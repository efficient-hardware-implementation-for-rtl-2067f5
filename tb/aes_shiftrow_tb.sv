// aes_shiftrow_tb: drives random states through ShiftRows and InvShiftRows and
// compares every byte with the FIPS-197 index formula s'[r][c] = s[r][(c+r)%4]
// worked out on a flat byte array; also checks that the inverse undoes it.
module aes_shiftrow_tb;
  import aes_pkg::state_t;

  int checks = 0, failures = 0;
  state_t din, dout, back;
  logic [7:0] flat_in [16], flat_exp [16];

  aes_shiftrow #(.INVERSE(1'b0)) dut  (.din(din),  .dout(dout));
  aes_shiftrow #(.INVERSE(1'b1)) dinv (.din(dout), .dout(back));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < 16; k++) flat_in[k] = 8'($urandom);
      for (int c = 0; c < 4; c++)
        din[c] = {flat_in[4*c], flat_in[4*c+1], flat_in[4*c+2], flat_in[4*c+3]};
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++) flat_exp[4*c+r] = flat_in[4*((c+r)%4)+r];
      #1;
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (dout[c] !== {flat_exp[4*c], flat_exp[4*c+1], flat_exp[4*c+2], flat_exp[4*c+3]}) begin
          failures++;
          $display("FAIL shiftrow column %0d: %08h", c, dout[c]);
        end
        checks++;
        if (back[c] !== din[c]) begin
          failures++;
          $display("FAIL inverse column %0d: %08h vs %08h", c, back[c], din[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
