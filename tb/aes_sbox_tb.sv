// aes_sbox_tb: checks the forward S-box on all 256 inputs against the
// reference model, a few published entries, and that the inverse S-box undoes
// it for every byte.
module aes_sbox_tb;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0] din, dout, iout;

  aes_sbox #(.INVERSE(1'b0)) dut  (.din(din),  .dout(dout));
  aes_sbox #(.INVERSE(1'b1)) dinv (.din(dout), .dout(iout));

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [7:0] known_in  [6] = '{8'h00, 8'h01, 8'h53, 8'hff, 8'h10, 8'hc9};
    automatic logic [7:0] known_out [6] = '{8'h63, 8'h7c, 8'hed, 8'h16, 8'hca, 8'hdd};
    for (int i = 0; i < 6; i++) begin
      din = known_in[i]; #1;
      check(dout, known_out[i], $sformatf("sbox(%02h)", din));
    end
    for (int i = 0; i < 256; i++) begin
      din = 8'(i); #1;
      check(dout, ref_sbox(din), $sformatf("sbox vs model %02h", din));
      check(iout, din, $sformatf("inv_sbox(sbox(%02h))", din));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
