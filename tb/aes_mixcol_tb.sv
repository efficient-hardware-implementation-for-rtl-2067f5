// aes_mixcol_tb: checks MixColumns against published column test vectors and
// a matrix product computed here, and that InvMixColumns undoes it.
module aes_mixcol_tb;
  import aes_ref_pkg::ref_mul;

  int checks = 0, failures = 0;
  logic [31:0] din, dout, back, exp;

  aes_mixcol #(.INVERSE(1'b0)) dut  (.din(din),  .dout(dout));
  aes_mixcol #(.INVERSE(1'b1)) dinv (.din(dout), .dout(back));

  task automatic check(input logic [31:0] got, input logic [31:0] e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, e);
    end
  endtask

  function automatic logic [31:0] model(input logic [31:0] x);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = x;
    return {ref_mul(a0, 2) ^ ref_mul(a1, 3) ^ a2 ^ a3,
            a0 ^ ref_mul(a1, 2) ^ ref_mul(a2, 3) ^ a3,
            a0 ^ a1 ^ ref_mul(a2, 2) ^ ref_mul(a3, 3),
            ref_mul(a0, 3) ^ a1 ^ a2 ^ ref_mul(a3, 2)};
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [31:0] vin  [5] = '{32'hdb135345, 32'hf20a225c, 32'h01010101, 32'hd4d4d4d5, 32'h2d26314c};
    automatic logic [31:0] vout [5] = '{32'h8e4da1bc, 32'h9fdc589d, 32'h01010101, 32'hd5d5d7d6, 32'h4d7ebdf8};
    for (int i = 0; i < 5; i++) begin
      din = vin[i]; #1;
      check(dout, vout[i], $sformatf("mixcol(%08h)", din));
      check(back, din, "inverse");
    end
    for (int n = 0; n < 300; n++) begin
      din = $urandom; #1;
      exp = model(din);
      check(dout, exp, $sformatf("mixcol(%08h)", din));
      check(back, din, "inverse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
