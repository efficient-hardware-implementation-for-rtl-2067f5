// rc6_round_tb: compares one RC6 round with the reference model on random
// words, for 16-bit and 32-bit words.
module rc6_round_tb;
  import rc6_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0] a16, b16, c16, d16, s016, s116, ao16, bo16, co16, do16;
  logic [31:0] a32, b32, c32, d32, s032, s132, ao32, bo32, co32, do32;

  rc6_round #(.W(16)) dut16 (.a_in(a16), .b_in(b16), .c_in(c16), .d_in(d16), .s_even(s016),
    .s_odd(s116), .a_out(ao16), .b_out(bo16), .c_out(co16), .d_out(do16));
  rc6_round #(.W(32)) dut32 (.a_in(a32), .b_in(b32), .c_in(c32), .d_in(d32), .s_even(s032),
    .s_odd(s132), .a_out(ao32), .b_out(bo32), .c_out(co32), .d_out(do32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u64 a, b, c, d;
    for (int n = 0; n < 500; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 16'($urandom); d16 = 16'($urandom);
      s016 = 16'($urandom); s116 = 16'($urandom);
      a32 = $urandom; b32 = $urandom; c32 = $urandom; d32 = $urandom;
      s032 = $urandom; s132 = $urandom;
      #1;
      a = u64'(a16); b = u64'(b16); c = u64'(c16); d = u64'(d16);
      rc6_ref_round(a, b, c, d, u64'(s016), u64'(s116), 16);
      checks++;
      if ({ao16, bo16, co16, do16} !== {a[15:0], b[15:0], c[15:0], d[15:0]}) begin
        failures++;
        $display("FAIL w=16: %h %h %h %h vs %h %h %h %h", ao16, bo16, co16, do16, a, b, c, d);
      end
      a = u64'(a32); b = u64'(b32); c = u64'(c32); d = u64'(d32);
      rc6_ref_round(a, b, c, d, u64'(s032), u64'(s132), 32);
      checks++;
      if ({ao32, bo32, co32, do32} !== {a[31:0], b[31:0], c[31:0], d[31:0]}) begin
        failures++;
        $display("FAIL w=32: %h %h %h %h vs %h %h %h %h", ao32, bo32, co32, do32, a, b, c, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
