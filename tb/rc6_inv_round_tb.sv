// rc6_inv_round_tb: encrypts random words with one round of the reference
// model and checks that the inverse round returns the original words, for
// 16-bit and 32-bit words.
module rc6_inv_round_tb;
  import rc6_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0] a16, b16, c16, d16, s016, s116, ao16, bo16, co16, do16;
  logic [31:0] a32, b32, c32, d32, s032, s132, ao32, bo32, co32, do32;

  rc6_inv_round #(.W(16)) dut16 (.a_in(a16), .b_in(b16), .c_in(c16), .d_in(d16), .s_even(s016),
    .s_odd(s116), .a_out(ao16), .b_out(bo16), .c_out(co16), .d_out(do16));
  rc6_inv_round #(.W(32)) dut32 (.a_in(a32), .b_in(b32), .c_in(c32), .d_in(d32), .s_even(s032),
    .s_odd(s132), .a_out(ao32), .b_out(bo32), .c_out(co32), .d_out(do32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u64 a, b, c, d, s0, s1;
    logic [15:0] o16 [4];
    logic [31:0] o32 [4];
    for (int n = 0; n < 500; n++) begin
      o16[0] = 16'($urandom); o16[1] = 16'($urandom); o16[2] = 16'($urandom); o16[3] = 16'($urandom);
      s0 = u64'(16'($urandom)); s1 = u64'(16'($urandom));
      a = u64'(o16[0]); b = u64'(o16[1]); c = u64'(o16[2]); d = u64'(o16[3]);
      rc6_ref_round(a, b, c, d, s0, s1, 16);
      a16 = a[15:0]; b16 = b[15:0]; c16 = c[15:0]; d16 = d[15:0];
      s016 = s0[15:0]; s116 = s1[15:0];
      o32[0] = $urandom; o32[1] = $urandom; o32[2] = $urandom; o32[3] = $urandom;
      s032 = $urandom; s132 = $urandom;
      a = u64'(o32[0]); b = u64'(o32[1]); c = u64'(o32[2]); d = u64'(o32[3]);
      rc6_ref_round(a, b, c, d, u64'(s032), u64'(s132), 32);
      a32 = a[31:0]; b32 = b[31:0]; c32 = c[31:0]; d32 = d[31:0];
      #1;
      checks++;
      if ({ao16, bo16, co16, do16} !== {o16[0], o16[1], o16[2], o16[3]}) begin
        failures++;
        $display("FAIL w=16: %h %h %h %h vs %h %h %h %h", ao16, bo16, co16, do16, o16[0], o16[1], o16[2], o16[3]);
      end
      checks++;
      if ({ao32, bo32, co32, do32} !== {o32[0], o32[1], o32[2], o32[3]}) begin
        failures++;
        $display("FAIL w=32: %h %h %h %h vs %h %h %h %h", ao32, bo32, co32, do32, o32[0], o32[1], o32[2], o32[3]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
