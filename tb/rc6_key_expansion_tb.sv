// rc6_key_expansion_tb: writes random user keys into L, runs the key
// schedule, checks that `done` comes 3*max(c, 2r+4) clocks after start, and
// reads back every S word against the reference model. Default instance
// (16-bit words, 20 rounds, 16-byte key) and a 32-bit-word, 12-round,
// 32-byte-key instance.
module rc6_key_expansion_tb;
  import rc6_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic reset;
  logic we16, st16, busy16, done16;
  logic [2:0] la16;
  logic [15:0] ld16, rd16a, rd16b;
  logic [5:0] ra16a, ra16b;
  logic we32, st32, busy32, done32;
  logic [2:0] la32;
  logic [31:0] ld32, rd32a, rd32b;
  logic [4:0] ra32a, ra32b;

  rc6_key_expansion dut16 (.clk(clk), .reset(reset), .l_we(we16), .l_addr(la16), .l_data(ld16),
    .start(st16), .busy(busy16), .done(done16), .s_raddr0(ra16a), .s_raddr1(ra16b),
    .s_rdata0(rd16a), .s_rdata1(rd16b));
  rc6_key_expansion #(.W(32), .R(12), .KEY_BYTES(32)) dut32 (.clk(clk), .reset(reset),
    .l_we(we32), .l_addr(la32), .l_data(ld32), .start(st32), .busy(busy32), .done(done32),
    .s_raddr0(ra32a), .s_raddr1(ra32b), .s_rdata0(rd32a), .s_rdata1(rd32b));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] key [32];
    u64 s [68];
    int cycles;
    reset = 1'b1; we16 = 0; st16 = 0; we32 = 0; st32 = 0;
    la16 = 0; ld16 = 0; la32 = 0; ld32 = 0; ra16a = 0; ra16b = 0; ra32a = 0; ra32b = 0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    for (int n = 0; n < 4; n++) begin
      for (int k = 0; k < 32; k++) key[k] = (n == 0) ? 8'h00 : 8'($urandom);
      // 16-bit words: L[i] = key[2i] | key[2i+1] << 8.
      for (int i = 0; i < 8; i++) begin
        we16 = 1; la16 = 3'(i); ld16 = {key[2*i+1], key[2*i]};
        we32 = 1; la32 = 3'(i); ld32 = {key[4*i+3], key[4*i+2], key[4*i+1], key[4*i]};
        @(negedge clk);
      end
      we16 = 0; we32 = 0;
      st16 = 1; st32 = 1;
      @(negedge clk);
      st16 = 0; st32 = 0;
      cycles = 1;
      while (!done16) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (cycles != 3 * 44 + 1) begin
        failures++;
        $display("FAIL w=16 schedule took %0d clocks", cycles);
      end
      while (busy32) @(negedge clk);
      rc6_ref_schedule(key, 16, 16, 20, s);
      for (int i = 0; i < 44; i += 2) begin
        ra16a = 6'(i); ra16b = 6'(i + 1);
        #1;
        checks++;
        if (rd16a !== s[i][15:0] || rd16b !== s[i+1][15:0]) begin
          failures++;
          $display("FAIL w=16 S[%0d..%0d] = %h %h expected %h %h", i, i + 1, rd16a, rd16b, s[i][15:0], s[i+1][15:0]);
        end
      end
      rc6_ref_schedule(key, 32, 32, 12, s);
      for (int i = 0; i < 28; i += 2) begin
        ra32a = 5'(i); ra32b = 5'(i + 1);
        #1;
        checks++;
        if (rd32a !== s[i][31:0] || rd32b !== s[i+1][31:0]) begin
          failures++;
          $display("FAIL w=32 S[%0d..%0d] = %h %h expected %h %h", i, i + 1, rd32a, rd32b, s[i][31:0], s[i+1][31:0]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
