// rc6_encryptor_tb: end-to-end test of the RC6 encryptor.
//
// A 32-bit-word instance (RC6-32/20/16, the AES-candidate configuration) is
// checked against the two published test vectors for that cipher; the
// default 16-bit-word instance is checked against the reference model on
// random keys and blocks. The test also checks the latency from start_e to
// the first ready_e clock, that ready_e lasts four clocks, that start_e is
// ignored while a block is in progress, and that reset aborts a block.
module rc6_encryptor_tb;
  import rc6_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        reset;
  logic        st16, rdy16, st32, rdy32;
  logic [15:0] pt16, key16, ct16;
  logic [31:0] pt32, key32, ct32;

  rc6_encryptor dut16 (.clock(clk), .reset(reset), .start_e(st16), .plaintext_e(pt16),
    .round_keyse(key16), .ciphertext(ct16), .ready_e(rdy16));
  rc6_encryptor #(.W(32), .R(20), .KEY_BYTES(16)) dut32 (.clock(clk), .reset(reset),
    .start_e(st32), .plaintext_e(pt32), .round_keyse(key32), .ciphertext(ct32), .ready_e(rdy32));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // 32-bit instance: 4 key words and 4 block words in the same 4 clocks.
  task automatic run32(input logic [31:0] blk [4], input logic [31:0] key [4],
                       output logic [31:0] out [4], output int latency);
    for (int k = 0; k < 4; k++) begin
      st32 = (k == 0); pt32 = blk[k]; key32 = key[k];
      @(negedge clk);
    end
    st32 = 0;
    latency = 4;
    while (!rdy32) begin
      @(negedge clk);
      latency++;
    end
    for (int k = 0; k < 4; k++) begin
      check(rdy32 === 1'b1, "ready_e length (w=32)");
      out[k] = ct32;
      @(negedge clk);
    end
    check(rdy32 === 1'b0, "ready_e dropped (w=32)");
  endtask

  // 16-bit instance: 8 key words, block words on the first 4 of them.
  task automatic run16(input logic [15:0] blk [4], input logic [15:0] key [8],
                       output logic [15:0] out [4], output int latency);
    for (int k = 0; k < 8; k++) begin
      st16 = (k == 0); pt16 = (k < 4) ? blk[k] : 16'hdead; key16 = key[k];
      @(negedge clk);
    end
    latency = 8;
    // start_e during the computation must be ignored.
    st16 = 1'b1;
    @(negedge clk);
    st16 = 1'b0;
    latency++;
    while (!rdy16) begin
      @(negedge clk);
      latency++;
    end
    for (int k = 0; k < 4; k++) begin
      check(rdy16 === 1'b1, "ready_e length (w=16)");
      out[k] = ct16;
      @(negedge clk);
    end
    check(rdy16 === 1'b0, "ready_e dropped (w=16)");
  endtask

  initial begin
    logic [31:0] b32 [4], k32 [4], o32 [4];
    logic [15:0] b16 [4], k16 [8], o16 [4];
    logic [7:0]  key [32];
    u64 s [68], blk [4];
    int lat;
    reset = 1; st16 = 0; st32 = 0; pt16 = 0; pt32 = 0; key16 = 0; key32 = 0;
    repeat (3) @(negedge clk);
    reset = 0;

    // Published RC6-32/20/16 vectors (words little-endian).
    b32 = '{32'h0, 32'h0, 32'h0, 32'h0};
    k32 = '{32'h0, 32'h0, 32'h0, 32'h0};
    run32(b32, k32, o32, lat);
    check(o32 == '{32'h36a5c38f, 32'h78f7b156, 32'h4edf29c1, 32'h1ea44898}, "RC6-32 zero vector");
    check(lat == 4 + 3 * 44 + 1 + 1 + 20 + 1, $sformatf("w=32 latency %0d", lat));
    b32 = '{32'h35241302, 32'h79685746, 32'hbdac9b8a, 32'hf1e0dfce};
    k32 = '{32'h67452301, 32'hefcdab89, 32'h34231201, 32'h78675645};
    run32(b32, k32, o32, lat);
    check(o32 == '{32'h2f194e52, 32'h23c61547, 32'h36f6511f, 32'h183fa47e}, "RC6-32 second vector");

    // Default 16-bit core against the model.
    for (int n = 0; n < 8; n++) begin
      for (int k = 0; k < 32; k++) key[k] = (k < 16) ? 8'($urandom) : 8'h00;
      for (int k = 0; k < 8; k++) k16[k] = {key[2*k+1], key[2*k]};
      for (int k = 0; k < 4; k++) b16[k] = 16'($urandom);
      run16(b16, k16, o16, lat);
      rc6_ref_schedule(key, 16, 16, 20, s);
      for (int k = 0; k < 4; k++) blk[k] = u64'(b16[k]);
      rc6_ref_encrypt(blk, s, 16, 20);
      check({o16[0], o16[1], o16[2], o16[3]} == {blk[0][15:0], blk[1][15:0], blk[2][15:0], blk[3][15:0]},
            $sformatf("w=16 block %0d: %h %h %h %h vs %h %h %h %h", n, o16[0], o16[1], o16[2], o16[3],
                      blk[0][15:0], blk[1][15:0], blk[2][15:0], blk[3][15:0]));
      // First ciphertext word 163 clocks after the clock that sampled start_e.
      check(lat == 163, $sformatf("w=16 latency %0d", lat));
    end

    // Reset in the middle of a block: no output follows.
    st16 = 1;
    @(negedge clk);
    st16 = 0;
    repeat (50) @(negedge clk);
    reset = 1;
    @(negedge clk);
    reset = 0;
    repeat (200) begin
      @(negedge clk);
      if (rdy16) break;
    end
    check(rdy16 === 1'b0, "reset aborts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
