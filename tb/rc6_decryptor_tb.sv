// rc6_decryptor_tb: end-to-end test of the RC6 decryptor.
//
// A 32-bit-word instance (RC6-32/20/16) must turn the two published
// ciphertexts back into their plaintexts; the default 16-bit-word instance
// decrypts blocks encrypted by the reference model under random keys. Also
// checks the latency to the first ready_d clock, the four-clock output, and
// that start_d is ignored while a block is in progress.
module rc6_decryptor_tb;
  import rc6_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        reset;
  logic        st16, rdy16, st32, rdy32;
  logic [15:0] ct16, key16, pt16;
  logic [31:0] ct32, key32, pt32;

  rc6_decryptor dut16 (.clock(clk), .reset(reset), .start_d(st16), .ciphertext_d(ct16),
    .round_keysd(key16), .plaintext(pt16), .ready_d(rdy16));
  rc6_decryptor #(.W(32), .R(20), .KEY_BYTES(16)) dut32 (.clock(clk), .reset(reset),
    .start_d(st32), .ciphertext_d(ct32), .round_keysd(key32), .plaintext(pt32), .ready_d(rdy32));

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

  task automatic run32(input logic [31:0] blk [4], input logic [31:0] key [4],
                       output logic [31:0] out [4], output int latency);
    for (int k = 0; k < 4; k++) begin
      st32 = (k == 0); ct32 = blk[k]; key32 = key[k];
      @(negedge clk);
    end
    st32 = 0;
    latency = 4;
    while (!rdy32 && latency < 400) begin
      @(negedge clk);
      latency++;
    end
    for (int k = 0; k < 4; k++) begin
      check(rdy32 === 1'b1, "ready_d length (w=32)");
      out[k] = pt32;
      @(negedge clk);
    end
    check(rdy32 === 1'b0, "ready_d dropped (w=32)");
  endtask

  task automatic run16(input logic [15:0] blk [4], input logic [15:0] key [8],
                       output logic [15:0] out [4], output int latency);
    for (int k = 0; k < 8; k++) begin
      st16 = (k == 0); ct16 = (k < 4) ? blk[k] : 16'hbeef; key16 = key[k];
      @(negedge clk);
    end
    latency = 8;
    st16 = 1'b1;            // ignored while busy
    @(negedge clk);
    st16 = 1'b0;
    latency++;
    while (!rdy16 && latency < 400) begin
      @(negedge clk);
      latency++;
    end
    for (int k = 0; k < 4; k++) begin
      check(rdy16 === 1'b1, "ready_d length (w=16)");
      out[k] = pt16;
      @(negedge clk);
    end
    check(rdy16 === 1'b0, "ready_d dropped (w=16)");
  endtask

  initial begin
    logic [31:0] b32 [4], k32 [4], o32 [4];
    logic [15:0] b16 [4], k16 [8], o16 [4];
    logic [7:0]  key [32];
    u64 s [68], blk [4];
    int lat;
    reset = 1; st16 = 0; st32 = 0; ct16 = 0; ct32 = 0; key16 = 0; key32 = 0;
    repeat (3) @(negedge clk);
    reset = 0;

    b32 = '{32'h36a5c38f, 32'h78f7b156, 32'h4edf29c1, 32'h1ea44898};
    k32 = '{32'h0, 32'h0, 32'h0, 32'h0};
    run32(b32, k32, o32, lat);
    check(o32 == '{32'h0, 32'h0, 32'h0, 32'h0}, "RC6-32 zero vector");
    check(lat == 159, $sformatf("w=32 latency %0d", lat));
    b32 = '{32'h2f194e52, 32'h23c61547, 32'h36f6511f, 32'h183fa47e};
    k32 = '{32'h67452301, 32'hefcdab89, 32'h34231201, 32'h78675645};
    run32(b32, k32, o32, lat);
    check(o32 == '{32'h35241302, 32'h79685746, 32'hbdac9b8a, 32'hf1e0dfce}, "RC6-32 second vector");

    for (int n = 0; n < 8; n++) begin
      for (int k = 0; k < 32; k++) key[k] = (k < 16) ? 8'($urandom) : 8'h00;
      for (int k = 0; k < 8; k++) k16[k] = {key[2*k+1], key[2*k]};
      for (int k = 0; k < 4; k++) b16[k] = 16'($urandom);
      rc6_ref_schedule(key, 16, 16, 20, s);
      for (int k = 0; k < 4; k++) blk[k] = u64'(b16[k]);
      rc6_ref_encrypt(blk, s, 16, 20);
      run16('{blk[0][15:0], blk[1][15:0], blk[2][15:0], blk[3][15:0]}, k16, o16, lat);
      check(o16 == b16, $sformatf("w=16 block %0d: %h %h %h %h vs %h %h %h %h", n,
            o16[0], o16[1], o16[2], o16[3], b16[0], b16[1], b16[2], b16[3]));
      check(lat == 163, $sformatf("w=16 latency %0d", lat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
