// aes_core_tb: end-to-end test of the AES core.
//
// Instance 0 is the default configuration (AES-128, encryption only);
// instances 1..3 are built with the decryption path for 128-, 192- and
// 256-bit keys. For each, the key is written word by word, key_stable is
// raised, and blocks are processed with a data_stable pulse. Results are
// compared with the FIPS-197 example vectors and with the reference model on
// random keys and blocks, decryptions must return the plaintext, and the
// clocks from start to `finished` must be NR + 1 (one round per clock plus
// the initial key addition).
module aes_core_tb;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int KL [4] = '{128, 128, 192, 256};

  state_t     din [4], res [4];
  logic       dstab [4], kwe [4], kst [4], dmode [4], fin [4], kdone [4];
  word_t      kw [4];
  logic [2:0] ka [4];

  aes_core dut0 (.clk(clk), .data_in(din[0]), .data_stable(dstab[0]), .keyword(kw[0]),
    .keywordaddr(ka[0]), .w_ena_keyword(kwe[0]), .key_stable(kst[0]), .decrypt_mode(dmode[0]),
    .result(res[0]), .finished(fin[0]), .keyexp_done(kdone[0]));
  aes_core #(.KEYLENGTH(128), .DECRYPTION(1'b1)) dut1 (.clk(clk), .data_in(din[1]),
    .data_stable(dstab[1]), .keyword(kw[1]), .keywordaddr(ka[1]), .w_ena_keyword(kwe[1]),
    .key_stable(kst[1]), .decrypt_mode(dmode[1]), .result(res[1]), .finished(fin[1]),
    .keyexp_done(kdone[1]));
  aes_core #(.KEYLENGTH(192), .DECRYPTION(1'b1)) dut2 (.clk(clk), .data_in(din[2]),
    .data_stable(dstab[2]), .keyword(kw[2]), .keywordaddr(ka[2]), .w_ena_keyword(kwe[2]),
    .key_stable(kst[2]), .decrypt_mode(dmode[2]), .result(res[2]), .finished(fin[2]),
    .keyexp_done(kdone[2]));
  aes_core #(.KEYLENGTH(256), .DECRYPTION(1'b1)) dut3 (.clk(clk), .data_in(din[3]),
    .data_stable(dstab[3]), .keyword(kw[3]), .keywordaddr(ka[3]), .w_ena_keyword(kwe[3]),
    .key_stable(kst[3]), .decrypt_mode(dmode[3]), .result(res[3]), .finished(fin[3]),
    .keyexp_done(kdone[3]));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic state_t to_state(input blk_t b);
    state_t s;
    for (int c = 0; c < 4; c++) s[c] = {b[4*c], b[4*c+1], b[4*c+2], b[4*c+3]};
    return s;
  endfunction

  function automatic state_t from128(input logic [127:0] v);
    state_t s;
    for (int c = 0; c < 4; c++) s[c] = v[127-32*c -: 32];
    return s;
  endfunction

  task automatic load_key(input int u, input b8 key [32]);
    kst[u] = 1'b0;
    @(negedge clk);
    for (int i = 0; i < KL[u] / 32; i++) begin
      kw[u] = {key[4*i], key[4*i+1], key[4*i+2], key[4*i+3]};
      ka[u] = 3'(i);
      kwe[u] = 1'b1;
      @(negedge clk);
    end
    kwe[u] = 1'b0;
    kst[u] = 1'b1;
    while (!kdone[u]) @(negedge clk);
    checks++;
    if (fin[u] !== 1'b0) begin
      failures++;
      $display("FAIL core %0d: finished high after a new key", u);
    end
  endtask

  // One operation; returns the result and checks the latency.
  task automatic run_block(input int u, input state_t blk, input bit dec, output state_t out);
    int cycles;
    din[u]   = blk;
    dmode[u] = dec;
    dstab[u] = 1'b1;
    cycles   = 0;
    @(negedge clk);
    cycles++;
    while (!fin[u]) begin
      @(negedge clk);
      cycles++;
      if (cycles > 100) break;
    end
    checks++;
    if (cycles != KL[u] / 32 + 7) begin
      failures++;
      $display("FAIL core %0d: %0d clocks from start to finished", u, cycles);
    end
    out = res[u];
    dstab[u] = 1'b0;
    @(negedge clk);
    @(negedge clk);
    // The result and finished are held while idle.
    checks++;
    if (fin[u] !== 1'b1 || res[u] != out) begin
      failures++;
      $display("FAIL core %0d: result not held", u);
    end
  endtask

  task automatic check_state(input int u, input state_t got, input state_t e, input string what);
    checks++;
    if (got != e) begin
      failures++;
      $display("FAIL core %0d %s: got %08h%08h%08h%08h expected %08h%08h%08h%08h", u, what,
               got[0], got[1], got[2], got[3], e[0], e[1], e[2], e[3]);
    end
  endtask

  initial begin
    b8 key [32];
    blk_t pt;
    state_t out, back;
    for (int u = 0; u < 4; u++) begin
      din[u] = '{default: '0}; dstab[u] = 0; kwe[u] = 0; kst[u] = 0; dmode[u] = 0;
      kw[u] = '0; ka[u] = '0;
    end
    repeat (2) @(negedge clk);

    // FIPS-197 Appendix C: key 00 01 02 ..., plaintext 00 11 22 ... ff.
    for (int k = 0; k < 32; k++) key[k] = b8'(k);
    for (int k = 0; k < 16; k++) pt[k] = b8'(17 * k);
    begin
      automatic logic [127:0] exp [4] = '{128'h69c4e0d86a7b0430d8cdb78070b4c55a,
                                128'h69c4e0d86a7b0430d8cdb78070b4c55a,
                                128'hdda97ca4864cdfe06eaf70a0ec0d7191,
                                128'h8ea2b7ca516745bfeafc49904b496089};
      for (int u = 0; u < 4; u++) begin
        load_key(u, key);
        run_block(u, to_state(pt), 1'b0, out);
        check_state(u, out, from128(exp[u]), "FIPS-197 C encrypt");
        if (u > 0) begin
          run_block(u, from128(exp[u]), 1'b1, back);
          check_state(u, back, to_state(pt), "FIPS-197 C decrypt");
        end
      end
    end

    // FIPS-197 Appendix B on the default core.
    {key[0], key[1], key[2], key[3], key[4], key[5], key[6], key[7],
     key[8], key[9], key[10], key[11], key[12], key[13], key[14], key[15]} =
      128'h2b7e151628aed2a6abf7158809cf4f3c;
    load_key(0, key);
    run_block(0, from128(128'h3243f6a8885a308d313198a2e0370734), 1'b0, out);
    check_state(0, out, from128(128'h3925841d02dc09fbdc118597196a0b32), "FIPS-197 B");
    // decrypt_mode has no effect without the decryption path.
    run_block(0, from128(128'h3243f6a8885a308d313198a2e0370734), 1'b1, out);
    check_state(0, out, from128(128'h3925841d02dc09fbdc118597196a0b32), "decrypt_mode ignored");

    // Random keys and blocks against the model, with decryption round trips.
    for (int n = 0; n < 6; n++) begin
      for (int k = 0; k < 32; k++) key[k] = 8'($urandom);
      for (int u = 0; u < 4; u++) begin
        load_key(u, key);
        for (int m = 0; m < 3; m++) begin
          for (int k = 0; k < 16; k++) pt[k] = 8'($urandom);
          run_block(u, to_state(pt), 1'b0, out);
          check_state(u, out, to_state(ref_encrypt(pt, key, KL[u] / 32)), "random encrypt");
          if (u > 0) begin
            run_block(u, out, 1'b1, back);
            check_state(u, back, to_state(pt), "random decrypt");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
