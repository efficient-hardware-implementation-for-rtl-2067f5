// crypto_top_tb: end-to-end test of the top level with every parameter at
// its default (AES-128 encryption core, RC6 with 16-bit words, 20 rounds,
// 16-byte key). The AES and RC6 halves run concurrently on separate clocks.
//
// AES: the FIPS-197 Appendix B and C.1 examples and random blocks under
// random keys, checked against the reference model, with the NR + 1 = 11
// clock latency; the key is reloaded (key expansion rerun) several times.
// RC6: random keys and blocks against the reference model, with the
// 163-clock latency and the four-clock output burst; every ciphertext is
// then fed to the RC6 decryptor, which must return the plaintext.
// Mechanisms counted (each must occur): AES key expansion, AES block
// encryption, AES result hold after data_stable falls, RC6 block encryption,
// RC6 start_e ignored while busy, RC6 reset abort, RC6 block decryption.
module crypto_top_tb;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  import rc6_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_keyexp = 0, n_aes_blk = 0, n_aes_hold = 0, n_rc6_blk = 0, n_rc6_ignore = 0, n_rc6_reset = 0, n_rc6_dec = 0;

  logic aclk = 1'b0, rclk = 1'b0;
  always #5 aclk = ~aclk;
  always #7 rclk = ~rclk;

  state_t      a_din, a_res;
  logic        a_dstab, a_kwe, a_kst, a_dmode, a_fin, a_kdone;
  word_t       a_kw;
  logic [2:0]  a_ka;
  logic        r_reset, r_start, r_ready;
  logic [15:0] r_pt, r_key, r_ct;
  logic        d_start, d_ready;
  logic [15:0] d_ct, d_key, d_pt;

  crypto_top dut (
    .aes_clk(aclk), .aes_data_in(a_din), .aes_data_stable(a_dstab), .aes_keyword(a_kw),
    .aes_keywordaddr(a_ka), .aes_w_ena_keyword(a_kwe), .aes_key_stable(a_kst),
    .aes_decrypt_mode(a_dmode), .aes_result(a_res), .aes_finished(a_fin),
    .aes_keyexp_done(a_kdone),
    .rc6_clock(rclk), .rc6_reset(r_reset), .rc6_start_e(r_start), .rc6_plaintext_e(r_pt),
    .rc6_round_keyse(r_key), .rc6_ciphertext(r_ct), .rc6_ready_e(r_ready),
    .rc6_start_d(d_start), .rc6_ciphertext_d(d_ct), .rc6_round_keysd(d_key),
    .rc6_plaintext(d_pt), .rc6_ready_d(d_ready));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (40000) @(posedge aclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic state_t to_state(input blk_t b);
    state_t s;
    for (int c = 0; c < 4; c++) s[c] = {b[4*c], b[4*c+1], b[4*c+2], b[4*c+3]};
    return s;
  endfunction

  task automatic aes_key(input b8 key [32]);
    a_kst = 1'b0;
    @(negedge aclk);
    for (int i = 0; i < 4; i++) begin
      a_kw = {key[4*i], key[4*i+1], key[4*i+2], key[4*i+3]};
      a_ka = 3'(i);
      a_kwe = 1'b1;
      @(negedge aclk);
    end
    a_kwe = 1'b0;
    a_kst = 1'b1;
    while (!a_kdone) @(negedge aclk);
    n_keyexp++;
  endtask

  task automatic aes_block(input blk_t pt, input b8 key [32]);
    int cycles;
    state_t exp;
    exp = to_state(ref_encrypt(pt, key, 4));
    a_din = to_state(pt);
    a_dstab = 1'b1;
    cycles = 0;
    do begin
      @(negedge aclk);
      cycles++;
    end while (!a_fin && cycles < 100);
    check(cycles == 11, $sformatf("AES latency %0d", cycles));
    check(a_res == exp, "AES result");
    if (a_res == exp) n_aes_blk++;
    a_dstab = 1'b0;
    a_din = '{default: '0};
    repeat (2) @(negedge aclk);
    check(a_fin === 1'b1 && a_res == exp, "AES result held");
    if (a_fin === 1'b1 && a_res == exp) n_aes_hold++;
  endtask

  task automatic aes_side();
    b8 key [32];
    blk_t pt;
    for (int k = 0; k < 32; k++) key[k] = b8'(k);
    for (int k = 0; k < 16; k++) pt[k] = b8'(17 * k);
    aes_key(key);
    aes_block(pt, key);
    check(a_res[0] == 32'h69c4e0d8 && a_res[3] == 32'h70b4c55a, "FIPS-197 C.1");
    for (int n = 0; n < 5; n++) begin
      for (int k = 0; k < 16; k++) key[k] = 8'($urandom);
      aes_key(key);
      for (int m = 0; m < 4; m++) begin
        for (int k = 0; k < 16; k++) pt[k] = 8'($urandom);
        aes_block(pt, key);
      end
    end
  endtask

  task automatic rc6_block(input int n);
    logic [7:0] key [32];
    logic [15:0] blk16 [4];
    u64 s [68], blk [4];
    int lat;
    for (int k = 0; k < 32; k++) key[k] = (k < 16) ? 8'($urandom) : 8'h00;
    for (int k = 0; k < 4; k++) blk16[k] = 16'($urandom);
    for (int k = 0; k < 8; k++) begin
      r_start = (k == 0);
      r_pt = (k < 4) ? blk16[k] : 16'h0;
      r_key = {key[2*k+1], key[2*k]};
      @(negedge rclk);
    end
    lat = 8;
    r_start = (n % 2 == 1);     // a start_e while busy on odd blocks
    @(negedge rclk);
    r_start = 1'b0;
    lat++;
    while (!r_ready && lat < 400) begin
      @(negedge rclk);
      lat++;
    end
    check(lat == 163, $sformatf("RC6 latency %0d", lat));
    rc6_ref_schedule(key, 16, 16, 20, s);
    for (int k = 0; k < 4; k++) blk[k] = u64'(blk16[k]);
    rc6_ref_encrypt(blk, s, 16, 20);
    for (int k = 0; k < 4; k++) begin
      check(r_ready === 1'b1 && r_ct == blk[k][15:0], $sformatf("RC6 word %0d: %h vs %h", k, r_ct, blk[k][15:0]));
      @(negedge rclk);
    end
    n_rc6_blk++;
    // If the extra start_e had been taken, ready_e would come back.
    repeat (200) begin
      if (r_ready) break;
      @(negedge rclk);
    end
    check(r_ready === 1'b0, "RC6 start_e while busy ignored");
    if (n % 2 == 1 && r_ready === 1'b0) n_rc6_ignore++;
    // Decrypt the ciphertext again.
    for (int k = 0; k < 8; k++) begin
      d_start = (k == 0);
      d_ct = (k < 4) ? blk[k][15:0] : 16'h0;
      d_key = {key[2*k+1], key[2*k]};
      @(negedge rclk);
    end
    d_start = 1'b0;
    lat = 8;
    while (!d_ready && lat < 400) begin
      @(negedge rclk);
      lat++;
    end
    check(lat == 163, $sformatf("RC6 decrypt latency %0d", lat));
    for (int k = 0; k < 4; k++) begin
      check(d_ready === 1'b1 && d_pt == blk16[k], $sformatf("RC6 decrypted word %0d: %h vs %h", k, d_pt, blk16[k]));
      @(negedge rclk);
    end
    check(d_ready === 1'b0, "RC6 ready_d length");
    n_rc6_dec++;
  endtask

  task automatic rc6_side();
    r_reset = 1'b1;
    repeat (2) @(negedge rclk);
    r_reset = 1'b0;
    for (int n = 0; n < 6; n++) rc6_block(n);
    // Abort a block with reset.
    r_start = 1'b1;
    @(negedge rclk);
    r_start = 1'b0;
    repeat (30) @(negedge rclk);
    r_reset = 1'b1;
    @(negedge rclk);
    r_reset = 1'b0;
    repeat (250) begin
      if (r_ready) break;
      @(negedge rclk);
    end
    check(r_ready === 1'b0, "RC6 reset abort");
    if (r_ready === 1'b0) n_rc6_reset++;
    rc6_block(0);
  endtask

  initial begin
    a_din = '{default: '0}; a_dstab = 0; a_kwe = 0; a_kst = 0; a_dmode = 0; a_kw = 0; a_ka = 0;
    r_reset = 1; r_start = 0; r_pt = 0; r_key = 0;
    d_start = 0; d_ct = 0; d_key = 0;
    @(negedge aclk);
    fork
      aes_side();
      rc6_side();
    join
    check(n_keyexp > 0,     "mechanism: AES key expansion");
    check(n_aes_blk > 0,    "mechanism: AES block");
    check(n_aes_hold > 0,   "mechanism: AES result hold");
    check(n_rc6_blk > 0,    "mechanism: RC6 block");
    check(n_rc6_ignore > 0, "mechanism: RC6 start ignored while busy");
    check(n_rc6_reset > 0,  "mechanism: RC6 reset abort");
    check(n_rc6_dec > 0,    "mechanism: RC6 block decryption");
    $display("mechanisms: aes_keyexp=%0d aes_block=%0d aes_hold=%0d rc6_block=%0d rc6_ignore=%0d rc6_reset=%0d rc6_decrypt=%0d",
             n_keyexp, n_aes_blk, n_aes_hold, n_rc6_blk, n_rc6_ignore, n_rc6_reset, n_rc6_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
