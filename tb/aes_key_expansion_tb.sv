// aes_key_expansion_tb: loads keys through the keyword port, raises
// key_stable, counts the clocks until `ready`, and compares every round key
// with the reference key schedule. Runs the FIPS-197 128-bit example key
// (round keys 1 and 10 also checked against the published values), random
// 128-bit keys, and random 192/256-bit keys on two further instances.
module aes_key_expansion_tb;
  import aes_pkg::*;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check32(input logic [31:0] got, input logic [31:0] e, input string what);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, e);
    end
  endtask

  // One instance per key length.
  word_t      kw [3];
  logic [2:0] ka [3];
  logic       kwe [3], kst [3], rdy [3];
  logic [3:0] idx [3];
  state_t     rk [3];

  aes_key_expansion #(.KEYLENGTH(128)) dut128 (.clk(clk), .keyword(kw[0]), .keywordaddr(ka[0]),
    .w_ena_keyword(kwe[0]), .key_stable(kst[0]), .roundkey_idx(idx[0]), .roundkey(rk[0]), .ready(rdy[0]));
  aes_key_expansion #(.KEYLENGTH(192)) dut192 (.clk(clk), .keyword(kw[1]), .keywordaddr(ka[1]),
    .w_ena_keyword(kwe[1]), .key_stable(kst[1]), .roundkey_idx(idx[1]), .roundkey(rk[1]), .ready(rdy[1]));
  aes_key_expansion #(.KEYLENGTH(256)) dut256 (.clk(clk), .keyword(kw[2]), .keywordaddr(ka[2]),
    .w_ena_keyword(kwe[2]), .key_stable(kst[2]), .roundkey_idx(idx[2]), .roundkey(rk[2]), .ready(rdy[2]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_key(input int u, input b8 key [32]);
    int nkw, nrr, cycles;
    w32 w [60];
    nkw = 4 + 2 * u;
    nrr = nkw + 6;
    ref_expand(key, nkw, w);
    kst[u] = 1'b0;
    @(negedge clk);
    for (int i = 0; i < nkw; i++) begin
      kw[u] = {key[4*i], key[4*i+1], key[4*i+2], key[4*i+3]};
      ka[u] = 3'(i);
      kwe[u] = 1'b1;
      @(negedge clk);
    end
    kwe[u] = 1'b0;
    kst[u] = 1'b1;
    cycles = 0;
    while (!rdy[u]) begin
      @(negedge clk);
      cycles++;
    end
    // One start clock, NK copy clocks, two clocks for each remaining word.
    checks++;
    if (cycles != 1 + nkw + 2 * (4 * (nrr + 1) - nkw)) begin
      failures++;
      $display("FAIL key length %0d: expansion took %0d clocks", 32 * nkw, cycles);
    end
    for (int r = 0; r <= nrr; r++) begin
      idx[u] = 4'(r);
      #1;
      for (int c = 0; c < 4; c++) check32(rk[u][c], w[4*r+c], $sformatf("nk=%0d rk%0d col%0d", nkw, r, c));
    end
  endtask

  initial begin
    b8 key [32];
    for (int u = 0; u < 3; u++) begin
      kst[u] = 1'b0; kwe[u] = 1'b0; kw[u] = '0; ka[u] = '0; idx[u] = '0;
    end
    repeat (2) @(negedge clk);
    // FIPS-197 Appendix A.1 key.
    {key[0], key[1], key[2], key[3], key[4], key[5], key[6], key[7],
     key[8], key[9], key[10], key[11], key[12], key[13], key[14], key[15]} =
      128'h2b7e151628aed2a6abf7158809cf4f3c;
    for (int k = 16; k < 32; k++) key[k] = 0;
    run_key(0, key);
    idx[0] = 4'd1; #1;
    check32(rk[0][0], 32'ha0fafe17, "published rk1 w4");
    check32(rk[0][3], 32'h2a6c7605, "published rk1 w7");
    idx[0] = 4'd10; #1;
    check32(rk[0][3], 32'hb6630ca6, "published rk10 w43");
    for (int n = 0; n < 3; n++) begin
      for (int k = 0; k < 32; k++) key[k] = 8'($urandom);
      run_key(0, key);
      run_key(1, key);
      run_key(2, key);
    end
    // key_stable low clears ready.
    kst[0] = 1'b0;
    @(negedge clk);
    checks++;
    if (rdy[0] !== 1'b0) begin
      failures++;
      $display("FAIL ready did not clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
