// aes_fsm_encrypt_tb: runs the round sequencer for NR = 10 and NR = 14 and checks,
// clock by clock, the round type, the round-key index and the state write
// enable against the expected schedule, that `finished` rises after NR + 1
// state writes and holds, that a held start does not restart the sequence,
// and that key_ready low returns the FSM to idle.
module aes_fsm_encrypt_tb;
  import aes_pkg::*;

  localparam bit DESCEND = 0;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        key_ready [2], ena [2], we [2], fin [2];
  round_type_e rt [2];
  logic [3:0]  idx [2];

  aes_fsm_encrypt #(.NR(10)) dut10 (.clk(clk), .key_ready(key_ready[0]), .ena_encrypt(ena[0]),
    .round_type(rt[0]), .roundkey_idx(idx[0]), .state_we(we[0]), .finished(fin[0]));
  aes_fsm_encrypt #(.NR(14)) dut14 (.clk(clk), .key_ready(key_ready[1]), .ena_encrypt(ena[1]),
    .round_type(rt[1]), .roundkey_idx(idx[1]), .state_we(we[1]), .finished(fin[1]));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int u, input int nr, input bit hold);
    int k, e_idx;
    round_type_e e_rt;
    ena[u] = 1'b1;
    for (k = 0; k <= nr; k++) begin
      #1;
      e_rt  = (k == 0) ? RT_INITIAL : (k == nr) ? RT_FINAL : RT_MIDDLE;
      e_idx = DESCEND ? nr - k : k;
      check(we[u] === 1'b1, $sformatf("nr=%0d step %0d: no state write", nr, k));
      check(rt[u] === e_rt, $sformatf("nr=%0d step %0d: round type %0d", nr, k, rt[u]));
      check(int'(idx[u]) == e_idx, $sformatf("nr=%0d step %0d: key index %0d", nr, k, idx[u]));
      if (k > 0) check(fin[u] === 1'b0, $sformatf("nr=%0d step %0d: finished early", nr, k));
      @(negedge clk);
    end
    if (!hold) ena[u] = 1'b0;
    for (k = 0; k < 3; k++) begin
      #1;
      check(fin[u] === 1'b1, $sformatf("nr=%0d: finished not held", nr));
      check(we[u] === 1'b0, $sformatf("nr=%0d: state written after the last round", nr));
      @(negedge clk);
    end
    ena[u] = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    for (int u = 0; u < 2; u++) begin
      key_ready[u] = 1'b0; ena[u] = 1'b0;
    end
    repeat (2) @(negedge clk);
    key_ready[0] = 1'b1; key_ready[1] = 1'b1;
    @(negedge clk);
    #1;
    check(fin[0] === 1'b0 && we[0] === 1'b0, "idle after key_ready");
    @(negedge clk);
    run(0, 10, 1'b0);
    run(0, 10, 1'b1);
    run(1, 14, 1'b0);
    // Start, then drop key_ready in the middle: back to idle, finished low.
    ena[0] = 1'b1;
    repeat (4) @(negedge clk);
    ena[0] = 1'b0;
    key_ready[0] = 1'b0;
    @(negedge clk);
    key_ready[0] = 1'b1;
    #1;
    check(we[0] === 1'b0 && fin[0] === 1'b0, "abort by key_ready");
    @(negedge clk);
    run(0, 10, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
