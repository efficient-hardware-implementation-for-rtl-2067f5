// rc6_encryptor: RC6-W/R/b block encryption core with a W-bit data port
// (W = 16 by default, so one block is four 16-bit words A, B, C, D).
//
// Operation of one block:
//  1. Load: start_e high marks load clock 0. On load clock k, plaintext_e
//     carries block word k (A, B, C, D for k = 0..3) and round_keyse carries
//     user-key word L[k] (k = 0 .. C-1, C = KEY_BYTES*8/W, 8 words for the
//     default 128-bit key). The load lasts max(4, C) clocks.
//  2. Key schedule: rc6_key_expansion mixes S and L for 3*max(C, 2R+4)
//     clocks (132 for R = 20).
//  3. Whitening: B += S[0], D += S[1] (one clock).
//  4. R rounds of rc6_round, one per clock, using S[2i] and S[2i+1].
//  5. Final: A += S[2R+2], C += S[2R+3] (one clock).
//  6. Output: ready_e is high for four clocks while ciphertext shows the
//     result words A, B, C, D in that order.
// With the defaults the first ciphertext word appears 8 + 132 + 1 + 1 + 20 +
// 1 = 163 clocks after the clock in which start_e was sampled. Reset is
// synchronous and active high; start_e is ignored while a block is in
// progress. The word layout (little-endian words, as in the RC6
// specification) and the serial load/unload order are this design's choice.
module rc6_encryptor
  import rc6_pkg::*;
#(
  parameter int W         = 16,
  parameter int R         = 20,
  parameter int KEY_BYTES = 16
) (
  input  logic         clock,
  input  logic         reset,
  input  logic         start_e,
  input  logic [W-1:0] plaintext_e,
  input  logic [W-1:0] round_keyse,
  output logic [W-1:0] ciphertext,
  output logic         ready_e
);

  localparam int C     = key_words(W, KEY_BYTES);
  localparam int CW    = (C > 1) ? $clog2(C) : 1;
  localparam int TW    = $clog2(2 * R + 4);
  localparam int NLOAD = (C > 4) ? C : 4;
  localparam int LW    = $clog2(NLOAD + 1);
  localparam int RW    = $clog2(R + 2);

  typedef enum logic [2:0] {
    E_IDLE, E_LOAD, E_KEYS, E_WHITEN, E_ROUNDS, E_FINAL, E_OUT
  } est_e;

  est_e         st;
  logic [LW-1:0] cnt;        // load word index / output word index
  logic [RW-1:0] round;
  logic [W-1:0] a, b, c, d;
  logic [W-1:0] a_n, b_n, c_n, d_n;
  logic [W-1:0] s0, s1;
  logic [TW-1:0] raddr0, raddr1;
  logic          loading, ks_start, ks_busy, ks_done;
  logic [LW-1:0] load_idx;

  assign loading  = (st == E_IDLE && start_e) || st == E_LOAD;
  assign load_idx = (st == E_IDLE) ? '0 : cnt;
  assign ks_start = (st == E_LOAD) && (cnt == LW'(NLOAD - 1));

  always_comb begin
    unique case (st)
      E_WHITEN: begin raddr0 = TW'(0);           raddr1 = TW'(1);           end
      E_ROUNDS: begin raddr0 = TW'(2 * round);   raddr1 = TW'(2 * round + 1); end
      E_FINAL:  begin raddr0 = TW'(2 * R + 2);   raddr1 = TW'(2 * R + 3);   end
      default:  begin raddr0 = '0;               raddr1 = '0;               end
    endcase
  end

  rc6_key_expansion #(.W(W), .R(R), .KEY_BYTES(KEY_BYTES)) u_keysched (
    .clk     (clock),
    .reset   (reset),
    .l_we    (loading && load_idx < LW'(C)),
    .l_addr  (CW'(load_idx)),
    .l_data  (round_keyse),
    .start   (ks_start),
    .busy    (ks_busy),
    .done    (ks_done),
    .s_raddr0(raddr0),
    .s_raddr1(raddr1),
    .s_rdata0(s0),
    .s_rdata1(s1)
  );

  // The key schedule must be running for the whole KEYS state.
  always_ff @(posedge clock)
    if (!reset && st == E_KEYS) assert (ks_busy || ks_done);

  rc6_round #(.W(W)) u_round (
    .a_in(a), .b_in(b), .c_in(c), .d_in(d),
    .s_even(s0), .s_odd(s1),
    .a_out(a_n), .b_out(b_n), .c_out(c_n), .d_out(d_n)
  );

  always_ff @(posedge clock) begin
    if (reset) begin
      st    <= E_IDLE;
      cnt   <= '0;
      round <= '0;
    end else begin
      if (loading) begin
        unique case (load_idx)
          LW'(0):  a <= plaintext_e;
          LW'(1):  b <= plaintext_e;
          LW'(2):  c <= plaintext_e;
          LW'(3):  d <= plaintext_e;
          default: ;
        endcase
      end
      unique case (st)
        E_IDLE:
          if (start_e) begin
            st  <= E_LOAD;
            cnt <= LW'(1);
          end
        E_LOAD: begin
          cnt <= cnt + 1'b1;
          if (ks_start) st <= E_KEYS;
        end
        E_KEYS:
          if (ks_done) st <= E_WHITEN;
        E_WHITEN: begin
          b     <= b + s0;
          d     <= d + s1;
          round <= RW'(1);
          st    <= E_ROUNDS;
        end
        E_ROUNDS: begin
          a <= a_n;  b <= b_n;  c <= c_n;  d <= d_n;
          round <= round + 1'b1;
          if (round == RW'(R)) st <= E_FINAL;
        end
        E_FINAL: begin
          a   <= a + s0;
          c   <= c + s1;
          cnt <= '0;
          st  <= E_OUT;
        end
        E_OUT: begin
          {a, b, c, d} <= {b, c, d, a};
          cnt <= cnt + 1'b1;
          if (cnt == LW'(3)) st <= E_IDLE;
        end
        default: st <= E_IDLE;
      endcase
    end
  end

  assign ciphertext = a;
  assign ready_e    = (st == E_OUT);

endmodule
