// rc6_key_expansion: RC6 key schedule producing the round-key table
// S[0 .. 2R+3] from the user key words L[0 .. C-1].
//
// The user key is written into the L array through l_we / l_addr / l_data
// (L[0] holds the first key bytes, least significant byte first). A `start`
// pulse runs the mixing loop, one iteration per clock, for
// 3 * max(C, 2R+4) clocks:
//   A = S[i] = (S[i] + A + B) <<< 3
//   B = L[j] = (L[j] + A + B) <<< (A + B)
//   i = (i + 1) mod (2R+4),  j = (j + 1) mod C
// The initial table S[k] = Pw + k*Qw is never stored separately: during the
// first pass over S the value is taken from a running register that starts at
// Pw and adds Qw each clock. `done` pulses for one clock after the last
// iteration. The table has two combinational read ports so a round can fetch
// S[2i] and S[2i+1] together. Synchronous, active-high reset.
module rc6_key_expansion
  import rc6_pkg::*;
#(
  parameter int W         = 16,
  parameter int R         = 20,
  parameter int KEY_BYTES = 16,
  localparam int C  = key_words(W, KEY_BYTES),
  localparam int CW = (C > 1) ? $clog2(C) : 1,
  localparam int TW = $clog2(2 * R + 4)
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  l_we,
  input  logic [CW-1:0]         l_addr,
  input  logic [W-1:0]          l_data,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  input  logic [TW-1:0]         s_raddr0,
  input  logic [TW-1:0]         s_raddr1,
  output logic [W-1:0]          s_rdata0,
  output logic [W-1:0]          s_rdata1
);

  localparam int T     = 2 * R + 4;
  localparam int V     = mix_steps(C, R);
  localparam int IW    = TW;
  localparam int JW    = CW;
  localparam int VW    = $clog2(V + 1);
  localparam logic [W-1:0] PW = W'(magic_p(W));
  localparam logic [W-1:0] QW = W'(magic_q(W));

  logic [W-1:0] s_tab [T];
  logic [W-1:0] l_tab [C];

  logic [W-1:0]  a_reg, b_reg, s_init;
  logic [IW-1:0] i_idx;
  logic [JW-1:0] j_idx;
  logic [VW-1:0] step;
  logic          first_pass;

  logic [W-1:0] s_cur, s_new, l_new, ab, s_sum, l_sum;

  assign s_cur = first_pass ? s_init : s_tab[i_idx];
  assign s_sum = s_cur + a_reg + b_reg;
  rc6_rotl #(.W(W)) u_rot_s (.din(s_sum), .amount(W'(3)), .dout(s_new));
  assign ab    = s_new + b_reg;
  assign l_sum = l_tab[j_idx] + ab;
  rc6_rotl #(.W(W)) u_rot_l (.din(l_sum), .amount(ab), .dout(l_new));

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (reset) begin
      busy <= 1'b0;
    end else if (busy) begin
      s_tab[i_idx] <= s_new;
      l_tab[j_idx] <= l_new;
      a_reg  <= s_new;
      b_reg  <= l_new;
      s_init <= s_init + QW;
      if (i_idx == IW'(T - 1)) begin
        i_idx      <= '0;
        first_pass <= 1'b0;
      end else begin
        i_idx <= i_idx + 1'b1;
      end
      j_idx <= (j_idx == JW'(C - 1)) ? '0 : j_idx + 1'b1;
      step  <= step + 1'b1;
      if (step == VW'(V - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end else begin
      if (l_we) l_tab[l_addr] <= l_data;
      if (start) begin
        busy       <= 1'b1;
        a_reg      <= '0;
        b_reg      <= '0;
        s_init     <= PW;
        i_idx      <= '0;
        j_idx      <= '0;
        step       <= '0;
        first_pass <= 1'b1;
      end
    end
  end

  assign s_rdata0 = s_tab[s_raddr0];
  assign s_rdata1 = s_tab[s_raddr1];

endmodule
