// aes_key_expansion: loads the user key word by word, expands it into all
// round keys, and serves round key `roundkey_idx` as four 32-bit columns.
//
// Loading: while w_ena_keyword is high, keyword is written to key word
// keywordaddr (0 .. NK-1; word 0 is the first four key bytes). Raising
// key_stable starts the expansion; lowering it clears `ready` so a new key
// can be loaded. The expansion first copies the NK key words into the round
// key memory (one per clock), then produces each further word w[i] in two
// clocks: in the first the previous word goes through RotWord/SubWord and the
// round constant (when i mod NK = 0; a register doubled in GF(2^8) after
// each use), or through SubWord alone (NK = 8,
// i mod 8 = 4), and is registered; in the second w[i] = w[i-NK] ^ temp is
// written to memory and shifted into the NK-word window that holds the last
// NK words. Holding key_stable low returns the block to idle (it has no
// other reset). With NK = 4 this takes 1 + 4 + 2*40 = 85 clocks (one start
// clock, the copy, two clocks per derived word), after which `ready`
// goes high. The memory is four banks (one per round-key column) of NR+1
// words with a combinational read, so roundkey follows roundkey_idx in the
// same clock; encryption reads it in ascending, decryption in descending
// order. Four S-boxes belong to this block.
module aes_key_expansion
  import aes_pkg::*;
#(
  parameter int KEYLENGTH = 128
) (
  input  logic        clk,
  input  word_t       keyword,
  input  logic [2:0]  keywordaddr,
  input  logic        w_ena_keyword,
  input  logic        key_stable,
  input  logic [3:0]  roundkey_idx,
  output state_t      roundkey,
  output logic        ready
);

  localparam int NK     = nk(KEYLENGTH);
  localparam int NR     = nr(KEYLENGTH);
  localparam int NWORDS = 4 * (NR + 1);

  typedef enum logic [1:0] {K_IDLE, K_LOAD, K_SUB, K_SHIFT} kst_e;

  word_t key_reg [8];
  word_t window  [NK];           // window[0] = w[i-NK] ... window[NK-1] = w[i-1]
  word_t bank    [4][NR+1];
  word_t temp;
  byte_t rc;                     // round constant for the next i mod NK = 0 word
  word_t sub_in, sub_out, rot;
  kst_e  st;
  logic [5:0] i;                 // index of the word being produced
  logic  rdy;

  // SubWord on the last word of the window.
  always_comb begin
    sub_in = window[NK-1];
    rot    = {sub_out[23:0], sub_out[31:24]};
  end

  for (genvar b = 0; b < 4; b++) begin : g_sub
    aes_sbox u_sbox (.din(sub_in[31-8*b -: 8]), .dout(sub_out[31-8*b -: 8]));
  end

  word_t new_word;
  assign new_word = window[0] ^ temp;

  always_ff @(posedge clk) begin
    if (w_ena_keyword) key_reg[keywordaddr] <= keyword;

    if (!key_stable) begin
      st  <= K_IDLE;
      rdy <= 1'b0;
    end else begin
      unique case (st)
        K_IDLE:
          if (!rdy) begin
            st <= K_LOAD;
            i  <= '0;
            rc <= 8'h01;
          end
        K_LOAD: begin
          bank[i[1:0]][i[5:2]] <= key_reg[i[2:0]];
          for (int k = 0; k < NK - 1; k++) window[k] <= window[k+1];
          window[NK-1] <= key_reg[i[2:0]];
          i <= i + 6'd1;
          if (i == 6'(NK - 1)) st <= K_SUB;
        end
        K_SUB: begin
          if (int'(i) % NK == 0) begin
            temp <= rot ^ {rc, 24'h0};
            rc   <= xtime(rc);
          end else if (NK > 6 && int'(i) % NK == 4)
            temp <= sub_out;
          else
            temp <= window[NK-1];
          st <= K_SHIFT;
        end
        K_SHIFT: begin
          bank[i[1:0]][i[5:2]] <= new_word;
          for (int k = 0; k < NK - 1; k++) window[k] <= window[k+1];
          window[NK-1] <= new_word;
          i <= i + 6'd1;
          if (i == 6'(NWORDS - 1)) begin
            st  <= K_IDLE;
            rdy <= 1'b1;
          end else begin
            st <= K_SUB;
          end
        end
        default: st <= K_IDLE;
      endcase
    end
  end

  always_comb begin
    for (int c = 0; c < 4; c++) roundkey[c] = bank[c][roundkey_idx];
  end

  assign ready = rdy;

endmodule
