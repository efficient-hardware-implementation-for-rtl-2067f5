// aes_fsm_decrypt: round sequencer of the optional AES decryption data path.
//
// Same handshake and timing as aes_fsm_encrypt, with the round keys taken in
// the opposite order: when ena_decrypt is high in IDLE the initial key
// addition uses round key NR in that clock, then rounds NR-1 .. 1 (MIDDLE)
// and round 0 (FINAL) follow, one per clock, NR + 1 state writes in all.
// `finished` rises after the last round and stays high until the next
// decryption starts. While key_ready is low the FSM is held in IDLE with
// finished low (there is no separate reset).
module aes_fsm_decrypt
  import aes_pkg::*;
#(
  parameter int NR = 10
) (
  input  logic        clk,
  input  logic        key_ready,
  input  logic        ena_decrypt,
  output round_type_e round_type,
  output logic [3:0]  roundkey_idx,
  output logic        state_we,
  output logic        finished
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} fsm_e;

  fsm_e       st;
  logic [3:0] round;    // round key index of the current round
  logic       fin;

  always_comb begin
    round_type   = RT_INITIAL;
    roundkey_idx = 4'(NR);
    state_we     = 1'b0;
    unique case (st)
      S_IDLE: state_we = ena_decrypt & key_ready;
      S_RUN: begin
        state_we     = 1'b1;
        roundkey_idx = round;
        round_type   = (round == 4'd0) ? RT_FINAL : RT_MIDDLE;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!key_ready) begin
      st    <= S_IDLE;
      round <= '0;
      fin   <= 1'b0;
    end else unique case (st)
      S_IDLE:
        if (ena_decrypt) begin
          st    <= S_RUN;
          round <= 4'(NR - 1);
          fin   <= 1'b0;
        end
      S_RUN: begin
        round <= round - 4'd1;
        if (round == 4'd0) begin
          st  <= S_DONE;
          fin <= 1'b1;
        end
      end
      S_DONE:
        if (!ena_decrypt) st <= S_IDLE;
      default: st <= S_IDLE;
    endcase
  end

  assign finished = fin;

endmodule
