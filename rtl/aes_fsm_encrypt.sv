// aes_fsm_encrypt: round sequencer of the AES encryption data path.
//
// When ena_encrypt is high in IDLE the FSM issues the initial round (round
// type INITIAL, round key 0) in that same clock, then one round per clock:
// rounds 1 .. NR-1 as MIDDLE and round NR as FINAL, each with round key index
// equal to the round number. The state register is written on every one of
// these NR + 1 clocks (state_we). After the last round `finished` goes high
// and stays high until the next encryption starts; the FSM waits in DONE
// until ena_encrypt falls, so a block is encrypted once per data_stable
// pulse. Outputs round_type, roundkey_idx and state_we are combinational
// (Mealy) so the round key read from the key memory lines up with the data.
// The core has no reset pin: while key_ready is low (key_stable low or the key
// still being expanded) the FSM is held in IDLE with finished low, which also
// serves as its power-up initialisation.
module aes_fsm_encrypt
  import aes_pkg::*;
#(
  parameter int NR = 10
) (
  input  logic        clk,
  input  logic        key_ready,
  input  logic        ena_encrypt,
  output round_type_e round_type,
  output logic [3:0]  roundkey_idx,
  output logic        state_we,
  output logic        finished
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} fsm_e;

  fsm_e       st;
  logic [3:0] round;
  logic       fin;

  always_comb begin
    round_type   = RT_INITIAL;
    roundkey_idx = '0;
    state_we     = 1'b0;
    unique case (st)
      S_IDLE: state_we = ena_encrypt & key_ready;
      S_RUN: begin
        state_we     = 1'b1;
        roundkey_idx = round;
        round_type   = (round == 4'(NR)) ? RT_FINAL : RT_MIDDLE;
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
        if (ena_encrypt) begin
          st    <= S_RUN;
          round <= 4'd1;
          fin   <= 1'b0;
        end
      S_RUN: begin
        round <= round + 4'd1;
        if (round == 4'(NR)) begin
          st  <= S_DONE;
          fin <= 1'b1;
        end
      end
      S_DONE:
        if (!ena_encrypt) st <= S_IDLE;
      default: st <= S_IDLE;
    endcase
  end

  assign finished = fin;

endmodule
