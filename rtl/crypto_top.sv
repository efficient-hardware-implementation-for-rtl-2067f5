// crypto_top: the AES core, the RC6 encryptor and the RC6 decryptor side by
// side.
//
// The AES and RC6 halves are independent designs with their own clocks and
// ports; nothing is shared between them. The AES core keeps its port names
// with an aes_ prefix (no reset pin), the RC6 blocks theirs with an rc6_
// prefix. The RC6 encryptor and decryptor share the RC6 clock and reset but
// are otherwise separate units, each with its own key schedule, so one block
// can be encrypted while another is decrypted.
// Parameters are passed through with the same defaults as the cores:
// AES-128 without the decryption path, RC6 with 16-bit words, 20 rounds and
// a 16-byte key. See aes_core, rc6_encryptor and rc6_decryptor for the handshakes and timing.
module crypto_top
  import aes_pkg::*;
#(
  parameter int AES_KEYLENGTH  = 128,
  parameter bit AES_DECRYPTION = 1'b0,
  parameter int RC6_W          = 16,
  parameter int RC6_R          = 20,
  parameter int RC6_KEY_BYTES  = 16
) (
  // AES
  input  logic             aes_clk,
  input  state_t           aes_data_in,
  input  logic             aes_data_stable,
  input  word_t            aes_keyword,
  input  logic [2:0]       aes_keywordaddr,
  input  logic             aes_w_ena_keyword,
  input  logic             aes_key_stable,
  input  logic             aes_decrypt_mode,
  output state_t           aes_result,
  output logic             aes_finished,
  output logic             aes_keyexp_done,
  // RC6
  input  logic             rc6_clock,
  input  logic             rc6_reset,
  input  logic             rc6_start_e,
  input  logic [RC6_W-1:0] rc6_plaintext_e,
  input  logic [RC6_W-1:0] rc6_round_keyse,
  output logic [RC6_W-1:0] rc6_ciphertext,
  output logic             rc6_ready_e,
  input  logic             rc6_start_d,
  input  logic [RC6_W-1:0] rc6_ciphertext_d,
  input  logic [RC6_W-1:0] rc6_round_keysd,
  output logic [RC6_W-1:0] rc6_plaintext,
  output logic             rc6_ready_d
);

  aes_core #(.KEYLENGTH(AES_KEYLENGTH), .DECRYPTION(AES_DECRYPTION)) u_aes (
    .clk          (aes_clk),
    .data_in      (aes_data_in),
    .data_stable  (aes_data_stable),
    .keyword      (aes_keyword),
    .keywordaddr  (aes_keywordaddr),
    .w_ena_keyword(aes_w_ena_keyword),
    .key_stable   (aes_key_stable),
    .decrypt_mode (aes_decrypt_mode),
    .result       (aes_result),
    .finished     (aes_finished),
    .keyexp_done  (aes_keyexp_done)
  );

  rc6_encryptor #(.W(RC6_W), .R(RC6_R), .KEY_BYTES(RC6_KEY_BYTES)) u_rc6 (
    .clock      (rc6_clock),
    .reset      (rc6_reset),
    .start_e    (rc6_start_e),
    .plaintext_e(rc6_plaintext_e),
    .round_keyse(rc6_round_keyse),
    .ciphertext (rc6_ciphertext),
    .ready_e    (rc6_ready_e)
  );

  rc6_decryptor #(.W(RC6_W), .R(RC6_R), .KEY_BYTES(RC6_KEY_BYTES)) u_rc6d (
    .clock       (rc6_clock),
    .reset       (rc6_reset),
    .start_d     (rc6_start_d),
    .ciphertext_d(rc6_ciphertext_d),
    .round_keysd (rc6_round_keysd),
    .plaintext   (rc6_plaintext),
    .ready_d     (rc6_ready_d)
  );

endmodule
