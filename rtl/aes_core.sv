// aes_core: iterative AES block cipher core computing one round per clock.
//
// Encryption data path: a 128-bit state register feeds 16 S-boxes,
// ShiftRows and four MixColumns units; the addkey multiplexer chooses the
// plaintext (initial round), the MixColumns output (middle rounds) or the
// ShiftRows output (last round), XORs it with the round key and writes the
// state register. A block therefore takes NR + 1 clocks (11 for a 128-bit
// key). The round keys are precomputed once per key by aes_key_expansion and
// read by index. With DECRYPTION = 1 a second, independent data path
// (InvShiftRows, inverse S-boxes, AddRoundKey, InvMixColumns) with its own
// FSM is added; it shares the key memory, reading the round keys in reverse
// order, and multiplexers select the round-key index and the result.
//
// Interface: data_in[0..3] are the four 32-bit columns of the input block
// (column 0 = first four bytes, first byte in bits 31:24), result[0..3] the
// output block in the same order. Key words are written with w_ena_keyword
// / keywordaddr / keyword; key_stable high starts the key expansion and
// keyexp_done reports its end. With the key expanded, data_stable high starts
// one operation (decryption if decrypt_mode = 1 and the decryption path is
// built, else encryption) in that clock; `finished` rises NR + 1 clocks later
// together with the valid result, and holds until the next operation starts.
// data_stable must fall before the next block is accepted. There is no reset
// pin; key_stable low brings the core back to idle.
module aes_core
  import aes_pkg::*;
#(
  parameter int KEYLENGTH  = 128,
  parameter bit DECRYPTION = 1'b0
) (
  input  logic       clk,
  input  state_t     data_in,
  input  logic       data_stable,
  input  word_t      keyword,
  input  logic [2:0] keywordaddr,
  input  logic       w_ena_keyword,
  input  logic       key_stable,
  input  logic       decrypt_mode,
  output state_t     result,
  output logic       finished,
  output logic       keyexp_done
);

  localparam int NR = nr(KEYLENGTH);

  logic        key_ready;
  logic        ena_encrypt;
  logic        dec_sel;
  logic [3:0]  roundkey_idx, enc_idx, dec_idx;
  state_t      roundkey;

  assign dec_sel     = DECRYPTION && decrypt_mode;
  assign ena_encrypt = data_stable && key_ready && !dec_sel;
  assign roundkey_idx = dec_sel ? dec_idx : enc_idx;
  assign keyexp_done  = key_ready;

  aes_key_expansion #(.KEYLENGTH(KEYLENGTH)) u_keyexp (
    .clk          (clk),
    .keyword      (keyword),
    .keywordaddr  (keywordaddr),
    .w_ena_keyword(w_ena_keyword),
    .key_stable   (key_stable),
    .roundkey_idx (roundkey_idx),
    .roundkey     (roundkey),
    .ready        (key_ready)
  );

  // ---------------- encryption data path ----------------
  round_type_e round_type_enc;
  logic        enc_we, finished_enc;
  state_t      state_enc, sb_enc, sr_enc, mc_enc, ak_enc;

  aes_fsm_encrypt #(.NR(NR)) u_fsm_enc (
    .clk         (clk),
    .key_ready   (key_ready),
    .ena_encrypt (ena_encrypt),
    .round_type  (round_type_enc),
    .roundkey_idx(enc_idx),
    .state_we    (enc_we),
    .finished    (finished_enc)
  );

  for (genvar c = 0; c < 4; c++) begin : g_enc_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      aes_sbox u_sbox (.din(state_enc[c][31-8*r -: 8]), .dout(sb_enc[c][31-8*r -: 8]));
    end
    aes_mixcol u_mixcol (.din(sr_enc[c]), .dout(mc_enc[c]));
  end

  aes_shiftrow u_shiftrow (.din(sb_enc), .dout(sr_enc));

  aes_addkey u_addkey (
    .round_type  (round_type_enc),
    .data_in     (data_in),
    .mixcol_out  (mc_enc),
    .shiftrow_out(sr_enc),
    .roundkey    (roundkey),
    .dout        (ak_enc)
  );

  always_ff @(posedge clk) begin
    if (enc_we) state_enc <= ak_enc;
  end

  // ---------------- decryption data path (optional) ----------------
  logic   finished_dec;
  state_t state_dec;
  logic   last_dec;      // the most recent operation was a decryption

  if (DECRYPTION) begin : g_dec
    round_type_e round_type_dec;
    logic        dec_we;
    state_t      isr_dec, isb_dec, ak_dec, imc_dec, next_dec;
    logic        ena_decrypt;

    assign ena_decrypt = data_stable && key_ready && dec_sel;

    aes_fsm_decrypt #(.NR(NR)) u_fsm_dec (
      .clk         (clk),
      .key_ready   (key_ready),
      .ena_decrypt (ena_decrypt),
      .round_type  (round_type_dec),
      .roundkey_idx(dec_idx),
      .state_we    (dec_we),
      .finished    (finished_dec)
    );

    aes_shiftrow #(.INVERSE(1'b1)) u_inv_shiftrow (.din(state_dec), .dout(isr_dec));

    for (genvar c = 0; c < 4; c++) begin : g_dec_col
      for (genvar r = 0; r < 4; r++) begin : g_row
        aes_sbox #(.INVERSE(1'b1)) u_inv_sbox (
          .din(isr_dec[c][31-8*r -: 8]), .dout(isb_dec[c][31-8*r -: 8]));
      end
      aes_mixcol #(.INVERSE(1'b1)) u_inv_mixcol (.din(ak_dec[c]), .dout(imc_dec[c]));
    end

    // Middle and final rounds both add the key to the inverse S-box output;
    // only middle rounds then apply InvMixColumns.
    aes_addkey u_addkey_dec (
      .round_type  (round_type_dec),
      .data_in     (data_in),
      .mixcol_out  (isb_dec),
      .shiftrow_out(isb_dec),
      .roundkey    (roundkey),
      .dout        (ak_dec)
    );

    assign next_dec = (round_type_dec == RT_MIDDLE) ? imc_dec : ak_dec;

    always_ff @(posedge clk) begin
      if (dec_we) state_dec <= next_dec;
      if (!key_ready)       last_dec <= 1'b0;
      else if (ena_decrypt) last_dec <= 1'b1;
      else if (ena_encrypt) last_dec <= 1'b0;
    end
  end else begin : g_no_dec
    assign dec_idx      = '0;
    assign finished_dec = 1'b0;
    assign state_dec    = '{default: '0};
    assign last_dec     = 1'b0;
  end

  assign result   = last_dec ? state_dec : state_enc;
  assign finished = last_dec ? finished_dec : finished_enc;

endmodule
