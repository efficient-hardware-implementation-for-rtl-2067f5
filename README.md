# AES round-per-clock core and 16-bit RC6 encryptor/decryptor

This repository holds small block-cipher engines for AES and RC6 that sit
side by side:

* **An iterative AES core.** It completes one full AES round per clock. The
  round keys are computed once per key and kept in a small memory, so a
  128-bit block with a 128-bit key takes 11 clocks (10 rounds plus the
  initial key addition). A decryption data path can be added with a
  parameter. Key lengths of 128, 192 and 256 bits are supported.
* **An RC6 encryptor with 16-bit words.** It computes RC6-16/20/16: 16-bit
  words, 20 rounds and a 16-byte key. Its 16-bit ports carry the block (four
  16-bit words A, B, C, D) and the user key in and the ciphertext out, one
  word per clock. The key schedule runs in hardware before each block.
* **An RC6 decryptor** with the same parameters and port protocol, which
  turns the ciphertext back into plaintext.

`crypto_top` instantiates all three and brings out their ports with `aes_`
and `rc6_` prefixes. The AES and RC6 sides share nothing, not even a clock.
The RC6 encryptor and decryptor share only their clock and reset.

The design follows a thesis on FPGA implementations of AES and RC6. The
module split, port names, round-type encoding and round timing come from it.
That source leaves open the handshakes, the RC6 data-transfer order, the
reset behaviour and the decryption path. Choices made here to fill those
gaps are listed under "Where this design departs from or extends its source".

## The AES core

### Data path: one round per clock

```
                 data_in ──┐
                           ▼
  ┌──────────── addkey mux (round_type) ◄── MixColumns x4 ◄──┐
  │                        │             ◄──────────────────┤
  │                        ▼                                │
  │      roundkey ──►  XOR (AddRoundKey)                    │
  │                        │                                │
  │                        ▼                                │
  │                 state register ──► result               │
  │                        │                                │
  │                        ▼                                │
  │                  16 S-boxes ──► ShiftRows ──────────────┘
```

The only register on the round path is the 128-bit state. Each clock it is
loaded with `roundkey XOR sel`, where `round_type` picks `sel`:

| round_type | name    | `sel` is                    | used in            |
|-----------:|---------|-----------------------------|--------------------|
| `00`       | initial | `data_in`                   | start clock        |
| `01`       | middle  | MixColumns(ShiftRows(SubBytes(state))) | rounds 1 .. NR-1 |
| `10`       | final   | ShiftRows(SubBytes(state))  | round NR           |

SubBytes, ShiftRows and MixColumns are purely combinational. So the critical
path runs from the state register through an S-box, ShiftRows (wiring), a
MixColumns column and the key XOR, then back to the register.

The state and the data ports are four 32-bit columns. `data_in[0]` holds
bytes 0..3 of the block with byte 0 in bits 31:24, and `result` uses the
same layout. This is the FIPS-197 column order. For example, the FIPS-197
plaintext `00112233…ff` is given as `data_in[0] = 32'h00112233`.

### Round keys: expanded once, read by index

`aes_key_expansion` holds the user key in an 8-word register file. Words are
written through `keyword`, `keywordaddr` and `w_ena_keyword`. Raising
`key_stable` starts the expansion:

1. One start clock. Then NK clocks copy the key words into the round-key
   memory and into a window that holds the last NK words.
2. Each further word `w[i]` takes **two clocks**:
   * first clock: `temp` is computed from `w[i-1]` and registered. When
     `i mod NK = 0` it is RotWord, then SubWord, then XOR with the round
     constant. When NK = 8 and `i mod 8 = 4` it is SubWord alone. Otherwise it
     is a copy.
   * second clock: `w[i] = w[i-NK] ^ temp` is written to memory and shifted
     into the window.

   The round constant is a register that starts at `01` and is multiplied by
   x in GF(2^8) after each use.
3. `ready` (the core's `keyexp_done`) goes high. The expansion takes
   1 + NK + 2·(4·(NR+1) − NK) clocks: 85 for AES-128, 99 for AES-192 and 113
   for AES-256.

The memory has four banks, one per round-key column, each NR+1 words deep,
with an asynchronous read. Round key `roundkey_idx` is therefore available in
the clock in which the index is presented. That is what lets the Mealy
outputs of the round FSM line up with the data. Only the key expansion
drives this memory; encryption reads it in ascending order and decryption in
descending order.

Lowering `key_stable` clears `ready` and puts the core back to idle. The AES
core has no reset pin, so this is how it is initialised after power-up:
hold `key_stable` low for at least one clock.

### Handshake and timing

```
clk            _|‾|_|‾|_|‾|_ ... _|‾|_|‾|_|‾|_
data_stable    ___|‾‾‾‾‾‾‾‾‾ ... ‾‾‾‾‾‾‾‾‾‾|____
round_type       | 00| 01| 01 ... 01 | 10 |
finished       ‾‾‾‾‾‾‾|_______ ... ______|‾‾‾‾‾‾‾‾‾‾
result                                   | valid, held
```

* An operation starts in the first clock where `data_stable`, `keyexp_done`
  and the idle FSM coincide. `data_in` is sampled in that clock, because the
  initial key addition happens there.
* `finished` falls after that clock. It rises again NR + 1 clocks after the
  start clock (11 for AES-128), with the result in the state register.
* `finished` and `result` stay valid until the next operation starts.
  The FSM waits in DONE until `data_stable` goes low, so each high period
  of `data_stable` encrypts exactly one block.
* `decrypt_mode` selects the decryption path when one is built. Keep it
  stable while `data_stable` is high.

Throughput is one block per NR + 2 clocks, because `data_stable` must be low
for at least one clock between blocks.

### Optional decryption path (`DECRYPTION = 1`)

The decryption path has its own FSM (`aes_fsm_decrypt`), its own state
register, 16 inverse S-boxes, InvShiftRows and four InvMixColumns units. It
computes the standard inverse cipher:

* initial clock: `state = data_in ^ rk[NR]`
* rounds NR-1 .. 1: `state = InvMixColumns(InvSubBytes(InvShiftRows(state)) ^ rk[i])`
* last clock: `state = InvSubBytes(InvShiftRows(state)) ^ rk[0]`

It shares the round-key memory with encryption. Multiplexers pick the
round-key index, `result` and `finished` from whichever path ran last. The
default is `DECRYPTION = 0`, which builds an encryption-only core. The
reference configuration is also encryption-only.

### Parameters

| module        | parameter    | default | meaning                                    |
|---------------|--------------|---------|--------------------------------------------|
| `aes_core`    | `KEYLENGTH`  | 128     | 128, 192 or 256; sets NK = KEYLENGTH/32 and NR = NK+6 |
| `aes_core`    | `DECRYPTION` | 0       | 1 adds the decryption data path            |
| `aes_sbox`, `aes_shiftrow`, `aes_mixcol` | `INVERSE` | 0 | 1 gives the inverse transform |

The S-box is not stored as a literal table. `aes_pkg::gen_sbox()` builds it at
elaboration time from its definition: the multiplicative inverse in
GF(2^8) modulo x⁸+x⁴+x³+x+1 (0 maps to 0), then the affine map
`b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`. The inverse S-box
is built by inverting that table. Synthesis turns each table into a 256×8
ROM.

## The RC6 encryptor and decryptor

### Algorithm

RC6-w/r/b uses w-bit words, r rounds and a b-byte key. With `lg = log2(w)`,
`<<<` for rotation and all arithmetic modulo 2^w:

```
key schedule:  S[k] = Pw + k·Qw  (k = 0 .. 2r+3);  A = B = i = j = 0
               repeat 3·max(c, 2r+4) times:
                   A = S[i] = (S[i] + A + B) <<< 3
                   B = L[j] = (L[j] + A + B) <<< (A + B)
                   i = (i+1) mod (2r+4);  j = (j+1) mod c
encryption:    B += S[0];  D += S[1]
               for i = 1 .. r:
                   t = (B·(2B+1)) <<< lg;   u = (D·(2D+1)) <<< lg
                   A = ((A ^ t) <<< u) + S[2i];  C = ((C ^ u) <<< t) + S[2i+1]
                   (A, B, C, D) = (B, C, D, A)
               A += S[2r+2];  C += S[2r+3]
```

Here `c` is the number of w-bit key words, and `L[0]` holds the first key
bytes, least significant byte first. The constants `Pw` and `Qw` are the
top w bits of the binary expansions of e−2 and φ−1, made odd: `B7E1` and
`9E37` for w = 16, and `B7E15163` and `9E3779B9` for w = 32.

### Hardware

* `rc6_key_expansion` holds `S` (2r+4 words) and `L` (c words) as register
  arrays. It runs one mixing step per clock. The initial `S` table is never
  written as such: during the first pass over `S`, the value `Pw + k·Qw`
  comes from a running register. `S` has two asynchronous read ports, so
  a round can fetch `S[2i]` and `S[2i+1]` together.
* `rc6_round` is one combinational round: two w×w multipliers for B(2B+1)
  and D(2D+1), two fixed rotations, two data-dependent barrel rotators
  (`rc6_rotl`) and two adders. Its A and C outputs are simply the incoming B
  and D. That is the word rotation, not a missing function.
* `rc6_encryptor` is the sequencer: IDLE → LOAD → KEYS → WHITEN → ROUNDS →
  FINAL → OUT.

### Port protocol and timing (defaults: w = 16, r = 20, b = 16 so c = 8)

| clock after `start_e` is sampled | `plaintext_e` | `round_keyse` | `ready_e` / `ciphertext` |
|---|---|---|---|
| 0 (start) | A | L[0] | |
| 1, 2, 3 | B, C, D | L[1], L[2], L[3] | |
| 4 .. 7 | ignored | L[4] .. L[7] | |
| 8 .. 139 | | | key mixing, 132 clocks |
| 140 .. 162 | | | end of mixing, whitening, 20 rounds, final addition |
| 163 .. 166 | | | `ready_e` = 1; ciphertext A, B, C, D |

The load lasts max(4, c) clocks. The first ciphertext word therefore
appears max(4, c) + 3·max(c, 2r+4) + r + 3 clocks after the start clock:
163 with the defaults, and 159 for RC6-32/20/16. `start_e` is ignored until
the output burst has ended. `reset` is synchronous and active high, and
aborts a block in progress. Each block reloads its key and reruns the key
schedule, so key agility costs 132 clocks per block.

| parameter   | default | meaning                                |
|-------------|---------|----------------------------------------|
| `W`         | 16      | word size: 16, 32 or 64 (ports are W bits wide) |
| `R`         | 20      | rounds                                 |
| `KEY_BYTES` | 16      | user key length b in bytes             |

### The RC6 decryptor

`rc6_decryptor` runs the encryption steps backwards. It subtracts S[2r+3]
from C and S[2r+2] from A. It then runs r inverse rounds (`rc6_inv_round`),
from i = r down to 1, each undoing one encryption round. Finally it
subtracts S[1] from D and S[0] from B. An inverse round first rotates the
words back, (A, B, C, D) = (D, A, B, C). It recomputes t and u from B and D,
then rotates C − S[2i+1] right by t and A − S[2i] right by u. The
right rotation is the same rotator turned by the negated amount.

The ports are `start_d`, `ciphertext_d`, `round_keysd`, `plaintext` and
`ready_d`, with the same meaning and timing as the encryptor's ports. The
latency is again 163 clocks with the defaults. The decryptor has its own key
schedule, so encryption and decryption can overlap.

## Where this design departs from or extends its source

* **RC6 latency.** The source reports that `ready_e` rises after 93 clocks,
  but does not say how those clocks are spent or how the 16-bit ports carry a
  block. This design takes 163 clocks, mostly for the 132-step key schedule.
  Its serial load/unload order is this design's own choice.
* **RC6 block format.** Four registers A..D of 16 bits each make a 64-bit
  block. The single 16-bit plaintext/ciphertext pair shown in the source's
  simulation cannot serve as a test vector for this format. The RC6 core is
  instead verified against the published RC6-32/20/16 vectors, with
  W = 32, and against a reference model with W = 16.
* **AES start/finish handshake.** Level-sensitive `data_stable`, with
  `finished` held high until the next start, is this design's reading. One
  of the source's waveforms instead shows `finished` as a one-clock pulse.
* **No AES reset pin.** Following the source's port list, the AES core has
  no reset. `key_stable` low initialises it.
* **Result tap.** `result` comes from the state register, not from the
  combinational addkey output.
* **RC6 decryptor.** The source describes RC6 decryption as an algorithm
  only; its RC6 hardware encrypts. The decryptor core, its ports and its
  timing are this design's own, built as a mirror of the encryptor. The
  source says the first decryption round uses S[21] and S[20]. That does not
  match its own rule S[2i], S[2i+1] with i = r = 20, so the rule is followed.
* **Decryption path.** The source only says that this path exists behind a
  generic. The inverse-cipher structure used here is this design's choice.
* **Round-key storage.** All round keys are precomputed and stored, as in the
  source's implementation section. Its concluding chapter describes
  on-the-fly round keys; that variant is not built here.
* **S-box count.** The key expansion has four S-boxes of its own in addition
  to the 16 in the round. The source names its main architecture
  "16 S-boxes and 2 dual-port RAMs" without saying whether the key S-boxes
  are part of the 16. The round-key memory here is four banks with
  asynchronous read, not two dual-port RAMs.
* **Not built:**
  * the bus-mapped register front end (a KEY segment plus KEY_VALID, ENC
    and DEC control bits), whose layout is not specified;
  * the LCD display driver used to show RC6 output on an evaluation board.
  * The alternative AES architectures the source compares against (8 RAMs,
    or 4 S-boxes) are not part of this design.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. Two reference packages are written
independently of the RTL:

* `tb/aes_ref_pkg.sv`: AES on a flat byte array. Its S-box uses an
  inverse search plus the bitwise affine formula.
* `tb/rc6_ref_pkg.sv`: RC6 for any word size up to 64.

| testbench | what it establishes |
|---|---|
| `aes_sbox_tb` | all 256 entries against the model and published entries; the inverse S-box undoes the forward one |
| `aes_shiftrow_tb`, `aes_mixcol_tb`, `aes_addkey_tb` | transforms against index formulas, published MixColumns column vectors and the model; inverses round-trip |
| `aes_key_expansion_tb` | every round key for 128/192/256-bit keys (FIPS-197 A.1 key plus random keys); expansion clock count; `ready` clears |
| `aes_fsm_encrypt_tb`, `aes_fsm_decrypt_tb` | clock-by-clock round type, key index and write enable for NR = 10 and 14; `finished` timing and hold; abort by `key_ready` |
| `aes_core_tb` | FIPS-197 Appendix B and C.1–C.3 (128/192/256) encryption and decryption; random blocks against the model; NR+1 latency; result hold |
| `rc6_round_tb`, `rc6_key_expansion_tb` | round and key schedule against the model for w = 16 and 32; schedule clock count |
| `rc6_encryptor_tb` | the two published RC6-32/20/16 vectors; random RC6-16/20/16 blocks; 163/159-clock latency; four-clock output; `start_e` ignored while busy; reset abort |
| `rc6_inv_round_tb` | the inverse round undoes a model encryption round, w = 16 and 32 |
| `rc6_decryptor_tb` | the two published RC6-32/20/16 ciphertexts decrypt to their plaintexts; model-encrypted RC6-16 blocks decrypt back; 163/159-clock latency; four-clock output; `start_d` ignored while busy |
| `crypto_top_tb` | all engines concurrently at the default parameters; counts and requires key expansion, AES blocks, result hold, RC6 blocks, ignored start, reset abort, RC6 decryption of each ciphertext |

To run a testbench with Verilator 5, put the packages first and each file
only once:

```
verilator --binary --timing --assert \
    rtl/aes_pkg.sv rtl/rc6_pkg.sv tb/aes_ref_pkg.sv tb/rc6_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v _pkg) tb/crypto_top_tb.sv --top-module crypto_top_tb
./obj_dir/Vcrypto_top_tb
```

Replace `crypto_top_tb` with the name of any other testbench. `crypto_top_tb`
runs in well under a second. With `-Wall`, Verilator's lint reports only
unused bits: the upper bits of a rotation amount, and half of the doubled word
in the rotator. Both are intentional.

Coarse synthesis of `crypto_top` with Yosys, as a generic word-level
netlist with memories kept as memories, gives:

* about 1,500 word-level cells;
* 483 flip-flop bits;
* about 44,400 memory/ROM bits.

The ROM bits are mostly the twenty 256×8 S-box tables. No latches and no
combinational loops are reported.

## Files

| file | content |
|---|---|
| `rtl/aes_pkg.sv` | AES types, round-type enum, GF(2^8) helpers, S-box table generation |
| `rtl/aes_sbox.sv` | S-box / inverse S-box |
| `rtl/aes_shiftrow.sv` | ShiftRows / InvShiftRows |
| `rtl/aes_mixcol.sv` | MixColumns / InvMixColumns on one column |
| `rtl/aes_addkey.sv` | addkey multiplexer and AddRoundKey |
| `rtl/aes_key_expansion.sv` | key load, two-clock-per-word expansion, round-key memory |
| `rtl/aes_fsm_encrypt.sv`, `rtl/aes_fsm_decrypt.sv` | round sequencers |
| `rtl/aes_core.sv` | AES core |
| `rtl/rc6_pkg.sv` | RC6 constants and size helpers |
| `rtl/rc6_rotl.sv` | W-bit data-dependent rotator |
| `rtl/rc6_round.sv` | one RC6 round |
| `rtl/rc6_key_expansion.sv` | RC6 key schedule and S table |
| `rtl/rc6_encryptor.sv` | RC6 encryptor |
| `rtl/rc6_inv_round.sv` | one RC6 decryption round |
| `rtl/rc6_decryptor.sv` | RC6 decryptor |
| `rtl/crypto_top.sv` | all engines side by side |
| `tb/*` | reference packages and testbenches |
