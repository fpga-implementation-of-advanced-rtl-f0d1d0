# Iterative AES-128 encryptor/decryptor with round-sequencing controllers

This is a compact, iterative hardware implementation of AES-128 (FIPS-197):
one cipher and one decipher, each built as a small finite-state controller
driving a round datapath that is reused for all eleven round steps. The goal
of the architecture is low area: there is exactly one instance of each round
transformation per direction, and the controller switches each transformation
on or off per round instead of building a separate first or last round.

The top level, `aes_top`, chains the two: the cipher encrypts a 128-bit block
under a 128-bit key, and when the cipher text is ready it starts the decipher,
which decrypts it again with the same key. `decipher_txt` therefore returns
the original `data`, so the block both encrypts and checks its own result.

The architecture (controller states, control table, block list, port names)
follows the B.Tech thesis "FPGA Implementation of Advanced Encryption
Standard" (V. Kumar, A. Tibrewal, NIT Rourkela, 2014), which described it in
VHDL. This SystemVerilog is a new implementation; where that description is
silent or ambiguous, the choices made here are listed in
[Departures and design choices](#departures-and-design-choices).

## Block structure

```
aes_top
├── final_cipher            encryption: controller + datapath + go_d flag
│   ├── cipher_fsm          INIT, S0..S4 controller, round count 0 -> 10
│   └── cipher_datapath
│       ├── mux (inline)    data / fed-back state Sa
│       ├── byte_sub → row_shift → mix_column → add_round_key
│       ├── key_exp         round key of any round, registered
│       ├── up_counter      round count
│       └── state_reg ×2    Sa (round state) and result (cipher_txt)
└── final_decipher          decryption: controller + datapath
    ├── decipher_fsm        INIT, S0..S4 controller, round count 10 -> 0
    └── decipher_datapath
        ├── mux (inline)    cipher text / Sa
        ├── inv_row_shift → inv_byte_sub → add_round_key → inv_mix_column
        ├── key_exp
        ├── down_counter
        └── state_reg ×2    Sa and result (decipher_txt)
```

`aes_pkg` holds the shared types (`block_t`, `round_t`, the controller state
enum), the S-box tables and the GF(2^8) functions used by the transformation
blocks.

## Data format

All 128-bit values (`data`, `key`, `cipher_txt`, `decipher_txt`, round keys)
use the FIPS-197 byte order: byte 0 is bits 127:120, byte 15 is bits 7:0, and
bytes fill the 4×4 state column by column (byte *i* is row *i* mod 4,
column *i* / 4). The FIPS-197 example vectors can be used as written:

| key                                | plain text                         | cipher text                        |
|------------------------------------|------------------------------------|------------------------------------|
| `000102030405060708090a0b0c0d0e0f` | `00112233445566778899aabbccddeeff` | `69c4e0d86a7b0430d8cdb78070b4c55a` |
| `2b7e151628aed2a6abf7158809cf4f3c` | `3243f6a8885a308d313198a2e0370734` | `3925841d02dc09fbdc118597196a0b32` |

The thesis's unit waveforms for row shift and inverse mix column are
consistent with a row-by-row packing of the 128-bit vector instead. This
design keeps the standard packing; a row-by-row user can transpose the 4×4
byte matrix at the ports. The unit testbenches check the thesis's example
values through exactly such a transpose.

## How a block is processed: the controller

Both controllers have the same six states. INIT is the reset state. S0 is a
"select" state that looks at the round count and branches to the state that
processes that round. Each processing state returns to S0.

| state | cipher branch (from S0) | decipher branch (from S0) | what the datapath does |
|-------|------------------------|---------------------------|------------------------|
| INIT  | → S0 when `go_i`       | → S0 when `go_i`          | nothing; count held at 0 (cipher) or 10 (decipher) |
| S0    | —                      | —                         | registers the round key of the current round |
| S1    | round = 0              | round = 10                | add round key only, on the input block |
| S2    | round 1..9             | round 9..1 (other values) | full round: all four transformations on Sa |
| S3    | round = 10             | round = 0                 | last round without (inverse) mix column; result register loaded |
| S4    | round > 10             | round > 10                | round count reset to 0 / 10 |

In the decipher the round count runs down; after round 0 the 4-bit counter
wraps to 15, which is how S0 reaches S4. The decipher's branch conditions
overlap as stated in the source (round 10 is also "above 0"); priority here is
round 10, then above 10, then 0, then anything else.

Per state, the controller drives these datapath controls:

| state | `sel` cipher (BS,SR,MC,ARK) | `sel` decipher (ISR,ISB,ARK,IMC) | `load_reg` (result, Sa) | `sline` | `count_en` | `load_rgk` | `rnd_out` to counter |
|-------|------|------|----|---|---|---|--------------|
| INIT  | 0000 | 0000 | 00 | 0 | 0 | 0 | 0 / 10 |
| S0    | 0000 | 0000 | 00 | 0 | 0 | 1 | current count |
| S1    | 0001 | 0010 | 01 | 0 | 1 | 0 | current count |
| S2    | 1111 | 1111 | 01 | 1 | 1 | 0 | current count |
| S3    | 1101 | 1110 | 11 | 1 | 1 | 0 | current count |
| S4    | 0000 | 0000 | 00 | 1 | 0 | 0 | 0 / 10 |

The counter stores `rnd_out`, plus one (cipher) or minus one (decipher)
when `count_en` is high, so the count steps once per processing state.
`load_reg` and `sel` are 4 bits wide as in the source; `load_reg[3:2]` are
not used and held at 0. The cipher controller also has a `go` output, high
in S3.

An encryption therefore walks
INIT → S0 → S1 → (S0 → S2) × 9 → S0 → S3 → S0 → S4 → S0 → S1 → …
After S4 the controller starts again on whatever is on `data` and `key`: the
blocks keep running until reset, producing a new result every 24 clocks.

## Datapaths

Each transformation block is combinational with an `enable` input: when
enable is high it transforms its 128-bit input, when low it passes it
through unchanged. The controller's `sel` bits are these enables, which is how
one chain serves the initial key addition, the nine middle rounds and the
final round.

The cipher chain is mux → SubBytes → ShiftRows → MixColumns → AddRoundKey.
The decipher chain is mux → InvShiftRows → InvSubBytes → AddRoundKey →
InvMixColumns (the straight FIPS-197 inverse cipher, so it uses the ordinary
round keys in reverse order). The mux selects the external input when
`sline` is 0 (first step) and the fed-back state Sa when it is 1. The chain
output goes into Sa (`load_reg[0]`) and, in the last round, into the result
register (`load_reg[1]`).

The whole round is one combinational path from Sa back to Sa: one S-box
layer, MixColumns and the key XOR. The source draws a register after each
transformation; they are merged into the single state register here (see
below).

## Key expansion

`key_exp` takes the cipher key and a round number and gives the round key of
that round. It unrolls the full AES-128 key schedule (ten steps of RotWord,
SubWord, round constant and XOR chain, with RC = 01, 02, 04, … 1b, 36 computed
by repeated doubling in GF(2^8)) and selects the requested round, so keys can
be produced in any order: ascending for the cipher, descending for the
decipher, with no stored schedule and no reverse key expansion. The selected
key is registered when `enable` (`load_rgk`) is high, which the controllers do
in S0, one clock ahead of the round that uses it. Round numbers above 10
return the round-10 key.

This is the area-hungry part of the design: 40 S-box lookups per key unit,
two key units in `aes_top`. Anyone optimising for area should replace it with
an on-the-fly schedule (forward for the cipher, inverse for the decipher).

## S-boxes

The S-box and inverse S-box are `localparam` tables in `aes_pkg`, computed at
elaboration from their definition rather than typed in: the multiplicative
inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 (found as a^254), followed by the
FIPS-197 affine map `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`
(inverse map `rotl(b,1) ^ rotl(b,3) ^ rotl(b,6) ^ 0x05` before inverting).
Synthesis sees constant 256×8 ROMs.

## Interface and timing of `aes_top`

| port           | dir | width | meaning |
|----------------|-----|-------|---------|
| `clk`          | in  | 1     | clock; everything is rising-edge |
| `reset`        | in  | 1     | synchronous, active high; clears all registers, controllers to INIT |
| `go_i`         | in  | 1     | start; sampled while the cipher controller is in INIT |
| `data`         | in  | 128   | plain text |
| `key`          | in  | 128   | cipher key |
| `cipher_txt`   | out | 128   | cipher text (result register) |
| `decipher_txt` | out | 128   | deciphered text |
| `go_d`         | out | 1     | cipher text valid; starts the decipher; stays high until reset |
| `dec_rnd`      | out | 4     | decipher round count |

Counting from the rising edge that samples `go_i`:

* `cipher_txt` and `go_d` change 22 clocks later (11 round steps × 2 clocks);
* the decipher samples `go_d` one clock after that and `decipher_txt` holds
  the plain text 45 clocks after the `go_i` edge;
* afterwards both halves repeat every 24 clocks, so a new `data` value applied
  right after a result appears is encrypted (and decrypted) in the next pass.

`data` and `key` must be stable during a pass. There is no busy/done pair
beyond `go_d`; a user streaming blocks should count clocks.

## Departures and design choices

* **One state register instead of a register per transformation.** The
  source shows a register after each of the four transformations, yet its
  control table loads all registers in the same state and finishes a round
  per processing state. The four transformations are therefore one
  combinational stage here. Cost: a longer critical path (one S-box, MixColumns
  and two XOR levels); benefit: 2 clocks per round as in the control table.
* **Combinational transformation blocks.** The source's block symbols show
  `clk` and `reset` on each transformation; here they have none, since the
  registers sit outside them.
* **`load_rgk` in S0** (the source's control table does not list it), so the
  round key is ready for the processing state.
* **`sline` = 0 in S0** (the source gives "0/1"; the mux is unused in S0).
* **`go_d` is a sticky flag** set by the cipher's last round; the source only
  says the cipher holds the decipher in its wait state until the cipher text
  is ready.
* **Counters** load their input, or input ±1 when enabled; the controllers
  drive the current count to hold it and 0 / 10 to restart. The source gives
  only the counters' pins and purpose.
* **Standard byte order** (see [Data format](#data-format)).
* **Extra top-level outputs** `go_d` and `dec_rnd`.
* **AES-128 only.** AES-192/256 need 12/14 rounds and a different key
  schedule; the round counter and controllers are built for 10 rounds.
* Reset is synchronous and active high (the source only says reset clears
  data and round counts).

## Verification

Every module has a self-checking testbench in `tb/`, compared against
`aes_ref_pkg`, an independent reference model (byte-array state, S-box by
search for the inverse, word-array key schedule). Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* Transformations: 300 random states each, bypass with enable low, FIPS-197
  Appendix C.1 intermediate values, and the thesis's example vectors.
* `key_exp`: every round of 40 random keys, FIPS-197 A.1 round keys, hold and
  reset.
* Controllers: 3000 random steps against the state graph and control table,
  every state visited, reset mid-run.
* Datapaths: the testbench acts as controller and checks the state after
  every round, and the round counter.
* `final_cipher` / `final_decipher`: FIPS-197 vectors, latency of 22 clocks,
  24-clock repetition with new data and keys.
* `tb_aes_top`: end-to-end at the default configuration: FIPS-197 vectors and
  random blocks, latencies 22 and 45, a second pass on new data, a reset in
  the middle of an encryption; it counts the visits of every controller
  state, the clocks the decipher waits for `go_d`, the repeat passes and the
  resets, and fails if any is zero.

Run a testbench with Verilator 5 from the repository root, for example:

```
verilator --binary --timing -Irtl rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
    -y rtl -y tb tb/tb_aes_top.sv --top-module tb_aes_top
./obj_dir/Vtb_aes_top
```

Replace `tb_aes_top` by any other `tb_<module>`. Each run takes seconds.

## Size

One `aes_top` synthesises (generic, before technology mapping) to roughly 790
flip-flops and 72 S-box ROMs of 256×8 bits: 16 in each of the two round
chains and 40 in each key unit. The 520 top-level pins (two 128-bit inputs,
two 128-bit outputs) exceed the I/O of small FPGA packages; a pin-limited
device needs a serial or word-wide wrapper around `aes_top`.

## Files

* `rtl/aes_pkg.sv` – types, S-box tables, GF(2^8) and round functions
* `rtl/aes_top.sv`, `rtl/final_cipher.sv`, `rtl/final_decipher.sv` – assemblies
* `rtl/cipher_fsm.sv`, `rtl/decipher_fsm.sv` – controllers
* `rtl/cipher_datapath.sv`, `rtl/decipher_datapath.sv` – round datapaths
* `rtl/byte_sub.sv`, `rtl/row_shift.sv`, `rtl/mix_column.sv`,
  `rtl/add_round_key.sv`, `rtl/inv_byte_sub.sv`, `rtl/inv_row_shift.sv`,
  `rtl/inv_mix_column.sv` – transformations with bypass
* `rtl/key_exp.sv` – round-key unit
* `rtl/up_counter.sv`, `rtl/down_counter.sv`, `rtl/state_reg.sv` – counters and register
* `tb/aes_ref_pkg.sv` – reference model; `tb/tb_*.sv` – testbenches
