# Iterative AES-128 encryptor/decryptor

This is an AES-128 engine (128-bit block, 128-bit key, 10 rounds) that keeps
hardware small by building **one round of logic and looping the data through it**.
It does not unroll ten rounds. A block enters a 128-bit state register, goes
around the round datapath once per clock, and leaves after 11 cycles. Encryption
and decryption each have their own looped datapath. Both read the same stored
key schedule, which is expanded once per key.

S-box substitution uses precomputed 256-entry lookup tables, not arithmetic in
GF(2^8). A table read is short enough that a full round, including all sixteen
substitutions, fits in a single clock cycle.

## Block diagram

```
                 key_in ──► aes_key_expand ──► RoundKey[0..10] (11 x 128-bit registers)
                            (4 S-box tables)          │ one read port, rk_idx ──► rk
                                                      │
 data_in ─┬─► aes_encrypt ────────────────────────────┤
          │   state ─► SubBytes ─► ShiftRows ─► MixColumns ─┐
          │                              └──(last round)───►├─► AddRoundKey ─► state
          │   din ─────────(load cycle)────────────────────►┘
          │
          └─► aes_decrypt ────────────────────────────┘
              state ─► InvShiftRows ─► InvSubBytes ─┐
              din ───────(load cycle)──────────────►├─► AddRoundKey ─┬─(last round)──► state
                                                                      └─► InvMixColumns ─► state
 data_out ◄── mux on the mode of the last accepted request
```

## State layout

All blocks pass the State around as `aes_pkg::state_t`, which is
`logic [0:15][7:0]`. Byte 0 is bits [127:120] of the 128-bit bus, so the
hexadecimal strings in the AES standard map onto it directly. Byte `k` is the
State element in row `k % 4` and column `k / 4`. A column is therefore four
consecutive bytes, and a row is every fourth byte. Every transform module is
written in terms of this mapping. If you change it, change all of them.

## The round transforms

| module | operation |
|---|---|
| `aes_sub_bytes` / `aes_inv_sub_bytes` | 16 parallel table lookups, one per byte |
| `aes_shift_rows` | row *r* rotated left by *r* bytes (wiring only) |
| `aes_inv_shift_rows` | row *r* rotated right by *r* bytes (wiring only) |
| `aes_mix_columns` | each column times {03}x³+{01}x²+{01}x+{02} mod x⁴+1, built from `xtime` |
| `aes_inv_mix_columns` | each column times {0B}x³+{0D}x²+{09}x+{0E} mod x⁴+1, built from ×2/×4/×8 chains |
| `aes_add_round_key` | 128-bit XOR with the round key |

All of them are combinational. The shift-row modules contain no logic cells.

### S-box tables

`aes_sbox` and `aes_inv_sbox` each hold one 256 × 8 constant array, indexed
by the input byte. No table of numbers appears in the source. The package
function `aes_pkg::gen_sbox` builds the table at elaboration time:

- it walks the multiplicative group of GF(2⁸) using the generator 3;
- alongside, it tracks the inverse of each element;
- each inverse `q` is passed through the affine map
  `q ^ rotl(q,1) ^ rotl(q,2) ^ rotl(q,3) ^ rotl(q,4) ^ 0x63`;
- S(0) is set to 0x63.

`gen_inv_sbox` reads that table backwards. Synthesis sees an ordinary ROM.

The design has 36 of these tables:
- 16 in the cipher core;
- 16 in the inverse-cipher core;
- 4 in the key schedule.

## Cipher core (`aes_encrypt`)

- **Load cycle** (`start` while idle): `din` skips the round logic and goes
  straight into AddRoundKey with RoundKey[0]. This is the extra key addition
  that comes before the first round.
- **Rounds 1–9**: SubBytes → ShiftRows → MixColumns → AddRoundKey(RoundKey[r]).
- **Round 10**: the same, but without MixColumns.

A 4-bit round counter selects the round key. The core drives it out as
`rk_idx`, and expects `rk` to come back combinationally in the same cycle.

## Inverse-cipher core (`aes_decrypt`)

The round keys are used in reverse order:

- **Load cycle**: `din` XOR RoundKey[10].
- **Rounds 9 down to 1**: InvShiftRows → InvSubBytes → AddRoundKey(RoundKey[r])
  → InvMixColumns.
- **Final round**: InvShiftRows → InvSubBytes → AddRoundKey(RoundKey[0]), with
  no InvMixColumns.

This is the straightforward inverse cipher, in which InvMixColumns comes *after*
the key addition. That lets the decryptor use the same round keys as the
encryptor, unmodified. The "equivalent inverse cipher" instead puts
InvMixColumns before AddRoundKey, and needs round keys that have been passed
through InvMixColumns. That variant is not built here.

## Key schedule (`aes_key_expand`)

Pulsing `load` captures the key as RoundKey[0]. After that, one round key is
made per clock, using the standard AES-128 word recurrence:

- the last word is rotated, passed through four S-box tables, and XORed with Rcon;
- each of the four new words is then the XOR of the previous round key's word
  and the new word just before it.

Rcon is kept in a register and multiplied by x each step. All eleven round keys
are stored. This is what lets the decryptor start from RoundKey[10] with no
per-block key computation. `ready` rises 10 cycles after `load` was sampled. It
stays low from `load` until the new schedule is complete.

## Top level (`aes_top`) and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, active-low asynchronous reset |
| `key_load`, `key_in` | in | 1, 128 | start key expansion |
| `key_ready` | out | 1 | all eleven round keys valid |
| `start`, `mode`, `data_in` | in | 1, 1, 128 | block request; `mode` 0 = encrypt, 1 = decrypt |
| `start_ready` | out | 1 | request is accepted at the coming edge |
| `busy` | out | 1 | a block is in flight |
| `done` | out | 1 | one-cycle pulse: `data_out` is valid |
| `data_out` | out | 128 | result; held until the next accepted request |

Protocol:

1. Pulse `key_load` for one cycle with the key on `key_in`. `key_in` does not
   have to be held afterwards.
2. Raise `start` with `mode` and `data_in`, and hold them until a cycle in which
   `start_ready` is high. The request is taken at the end of that cycle.
3. A request stalls if the key schedule is not ready or a block is already in
   flight. `start_ready` is also low during a `key_load` cycle.
4. `done` comes 10 clock edges after the accepting edge. A request accepted in
   cycle *c* therefore gives its result in cycle *c* + 11.
5. Throughput is one 128-bit block per 11 cycles. Only one block is in flight
   at a time.
6. `key_load` must not be pulsed while `busy` is high. An assertion flags it.

The two cores never run together, so they share the single read port of the
round-key store. `a_one_core` asserts this.

## What is fixed by the algorithm and what is a choice here

These follow the AES algorithm as used by this design:
- the transforms and their order;
- AES-128 only, with Nr = 10;
- the last round without (Inv)MixColumns;
- lookup-table S-boxes;
- four S-boxes in the key schedule;
- eleven stored round keys;
- one looped round per direction.

These are implementation choices:
- the State byte numbering;
- one round per clock, giving 11-cycle latency;
- expanding the key serially, one round key per cycle;
- the start/start_ready/done handshake and the mode bit;
- the shared read port and the stall rules;
- the asynchronous reset;
- generating the S-box tables with constant functions.

AES-192 and AES-256 are not supported. The key schedule and round counter are
written for Nk = 4. The `NR` parameter exists, but changing it alone does not
give another key size.

## Size and a note on small FPGAs

Coarse synthesis of `aes_top` gives:
- 411 flip-flop bits: two 128-bit state registers, the 128-bit expander working
  register, counters and control;
- 1,408 bits of round-key registers;
- 73,728 bits of S-box ROM;
- about 600 word-level cells.

The S-box ROM is the dominant cost. On a very small device such as a Spartan-3E
XC3S100E (about 1,920 LUTs, four 18-Kbit block RAMs, at most 108 user I/O), this
design does not fit as written:
- the tables would need roughly 4,600 LUTs, or 18 dual-port block RAMs;
- the parallel 128-bit buses need 393 pins.

A build for such a part would need a narrower datapath, for example four
S-boxes per core processing one column per cycle, or shared tables. It would
also need a serial host interface.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference model,
`tb/aes_ref_pkg.sv`, is written separately from the RTL:
- its S-box comes from a brute-force search for each inverse, followed by a
  bit-by-bit affine map;
- it stores the State as a row/column matrix;
- it does all field products with a generic multiply.

| testbench | what it checks |
|---|---|
| `tb_aes_sbox`, `tb_aes_inv_sbox` | all 256 entries against the model, plus entries from the published AES table |
| `tb_aes_sub_bytes` … `tb_aes_add_round_key` | the FIPS-197 Appendix B round-1 values, and 200 random states against the model |
| `tb_aes_key_expand` | published RoundKey[1] and RoundKey[10] for the FIPS-197 A.1 key; all round keys for 21 keys; `ready` exactly 10 cycles after `load` |
| `tb_aes_encrypt`, `tb_aes_decrypt` | FIPS-197 Appendix B and C.1 vectors; 50 random pairs; latency of 11 cycles; a second `start` while busy is ignored; result held after `done` |
| `tb_aes_top` | end to end at default parameters |

`tb_aes_top` checks:
- the standard vectors in both directions;
- round trips;
- a request made before any key exists;
- a request stalled behind a block in flight;
- a request stalled through a re-key;
- frequent encrypt/decrypt mode switches;
- random traffic under eight random keys.

It counts each of these events and fails if any of them never happened. It also
checks the accept-to-`done` latency of every block.

To run one with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_aes_top \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv rtl/*.sv tb/tb_aes_top.sv
./obj_dir/Vtb_aes_top
```

For another testbench, replace `tb_aes_top` with its name. Lint a module with
`verilator --lint-only -Wall rtl/aes_pkg.sv rtl/*.sv --top-module <module>`.

Remaining lint warnings are intentional:
- `ASCRANGE` is for the ascending `[0:15]` byte index, which is deliberate.
- `UNUSEDPARAM` is for `NR` in modules that import the package but do not use it.
- `SYNCASYNCNET` is for `rst_n` being used both as the asynchronous reset and
  in the assertions' `disable iff`.
