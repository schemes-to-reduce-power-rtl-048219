# Low-power iterative AES-128 encryption cores

Three AES-128 encryption cores, written for FPGAs where power matters more
than raw throughput. Sensor nodes and other small radios need only a few
thousand 128-bit blocks a second. A core that unrolls all ten AES rounds
wastes area, and on an FPGA unused area still costs static power. So all
three cores use a single round of hardware over and over on a full 128-bit
datapath. The round keys are computed on the fly, one per round, so none are
stored. MixColumns uses XOR networks only, with no multipliers.

The three cores differ in how they connect to the host and how fast they run:

| core | module | input pins | key handling | rounds per clock | start to `data_valid` |
|---|---|---|---|---|---|
| Standard | `aes_standard` | 128-bit data + 128-bit key | key sent with every block | 1 | 11 cycles |
| Hard Key | `aes_hard_key` | one shared 128-bit bus + `store_key` | key stored once, reused | 1 | 11 cycles |
| Dual Stage | `aes_dual_stage` | same as Hard Key | same as Hard Key | 2 | 6 cycles |

The Hard Key core is the one recommended for low power. The Standard core is
the baseline the other two are built from. The Dual Stage core halves the
latency, but it doubles the round hardware and so costs much more power than
the speed-up gains. `aes_power_top` puts the three side by side. They share
only the clock and reset.

Only encryption is implemented. There is no decryption datapath.

## Conventions

- All blocks, keys and round keys are `logic [127:0]`. Byte 0 (the first byte
  of the block as written in hex) is bits `[127:120]`, and byte 15 is `[7:0]`.
- The 4x4 AES state is filled column by column. Byte *n* is row `n % 4`,
  column `n / 4`.
- Reset is synchronous and active high.
- `data_valid` is high for exactly one cycle. `data_out` keeps the last
  ciphertext until the next one is produced.

## The round datapath

Every core is built from the same combinational round (`aes_round`) and key
expansion unit (`aes_key_expansion`). A data register and a key register sit
in front of them. Each register has a 2:1 multiplexer that picks either the
new input or the fed-back result.

```
 data_in ^ key ──►┐                            key ──►┐
                  MUX ─► data reg               MUX ─► key reg
 round out ──────►┘        │               key exp ──►┘    │
                           ▼                               ▼
              ┌─ aes_round ───────────────┐     aes_key_expansion(rcon)
              │ SubBytes (16 S-box ROMs)  │               │
              │ ShiftRows (wiring only)   │               │ round key
              │ MixColumns (16 XOR units) │               │
              │ bypass mux (final round)  │               │
              │ AddRoundKey  ◄────────────┼───────────────┘
              └──────────────┬────────────┘
                             ▼  round out ──► data_out register on the last round
```

**SubBytes** (`aes_sub_bytes`, `aes_sbox`): there are 16 copies of a 256-byte
look-up table. The table is not typed in by hand.
`aes_pkg::build_sbox_table()` computes it at elaboration: first the inverse in
GF(2^8) with modulus x^8+x^4+x^3+x+1, computed as a^254, then the AES affine
transform. A synthesis tool still sees a constant 256x8 ROM. That fits an
FPGA, where a table costs less than the logic that would compute the inverse.

**ShiftRows** (`aes_shift_rows`): row *r* is rotated left by *r* bytes, which
is only a reordering of wires. The module contains no logic.

**MixColumns** (`aes_mix_columns`, `aes_mixcol_unit`, `aes_xtime`): this is
the part that needs the most care. Each output byte of a column is
`2·a ⊕ 3·b ⊕ c ⊕ d`, where `a` is the byte in the same row and `b`, `c`, `d`
are the next three rows, taken cyclically. Multiplication by 3 is never built.
Since `2a ⊕ 3b = 2(a ⊕ b) ⊕ b`, one unit computes

```
y = xtime(a ^ b) ^ b ^ (c ^ d)
```

`xtime`, multiplication by 2, is a one-bit left shift. The bit shifted out is
XORed back into bits 0, 1, 3 and 4, which takes three XOR gates. Sixteen such
units, four per column, make the stage. Output row *r* of a column takes
`a, b, c, d` from rows `r, r+1, r+2, r+3 (mod 4)`.

**Final-round bypass**: the last AES round skips MixColumns. No separate final
round is built. A 128-bit 2:1 multiplexer in front of AddRoundKey passes
either the MixColumns output or its input, selected by `final_round`. This
costs one multiplexer but saves a second S-box array, ShiftRows and
AddRoundKey.

**Key expansion** (`aes_key_expansion`): the unit turns the previous round key
`W0..W3` into the next one in the same cycle:
`f = SubWord(RotWord(W3)) ^ {rcon,0,0,0}`, then `W4 = W0^f`, `W5 = W1^W4`,
`W6 = W2^W5`, `W7 = W3^W6`. The round constants 01, 02, 04, 08, 10, 20, 40,
80, 1B, 36 come from `aes_pkg::round_constant(round)`.

## Control and timing

`aes_ctrl` is a small round counter shared by all three cores:

- A `start` in an idle cycle raises `load`. On that clock edge the data
  register takes `plaintext ^ key` (the initial AddRoundKey) and the key
  register takes the key.
- During the next `STEPS` cycles, `busy` is high and `step` counts
  1..`STEPS`. Each edge writes the round result and the new round key back.
- In the last step, `last` selects the MixColumns bypass, and the result is
  also written into the `data_out` register.
- `data_valid` is a registered copy of `last`.

If `start` is seen in cycle *c*, `data_valid` is high in cycle *c* + `STEPS`
+ 1. That is cycle *c*+11 for the single-round cores (`STEPS` = 10) and
*c*+6 for the Dual Stage core (`STEPS` = 5). The core is idle again in the
`data_valid` cycle and accepts a new `start` there. Blocks can therefore be
streamed at one per 11 (or 6) cycles. A `start` while busy is ignored.
`key_in`/`data_in` are sampled only in the start cycle.

```
cycle        c      c+1 ... c+10     c+11
start        1       -        -       (may be 1 again)
step         0       1  ...   10       0
last         0       0  ...    1       0
data_valid   0       0  ...    0       1      data_out = ciphertext
```

## Stored key: `aes_hard_key`

The Hard Key core removes the key bus. Key and plaintext share `data_in`:

- With `store_key` high, the bus is written into `aes_key_storage`, the
  initial key register. The key is then used for every later encryption until
  it is replaced. Changing the key costs one bus cycle.
- With `start` high, the bus is XORed with the stored key into the data
  register, and the stored key is copied into the key register. From there on
  the core works exactly like the Standard core.
- If `start` and `store_key` are high together, the key is stored and the
  start is ignored.
- Reset alone does **not** clear the stored key, so the host need not resend
  it after a system reset. Reset with `store_key` high clears it to zero.
- Writing a new key during an encryption affects only later encryptions. The
  running one already has its own copy in the key register.

A host that sends a new key with every block spends 12 cycles per block
(1 store + 11). With a fixed key it spends 11.

## Two rounds per clock: `aes_dual_stage`

The Dual Stage core has the Hard Key interface. It chains two round blocks
and two key expansion units in one cycle. The first pair computes the
odd-numbered round (1, 3, …, 9). Its state and key feed the second pair,
which computes the even-numbered round after it (2, …, 10). Only the second
pair's outputs go back to the registers. An odd round is never the last one,
so the first block's bypass select is tied to 0 and synthesis removes that
multiplexer. The second block's bypass is driven by `last` for round 10. The
two key expansion units get `round_constant(2s-1)` and `round_constant(2s)`
in step *s*. Ten rounds take five cycles, so the latency is 6 cycles, or 7
per block when a new key is stored each time.

The critical path is twice as long, and the combinational logic toggles twice
per cycle. Expect roughly double the dynamic power per clock for half the
cycles.

## Size

A generic (not FPGA-mapped) synthesis gives the following word-level figures.
Each S-box counts as a 2048-bit ROM.

| module | flip-flop bits | ROM bits | word-level cells |
|---|---|---|---|
| `aes_standard` | 390 | 40 960 (20 S-boxes) | 403 |
| `aes_hard_key` | 518 | 40 960 | 409 |
| `aes_dual_stage` | 517 | 81 920 (40 S-boxes) | 786 |

## Files

| file | contents |
|---|---|
| `rtl/aes_pkg.sv` | types, `xtime`, GF(2^8) helpers, S-box table generator, round constants |
| `rtl/aes_xtime.sv`, `aes_mixcol_unit.sv`, `aes_mix_columns.sv` | MixColumns |
| `rtl/aes_sbox.sv`, `aes_sub_bytes.sv` | SubBytes |
| `rtl/aes_shift_rows.sv`, `aes_add_round_key.sv` | ShiftRows, AddRoundKey |
| `rtl/aes_round.sv` | one round with final-round bypass |
| `rtl/aes_key_expansion.sv` | one key-schedule step |
| `rtl/aes_ctrl.sv` | round counter, `load`/`busy`/`last`/`data_valid` |
| `rtl/aes_key_storage.sv` | stored-key register with the reset rule |
| `rtl/aes_standard.sv`, `aes_hard_key.sv`, `aes_dual_stage.sv` | the three cores |
| `rtl/aes_power_top.sv` | the three cores side by side |
| `tb/aes_ref_pkg.sv` | behavioural AES-128 reference used by the testbenches |
| `tb/sbox_table.hex` | the standard S-box table, row = high nibble |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `aes_vectors300_tb` |

## Verification

Each module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`. The expected values come from sources
independent of the RTL:

- `tb/aes_ref_pkg.sv`, a separate AES-128 model. It finds the S-box inverse by
  brute-force search, multiplies in GF(2^8) bit-serially and builds the full
  44-word key schedule.
- The published S-box table, checked for all 256 entries.
- The FIPS-197 worked examples: round 1 of Appendix B, the round keys of
  Appendix A.1, and the ciphertexts `3925841d…` and `69c4e0d8…`.

The core testbenches also check the cycle counts above, the one-cycle
`data_valid` pulse, back-to-back starts, and the key-storage rules.

`aes_power_top_tb` runs all three cores at once with random traffic. It makes
each mechanism happen at least once and counts it: the final-round bypass,
back-to-back starts, starts ignored while busy, key stores, key reuse,
`store_key` winning over `start`, reset keeping the key, and reset with
`store_key` clearing it. `aes_vectors300_tb` sends 300 random key/plaintext
pairs through each core, each pair with its own key. It checks the sustained
rates of 11, 12 and 7 cycles per block.

To run a testbench with Verilator 5 from the project root:

```
verilator --binary --timing --assert -Wno-fatal --top-module aes_power_top_tb \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/aes_power_top_tb.sv
./obj_dir/Vaes_power_top_tb
```

Replace the top module and the last file name to run another testbench.
`aes_sbox_tb` reads `tb/sbox_table.hex` by a relative path, so run it from
the project root.

## Where this implementation departs from the original description, or fills gaps

- **Output register and `data_valid` form.** The original diagrams take the
  ciphertext straight off the round output, and describe the valid pin only
  as "toggled" and later returning to zero. Here a 128-bit output register
  holds the result, and `data_valid` is a one-cycle pulse.
- **Power gating of the S-boxes.** The original S-box array was described so
  that a table look-up happens only when its input changes, using
  sensitivity lists in the HDL. In this RTL the look-ups are plain
  combinational ROMs. They switch only when their input switches, but no
  explicit enable or clock gating is added.
- **S-box contents** are computed at elaboration, not typed in. The result is
  the same table, and the testbench checks every entry.
- **Undefined corner cases** got simple rules: `start` while busy is ignored,
  and `store_key` wins over `start`. Where nothing was specified, reset is
  synchronous.
- **Byte order on the bus** (byte 0 in bits `[127:120]`) is this
  implementation's choice. It matches the usual hex notation of FIPS-197.
- **Verification vectors.** The original design was checked against 300
  vectors from the official random-vector file. Here 300 pairs generated at
  run time are checked against the reference model, plus the FIPS-197 worked
  examples.
- **Not included:** decryption, other key sizes, and the alternative key
  schedulers (all round keys precomputed into registers or a circular key
  store). These were only discussed as options or future work. The power
  results depend on the FPGA and its vendor power estimator, and cannot be
  reproduced from RTL.
