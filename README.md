# Fully pipelined AES-128 encryption and decryption cores

This design encrypts one 128-bit block per clock cycle with AES-128.

It does not loop over one round circuit ten times. All ten rounds are laid
out one after another in hardware. Registers split each round into three
short steps. A new plaintext can enter on every cycle, and once the pipeline
is full a ciphertext leaves on every cycle. At a clock of f MHz the
throughput is 128·f Mbit/s; at 758 MHz that is about 97 Gbit/s.

Two ideas shape the design:

* **Keys travel with the data.** Each block enters with its own 128-bit key.
  * Every round computes its round key next to the data path, from the key
    that arrived with the block.
  * It passes that key on through the same pipeline registers as the data.
  * There is no key memory and no key set-up phase.
  * Consecutive blocks may use different keys.
* **A half-size inverse table in the S-box.** The S-box is
  `affine(inverse(x))` in GF(2^8). The inverse comes from a table that
  holds each number together with its inverse only once. That takes 129
  records instead of 256 entries. The same table serves the inverse S-box.

The output is standard FIPS-197 AES-128. It is checked against the
FIPS-197 examples and against an independent reference model.

A matching decryption pipeline sits next to the encryption pipeline in the
top level, `aes_top`. It is built from the inverse operations and the same
inverse table.

## Encryption pipeline (`aes_enc_pipe`)

```
 pt ──►(⊕ key)──►[REG]──► round 1 ──► round 2 ──► … ──► round 10 ──► ct
 key ────────────►[REG]──►   │ key ────►  │ key ─►  …      │ key ──► key_out
                 input stage

 one round (aes_round, INNER_REGS = 1):

  din ──► SubBytes ► ShiftRows ──►[REG]──► MixColumns ──►[REG]──► ⊕ ──►[REG]──► dout
  keyin ─► key step (rcon) ───────►[REG]───────────────────►[REG]──┴──►[REG]──► keyout
```

* **Input stage.** It registers `pt ^ key` (the initial AddRoundKey)
  together with `key`.
* **Rounds 1 to 10.** Each has three register steps:
  1. SubBytes and ShiftRows. The key step (`aes_key_expand`) runs alongside
     and turns the previous round key into this round's key.
  2. MixColumns.
  3. AddRoundKey.
* **Round 10.** It has no MixColumns. A plain register stage takes its
  place, so all rounds have the same latency.
* **Round constants.** Round `r` gets `rcon(r) = 02^(r-1)`, computed in
  `aes_pkg`.
* **Latency.** A block passes 1 + 10·3 = **31 register stages**. A block
  sampled at one rising edge is on `ct` right after the 31st rising edge,
  counting the sampling edge as the first. That is 30 clock periods later.
* **Throughput.** One block per clock, with no stalls. There is no
  back-pressure, so the receiver must take `out_valid` pulses as they come.
* **`INNER_REGS = 0`.** This keeps only the register at the end of each
  round, so a whole round is one clock cycle. Latency drops to 1 + 10 = 11,
  and the critical path becomes a full round.

Every register is an `aes_round_reg`. It holds a state word, a key word and
a valid bit, and `rst` clears it asynchronously. A reset therefore drops
every block in flight.

## Decryption pipeline (`aes_dec_pipe`)

The decryption side mirrors the encryption side and runs the FIPS-197
inverse cipher.

* **Inputs.** It takes a ciphertext together with the **last** round key
  (round key 10) of its cipher key. That is exactly what the encryption
  pipeline puts out on `key_out` next to each ciphertext.
* **Input stage.** It registers `ct ^ last_key`.
* **Inverse rounds.** Each of the ten inverse rounds (`aes_inv_round`) has
  three register steps:
  1. InvShiftRows and InvSubBytes;
  2. AddRoundKey;
  3. InvMixColumns.

  The last inverse round has no InvMixColumns.
* **Round keys.** They come out in reverse order from the key schedule run
  backwards (`aes_inv_key_expand`).
  * Round key 9 is derived from round key 10 with `rcon(10)`.
  * Each further step works the same way, down to the cipher key.
  * The cipher key appears on `key_out`.
* **Timing.** Latency, rate and reset behaviour equal the encryption side:
  31 stages and one block per clock.

The decryption pipeline needs the last round key, not the cipher key. A
system that keeps only cipher keys has to run the key schedule forward
first, for example by passing one block through the encryption pipeline
and keeping its `key_out`.

## The S-box and its 129-record inverse table

This is the least conventional part of the design.

**Why 129 records.**
* Every non-zero element of GF(2^8) is a power `3^k` of the generator `03`.
  Its inverse is `3^(255-k)`.
* For `k = 1 … 127` the partner exponent `255-k` lies in `128 … 254`. So the
  records `{3^k, 3^(255-k)}` list each inverse pair exactly once.
* The self-inverse elements `00` (mapped to itself by AES convention) and
  `01` add two more records.
* That makes 129 records in all (`aes_pkg::INV_TABLE`).

The package computes the table at elaboration time with a constant
function. No data file is involved.

**Lookup.** `aes_pkg::table_inverse` compares a byte with both fields of
every record. The record that holds the byte supplies the other field.
Exactly one record matches any byte.

**S-box.** `aes_sbox` applies the "seed" function after the lookup. This is
the AES affine transform
`b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`.

**Inverse S-box.** `aes_inv_sbox` first undoes the affine transform with
`rotl(s,1) ^ rotl(s,3) ^ rotl(s,6) ^ 0x05`. It then uses the **same**
table. This works because each record holds both members of a pair.

**Cost.** The lookup is content-addressed, so before synthesis folds them
it costs about 258 comparisons of the input against constants per S-box.
Each direction has 16 × 10 data S-boxes and 4 × 10 key S-boxes. To trade
this for area, change only `aes_pkg::table_inverse`, or `aes_sbox` /
`aes_inv_sbox`. For example, use a 256-entry ROM or a composite-field
inverter. Both modules just take a byte in and give a byte out.

## Interfaces and byte order

`aes_top` holds both pipelines. They are independent and share only `clk`
and `rst`.

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | asynchronous clear of all pipeline registers, active high |
| `enc_in_valid` | in | 1 | `enc_pt`/`enc_key` hold a block this cycle |
| `enc_pt`, `enc_key` | in | 128 | plaintext and its cipher key |
| `enc_out_valid` | out | 1 | `enc_ct` holds a ciphertext this cycle |
| `enc_ct` | out | 128 | ciphertext |
| `enc_key_out` | out | 128 | last round key of the block on `enc_ct` |
| `dec_in_valid` | in | 1 | `dec_ct`/`dec_last_key` hold a block this cycle |
| `dec_ct`, `dec_last_key` | in | 128 | ciphertext and the last round key of its cipher key |
| `dec_out_valid` | out | 1 | `dec_pt` holds a plaintext this cycle |
| `dec_pt` | out | 128 | plaintext |
| `dec_key_out` | out | 128 | the recovered cipher key |

The two pipelines can also be used on their own:

* **`aes_enc_pipe`** has the ports `clk`, `rst`, `in_valid`, `pt`, `key`,
  `out_valid`, `ct` and `key_out`.
* **`aes_dec_pipe`** has the ports `clk`, `rst`, `in_valid`, `ct`,
  `last_key`, `out_valid`, `pt` and `key_out`.

The combinational blocks take `din` and give `dout`.
* `aes_add_round_key` also takes `kin`.
* `aes_key_expand` takes the current round key `din` and `rconin`, and gives
  the next round key on `key_out`.
* `aes_inv_key_expand` takes round key `r` and `rcon(r)`, and gives round key
  `r-1`.

**Byte order.** Byte 0 of a block is in bits `[127:120]` and byte 15 in
`[7:0]`. Byte `i` is state row `i % 4`, column `i / 4`. This is the FIPS-197
order: `pt = 128'h00112233…eeff` with `key = 128'h000102…0f` gives
`ct = 128'h69c4e0d86a7b0430d8cdb78070b4c55a`.

**Vectors printed row by row.** Some published test vectors print the state
row by row. Transpose the 4×4 byte matrix before using them
(`aes_model_pkg::rows_to_cols` in the testbenches). One example is key
`0f470caf15d9b77f71e8ad67c959d698` with plaintext
`0189fe7623abdc5445cdba3267ef9810`, giving ciphertext
`ff0869640b53341484bfab8f4a7c43b9`. Transposed, this is the textbook vector
with key `0f1571c9…`, plaintext `01234567…` and ciphertext `ff0b844a…`.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `aes_top`, `aes_enc_pipe`, `aes_dec_pipe` | `NR` | 10 | number of rounds (AES-128 needs 10; other values do not give AES) |
| the same, and `aes_round`, `aes_inv_round` | `INNER_REGS` | 1 | 1: three register steps per round; 0: one register per round |
| `aes_round`, `aes_inv_round` | `FINAL` | 0 | 1: leave out (Inv)MixColumns (the last round) |
| `aes_pkg` | `INV_RECORDS` | 129 | records of the S-box inverse table |

## Files

| file | content |
|---|---|
| `rtl/aes_pkg.sv` | types, GF(2^8) helpers, `rcon`, the seed function and its inverse, the generated inverse table and its lookup |
| `rtl/aes_sbox.sv`, `aes_sub_bytes.sv` | S-box, SubBytes |
| `rtl/aes_shift_rows.sv`, `aes_mix_columns.sv`, `aes_add_round_key.sv` | the other round transforms |
| `rtl/aes_key_expand.sv` | one key-schedule step (4 S-boxes and XORs) |
| `rtl/aes_round_reg.sv` | state + key + valid register with asynchronous clear |
| `rtl/aes_round.sv`, `aes_enc_pipe.sv` | pipelined round, encryption pipeline |
| `rtl/aes_inv_sbox.sv`, `aes_inv_sub_bytes.sv`, `aes_inv_shift_rows.sv`, `aes_inv_mix_columns.sv` | inverse transforms |
| `rtl/aes_inv_key_expand.sv` | key-schedule step run backwards |
| `rtl/aes_inv_round.sv`, `aes_dec_pipe.sv` | pipelined inverse round, decryption pipeline |
| `rtl/aes_top.sv` | both pipelines side by side |
| `tb/aes_model_pkg.sv` | independent reference model for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_aes_avalanche` and `tb_aes_top_coarse` |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Each also has a watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/aes_pkg.sv tb/aes_model_pkg.sv rtl/aes_*.sv tb/tb_aes_top.sv \
  --top-module tb_aes_top -Mdir obj_top
./obj_top/Vtb_aes_top
```

Swap `tb_aes_top` for any other `tb_*` module to test one block.

**Reference model.** `tb/aes_model_pkg.sv` is written independently of the
RTL:
* field products use shift-and-add;
* inverses are found by exhaustive search;
* the affine map is built bit by bit from its definition;
* the cipher works on rows and columns.

The testbenches for the inverse blocks apply the forward model to the
block's output and require the input back.

**Whole-pipeline tests.** Five testbenches run the complete pipelines;
all but `tb_aes_top_coarse` use the default size.

* **`tb_aes_enc_pipe` and `tb_aes_dec_pipe`** compare every output cycle
  with the input sampled 30 edges earlier. That one comparison covers data,
  key, valid flag and latency. The stimulus includes:
  * FIPS-197 known answers;
  * the row-by-row-printed known answers and the 68-of-128-bit avalanche
    between two of them;
  * back-to-back streams with a new key for every block;
  * streams with idle cycles;
  * an asynchronous reset with a full pipeline, after which no block that
    was in flight may appear.
* **`tb_aes_top`** feeds every encryption output, with its last round key,
  straight into the decryption pipeline. Both pipelines then stream at
  once. Every block must come back as its plaintext and cipher key 61 edges
  after it went in.
* **`tb_aes_top_coarse`** runs the same round-trip test with
  `INNER_REGS = 0`, where each pipeline has 11 stages.
* **`tb_aes_avalanche`** encrypts one plaintext and its 128 single-bit
  variants back-to-back. It reports:
  * the avalanche effect for each flipped bit;
  * the average avalanche, which is 50.07 % for the textbook key and
    plaintext above;
  * the number of ones and of runs in the ciphertext (63 ones, 65 zeros,
    63 runs), which feed the frequency and runs randomness tests.

Each of these testbenches counts the events it is meant to provoke and
fails if one never happened. Every run takes well under a second.

## Departures from a literal reading of the source description

* **Registers per round.** By default each round is split by three
  registers. A coarser form with one register per round, a whole round in
  one clock, is available as `INNER_REGS = 0`.
* **Initial key addition.** AES needs the initial AddRoundKey. It is placed
  in front of the input register; the round-level block diagram does not
  show it.
* **Round keys.** They are computed on the fly and carried with the block.
  They are not read from a partitioned key memory.
* **S-box storage.** The S-box is logic, not an FPGA block RAM. The
  following are this design's own reading:
  * the 129-record organisation;
  * the generator ordering of the records;
  * the compare-both-fields lookup;
  * the "seed function" as the AES affine transform. Only this reading
    reproduces the published ciphertexts.
* **Decryption.** Support for the inverse operations is intended, and the
  S-box table serves both directions. The following are this design's own
  construction:
  * the decryption pipeline;
  * its last-round-key input;
  * the backward key schedule;
  * the choice of two separate pipelines rather than one datapath with a
    mode switch.
* **Added signals.** The valid flag, the active-high asynchronous reset to
  zero and the `key_out` ports are this design's choices.
* **Not reproduced.** The FPGA-specific results (slice counts, clock rates
  of 716 to 758 MHz) are not reproduced here. The RTL guarantees only the
  rate of 128 bits per clock.
