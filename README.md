# Bit-serial IDEA encryption core

This is SystemVerilog RTL for the block cipher IDEA (International Data
Encryption Algorithm). The datapath is bit-serial: each 16-bit sub-block
travels over a single wire, least significant bit first, one bit per clock
cycle. Every operator therefore needs only a few gates and flip-flops. All
operations of the cipher are unrolled into one deep pipeline that accepts a
new 64-bit block every 16 cycles. The result leaves 923 cycles later. Up to 16
such cores can share one control register with shifted phases, so that
together they accept a block in every cycle.

The architecture follows a published FPGA design of IDEA, which ran at
125 MHz on a Xilinx Virtex XCV300 (500 Mb/s). That design also had a host
interface on a PCMCIA/CardBus accelerator card. This RTL rebuilds it in
generic, vendor-independent SystemVerilog. Where the original gives only a
block's name or function, the RTL supplies its own details. The section
"Where this design departs from the original" lists those choices.

## IDEA in brief

IDEA encrypts a 64-bit block, seen as four 16-bit sub-blocks X1..X4. It uses
52 16-bit subkeys, derived from a 128-bit key. There are eight identical
rounds, then an output transformation. Three operations are mixed:

- XOR;
- addition modulo 2^16;
- multiplication modulo the prime 2^16+1, in which the sub-block value 0
  stands for 2^16.

One round computes:

```
A = X1*Z1   B = X2+Z2   C = X3+Z3   D = X4*Z4
T0 = (A^C)*Z5
T2 = ((B^D)+T0)*Z6
T1 = T0+T2
out = (A^T2, C^T2, B^T1, D^T1)      -- middle two sub-blocks swapped
```

The output transformation is `Y1 = X1*Z1, Y2 = X3+Z2, Y3 = X2+Z3, Y4 = X4*Z4`.
It takes X2 and X3 crossed, which undoes the last round's swap. Decryption is
the same computation with a different set of 52 subkeys: multiplicative
inverses, additive negations, and a reversed round order. The host prepares
all subkeys; the hardware only stores them.

## Bit-serial conventions

These rules hold throughout the RTL:

- **Words.** A word is 16 bits, sent LSB first, and a new word follows every
  16 cycles without a gap.
- **Control strobe.** Each operator that must know where a word starts
  (adders, multipliers, key registers, converters) gets a strobe `ctl`. The
  strobe is high during the cycle *before* the operand's LSB arrives, which
  is also the MSB cycle of the previous word.
- **Latency.** XOR and addition take 1 cycle. Multiplication modulo 2^16+1
  takes 35 cycles. Operands of one operator must arrive in the same cycle, so
  stage latches (`bs_delay`) delay the faster paths.
- **Global phase.** There are no per-module controllers. A single 16-bit
  one-hot ring (`onehot_ring`) has bit k high in cycles ≡ k (mod 16). An
  operator whose operand LSB arrives `L` cycles after the round input takes
  its strobe from tap `(PHASE + L − 1) mod 16` (function
  `idea_pkg::ctl_tap`). A round's output leaves 109 cycles after its input,
  and 109 mod 16 = 13. So each round gets its own `PHASE` parameter: round r
  uses `109·(r−1) mod 16`.

## Multiplication modulo 2^16+1 (`mulmod`, `dual_lyon_mult`)

This is the largest operator and the hardest to follow. It multiplies the
serial operand `a` by a fixed subkey `k`. With `x = a−1` and `y = k−1`:

```
t      = x*y + x + y + 1           (= a*k, 32 bits)
result = lo(t) − hi(t) + (lo(t) <= hi(t))    mod 2^16
```

This formula is exact for every input, including 0 meaning 2^16 and the case
2^16·2^16.

**Subkeys are loaded already decremented.** The host loads `y = k−1`, so only
the operand needs a subtraction in hardware.

**Why two multipliers.** A serial-parallel (Lyon) multiplier takes 16 operand
bits and needs 16 more cycles, with zeros at its input, to shift out the upper
half of the 32-bit product. That gives one product per 32 cycles. To keep up
with one word per 16 cycles, `dual_lyon_mult` has two rows of cells, P and Q,
that share the 16 `b` registers. A toggle flip-flop flips on every strobe and
steers alternate words to P and Q. The row that is not selected receives
zeros, which supplies the padding it needs to drain.

In each row, cell j adds three things: `a_i·b_j`, the sum bit of cell j+1, and
its own carry. Sums move one cell to the right per cycle; carries stay where
they are. Product bit k of a word whose LSB enters in cycle c leaves the row
in cycle c+1+k. After 32 bits the row holds zero again, so no clearing is
needed between words.

**Schedule** (cycle 0 is the operand LSB):

| cycle | what happens |
|---|---|
| 0→1 | serial decrement: `x = a − 1` (borrow preset by the strobe) |
| 1 | `x` meets `y`, which comes from the cyclic subkey register |
| 2 | product bits `x*y` leave the selected row (32 bits long) |
| 3 | `t = x*y + x + y + 1`: a 3-input serial adder per row, with the carry preset to 1 |
| 3–18 | a switch routes the lower half of the newest `t` to the *lo* line and the upper half of the previous `t` to the *hi* line; *lo* is delayed 16 cycles |
| 19–34 | `lo − hi` (serial subtractor) and `lo <= hi` (serial compare, LSB first) run on the aligned words |
| 34 | the compare result is complete; it becomes the carry-in of the final serial adder, whose other input is `lo − hi`, delayed 15 cycles in all |
| 35 | result LSB on `m` |

Internal strobes are copies of `ctl` delayed by 1, 2, 19 and 35 cycles.

## Round and core timing

`idea_round` implements this schedule. The numbers are cycles after the
round's input LSB.

| cycle | operation | waiting paths |
|---|---|---|
| 0 | A = X1·Z1, D = X4·Z4 (35); B = X2+Z2, C = X3+Z3 (1) | B, C: 34 stages |
| 35 | E = A^C, F = B^D | |
| 36 | T0 = E·Z5 | F: 35 stages |
| 71 | U = T0 + F | |
| 72 | T2 = U·Z6 | T0: 36 stages |
| 107 | T1 = T0 + T2 | T2: 1 stage |
| 108 | Y = (A^T2, C^T2, B^T1, D^T1) | A, B, C, D: 73 stages |
| 109 | round output | |

`idea_core` chains these stages:

- four `p2s` converters;
- eight rounds;
- `idea_out_transform`, with latency 35 (its two adders are followed by 34
  stage latches);
- four `s2p` converters, with latency 16.

The core takes `pt` in each cycle where `oh[0]` is high (`pt_ack`). `p2s`
places the LSB on the wire in that same cycle. The result is on `ct` in cycle
`ack + 8·109 + 35 + 16 = ack + 923`, marked by `ct_new`, and it stays there
for 16 cycles. The core processes a block in every slot, whether or not that
block means anything. Tracking which results are valid is the job of the
surrounding logic.

## Subkeys and the key chain

Each operator with a subkey owns a 16-bit register (`key_store`, plus the
multiplier's `b` registers). All 52 of these registers form one 832-bit shift
chain. The chain order is round 1 Z1→Z6, then round 2, …, round 8, then the
output transformation Z1→Z4.

While `key_load` is high, one bit enters `key_si` per cycle. The host must
send the subkeys in this order:

1. Start with the **last** subkey (output transformation Z4) and end with
   round 1 Z1.
2. Send each subkey LSB first.
3. For every subkey used by a multiplier, send the value minus 1, modulo
   2^16. These are Z1, Z4, Z5 and Z6 of each round, and Z1 and Z4 of the
   output transformation.

`tb/idea_ref_pkg.sv` shows this exactly: see the functions `chain_bit`,
`enc_keys` and `dec_keys`.

After loading, the values in the key registers must line up with the operand
bits. The host may start loading at any cycle. Each key register keeps still
after `key_load` falls, until its operator's first strobe. From then on it
rotates every cycle, so the subkey's LSB meets the operand's LSB every 16
cycles.

Blocks that are in flight while keys are loaded come out corrupted. To switch
between encryption and decryption, reload the chain with the other subkey set.

## Scaling: `idea_array`

`idea_array` instantiates `NCORES` cores (1 to 16) and one shared one-hot ring.
Core i sees the ring rotated by i, so its load slot is phase i.

- **Input.** The input block is broadcast to all cores. In each cycle, the
  core whose slot it is takes the block.
- **Output.** The results come back in the same round-robin order, i cycles
  after core 0's. They are merged onto one bus with AND-OR logic: only the
  core whose `ct_new` is high contributes.
- **Latency.** Every block keeps the 923-cycle latency.

With 16 cores, a block enters and a block leaves in every cycle.

## Host side: `idea_wildcard_top`

The top level models the accelerator card built around the core. It contains
three parts.

- **`host_if_ctrl`.** The host writes a block as two 32-bit words, `{X1,X2}`
  then `{X3,X4}`. The second word raises `data_valid`. The array takes the
  block in its next load slot, and `pt_ready` rises again. The AND of "taken"
  and `data_valid` enters a 923-stage shift register, whose output is the
  buffer's write enable. A valid result is therefore written exactly when it
  leaves the cores. An assertion checks this against the cores' own `ct_new`.
  A write while a block is waiting is dropped and sets the sticky `overrun`
  flag.
- **`ct_buffer`.** Two 32-bit wide RAMs of `BUF_BLOCKS` entries (default
  1024, the size of eight 256×32 block RAMs). Results fill consecutive
  entries. Word address `2k` reads `{Y1,Y2}` of block k and `2k+1` reads
  `{Y3,Y4}`; read data arrives one cycle later. `buf_clear` restarts the
  buffer at entry 0. `ct_count` and `buf_full` report how full it is.
- **`idea_array`.** The cores, as described above.

Top-level ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset, active high |
| `key_load`, `key_si` | in | 1 | subkey chain shift enable and data |
| `key_so` | out | 1 | end of the key chain |
| `wr_en`, `wr_data` | in | 1, 32 | plaintext word write |
| `pt_ready` | out | 1 | a write would be accepted now |
| `overrun` | out | 1 | a write was refused (sticky until reset) |
| `buf_clear` | in | 1 | empty the result buffer |
| `rd_addr` | in | log2(BUF_BLOCKS)+1 | result word address |
| `rd_data` | out | 32 | result word, one cycle after `rd_addr` |
| `ct_count`, `buf_full` | out | | blocks stored; buffer full |

Parameters: `NCORES` (default 1) and `BUF_BLOCKS` (default 1024).

**Typical use:**

1. Reset.
2. Shift in the 832 key bits.
3. Clear the buffer.
4. Write blocks whenever `pt_ready` is high.
5. Wait until `ct_count` reaches the number of blocks written.
6. Read the results.

With one core, the interface sustains one block per 16 cycles. The full-size
test sends 1024 blocks, enough to fill the buffer. The first result is stored
926 cycles after the first bus write, and the rest follow every 16 cycles.

## Where this design departs from the original

- **One clock.** The original card clocked the bus side at 33 MHz and the core
  at 125 MHz. Here everything runs on one clock. The bus interface itself is
  not included: the top exposes a plain word bus instead.
- **Host pacing.** The original host paced itself by inserting idle bus
  words. Here the host waits for `pt_ready`, and a refused write is flagged.
  The word order on the bus is this design's choice.
- **Output merge.** The scaled array's output merge uses AND-OR logic instead
  of tri-state buffers.
- **Multiplier adders.** The original multiplier adds `x + y` in a separate
  16-bit serial adder and gates the sum into the two rows. Here each row has
  a 3-input adder (`x·y + x + y + 1`), so the carry out of `x + y` cannot be
  lost.
- **Multiplier delays.** The split of the multiplier's internal delays is this
  design's, chosen to give the original total of 35 cycles. The 15-cycle
  difference delay is the subtractor register plus 14 stages, and the compare
  result is taken directly from the last compared bit.
- **Unspecified details.** These are this design's choices: the insides of
  the output transformation and of the parallel/serial converters, the
  key-chain order and the key-register phase rule. For the converters and the
  output transformation, the original gives only their names and latencies.
- **Generic primitives.** Stage latches and key registers are generic
  flip-flop chains rather than FPGA shift-register primitives. Register
  counts therefore do not match the original's slice figures.
- **Multi-core top.** With `NCORES > 1`, the single plaintext register and
  32-bit bus of the top cannot feed all the core slots. The array is tested on
  its own at 16 cores.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module against values computed independently, and prints
`TB_RESULT checks=N failures=M` at the end.

**Reference model.** `tb/idea_ref_pkg.sv` holds the reference: a word-level
IDEA, the key schedule, the decryption subkeys and the key-chain bit stream.
`tb/idea_host_pkg.sv` holds helpers for acting as the host. The model
reproduces the standard IDEA example: key `0001 0002 … 0008`, plaintext
`0000 0001 0002 0003` gives ciphertext `11FB ED2B 0198 6DE5`. `idea_core_tb`
checks this.

What the main tests cover:

- `mulmod_tb`: operands including 0 (meaning 2^16), 1 and 0xFFFF, and several
  subkeys including 0, checked against `a·k mod 65537` with the exact
  35-cycle latency.
- `idea_round_tb` and `idea_out_transform_tb`: one stage against the
  word-level model, with 109- and 35-cycle latency.
- `idea_core_tb`: the example vector and random blocks, a latency of exactly
  923 cycles, and decryption back to the plaintext.
- `idea_array_tb`: 16 cores, a block accepted in every cycle, every result
  checked, and all cores used.
- `idea_wildcard_top_tb`: two cores and a 16-block buffer. It covers
  encryption, overrun, buffer full, buffer clear, idle slots, both cores'
  slots, key reload and decryption. It also checks that each of these
  actually happened.
- `idea_wildcard_top_full_tb`: default parameters. A 1024-block encryption
  burst that fills the buffer, then its decryption, with the rate and latency
  checked.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/idea_pkg.sv tb/idea_ref_pkg.sv tb/idea_host_pkg.sv \
    tb/idea_core_tb.sv --top-module idea_core_tb -Mdir obj_core
./obj_core/Videa_core_tb
```

Replace `idea_core_tb` with any other testbench name. Each testbench finishes
in well under a second.

## Files

| file | content |
|---|---|
| `rtl/idea_pkg.sv` | widths, latencies, block/word types, `ctl_tap` |
| `rtl/bs_xor.sv`, `rtl/bs_add.sv` | bit-serial XOR and modulo-2^16 adder |
| `rtl/bs_delay.sv` | stage latch (N-cycle shift register) |
| `rtl/key_store.sv` | cyclic subkey register / key-chain link |
| `rtl/dual_lyon_mult.sv` | two-row serial-parallel multiplier with shared b |
| `rtl/mulmod.sv` | multiplication modulo 2^16+1, latency 35 |
| `rtl/idea_round.sv`, `rtl/idea_out_transform.sv` | round (109) and output transformation (35) |
| `rtl/p2s.sv`, `rtl/s2p.sv` | 16-bit parallel/serial converters |
| `rtl/onehot_ring.sv` | global 16-phase one-hot control |
| `rtl/idea_core.sv` | complete core, latency 923 |
| `rtl/idea_array.sv` | 1–16 cores with shifted phases |
| `rtl/host_if_ctrl.sv`, `rtl/ct_buffer.sv` | host plaintext registers, valid pipeline, result RAMs |
| `rtl/idea_wildcard_top.sv` | top level |
