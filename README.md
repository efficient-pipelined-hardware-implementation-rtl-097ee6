# Pipelined RIPEMD-160 hashing core

RIPEMD-160 compresses each 512-bit message block with two independent
"lines" of computation. Each line does five rounds of sixteen steps. This core
gives every round of every line its own hardware and its own 160-bit register,
so the ten round units form a five-stage pipeline. A block spends 16 cycles in
each stage. Up to five blocks, which may belong to five different messages, are
hashed at once. A new block can enter every 16 cycles and leaves 80 cycles
later, so the core delivers 512 bits of hashed input every 16 clock cycles. At
74.6 MHz that is 512 × 74.6 MHz / 16 ≈ 2.39 Gbit/s.

The core takes padded blocks and chaining values and produces digests. Message
padding is done outside it. A built-in self-test unit can play the standard
RIPEMD-160 test messages through the core at full rate and check the results.

## The computation per block

The block holds the message words X0..X15: word i is `block_in[32i+31:32i]`,
a little-endian 32-bit word as RIPEMD-160 defines it. Both lines start from
the chaining value h0..h4, loaded as a=h0, b=h1, c=h2, d=h3, e=h4. Each step
does:

```
b' = e + ROL_s( f(b, c, d) + a + X[r] + K )
a' = e      c' = b      d' = ROL_10(c)      e' = d
```

Each round has its own boolean function f (f1..f5) and constant K. The left
line uses f1..f5 in that order and the right line uses them in reverse. Each
step has its own word index r and rotation amount s. The two lines differ in
all of these; `rtl/ripemd_pkg.sv` holds the tables.

After 80 steps the addition level combines h with the left results (A..E) and
the right results (A'..E'):

```
h0' = h1 + C + D'   h1' = h2 + D + E'   h2' = h3 + E + A'
h3' = h4 + A + B'   h4' = h0 + B + C'
```

The operation block (`ripemd_op`) adds in this order: K + X first, then + a,
then + f, then the rotation and the final + e. K + X does not depend on the
state, so the path from the register through the block holds f, three adders
and a rotation.

## Pipeline organisation

```
 h_in ─►MuxA─►Round1─►MuxA─►Round2─►MuxA─►Round3─►MuxA─►Round4─►MuxA─►Round5─┐  left line
          ▲     │       ▲     │ ...                                         │
          └─────┘       └─────┘  (own register fed back on steps 1..15)     ├─► addition ─► digest
 h_in ─►MuxA─►Round1─►  ...                                    ─►Round5─────┘   level      right line
             MuxB        MuxB          MuxB          MuxB          MuxB
              ▲           ▲             ▲             ▲             ▲
 block_in ────┴─► perm ─► REG ─► perm ─► REG ─► perm ─► REG ─► perm ─► REG     (per line)
 Count_16 #1    #2            #3            #4            #5       (shared by both lines)
```

- **Round unit** (`ripemd_round`): the operation block with its round's f and
  K, a table of the round's 16 rotation amounts, and the 160-bit register. On
  every cycle its round holds a block, the register takes one step. The same
  register carries the state between the round's own steps and hands the
  result to the next round.
- **Mux_A** (`ripemd_mux_a`): at a round's first step it takes the state
  handed over: h_in for round 1, the previous round's register otherwise. On
  the other 15 steps it feeds back the round's own register.
- **Mux_B** (`ripemd_mux_b`): picks the message word of the current step.
- **Count_16** (`ripemd_count16`): one per round position, shared by both
  lines. It is active only while its round holds a block and counts steps
  0..15. At step 15 it starts the next counter, loads the X registers behind
  its round, and stops, unless a new block enters at that moment, in which
  case it wraps to 0.
- **X permutation unit + REG** (`ripemd_xreg`): see below.
- **Addition level** (`ripemd_addlevel`): the final combination, combinational.

## Message words: the hardest part

Every one of the 160 steps of a block reads one message word, in a different
order for each round and line. Storing all 160 words per block, for five
blocks, would be costly. Instead, each line keeps only the 16 words of the
round the block is in, already arranged so that step i reads position i:

- Round 1 reads `block_in` directly. That is why `block_in` must stay stable
  for the 16 cycles of round 1. The left line's round-1 order is the natural
  order. The right line's round-1 order (word 9i+5 mod 16 at step i) is wired
  into its Mux_B.
- While a block is in round j, the permutation unit behind that round rearranges
  the block's words from round j's order into round j+1's order. This is fixed
  wiring: `ripemd_pkg::perm_src` works out which input position feeds each
  output. Its register stores the result on the last step of round j, which is
  when the block moves into round j+1. Mux_B of round j+1 then selects word
  number `count`.

Each line therefore has 4 X registers of 16 words, plus `block_in` itself. Each
register holds the words of exactly one block in flight.

## Interface and timing

`ripemd_core` (and `ripemd_top` with `bist_mode` low):

| signal | dir | width | meaning |
|---|---|---|---|
| `start_counter1` | in | 1 | one cycle before a block enters |
| `start_round1` | in | 1 | block enters this cycle; `block_in` and `h_in` valid |
| `block_in` | in | 16×32 | padded block, word i at bits 32i+31..32i |
| `h_in` | in | 5×32 | chaining value of this block, `h_in[i]` = h_i |
| `hash_ready` | out | 1 | `digest` valid this cycle (one-cycle pulse) |
| `digest` | out | 5×32 | `digest[i]` = h_i after this block |

```
cycle          T-1   T     T+1 … T+15   T+16 …         T+80
start_counter1  1    0                  (1 at T+15 for back-to-back)
start_round1    0    1     0
block_in             ===== stable =====
h_in                 valid (read only in cycle T)
hash_ready                                              1
```

- The earliest next block enters at T+16, with start_counter1 at T+15.
  Assertions in `ripemd_core` flag a start_round1 that does not meet counter 1
  at step 0, and a start_counter1 while round 1 is still busy.
- `h_in` is read only at entry. Each block's chaining value travels with it in
  one register per round position, and the addition level uses that copy.
- The digest is combinational from the round-5 registers. It is valid only in
  the cycle `hash_ready` is high, because round 5 starts on the next block in
  the following cycle.
- Reset is asynchronous and active low (`rst_n`). It clears the counters, so
  an idle core issues no `hash_ready`.

### Hashing long messages

Pad the message (append 0x80, zeros up to 56 mod 64 bytes, and the 64-bit bit
length little-endian). Feed block 1 with `h_in` set to the initial value
`67452301 EFCDAB89 98BADCFE 10325476 C3D2E1F0`. Feed each later block with the
previous block's digest as `h_in`. A block's digest is out 80 cycles after it
entered, which is exactly five 16-cycle slots. So five independent messages,
interleaved one slot apart, keep every stage busy: the digest of one block is
on `digest` in the same cycle that the next block of that message may enter.

## Built-in self test

`ripemd_bist` plays five padded one-block messages into the core, one every
16 cycles: "", "a", "abc", "message digest" and "a"…"z". It compares the five
digests, in order, with their published values. `done` rises 146 cycles after
`start` is sampled, with `pass` telling whether all five matched. In
`ripemd_top`, `bist_mode` switches the core's inputs from the external ports
to the BIST. The digest and `hash_ready` stay visible on the ports in both
modes.

## What follows the published architecture and what is this design's own

These follow the published architecture:

- one pipeline stage per round and line, with ten 160-bit registers;
- five shared Count_16 controllers;
- Mux_A/Mux_B per round;
- X permutation units with registers, holding 16 words per line and block;
- round 1 reading an unregistered `block_in` that is held stable;
- the start_counter1/start_round1 protocol;
- 80-cycle latency and a 16-cycle block interval;
- the addition level;
- a BIST unit that supplies predefined inputs and checks the outputs.

These are this design's own choices:

- **Carried chaining value.** The published block diagram feeds h0..h4 straight
  into the addition level. That only works if h stays constant while blocks
  are in flight. Here each block's h is stored at entry and passed along
  (6 × 160 flip-flops), so the five blocks in flight may have different
  chaining values.
- The f functions, K constants, word orders and rotation amounts are those of
  the RIPEMD-160 specification.
- Word order of `block_in`, the reset style, `hash_ready` as a registered
  one-cycle pulse, and the two assertions.
- The BIST's test vectors and sequencing, and the 2:1 input select in
  `ripemd_top`.
- Padding is not included.

## Verification

Each module has a self-checking testbench in `tb/`. The testbenches compare
against `tb/ripemd_ref_pkg.sv`, a reference model written independently of the
RTL tables: its word orders come from the permutations ρ and π of the
specification, and its rotation amounts from the per-word shift table. The
core testbench checks the model against the published digests.

| testbench | checks |
|---|---|
| `tb_ripemd_op` | all five f, random states/words/rotations vs. the model's step |
| `tb_ripemd_round` | complete rounds (left 1, left 3, right 2, right 5); hold when disabled |
| `tb_ripemd_mux_a`, `tb_ripemd_mux_b` | selection, including the right line's round-1 order |
| `tb_ripemd_xreg` | all eight permutation units, load and hold |
| `tb_ripemd_count16` | 16 active cycles, wrap on back-to-back starts, random starts vs. a model |
| `tb_ripemd_addlevel` | final combination vs. the model |
| `tb_ripemd_bist` | BIST with a real core: pass, exact run length, detection of one flipped digest bit |
| `tb_ripemd_core` | six published test messages (one two-block), 40 random messages of 0–250 bytes in five interleaved chained streams, 80-cycle latency, five blocks in flight, 16-cycle output spacing, idle slots |
| `tb_ripemd_top` | BIST, then 60 messages of external traffic, then BIST again. Counts and requires each mechanism: BIST pass, mode switch, five in flight, back-to-back entry, idle slots, chained blocks |

The testbenches drive random noise onto `block_in` and `h_in` whenever the
core may no longer rely on them.

Example run with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ripemd_pkg.sv tb/ripemd_ref_pkg.sv \
    tb/tb_ripemd_top.sv --top-module tb_ripemd_top -Mdir obj_top
./obj_top/Vtb_ripemd_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`. Other
testbenches build the same way with their own file and top module. The
end-to-end test of the top level runs at full size and takes a fraction of a
second.

Not verified here: the clock frequency and area figures of FPGA
implementations; these depend on the target and tools.

## Files

- `rtl/ripemd_pkg.sv`: types, RIPEMD-160 tables, helper functions
- `rtl/ripemd_op.sv`, `rtl/ripemd_round.sv`, `rtl/ripemd_mux_a.sv`,
  `rtl/ripemd_mux_b.sv`, `rtl/ripemd_count16.sv`, `rtl/ripemd_xreg.sv`,
  `rtl/ripemd_addlevel.sv`: pipeline parts
- `rtl/ripemd_core.sv`: the pipelined core
- `rtl/ripemd_bist.sv`: self test
- `rtl/ripemd_top.sv`: core plus self test
- `tb/ripemd_ref_pkg.sv`: reference model; `tb/tb_*.sv`: testbenches
