# LUT_n + n:LUT_2: an obfuscation look-up table with a second layer of small LUTs

Logic obfuscation hides what a chip computes by replacing some of its gates
with look-up tables (LUTs). The LUT contents, the key, are loaded only after
fabrication, in a trusted place. An attacker who holds the netlist and a
working chip can run a SAT attack, which models every LUT as a mux tree with
unknown data inputs and solves for them. Large LUTs resist this, but a LUT's
cost grows as 2^n.

The primitive in this RTL keeps the large LUT smaller and puts a 2-input LUT
in front of each of its select inputs:

```
 in[0][1:0] ──► L_0 (LUT_2) ──┐
 in[1][1:0] ──► L_1 (LUT_2) ──┤ sel[n-1:0]
     ...                      ├──────────► LUT_n ──► out
 in[n-1][1:0] ► L_n-1 (LUT_2)─┘
```

    s_j = SMALL_j[ in[j] ]          (j = 0 .. n-1)
    out = LARGE[ {s_n-1, ..., s_0} ]

In the SAT model, the mux tree of the large LUT now also grows through its
select lines. An attacker must recover both layers at once, and a change in
one layer's key can be hidden by the other. A block takes 2n inputs and has a key of
2^n + 4n bits. The number of functions it can be set to is
n · 2^(2^2) · 2^(2^n). That is about 3.8·10^40 for n = 7, and about
1.45·10^81 for two such blocks in one circuit. The main configuration is two
blocks with n = 7, which is 312 key bits.

The key lives in non-volatile MTJ (magnetic tunnel junction) bit cells next to
the LUT. Taking the chip apart layer by layer destroys the MTJs and the key
with them.

## The STT-LUT: bit cells, sensing and a static read path

A LUT of size n (`stt_lut`) is a column of 2^n **MTJ latch** cells
(`mtj_latch_chain`) feeding a static 2^n:1 multiplexer (`lut_mux`). The
multiplexer is ordinary synthesizable logic. It is written as a tree of n
levels of 2:1 muxes: level 0 is controlled by `sel[0]` and pairs entries 2i
and 2i+1. Entry e of the table sits at `cfg[e]`. For example, a 2-input AND
gate is the table 0,0,0,1 (entries 0..3).

Each MTJ latch (`mtj_latch`) holds one key bit and has four parts:

* **scan flip-flop**: clocked by `sclk`. Its output is the cell's `so`, so the
  cells of a LUT form a shift chain.
* **write driver**: while `we` is high, it programs the cell's MTJ pair from
  the flip-flop (one MTJ from D, the other from its complement).
* **differential MTJ pair**: the non-volatile bit. It has no reset and keeps
  its value without power.
* **pre-charge sense amplifier** with output buffers: while `se` is low the
  amplifier is pre-charged and `q`/`qb` read 0. A rising edge of `se` fires
  it, and it then holds the MTJ value on `q`/`qb` for as long as `se` stays
  high.

The MTJs are read once per power-up. After that the path from the LUT inputs
to its output is the static mux alone, so a programmed LUT behaves like
combinational standard cells. Two rules hold: `se` must be low while `we` is
high, and `we` must be low while sensing. An assertion in `mtj_latch` checks
them.

`mtj_latch` is a **behavioural model**. The real cell is a full-custom
standard cell with MTJs stacked between two metal layers, and it is not
synthesizable logic. The model reproduces only its behaviour at the pins.
The write is modelled as level-sensitive on `we`, so the model contains a
latch, which stands for the MTJ pair. Resistances, write currents, sensing
margins and write time are not modelled. To build silicon you would replace
`mtj_latch` with the real cell, which has the same pins (`sclk si we se so q
qb`). Everything above it is synthesizable RTL.

## The configuration key and how it is loaded

This is the part that needs the most care, because bit order is fixed by the
chain wiring.

**Within one LUT_n + n:LUT_2 block** (`novel_lut`), the K = 2^n + 4n key bits
are laid out like this:

| key bits                  | meaning                                        |
|---------------------------|------------------------------------------------|
| `key[2^n-1 : 0]`          | large LUT, entry e at bit e                    |
| `key[2^n+4j+3 : 2^n+4j]`  | small LUT j (on select j), entry a at bit 2^n+4j+a |

The scan chain inside the block runs: `si` → large-LUT cells 0 .. 2^n-1 →
small LUT 0 (cells 0..3) → ... → small LUT n-1 → `so`. Key bit p therefore
sits at chain position p. Bits shift toward higher positions, so **`key[K-1]`
goes in first and `key[0]` last**.

**In the fabric** (`lut_obf_top`), the chain runs `cfg_si` → block 0 →
block 1 → ... Block i owns chain positions i·K .. i·K+K-1. The bits of the
last block go in first.

Programming sequence (every step is driven from outside; there is no on-chip
sequencer):

1. Hold `cfg_we = 0` and `cfg_se = 0`. Present each bit on `cfg_si` and give
   one `cfg_sclk` rising edge per bit, NUM_LUTS·K edges in all (624 at the
   defaults).
2. Raise `cfg_we` and lower it again, with `cfg_se` still low. Every MTJ pair
   in the fabric is written in parallel. Write duration is not modelled.
3. Raise `cfg_se` and keep it high. The keys are sensed and the LUTs compute.
   Do this once after every power-up; the MTJs keep the key while powered off.

After step 3 the scan flip-flops no longer matter. They can be flushed with
random data, so the chain does not go on holding the key.

The chain is a **dedicated configuration chain**, separate from the test scan
chains, and **its scan-out is blocked**: the last block's `so` is not
connected. Lint reports that one chain bit as unused; this is deliberate. A
scan-and-shift attack therefore cannot read the key back.

Shifting one bit too few leaves every block holding its key moved down by one
position. The end-to-end test checks this case explicitly.

## Two ways to hold the key

* **STT form** (`novel_lut`, built from `stt_lut`): every LUT holds its own
  MTJ cells and is loaded over the chain described above.
* **Keyed form** (`novel_lut_keyed`): the key is stored in a separate
  non-volatile key macro (an e-fuse, MTJ or ReRAM block) and arrives as plain
  input wires. The block is then only n 4:1 muxes and one 2^n:1 mux. It uses
  the same key layout as the STT form, so one key vector means the same
  function in both forms. The key macro itself is not part of this RTL.

`lut_obf_top` holds both forms side by side, each with its own ports.

## Top level: `lut_obf_top`

| parameter        | default | meaning                                       |
|------------------|---------|-----------------------------------------------|
| `N`              | 7       | size of the large LUT                         |
| `NUM_LUTS`       | 2       | STT-form blocks on the configuration chain    |
| `NUM_KEYED_LUTS` | 2       | keyed-form blocks                             |
| `K` (local)      | 2^N+4N  | key bits per block (156 for N = 7)            |

| port        | dir | width                      | meaning                               |
|-------------|-----|----------------------------|---------------------------------------|
| `cfg_sclk`  | in  | 1                          | configuration scan clock              |
| `cfg_si`    | in  | 1                          | configuration scan data               |
| `cfg_we`    | in  | 1                          | MTJ write enable                      |
| `cfg_se`    | in  | 1                          | MTJ sense enable                      |
| `lut_in`    | in  | [NUM_LUTS][N][2]           | STT-form block inputs, pair j → small LUT j |
| `lut_out`   | out | [NUM_LUTS]                 | STT-form block outputs                |
| `key_in`    | in  | [NUM_KEYED_LUTS][K]        | keys from the external key macro      |
| `keyed_in`  | in  | [NUM_KEYED_LUTS][N][2]     | keyed-form block inputs               |
| `keyed_out` | out | [NUM_KEYED_LUTS]           | keyed-form block outputs              |

The LUT inputs and outputs connect to the host netlist in place of the gates
the blocks replace. The host netlist is not part of this RTL. Apart from the
configuration scan clock there is no clock, and the read path is
combinational.

Key sizes for other settings of `N`:

| N | key bits per block | note |
|---|---------------|------|
| 4 | 32  | smallest size compared |
| 5 | 52  | |
| 6 | 88  | |
| 7 | 156 | main configuration |
| 8 | 288 | two blocks = 576 bits, as in an AES case study |

## Files

| file | contents |
|------|----------|
| `rtl/lut_obf_pkg.sv` | default sizes, `novel_key_bits(n)` |
| `rtl/mtj_latch.sv` | behavioural model of the MTJ latch cell |
| `rtl/mtj_latch_chain.sv` | column of cells on one scan chain |
| `rtl/lut_mux.sv` | static 2^N:1 mux tree |
| `rtl/stt_lut.sv` | STT-LUT of size N |
| `rtl/novel_lut.sv` | LUT_N + N:LUT_2, STT form |
| `rtl/novel_lut_keyed.sv` | LUT_N + N:LUT_2, keyed form |
| `rtl/lut_obf_top.sv` | the fabric |
| `tb/lut_ref_pkg.sv` | table-look-up reference model |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_lut_configs.sv`, `tb/lut_config_check.sv` | fabric at N = 8, 7, 6, 5, 4 with 2 to 14 blocks |

## Simulating

Every testbench checks itself against `lut_ref_pkg`, a reference that computes
the result by indexing the key directly. It does not reuse the RTL's mux trees
or chain wiring. Each testbench prints `TB_RESULT checks=<n> failures=<n>` and
has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lut_obf_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/lut_obf_pkg.sv tb/lut_ref_pkg.sv \
  tb/tb_lut_obf_top.sv -o sim && obj_dir/sim
```

The testbenches, from the smallest module up:

* **`tb_mtj_latch`**: tests one cell. It covers scan capture, the pre-charge
  outputs, sensing both values, that flushing the flip-flop does not change
  the sensed value, re-sensing after a simulated power cycle, and overwriting.
* **`tb_mtj_latch_chain`**: checks scan-out latency of exactly LEN shifts,
  parallel write and sense, and that a flush leaves the sensed bits unchanged.
* **`tb_lut_mux`**: every select value, on 20 tables.
* **`tb_stt_lut`**: N = 7, exhaustive over inputs, plus the chain latency
  check. It also checks a size-2 LUT loaded with 0,1,1,0, which must act as
  an XOR.
* **`tb_novel_lut`**: N = 7, all 2^14 input values for three random keys,
  plus a key that makes each small LUT an AND and the large LUT a parity.
* **`tb_novel_lut_keyed`**: exhaustive over inputs for one key, then
  random keys.
* **`tb_lut_obf_top`**: end to end at the default size. It covers
  programming, a chain flush, a power cycle, the one-bit-short chain case,
  mapping a majority-of-7 function onto the blocks, wrong keys in both forms
  (the error count must be non-zero), and the keyed form. It counts how often
  each of these happened and fails if one never did.
* **`tb_lut_configs`**: the fabric at six (N, number of blocks) settings, as
  listed in the file table.

All of them finish in seconds. Verilator is a two-state simulator, and every
testbench drives all inputs from time 0.

## What is this design's own choice

The following come from the primitive's definition: the structure (an STT-LUT
of 2^n MTJ latches and a static 2^n:1 mux, with 2-input LUTs on the selects),
the cell's parts and its SE/WE rules, the dedicated chain with its blocked
scan-out, the two ways of holding the key, the 2^n + 4n key length, and the
defaults (N = 7, two blocks).

These were chosen here:

* which select bit is least significant in the mux tree;
* which small LUT drives which select;
* the order of LUTs on the chain (large LUT first);
* `q`/`qb` reading 0 while pre-charged;
* placing both forms of the block in one top;
* the number of keyed-form blocks (2).

Not included:

* the benchmark circuits the blocks are inserted into;
* the external non-volatile key macro;
* any analogue behaviour of the MTJ cell;
* the software flow that picks which gates to replace.

Power and area figures, which drove the choice of n = 7, come from the cell
library and are not reproduced by this RTL.
