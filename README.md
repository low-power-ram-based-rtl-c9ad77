# Hierarchical RAM-based ternary CAM for FPGAs

A ternary content-addressable memory (TCAM) compares a search key with every
stored rule at once. Each rule bit is 0, 1 or "don't care". The TCAM returns the
address of the highest-priority rule that matches. Packet classifiers and
routers use TCAMs to pick the forwarding or drop action for a packet header.
FPGAs have no native CAM cells, so this design builds the TCAM from ordinary
RAM blocks.

To save power it adds a **hierarchical search**. The rules are split into
units, ordered by priority. A unit is searched only if no higher-priority unit
has matched the key. Once a key has matched, the RAMs of all later units stay
idle for it. The result is the same as searching everything at once.

Default configuration: 180-bit keys and 7 units of 72 rules each (504 rules).
Each unit uses 20 block RAMs of 512 x 72, so the design needs 140 block RAMs.
A second configuration uses LUT (distributed) RAM instead; see below.

## How a RAM emulates a TCAM

Cut the W-bit key into sub-keys of w bits. Sub-key j (key bits
`[j*w +: w]`) is the address of its own RAM, RAM j, which has 2^w words. Each
word has one bit per rule in the unit. **Bit n of word a in RAM j is 1 exactly
when rule n accepts the value a in slice j of the key.** The don't-care bits of
the rule are already taken into account: a rule with k don't-care bits in a
slice sets its bit in 2^k words of that RAM.

A search reads one word from every sub-key RAM in parallel. The AND of these
words is the match vector, with bit n set when rule n matches the whole key. A
priority encoder then picks the lowest-numbered matching rule.

Memory cost per unit: (W/w) RAMs of 2^w x N bits, where N is the number of
rules in the unit. Choosing w makes each RAM exactly one FPGA primitive:

| organisation | primitive | w | RAMs per unit | rules per unit | units | rules |
|---|---|---|---|---|---|---|
| block RAM (default) | 512 x 72 simple dual-port | 9 | 180/9 = 20 | 72 | 7 | 504 |
| LUT RAM | 32 x 6 dual-port, 12 side by side | 5 | 180/5 = 36 | 72 | 9 | 648 |

The unit and stage counts are what fit a mid-size Virtex-6 device:
140 of 156 block RAMs, or 9 x 36 x 12 x 4 = 15,552 of 16,720 LUTs usable as RAM.

An empty rule slot is a column that is zero in some RAM. A slot that is zero
everywhere never matches.

## The hierarchical search pipeline

```
 in_key ─► reg ─► unit 0 ──► unit 1 ──► ... ──► unit S-1 ─► reg ─► out_*
                  (2 cyc)    (2 cyc)             (2 cyc)
 found:            0   ───►  found0 ──► found0|found1 ...
 RAM read enable:  valid & !found  (for each unit)
```

- Each key travels down the chain with a `found` flag, the address of the
  winning rule and a count of the units that were read.
- Unit s reads its RAMs only if `valid && !found`. With the enable low, the
  block-RAM port and the LUT-RAM output register do not clock, so the unit uses
  no read power for that key. A disabled unit never reports a hit: its match
  vector is masked with the registered enable.
- The first unit that matches sets `found` and the address. The address is
  `unit * 72 + entry`. Later units leave both unchanged. This does the job of
  a final priority encoder across the units.
- Each unit takes two cycles. In the first, the RAMs are read. In the second,
  the AND and the priority encoder run and the result is registered. The next
  unit therefore knows, from a register, whether to enable its RAMs. The test
  that decides whether to search only adds an AND and an OR gate in front of
  the RAM enable.
- One key can be accepted every cycle. The latency from the input register to
  `out_valid` is `2*STAGES + 1` cycles: 15 for the default, 19 for the LUT-RAM
  setting.

`out_reads` gives the number of units read for the key: (index of the matching
unit) + 1, or `STAGES` on a miss. This is the activity the power saving comes
from. In the end-to-end tests, keys of which about a third miss and most of the
rest hit early units read about 6.4 of 7 units on average. The saving therefore
depends on how often keys match, and how early.

## Programming the RAMs

The top has a raw word-write port: `wr_unit`, `wr_sub` (the sub-key RAM),
`wr_addr` (the word) and `wr_data` (72 bits, one per rule of the unit). Turning
rules into RAM words is left to the host. To compute word `a` of RAM `j` in
unit `u`, set bit `n` when

    for every key bit b in [j*w, j*w+w):  care[u*72+n][b] == 0  or  val[u*72+n][b] == a[b - j*w]

To write a single new rule, set its column in all 2^w words of all W/w RAMs of
its unit, keeping the other columns as they were. With a full-word write port,
the host needs a copy of the unit's words, or it rewrites the whole unit:
20 x 512 = 10,240 writes for a block-RAM unit, 36 x 32 = 1,152 for a LUT-RAM
unit. The testbenches do the latter. A search that meets a write to a word it
reads sees either the old or the new word. There is no hardware update engine.

## Files

| file | what it is |
|---|---|
| `rtl/tcam_pkg.sv` | sizes of the two organisations, `num_sub()` |
| `rtl/bram_sdp.sv` | 512 x 72 simple dual-port RAM; synchronous read with read enable; read-first |
| `rtl/lutram_dp.sv` | 32 x 6 LUT RAM; synchronous write, asynchronous read |
| `rtl/prio_enc.sv` | lowest-set-bit priority encoder with hit flag |
| `rtl/tcam_unit.sv` | one unit: sub-key RAMs, AND, priority encoder, enable gating |
| `rtl/hier_tcam.sv` | top: chain of units with the found/disable logic |
| `tb/tb_*.sv` | self-checking testbench per module; `tb_hier_tcam_lut.sv` runs the top in the LUT-RAM organisation |

Top parameters: `KEY_W` (180), `SUB_W` (9), `ENTRIES` (72), `PRIM_W` (72),
`STAGES` (7) and `USE_BRAM` (1). For the LUT-RAM organisation, set
`USE_BRAM=0, SUB_W=5, PRIM_W=6, STAGES=9`. `ENTRIES` must be a multiple of
`PRIM_W`. A `KEY_W` that is not a multiple of `SUB_W` is padded with zeros at
the top, and the host must program the padding as "accept 0".

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Example for the
full-size top:

```
verilator --binary --timing --assert -Irtl \
  rtl/tcam_pkg.sv rtl/bram_sdp.sv rtl/lutram_dp.sv rtl/prio_enc.sv \
  rtl/tcam_unit.sv rtl/hier_tcam.sv tb/tb_hier_tcam.sv \
  --top-module tb_hier_tcam -o sim
./obj_dir/sim
```

For other testbenches, replace the testbench file and `--top-module`. The
primitive testbenches need only their own module.

`tb_hier_tcam` runs the design at its defaults in about a second:
- it programs all 140 RAMs from 504 random and deliberately overlapping rules;
- it streams 3,000 keys, some aimed at rules, some one bit away from a rule,
  some random;
- between the two halves of the stream, it replaces the rules of unit 0.

It checks every result, `out_reads` and the exact latency against a reference
model that compares keys with the rules directly. It also counts each mechanism
and fails if any never occurs:
- lower units switched off;
- a miss that searches every unit;
- a hit in the last unit;
- a key that matches in several units;
- a key that matches several rules of one unit;
- keys on back-to-back cycles;
- a rule update.

`tb_hier_tcam_lut` runs the same test on the 9-unit LUT-RAM organisation.
`tb_hier_tcam_small` reduces the design to 8-bit keys, 4-bit sub-keys and
two units of four rules. It loads a fixed table of eight ternary rules and
checks all 256 keys exhaustively.

## Where this design makes its own choices

- **Priority order.** Unit 0 and entry 0 have the highest priority.
- **Search rule.** A match in a higher unit switches off the lower ones.
  Skipping units after a *miss* would lose matches, so the design does not.
- **Pipeline depth.** There are exactly two register stages per unit, plus an
  input register and an output register. Adding more stages inside a unit
  would raise clock speed but would delay the `found` flag; the enable of the
  next unit would then have to wait for it.
- **Power switching.** Units are switched off with clock enables: the RAM port
  enable and the enable on the LUT-RAM output register. There is no gated
  clock.
- **Update interface.** There is no update interface beyond raw word writes.
- **Other choices.** Reset clears only the control flops. RAM contents start at
  zero, as FPGA RAM does after configuration. There is no back-pressure.
- **Not modelled.** Power and maximum frequency depend on the FPGA device and
  are not modelled. The design reproduces the behaviour and the RAM activity,
  not the watts.
