# Packet-processing ALU: Hosm-Format prefix unit and bit-field parse unit

Software IP lookup on a RISC processor spends most of its time on
bookkeeping, not memory: for every element of a search-tree node it has to
decide whether the destination address falls below the stored prefix and
whether the prefix matches the address. Done with ordinary instructions,
each of those tests takes a dozen instructions. This design adds two small
functional units beside a 32-bit ALU so that each test becomes one
instruction:

* a **Prefix unit** that works on prefixes stored in *Hosm-Format*
  (create, decode value, decode length, match against an address), and
* a **Parse unit** that extracts bit fields and tests single bits, for
  header parsing, QoS label extraction and unpacking of table entries.

The three units are independent and mutually exclusive. An ALU controller
picks one per operation, and an output multiplexer returns its result. The
whole block is combinational: one operation per cycle, as in the execute
stage of a simple pipeline.

## Hosm-Format

A prefix of length `L` (0 to 31) is stored as one 32-bit word. The `L`
prefix bits sit at the top. They are followed by a single `0` and then by
ones down to bit 0.

```
prefix 1101*  (L = 4)   ->  1101 0 111 1111 1111 1111 1111 1111 1111  = 0xD7FF_FFFF
prefix *      (L = 0)   ->  0111 1111 ...                             = 0x7FFF_FFFF
```

This encoding has two properties that the hardware relies on.

**Ordering is plain unsigned comparison.** A search tree of prefixes needs a
total order. Compare the common leading bits. If one prefix is a prefix of
the other, the longer one is larger exactly when its next bit is 1. Hosm
words give this order with a single unsigned compare. The longer prefix's
next bit meets the shorter one's terminating `0`: if that bit is 1, the
longer word is larger. So no special hardware is needed for comparison; the
ordinary ALU's `GTU`/`LTU` do it. When software places an address among
Hosm words and the address is numerically equal to one of them, the address
counts as the smaller; a strict `LTU` gives exactly that.

**Matching is a masked XOR.** Let `P` be a Hosm word of length `L` and `A`
an address. `P` matches `A` when `(P xor A) < 2^(32-L)`, that is, when the
top `L` bits of `P xor A` are zero. The length itself comes from the
encoding: it is 31 minus the number of trailing ones.

Prefixes of length 32 have no Hosm word. The intended use keeps host routes
in a separate exact-match table that is checked first. `cpr` clamps a
requested length above 31 to 31.

## Instructions

| code | mnemonic | operands (`input1`, `input2`) | `result` |
|------|----------|-------------------------------|----------|
| 24 | `cpr`  | zero-filled value, length | Hosm word. Value bits below the prefix are cleared; length > 31 is taken as 31 |
| 25 | `vpr`  | Hosm word, – | zero-filled value: prefix bits in place, rest 0 |
| 26 | `lpr`  | Hosm word, – | length, 0..31 |
| 27 | `mpr`  | Hosm word, address | 1 if the prefix matches the address, else 0. The same bit appears on `branch` |
| 16 | `ebis` | `Ra`, `{l, s}` | `Ra & MASK[s,l]`: field kept in place |
| 17 | `ebia` | `Ra`, `{l, s}` | `(Ra & MASK[s,l]) >> s`: field moved to bit 0 |
| 18 | `cbit` | `R1`, `b` | `R1[b]` as 1 or 0 |
| 0–13 | ordinary ALU | `x`, `y` | AND, OR, NOT (of `x`), XOR, NOR, ADD, SUB, MUL (low 32 bits), EQ, NE, GT, GTU, LT, LTU. Relational results are 0/1 |

`MASK[s,l]` has `l` ones starting at bit `s`, where bit 0 is the least
significant bit. For the parse instructions `input2` carries the
immediates: `s` (or `b`) in bits 4:0 and `l` (0..32) in bits 10:5. Mask
bits beyond bit 31 are dropped, so a field that runs off the top of the word
is truncated. Codes not listed (14, 15, 19–23, 28–31) return 0 and never
raise `branch`. The numeric codes are in `rtl/alu_pkg.sv` (`alu_op_e`).

`mpr` is a conditional jump in the instruction set: "if the prefix matches,
jump". The jump target and the program counter belong to the processor.
This block only supplies the condition on `branch`.

## Structure

```
                op
                 |
          +------v-------+   unit, enables, function codes (alu_ctrl_t)
          |alu_controller|-------------------------------+
          +--------------+                               |
input1 --+---------------+----------------+              |
input2 --|-+-------------|-+--------------|-+            |
         v v             v v              v v            |
     +--------+     +-----------+    +----------+        |
     |base_alu|     |prefix_unit|    |parse_unit|        |
     +--------+     +-----------+    +----------+        |
         |             |     |match       |              |
         +-------------+-----|------------+--> mux <-----+
                             v                  |
                          branch              result
```

| file | contents |
|------|----------|
| `rtl/alu_pkg.sv` | operation codes, unit select, per-unit function codes, control struct |
| `rtl/alu_controller.sv` | decodes `op` into the control struct. Exactly one unit enable is high for each assigned code |
| `rtl/base_alu.sv` | ordinary logical, integer and relational operations |
| `rtl/prefix_unit.sv` | `cpr`, `vpr`, `lpr`, `mpr` |
| `rtl/parse_unit.sv` | `ebis`, `ebia`, `cbit` |
| `rtl/augmented_alu.sv` | top: controller, three units, output multiplexer |

When a unit is disabled, its operands are forced to zero. An idle unit
therefore does not switch while another one works. Inside the prefix unit, a
trailing-ones counter produces the length. The length drives a top-`L`-bits
mask, which is shared by `vpr` and `mpr`. `cpr` builds its word from the
same kind of mask: `(value & mask) | (~mask >> 1)`. The parse unit builds
`MASK[s,l]` as `((1 << l) - 1) << s` and shares it between `ebis` and
`ebia`.

All modules take a width parameter `W` (default 32). The Hosm rules
generalise: lengths go from 0 to `W-1`, and the immediate fields are
`log2(W)` and `log2(W)+1` bits wide. Only `W = 32` is tested.

Two assertions guard the rules of the block. At most one unit is enabled at
a time (`alu_controller`). `branch` is raised only for `mpr`
(`augmented_alu`).

## Timing

Every module is combinational, with no clock or reset. A result is valid in
the same cycle as its operands, at one operation per cycle. For scale,
published gate-level figures for a comparable 0.25 µm implementation put the
ALU critical path near 13 ns and the two added units near 3–5 ns. The two
units also add about 35 % to the ALU's area. Both added units are therefore
much faster than the ALU they sit beside. The only delay they add to the
ALU's own path is the output multiplexer and the operand gating.

## How far it follows the original design

Taken from the original design:

* the Hosm-Format encoding, the maximum length of 31 and the rule that
  equal words mean "address is smaller";
* the matching rule;
* the seven new instructions and what they compute;
* the organisation: three independent, mutually exclusive units with
  select signals from the ALU controller;
* a 32-bit datapath with two inputs and one output.

Choices made here, where the original says nothing:

* the operation encoding, and the exact list of ordinary ALU operations
  beyond AND/OR/NOT/XOR, ADD/SUB/MUL and equality/greater-than;
* how the immediates of `ebis`/`ebia`/`cbit` are packed into `input2`, and
  bit numbering from the least significant bit;
* the `cpr` length clamp, clearing of value bits below the prefix, and
  decoding of the all-ones word as the empty prefix;
* operand gating of idle units, and result 0 for unassigned codes;
* no pipeline registers.

The original counts five operators in the prefix unit but lists four prefix
instructions. Prefix comparison, the obvious candidate for a fifth, is
deliberately left to the ordinary unsigned compare. Only the four listed
operations are built.

The processor around the ALU is not part of this RTL. That includes the
instruction decoder that would produce `op`, the register file, and the
branch unit that acts on `branch`.

## Verification

Each module has a self-checking testbench in `tb/`. All of them compare
against `tb/alu_ref_pkg.sv`, a reference written bit by bit from the
definitions above and independent of the RTL:

* `alu_controller_tb`: all 32 codes: unit, enables, function code.
* `base_alu_tb`: every operation on corner and random operands. It also
  checks that unsigned comparison of Hosm words gives the same order as the
  prefix order defined under "Ordering" above, on 2000 random prefix pairs,
  many of them nested.
* `parse_unit_tb`: IPv4 field examples, empty, full-width and overrunning
  fields, every `cbit` position, and 2000 random operations.
* `prefix_unit_tb`: every length 0..31 with random values for
  `cpr`/`vpr`/`lpr`. `mpr` is tried with matching addresses, random
  addresses and addresses that differ in exactly one prefix bit. Also
  covered: the `1101*` example, the clamp and the all-ones word.
* `augmented_alu_tb` (end to end, default parameters):
  * 6000 random operations over all 32 codes.
  * A longest-prefix-match lookup done entirely through the ALU. It has 48
    nested prefixes, sorted with `GTU`. It runs 400 lookups: `LTU` finds
    the place, `mpr` matches, `lpr` and `GT` keep the longest match, and
    `ebia` extracts the next hop. The result is checked against a plain
    longest-match search.
  * 300 random IPv4 headers parsed with `ebia`/`ebis`/`cbit`.
  * A check that every operation completes in one cycle.
  * A count of each mechanism: each unit, unassigned code, `mpr` taken and
    not taken, `cpr` clamp, lookup hit and lookup miss. A mechanism that
    never occurs counts as a failure.

The lookup test exercises the per-node work of a prefix-tree search. It
does not build a multi-level tree, whose construction and update rules are
software outside this block.

Each testbench ends with `TB_RESULT checks=N failures=M`. To run one with
Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/alu_pkg.sv tb/alu_ref_pkg.sv \
  rtl/base_alu.sv rtl/alu_controller.sv rtl/prefix_unit.sv rtl/parse_unit.sv \
  rtl/augmented_alu.sv tb/augmented_alu_tb.sv \
  --top-module augmented_alu_tb -Mdir obj
./obj/Vaugmented_alu_tb
```

For a unit testbench, list the package files, the unit and its testbench.
Every testbench finishes in well under a second.
