# Heads and Tails: a parallel fetch/decode front end for a variable-length ISA

Variable-length instructions make code small, but they are hard to fetch and decode
quickly. The length of instruction *n+1* is only known once instruction *n* has been
length-decoded, so a wide decoder becomes a long serial chain of decoders and
multiplexers. The Heads-and-Tails (HAT) format removes most of that chain. Every
instruction is split in two:

* a **head** of fixed size (10 bits), which carries the opcode and the first operand;
* a **tail** of variable size (1 to 6 units of 5 bits), which carries the rest.

Instructions are packed into fixed-size **bundles**. Heads are packed from the left, in
program order. Tails are packed from the right end, in the same order. All heads have
the same size, so the front end finds head *k* of a bundle without decoding anything. It
decodes the lengths of all heads at once. The only serial step left is a short chain of
small adders that turns tail lengths into tail positions.

This repository holds synthesizable SystemVerilog for such a front end, with the
encoding of MIPS-HAT: a compressed re-encoding of MIPS with 15- to 40-bit instructions.
By default it uses 256-bit bundles and decodes four instructions per cycle. It supports
four ways to find a branch target's tail: scanning, a tail-start bit vector, tail
pointers, and a BTB.

## The bundle

```
 bit 255                                                                    bit 0
 +------+----+----+----+---- ... ----+-------------+------+----------+----+
 | last | H0 | H1 | H2 |    unused   |     T2      |  T1  |    T0    | xx |
 +------+----+----+----+---- ... ----+-------------+------+----------+----+
  4 bits  heads, 10 bits each  -->        <--  tails, 1..6 units each    2 spare
         |<------------------- 50 units of 5 bits ------------------>|
```

| | 128-bit bundle | 256-bit bundle (default) |
|---|---|---|
| field `last` (number of the last instruction) | 3 bits | 4 bits |
| 5-bit units | 25 | 50 |
| most heads (instructions) | 8 | 16 |
| most tail units (tail region) | 16 | 32 |
| tail-start bit vector | 16 bits | 32 bits |
| spare bits | 0 | 2 (bits 1:0) |

Bit positions used by this RTL (`hat_pkg`): `last` sits in the top bits. Unit *u*
(*u* = 0 is leftmost) occupies `bundle[B-1-INUM-5u -: 5]`. Head *i* is units 2*i* and
2*i*+1, with the opcode in `head[9:5]`. Tail 0 ends at the last unit, and tail *i* ends
where tail *i*-1 begins. The fields inside a tail run left to right. A bundle is legal
when its heads and tails do not overlap and the tails fit in the tail region. No
instruction crosses a bundle boundary, so none crosses a cache line or a page.

**Tail lengths.** The opcode alone fixes the tail length. That lets a length decoder
work on one head with no other input. The real MIPS-HAT opcode map is not published.
`hat_pkg::DEFAULT_LEN_TABLE` is therefore a placeholder (length = opcode mod 6 + 1) and
sits behind a `LEN_TABLE` parameter on every module that decodes lengths. Put a real
opcode map there. Opcodes beyond the 32 primary ones use escape opcodes with a
secondary opcode in the tail. This design assumes one escape opcode per tail length,
so the head still fixes the length. The secondary opcode is passed on in the tail and
not decoded here.

## Finding the tails: offsets and the adder chain

A tail's position is given as an **offset**: the number of 5-bit units between the
tail's right end and the bundle's right end. Instruction 0 has offset 0. Instruction
*k* has the summed tail length of instructions 0..*k*-1.

For a decode group of `W` instructions starting at instruction `inst` with offset
`base_off`, `hat_slot_decoder` does this:

1. selects heads `inst .. inst+W-1` (fixed positions, a plain mux);
2. runs `W` length decoders (`hat_length_decoder`) in parallel;
3. runs the adder chain (`hat_tail_adder_chain`):
   `off[0] = base_off`, `off[i+1] = off[i] + len[i]`. This is the only part that
   depends on earlier instructions. Each adder is 6 bits wide and adds a 3-bit length;
4. cuts out each tail with `hat_tail_align`. That is a shifter in whole 5-bit units
   over the unit area, and it returns the tail left-aligned in 30 bits with unused
   units zero.

It also returns `next_off`, the offset of instruction `inst+W`. The PC unit keeps this
offset beside the PC, so the next group starts without re-summing earlier tails.

## Program counter and sequencing

A PC is `{bundle #, instruction #}`. Branch offsets count instructions, so their
granularity does not depend on instruction lengths. `hat_pc_unit` holds the PC and the
current tail offset, and updates them each cycle:

* **sequential**: if the group does not reach the bundle's last instruction,
  `inst += W` and `off = next_off`;
* **end of bundle**: otherwise `bundle += 1`, `inst = 0`, `off = 0`;
* **branch** (`redirect_valid`): load the target. In the cycle the target bundle is
  read, its instruction # is checked against that bundle's `last`. A target past
  `last` raises `bad_target`, and fetch stays halted until the next redirect.

## Branching into the middle of a bundle

A branch finds its target head at once. Its tail lies after the tails of every earlier
instruction in the bundle, and those have not been decoded. `br_scheme` selects, per
redirect, how the target's offset is found:

| `br_scheme` | how the offset is found | extra cycles for target *k* | cost |
|---|---|---|---|
| `BR_SCAN` | decode from instruction 0; groups before the target are decoded but not issued | floor(*k*/W) | time and energy |
| `BR_TSBV` | **tail-start bit vector** (below) | 0 | one vector per bundle, built at refill |
| `BR_TAILPTR` | the offset comes with the target PC (`redirect_tp`) | 0 | code size (a pointer field per head) |
| `BR_BTB` | offset cached in a BTB by target PC; on a miss, scan as `BR_SCAN` and fill the entry | 0 on a hit, floor(*k*/W) on a miss | BTB bits |

**Tail-start bit vector.** The vector has one bit per unit of the tail region: 32 bits
for a 256-bit bundle. Bit *j* is set when a tail starts *j* units from the right end,
where "starts" means its rightmost unit, since tails are laid down from the right. Bit 0
is therefore always set, and the (*k*+1)-th set bit from bit 0 marks tail *k*. Every
instruction has a tail (lengths are 1..6, never 0), so the rule holds. `hat_tsbv_gen`
builds the vector when a bundle is written (`refill_*`). It decodes all 16 heads in
parallel and runs a 16-long adder chain. `hat_bundle_mem` stores the vector beside the
bundle. On a branch, `hat_tsbv_locator` finds the (*k*+1)-th set bit with a counting
priority search. If there is no such bit, the target is past the bundle's last
instruction.

**Tail pointers.** Each head gets an extra field. The linker fills it with the tail
offset of the branch target, since it knows direct branch targets at link time. The
branch unit sends that offset with the target PC (`redirect_tp_valid`, `redirect_tp`).
A PC saved for a later indirect jump can carry the offset as well: a PC widened with a
tail pointer. Without an offset, an indirect jump may only target instruction 0 of a
bundle. Under `BR_TAILPTR`, a redirect with no offset to a nonzero instruction # is
reported as `bad_target`. The extra head field is read by whatever computes branch
targets, outside this front end. Its width and position are not fixed here.

**BTB.** `hat_btb` holds only the tail-pointer part of a branch target buffer. It is
direct-mapped, has 16 entries by default, and is indexed and tagged by the target PC.
Predicting branch targets is outside this design. Any refill flushes the whole BTB,
because stored offsets may be stale.

## Top level: `hat_frontend`

```
              refill_* ──► hat_bundle_mem ◄── hat_tsbv_gen (refill path)
                               │ bundle, tsbv
 redirect_* ──► hat_pc_unit ───┤ bundle #, inst #, base_off
 br_scheme        ▲  ▲         ▼
                  │  └── hat_tsbv_locator (tsbv, inst #)
                  │  └── hat_btb (lookup on redirect, fill after a scan)
                  │      hat_slot_decoder ─► W × {head, tail, length}
                  └──── last, next_off, slot offsets            │
                                                       output register ─► out_*
```

Timing:

* Reset is synchronous and active low (`rst_n`). It clears the PC (to bundle 0,
  instruction 0), the BTB and the output valids, not the bundle memory. Fill the memory
  first (writes work during reset).
* The PC reads its bundle combinationally. The decoded group is registered, so
  `out_*` shows the group one clock after its PC was current. `out_valid[i]` marks
  valid slots. All slots of a cycle share `out_bundle`.
* A redirect in cycle *t* squashes the group decoded in *t*. The target's group
  appears at the outputs in cycle *t*+2, plus the scan cycles above.
* `bad_target` is a one-cycle pulse in cycle *t*+2 for a bad target. `halted` stays
  high until the next redirect.
* `refill_en` writes one bundle per clock, also while fetching.

Parameters (defaults): `BUNDLE_BITS = 256` (128 also works), `W = 4`, `DEPTH = 256`
bundles, `BTB_ENTRIES = 16`, `LEN_TABLE`. The remaining widths follow from
`BUNDLE_BITS`: instruction # = log2(B/16) bits, tail region = B/8 units.

## What comes from the HAT format and what is this design's own

Taken from the format:
* bundles of 128 or 256 bits, with the field sizes of the table above;
* 10-bit heads and 5-bit tail units;
* 15- to 40-bit instructions, every head with a tail;
* heads from the left and tails from the right;
* the `{bundle #, instruction #}` PC and its three update rules;
* length decoders in parallel followed by a tail-length adder chain;
* the tail-start bit vector (its width and its bit meaning);
* tail pointers with the restriction on indirect jumps;
* the BTB fallback to scanning.

Choices made here where the format says nothing:
* exact bit positions inside the bundle;
* the opcode-to-length table (a placeholder);
* one escape opcode per length;
* the decode width W = 4;
* the offset register beside the PC;
* the pipeline (combinational read, one output register);
* halting on a bad target;
* the redirect interface;
* BTB size and organisation, and flush on refill;
* a plain array standing in for the instruction cache;
* synchronous reset.

Not built:
* the instruction cache itself (tags, misses), replaced by `hat_bundle_mem`;
* the branch predictor and target computation;
* the decoding of the secondary opcode and operand fields into MIPS operations;
* the compressor/linker that produces HAT code.

The code-size results of the format (a static compression ratio of about 75% of MIPS
code) depend on that compressor and on benchmark code. No simulation of this RTL
reproduces them. `tb_hat_workload_mix` shows the part that packing alone contributes.
It uses a random 1000-instruction program with the MIPS-HAT size mix (15 bits 22.1%,
20 bits 13.0%, 25 bits 47.5%, 30 bits 3.8%, 35 bits 3.3%, 40 bits 10.4%), packed
greedily. The program takes 101 256-bit bundles (80.8% of the same number of 32-bit
instructions) or 221 128-bit bundles (88.4%). Much of the gap to the format's figures
comes from the compressor, which also re-encodes common instruction sequences as single
instructions.

## Verification

Each module has a self-checking testbench in `tb/`. All of them use `hat_tb_pkg`,
which builds random legal bundles from known heads and tails, so expected results come
from the fields that went in, not from the RTL.

| testbench | checks |
|---|---|
| `tb_hat_length_decoder` | all 1024 heads against opcode mod 6 + 1 |
| `tb_hat_tail_adder_chain` | prefix sums, N = 4 and 16 |
| `tb_hat_tail_align` | every tail of random 256- and 128-bit bundles |
| `tb_hat_slot_decoder` | every start position: heads, lengths, offsets, tails, in-bundle flags, next offset |
| `tb_hat_tsbv_gen` | vectors of random 256- and 128-bit bundles |
| `tb_hat_tsbv_locator` | offsets of every instruction, not-found past the last |
| `tb_hat_btb` | against an associative model: hits, misses, evictions, flush, reset |
| `tb_hat_bundle_mem` | bundles and vectors read back after random refills |
| `tb_hat_pc_unit` | closed loop with a bundle model: instruction stream, offsets, branch latency per scheme, bad targets, BTB fills |
| `tb_hat_frontend` | whole design at default parameters, 20000 cycles, random redirects in all schemes, refills while running; checks every decoded instruction, branch latencies, bad-target pulses and halts, and counts that each mechanism occurred |
| `tb_hat_frontend_128` | the same with `BUNDLE_BITS = 128` |
| `tb_hat_workload_mix` | a straight-line program with the MIPS-HAT size mix, in 256- and 128-bit bundles: every instruction in order, and the decode rate (a full group every cycle, ceil(n/W) cycles per bundle) |

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through a
watchdog if it hangs. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hat_pkg.sv tb/hat_tb_pkg.sv tb/tb_hat_frontend.sv --top-module tb_hat_frontend
./obj_dir/Vtb_hat_frontend
```

The full-size end-to-end run takes a few seconds.
