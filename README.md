# Masked cmov / cmpeq / cmpgt instructions for a RISC-V core

Several post-quantum schemes contain small kernels that are cheap in plain
software but very expensive once they have to be protected against both
timing and power side channels:

- fixed-weight polynomial sampling and the index-to-coefficient conversion (BIKE, HQC, NTRU, McEliece);
- CDT sampling of discrete Gaussians (FrodoKEM, Hawk, Haetae);
- rotation of the BIKE syndrome by a secret offset.

In constant-time, first-order masked form, almost all of their time goes into
three operations:

- a conditional move (`cmov`);
- an equality test (`cmpeq`);
- an unsigned greater-than test (`cmpgt`).

This RTL adds these three operations as masked instructions to a RISC-V core
whose masked values sit in the general-purpose registers. A masked value is
held as two Boolean shares, `v = s0 ^ s1`. The instructions take shares in
and give shares out, and the two shares of a secret are never combined.

What is here:

- the masked datapath units;
- the masked ALU that sequences them;
- the instruction decoder;
- a register file that reads three share pairs at once;
- forwarding and hazard logic that knows about the third operand;
- a small three-stage execution path (`mask_ise_top`) that ties them together.

The host core itself is not included. Its fetch, load/store, other instructions
and memory are represented by ports.

## Share representation

- **Register pairs.** A masked value occupies an even/odd register pair.
  Share 0 is in the even register and share 1 in the odd one. An instruction
  names the pair by any register of it: address bits `[4:1]` select the pair.
  Pair 0 (`x0`/`x1`) is not usable, because `x0` reads as zero.
- **Bit reversal.** Share 1 is stored *bit-reversed*. A stray combination of
  the two shares anywhere in the pipeline, such as forwarding muxes or
  pipeline registers, then pairs bit *i* of one share with bit *31-i* of the
  other, never two bits of the same weight. Only the masked ALU restores the
  natural order, on entry, and it reverses share 1 of its result again on
  exit. All pair ports of `mask_ise_top`, the register file and the masked ALU
  use this register representation. Inside the units (`mask_cmov`,
  `mask_cmpeq`, `mask_ks_adder`) both shares are in natural order.
- **Types.** `mask_pkg::mword_t` is the share pair `{s0, s1}`.
  `mask_pkg::bitrev()` is the reversal.
- **Results.** A comparison result is a 1-bit condition in bit 0 of each
  share, with the upper bits zero. It can be fed straight to `cmov` as its
  condition.

## The DOM AND gadget and why everything is multi-cycle

The only non-linear step in all three instructions is an AND of shared values.
`dom_and` is a first-order domain-oriented-masking AND:

```
q0 = a0&b0 ^ [a0&b1 ^ z]      q1 = a1&b1 ^ [a1&b0 ^ z]
```

The gadget's timing:

- The operands must come from a register clocked on the **rising** edge: the
  execute-stage register, or a stage register inside a unit. They are then
  stable for the whole cycle.
- On the **falling** edge, the bracketed cross-domain terms are refreshed with
  fresh randomness `z` and registered. This register is what stops glitches
  from mixing the two domains. The inner-domain terms are combinational.
- The output is valid from the falling edge to the end of the same cycle, and
  the next rising-edge register captures it. So one gadget is one cycle, and
  the 32-bit gadget of `cmov` holds just 64 flip-flops.

Multi-cycle units put a rising-edge stage register between successive
gadgets. A gadget refreshes its cross-domain registers only when its stage
holds valid data (`en`), and a one-hot valid chain enables the stages one at a
time. So only one stage of a unit consumes randomness in any cycle. All stages can therefore share one
random word (`RND_W = 64` bits per cycle for the whole ALU). That random word
is an input port: no random number generator is included.

## The three units

**`mask_cmov`: 1 cycle.**
`res = dest ^ ((dest ^ src) & {32{cond[0]}})`.

- The XORs are share-wise.
- Each share of the condition bit is replicated to 32 bits on its own, and one
  32-bit DOM AND does the masking.

The result is valid in the `start` cycle itself, from its falling edge.

**`mask_cmpeq`: 5 cycles.**

1. The operands are XORed share-wise.
2. An OR tree reduces the 32-bit difference to one bit. Stage *k* ORs adjacent
   bit pairs, so the widths go 32 → 16 → 8 → 4 → 2 → 1.
3. Each masked OR is a DOM AND with inversions on share 0 only (De Morgan).
   Stage 1 works on the operands directly, and each later stage works on a
   stage register. So each stage is one cycle, and the result is valid in the
   fifth cycle counted from `start`.

The tree yields 1 when the operands differ. The unit flips share 0 of the
final bit, so that the instruction returns **1 for equal**. This is the
polarity the masked algorithms use, for example `cmov(coef, 1, cmpeq(idx, i))`.

**`mask_ks_adder`: 6 cycles; `cmpgt` is its carry.**
This is a Boolean-masked Kogge-Stone adder:

1. It forms generate `g = x & y` (one gadget) and propagate `p = x ^ y`
   (share-wise).
2. Five prefix levels with distances 1, 2, 4, 8 and 16 follow. Each level is
   one cycle of gadgets, and its result goes into a stage register:

```
G'[i] = G[i] ^ (P[i] & G[i-d])        P'[i] = P[i] & P[i-d]
```

The XOR is exact because a group never both generates and propagates.

- **Subtraction** is `a - b = ~(~a + b)`, with both inversions on share 0. No
  carry-in is needed, so the adder stays at 1 + 5 = 6 cycles.
- **Carry-out.** The carry-out of `~a + b` is 1 exactly when `b > a`. This is
  the "a larger value was subtracted from a smaller one" carry, and it is
  brought out in shared form as `cout`.
- **`cmpgt rs1, rs2`** runs the subtractor as `rs2 - rs1` and returns the
  carry, so `rd = (rs1 > rs2)`, unsigned.
- **add and sub.** The adder's plain addition and subtraction are also
  selectable at the masked ALU (`MOP_ADD`, `MOP_SUB`). The decoder does not
  produce them, because their instruction encodings belong to the base masked
  instruction set, which is not part of this RTL.

## Masked ALU sequencing (`masked_alu`)

`start` is a one-cycle pulse, given together with `op` and the three operands
(`rs1`, `rs2`, `rd_in`). The rules of the handshake:

- The operands must come from rising-edge registers and stay stable until
  `done`.
- An operation occupies the ALU for *LAT* cycles, the `start` cycle included.
- `done` is high in the last of these cycles, which for `cmov` is the `start`
  cycle itself.
- `res` is valid in the `done` cycle only, from its falling edge. Capture it
  at the next rising edge.
- An assertion checks that `start` never arrives while `busy` is high.

| operation | result                         | LAT (cycles occupied) |
|-----------|--------------------------------|--------------------|
| cmov      | `rs2[0] ? rs1 : rd_in`         | 1                  |
| cmpeq     | `rs1 == rs2`                   | 5                  |
| cmpgt     | `rs1 > rs2` (unsigned)         | 6                  |
| add / sub | `rs1 + rs2` / `rs1 - rs2`      | 6                  |

## Instruction encoding (`mask_ise_decoder`)

The three instructions are R-type, with funct7 = `0x7c` and opcode = `0x5b`:

| funct3 | mnemonic       | operation                    |
|--------|----------------|------------------------------|
| 0      | `mask.b.cmov`  | `rd = rs2[0] ? rs1 : rd`     |
| 1      | `mask.b.cmpeq` | `rd = (rs1 == rs2)`          |
| 2      | `mask.b.cmpgt` | `rd = (rs1 > rs2)`           |

`cmov` is the unusual one: its destination is also a source. Without it, the
condition would have to be exposed to select between two registers. The
decoder raises `reads_rd` for `cmov`, and the register file then reads a third
share pair.

## Execution path (`mask_ise_top`)

The three pipeline stages:

- **ID.** The decoder runs and `masked_regfile` reads up to three pairs. Then
  `mask_fwd_unit` replaces any pair with a younger value, taking the EX
  result in the cycle it becomes valid first, then the WB result.
- **EX.** The operands are latched in the stage register and `masked_alu`
  starts in the stage's first cycle. The stage is occupied for *LAT* cycles,
  and ID stalls behind it (`stall`).
- **WB.** The result pair is written to the register file.

The third operand goes only to the ALU's `rd_in`. A run of independent
instructions of one kind therefore retires one every 1 (`cmov`), 5 (`cmpeq`)
or 6 (`cmpgt`) cycles. A dependent instruction right behind gets its value
forwarded, with no extra cycles. This includes a chain of `cmov`s on the same
destination, as in the syndrome rotation.

The ports of `mask_ise_top`:

| port | use |
|------|-----|
| `instr`, `instr_valid`, `instr_ready` | instruction stream; a word is taken when valid and ready are both high |
| `rnd` | `RND_W` fresh random bits every cycle |
| `ext_we`, `ext_waddr`, `ext_wdata`, `ext_raddr`, `ext_rdata` | register-pair access for the rest of the core (its loads and stores); use only while `idle` is high |
| `retire` | one pulse per written-back instruction |
| `stall` | an instruction waits in ID |
| `fwd_ex`, `fwd_wb` | per source: a value was forwarded from EX / WB this cycle |
| `other_instr` | a word that is not one of the three was dropped |

All pair ports use the register representation.

## Where this departs from, or goes beyond, the original design

The original design is an extension inside a specific five-stage RV32IMC core
that already has a full first-order masked Boolean/arithmetic instruction set.
The following are this RTL's own choices, or are left out:

- **Host core and pipe depth.** Only the parts the extension touches are
  modelled, as a three-stage pipe. The host core's stages, its forwarding
  network and how it stalls are not reproduced.
- **Base masked instructions.** The other masked instructions (mask, unmask,
  and, or, xor, not, shifts, Boolean/arithmetic conversion) are not included.
  Their encodings and implementations are not part of this design.
- **Adder.** The masked adder existed before the extension. Its insides
  (generate level, prefix levels, subtraction by inversion) are
  reconstructed here; only its cycle count and its Kogge-Stone structure are
  fixed.
- **Polarity and operand order.**
  - The equal=1 polarity of `cmpeq` is chosen to match the software's use.
    The OR tree on its own yields 1 for "different".
  - The operand order of `cmpgt` (`rs1 > rs2`) is a choice.
- **Register layout.** The even/odd pair layout, the choice of share 1 as the
  bit-reversed share, and the unusable pair 0 are choices.
- **Randomness and reset.** Randomness enters as a port. Control state resets
  asynchronously on `rst_n` (active low). Datapath registers and the register
  file are not reset.

The units follow the original design in these points:

- the `cmov` algorithm and its single cycle;
- the XOR + OR-tree structure of `cmpeq` and its five cycles;
- `cmpgt` as the shared carry of the six-cycle masked subtractor;
- the instruction encodings;
- reading `rd` as a third operand and routing it only into the masked ALU;
- the bit-reversed share.

Side-channel security is not verified by simulation here. The RTL keeps the
structural rules of first-order DOM: shares combined only inside gadgets,
registered and refreshed cross terms, and one fresh random word per active
stage. Leakage on real hardware also depends on synthesis and placement.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_dom_and` | `q0^q1 == a&b` with random shares and randomness, in the cycle the operands are applied; result held while `en` is low |
| `tb_mask_cmov`, `tb_mask_cmpeq`, `tb_mask_ks_adder` | results against unmasked arithmetic; exact cycle of validity (1st / 5th / 6th cycle from `start`); carry-out for add and sub, including boundaries |
| `tb_masked_alu` | all five operations in register representation; `done` in exactly the *LAT*-th cycle |
| `tb_mask_ise_decoder`, `tb_masked_regfile`, `tb_mask_fwd_unit` | against independent reference models |
| `tb_mask_ise_top` | random programs against an unmasked model of the registers; retire spacing (1/5/6 cycles); requires each instruction, stalls, EX and WB forwarding, forwarding of the cmov third operand and a dropped foreign word to have occurred |
| `tb_mask_ise_workloads` | three kernels on the top at full size, with the testbench acting as the load/store unit of the core: index-to-coefficient conversion for NTRU key generation (N = 677, W = 254; checks every coefficient and exactly 2·N·W masked instructions), word-unit rotation of a BIKE-1 syndrome (12 323 bits in 386 words, held as three copies; three secret offsets), and comparison sampling (N = 677, threshold `floor(2^16·W/N)`) |
| `tb_masked_alu_cdt` | masked CDT sampling for the three FrodoKEM parameter sets (n·8 samples each) on the masked ALU: `cmpgt` against every table entry, masked additions to accumulate, and a conditional negation by a masked subtraction and `cmov`. Only the final sample is unmasked and compared with a plain model. The tables are the published FrodoKEM CDF tables |

Run any of them with plain Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_mask_ise_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/mask_pkg.sv tb/tb_mask_ise_top.sv
./obj_dir/Vtb_mask_ise_top
```

The design has no size parameters beyond `dom_and.WIDTH` (32) and
`masked_regfile.NREGS` (32). Every testbench runs the design at these
defaults; the two workload testbenches take a few seconds, the rest well
under a second.

## Cost of the kernels

The instruction counts follow from the units above. Index-to-coefficient
conversion for NTRU key generation (N = 677, W = 254) is 171 958 `cmpeq` plus
171 958 `cmov`. These occupy the execute stage for about 1.03 million cycles
(6 per `cmpeq`/`cmov` pair), before any loads, stores or loop control. The
workload testbench needs 1.89 million cycles for the whole kernel because it
waits for the path to drain before every load. The BIKE decapsulation case
(N = 49 318, W = 199) needs about 58.9 million execute-stage cycles.

A BIKE-1 rotation is 3 985 `cmov`, about 36 000 cycles in the testbench
including its loads and stores. A FrodoKEM CDT sample costs 191, 163 and 107
ALU cycles for the 640, 976 and 1344 parameter sets: 12 per table entry
(compare plus add) and 7 for the negation.
