# MOMR core: multi-word operations on a word-oriented 2-way superscalar machine

A RISC instruction reads two register words and writes one. Two kinds of
work keep hitting that limit:

* **Arbitrary bit permutations** (DES and other block ciphers). Any
  permutation of 64 bits can be done by a 2·log2(64) = 12-stage network of
  2×2 switches. The network needs 12 × 32 = 384 configuration bits, which is
  six words. A permutation instruction that carries one configuration word
  sets only two stages. So one permutation takes 6 instructions, which are
  serially dependent and take 6 cycles.
* **Multi-word multiplication** (public-key cryptography). A 64×64
  multiplier already makes a 128-bit product. Still, two instructions are
  needed to get it out, one word per instruction. A 128×128 multiplier cannot
  be used at all, because no instruction can give it four source words.

A 2-way superscalar machine already has four register read ports, two write
ports and the buses and bypasses that go with them. This design lets two
adjacent instructions form a **group**. A group issues as **one** operation on
a *datarich* unit, called MOMR (multi-word operands, multi-word result). The
group uses both issue slots, so the unit sees four source words and can write
two results. Two datarich units are built:

* a **(4,1) permutation unit (PU)**: data + three configuration words in,
  one word out;
* a **(4,2) multiplier**: 128×128 bits, two 64-bit result words out,
  latency 5.

A full 64-bit permutation becomes two groups and takes **2 cycles instead of 6**.
A 256-bit product of two 128-bit numbers takes **four instructions in two
issue cycles**.

## How instructions become groups

A group is marked by a **C-bit** on its first instruction in the issue
window. The C-bit means "this entry and the next one issue together". There
are two ways to get the C-bits, and `grp_mode` picks one at run time:

**Method 1: detection in hardware** (`seq_detect`, `code_transformer`). This
method needs no change to the ISA. Within one fetch block of four
instructions, the detector finds these patterns:

| pattern | conditions | becomes |
|---|---|---|
| 3 × PERM | same opcode; stage pairs 0,1,2; each data source is the previous result; all write the same rd; no other dependence | PERM group (2 entries) |
| MUL,L then MUL,H | same sources, different destinations, no dependence | (2,2) 64-bit multiply |
| PMIN then PMAX | no dependence, different destinations | min/max pair |

A 3-PERM sequence holds the data word and three configuration words. That
data fits in two instructions, so the transformer rewrites it:

```
PERM rs, rc1, rd          PERM  rs,  rc1, rd   (C=1)
PERM rd, rc2, rd   ==>    PERM' rc3, rc2, rd
PERM rd, rc3, rd          (dropped)
```

Patterns that cross a fetch-block boundary are not recognised. This keeps
the detector free of state.

**Method 2: group bits in the ISA** (`group_check`). Every instruction has two
bits, `gs` and `gc`:

| gs | gc | meaning |
|---|---|---|
| 0 | 0 | normal instruction |
| 1 | 0 | first instruction of a group |
| 0 | 1 | continuation of a group |
| 1 | 1 | reserved (decoded as normal) |

A compiler can then state groups that the hardware could not find by itself:

* `PERM,gs rs,rc1,rd ; PERM,gc rc2,rc3,rd`: a full 6-stage pass in 2 instructions.
* `MUL,L,gs ; MUL,H,gc` with the same sources: a 64×64 multiply giving both words.
* `MUL,L,gs a0,b0,c0 ; MUL,L,gc a1,b1,c1`: the low 128 bits of
  {a1,a0}×{b1,b0}. Then `MUL,H,gs ; MUL,H,gc` gives the high 128 bits.
* `PMIN,gs ; PMAX,gc`.

The hardware still checks every marked pair: opcodes, sources, destinations
and the absence of any dependence inside the group. A pair that fails the
check has its marks ignored. Its instructions then run as ordinary
instructions and are counted in `stats.bad_group`.

## Issue: wakeup, select and hazards

`issue_window` is an ordered, collapsing window of 16 entries. Entry 0 is the
oldest. Grouped instructions therefore stay adjacent.

* **Wakeup** (`wakeup_logic`): an entry is ready when its own operands are
  ready. If it belongs to a group, the other member's operands must be ready
  too. Without this, half of a group could issue alone.
* **Select** (`select_logic`): the ALU1 selector picks the oldest ready entry.
  If that entry has its C-bit set, both the entry and its successor are
  granted, and the ALU2 selector is bypassed. Otherwise the ALU2 selector picks
  the oldest other ready entry. It is granted only if it does not start a group
  and does not need the same single PU or multiplier.
* **Hazards without renaming.** The design has no rename stage. The window
  therefore checks hazards on architectural registers:
  * RAW: an operand waits until no older window entry writes it.
  * Result in flight: an operand also waits until a per-register countdown
    says its value is in the register file or on a write bus.
  * WAR and WAW: a destination waits until no older entry reads or writes it.

  The two members of a group are not checked against each other. The group
  rules guarantee that they do not conflict, and the group reads all four
  operands at once.
* **Write ports.** The multiplier writes both write ports 5 cycles after it
  issues. In the cycle before that write, only multiplier instructions may
  issue (`stats.wb_block`). A single MUL,L or MUL,H also goes through the
  128-bit multiplier, so every multiplier result has the same latency.

Timing: an instruction is granted and reads its registers in one cycle. It
executes and writes back in the next cycle. Both write ports bypass to the
operands read in the same cycle. Dependent ALU and PU operations therefore
issue back to back. A multiply's consumer issues 5 cycles after the multiply.

## The permutation unit

`perm_unit` holds two 64-bit networks, each with 6 stages of 32 switches:

* `bfly_net`, a butterfly. Its switch distances are 32, 16, 8, 4, 2, 1.
* `ibfly_net`, an inverse butterfly. Its switch distances are 1, 2, 4, 8, 16, 32.

Only one network is used per operation, chosen by the opcode (PERMB or PERMI).
Configuration word k drives stages 2k (bits 31:0) and 2k+1 (bits 63:32).
In stage s, switch j joins bit positions p and p+d, where
j = (p / 2d)·d + p mod d. When the switch bit is 1, those two bits are swapped.

A butterfly pass followed by an inverse butterfly pass is a Benes network,
so any of the 64! permutations can be done. Both passes together take two
groups: 4 instructions with group bits, or 6 without. They run in 2 cycles
on the single PU, so the PU delivers one permutation every 2 cycles.

Each PERM instruction carries a stage-pair field `sp`. A lone PERM applies the
full 6-stage pass with its `rs2` word in position `sp` and the other two words
zero. Three chained PERMs with `sp` = 0, 1, 2 therefore give exactly the
result of the grouped operation. Running the same code with grouping on or
off never changes the result; only the cycle count changes.

## The multiplier

`momr_mul` computes a 128×128 → 256-bit unsigned product and is fully
pipelined: one operation per cycle, result after `STAGES` = 5 cycles. The
product is computed straight from the input registers and then delayed, so
a synthesis flow must retime it. The unit returns two words, selected by
`rsel`:

* the low 128 bits, for MUL,L groups, 64-bit pairs and single MUL,L;
* word 1 alone, for a single MUL,H;
* the high 128 bits, for MUL,H groups.

64-bit operations use zeros for the upper operand words.

## Instruction format

```
 31    26  25  24  23 22  21   15  14  10  9   5  4   0
[ opcode ][gs][gc][ sp  ][ 0000000 ][ rs1 ][ rs2 ][ rd ]
```

Opcodes (in `momr_pkg`):

| code | op | code | op |
|---|---|---|---|
| 0 | NOP | 7 | SRL |
| 1 | ADD | 8 | PMIN (4×16-bit unsigned) |
| 2 | SUB | 9 | PMAX (4×16-bit unsigned) |
| 3 | AND | 10 | MULL |
| 4 | OR | 11 | MULH |
| 5 | XOR | 12 | PERMB (butterfly) |
| 6 | SLL | 13 | PERMI (inverse butterfly) |

Unknown opcodes decode as NOP. There are 32 registers of 64 bits, all reset
to zero.

## Top-level interface (`momr_core`)

| port | meaning |
|---|---|
| `clk`, `rst_n` | clock; asynchronous active-low reset |
| `grp_mode` | 0 no grouping (plain 2-way machine), 1 method 1, 2 method 2; change only while `idle` |
| `fb_valid`, `fb_instr[4]`, `fb_mask`, `fb_ready` | fetch blocks in, valid/ready handshake; slot 0 is oldest |
| `ld_we`, `ld_addr`, `ld_data` | write a register from outside (stands in for loads) |
| `dbg_addr`, `dbg_data` | read a register |
| `idle` | nothing in flight |
| `stats` | event counters (see `stats_t`): groups by kind, folded PERMs, malformed groups, issues, dual issues, PU/multiplier operations, window-full and write-back stalls, bypasses |

Parameters: `IW` = 16 (window entries) and `MUL_LAT` = 5. Package constants:
`XLEN` = 64, `NREG` = 32 and `FETCH_W` = 4.

## Module map

| module | role |
|---|---|
| `momr_pkg` | types, opcodes, instruction format, counters |
| `instr_decoder` | one instruction → fields, unit, operand use |
| `seq_detect` | method-1 group detection in a fetch block |
| `group_check` | method-2 gs/gc validation |
| `code_transformer` | 3→2 PERM folding, C-bits, mode muxes, packing |
| `issue_window` | ordered window, readiness, write-port reservation |
| `wakeup_logic` | group-aware ready signal of one entry |
| `select_logic` | ALU1/ALU2 selectors with C-bit control units |
| `exec_datapath` | register read, bypass, ALUs, PU, multiplier, write-back |
| `regfile` | 32×64, 4 read / 2 write ports |
| `alu`, `perm_unit`, `bfly_net`, `ibfly_net`, `momr_mul` | execution units |
| `momr_core` | top |

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M`. There are two system-level testbenches:

* `tb_momr_core` runs directed and random programs in all three modes
  against its own instruction-level model. It checks the 6-versus-2 cycle
  permutation and the multiply latency. It also requires every counted event
  to occur.
* `tb_workload_kernels` routes random 64-bit permutations, and the DES
  initial permutation and its inverse, through the Benes network with the
  looping algorithm. It runs them in all three modes. It also runs 128×128
  products as (4,2) groups and checks their issue cycles and latency.

Both use the core at its default parameters. With plain Verilator:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
    rtl/momr_pkg.sv tb/tb_momr_core.sv --top-module tb_momr_core -o sim
./obj_dir/sim
```

## Where this design departs from or goes beyond its source

* **No register renaming, in-order window.** The window resolves WAR and
  WAW itself, and selection is oldest-first. A renamed out-of-order front end
  would change none of the group logic. It would only replace the hazard
  checks in `issue_window`.
* **Invented encoding.** This covers the bit layout, the opcode numbers and
  the PERM stage-pair field. Real permutation instructions such as CROSS or
  OMFLIP would fit the same grouping scheme, but they are not implemented.
  PERMB/PERMI are plain butterfly or inverse-butterfly stage pairs.
* **Operand order of the second PERM of a group.** Method 1 reads (rc3, rc2)
  and method 2 writes (rc2, rc3). Method-2 operands are swapped at dispatch,
  so the window sees one form.
* **Matching rules.** The rules are strict: same rd along a PERM chain, and
  no RAW hazard except the chain itself. The PMIN/PMAX pair and the 128-bit
  MUL groups are additions beside the permutation groups. PMIN/PMAX is taken
  as 16-bit subword min/max.
* **One 128-bit multiplier for everything.** It has latency 5, so a single
  64-bit multiply is slower here than on a dedicated 3-cycle 64-bit multiplier.
* **Sizes that are this design's own:** window size, register count, and the
  reset behaviour.
* **Not built:**
  * the alternative select with a separate PU selector and arbiter;
  * the 4-way machine with two PUs (one permutation per cycle);
  * (4,4) multiplier groups;
  * instruction fetch and caches, data memory, loads and stores.

  Without loads and stores, whole DES or Diffie-Hellman programs cannot run
  on this core. Their kernels can: permutations and 128-bit products.

## Trusting it

Every module except the package has a testbench, and each has been shown to catch a
deliberately injected fault in its module. The system testbenches compare
whole register files with an independent model over hundreds of random
instructions in each mode. The multiplier's single-cycle 128×128 product is
the part least ready for a real implementation: it needs retiming or a
hand-pipelined multiplier.
