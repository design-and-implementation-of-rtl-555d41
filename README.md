# RVV vector unit for a small RISC-V core

This is a vector co-processor that runs a subset of the RISC-V Vector
extension (RVV 1.0), integer operations only. A scalar RV32 core hands it
one vector instruction at a time, together with the values of rs1 and rs2.
The unit then:

- decodes the instruction;
- runs it over the whole register group;
- writes back vl (for vset*) or touches memory (for loads and stores);
- raises `instr_ready` again.

Vector registers are VLEN = 256 bits. The register file has 32 of them. All
arithmetic is done by lane-parallel units built from 64-bit cells, so one
256-bit row is processed per step. The element width (EEW) can be 8, 16,
32 or 64 bits, and the same hardware handles every width by cutting or
joining carries and shifts at element boundaries.

The design is written in SystemVerilog. Every module is parameterised. The
defaults give the 256-bit configuration.

## Block overview

```
              instr, rs1, rs2                       rd / vl
 scalar core ───────────────► vector_core ─────────────────► scalar core
                                │
     ┌──────────────────────────┼──────────────────────────────────┐
     │ vector_predecode ──► macro-op register ──► vector_udecode   │
     │        │                    │                     │         │
     │   vector_csr           sequencer FSM ◄────────────┘         │
     │   (vl, vtype, ...)          │ row / element steps           │
     │                             ▼                               │
     │                     vector_regfile (32 × VLEN)              │
     │                             │ two read ports                │
     │                             ▼                               │
     │  vector_execute: adder · halver · shifter · multiplier ·    │
     │                  slider · cumulative adder                  │
     │  vector_divider (element-serial)                            │
     │  vector_addr_gen ──► memory port (req / gnt / rvalid)       │
     └─────────────────────────────────────────────────────────────┘
```

## Interface and timing (`vector_core`)

| Group | Signals | Behaviour |
|---|---|---|
| Instruction | `instr_valid`, `instr`, `rs1_val`, `rs2_val`, `instr_ready` | Accepted in a cycle where valid and ready are both high. |
| Status | `instr_illegal`, `instr_done` | One-cycle pulses. |
| Scalar result | `rd_we`, `rd_addr`, `rd_wdata` | Pulsed by vset* with the new vl. |
| CSR access | `csr_we`, `csr_addr`, `csr_wdata`, `csr_rdata` | The scalar core's CSR instructions. |
| Memory | `mem_req`, `mem_we`, `mem_addr`, `mem_size`, `mem_wdata`, `mem_gnt`, `mem_rvalid`, `mem_rdata` | See below. |

The memory port carries one element per access:

- The request is held stable until it is granted.
- A load's data comes back with `mem_rvalid` in any later cycle.
- The element sits in the low bits of the data buses.
- `mem_size` is log2 of its byte count.

Cycle counts per instruction:

| Instruction kind | Cycles |
|---|---|
| Unmasked row operation | 1 + 2 per register of the group |
| Mask read | adds 2 |
| Compare | adds 3 |
| Reduction | adds 1 |
| Divide | about EEW + 3 per element |
| vset* | finishes in the cycle it is issued |

## Configuration and CSRs (`vector_csr`)

All seven RVV CSRs exist: `vstart`, `vxsat`, `vxrm`, `vcsr`, `vl`, `vtype`
and `vlenb`. Their numbers are the standard ones.

`vsetvli`, `vsetivli` and `vsetvl` compute VLMAX from SEW and LMUL. LMUL may
be 1/8 to 8. They then set:

- `vl = min(AVL, VLMAX)`;
- `vl = VLMAX` when rs1 = x0 and rd ≠ x0;
- vl unchanged (clipped to the new VLMAX) when rs1 = rd = x0.

A reserved or unsupported vtype sets `vill` and vl = 0. `vill` is also set at
reset, and while it is set every other vector instruction is illegal.

## Register file (`vector_regfile`)

The 32 registers are stored in one RAM of DPW-bit rows, VLEN/DPW rows per
register. This replaces a wide RAM plus multiplexers. The register file has:

- two synchronous read ports with one cycle of latency;
- one write port with byte enables. The byte enables give masking and
  tail-undisturbed writes for free.

On its own the register file defaults to a 64-bit data path, so it has 128
rows and a 7-bit address. Inside `vector_core` the data path equals VLEN, so
one register is one row.

## Decoder

Decoding has two stages.

**First stage (`vector_predecode`), combinational.** It turns an instruction
into a macro-operation. The macro-operation holds:

- the class: configuration, row arithmetic, compare, reduction, divide, load
  or store;
- the operation and the operand form (.vv, .vx or .vi);
- the element width, and the index width for indexed memory operations;
- the group size;
- the sign-extended scalar or immediate;
- the memory mode;
- the destination and sources.

Encodings outside the supported subset decode as illegal.

**Second stage (`vector_udecode`).** It works from the macro-operation and
one of two step counters:

- the register index inside the group, for row operations;
- the element index, for divide and memory operations.

For each step it produces:

- which registers to read and write;
- which elements are active (below vl and, when masked, with the v0 bit
  set) and the matching byte enables;
- for slides, which source registers to combine and the in-row slide
  amount, plus which elements come from beyond VLMAX and must be written as
  zero.

## Execute units

All row units are combinational and work on WIDTH = 256 bits. They are built
from 64-bit cells, so WIDTH can be any multiple of 64.

### Adder (`vector_adder`, `vector_adder_cell`)

Each 64-bit cell is eight 8-bit carry-select blocks. Between blocks, the
carry is `(carry AND enable) OR (carry_in_set AND NOT enable)`:

- An inner byte boundary of an element passes the carry (enable = 1).
- An element boundary cuts it (enable = 0) and injects the element's own
  carry-in: 0 for add, 1 for subtract, the v0 bit for vadc, its inverse for
  vsbc.

Subtraction inverts B. Every byte produces N, V, C and Z flags. An element's
compare result is taken from its top byte's flags and the AND of its Z
flags:

- equal when all bytes are zero;
- unsigned-less when there is no carry;
- signed-less when N xor V.

This gives vmseq, vmsne, vmsltu, vmslt, vmsleu, vmsle, vmsgtu and vmsgt.

### Halver (`vector_halver`)

The halver shifts each element right by one and feeds the adder's carry out
into the vacated top bit. With a rounding bit chosen by `vxrm` (a second
adder adds it), this gives vaaddu. It is built from two sets selected by
EEW[1]:

- 16-bit halvers, which act as one 16-bit element or two 8-bit elements by
  EEW[0];
- 64-bit halvers, which act as one 64-bit element or two 32-bit elements.

### Shifter (`pseudo_shifter`, `shifter16`, `shifter64`, `vector_shifter`)

A **pseudo-shifter** moves the low *s* bits of its input to the top *s* output
bits (`x << (N − s)`, zero for s = 0).

A **16-bit shifter** is two 8-bit right shifters plus an 8-bit pseudo-shifter:

- For a 16-bit element with s < 8, the bits that leave the upper byte are
  ORed into the lower byte.
- For s ≥ 8, the upper byte moves into the lower shifter and the upper
  output is cleared.
- For two 8-bit elements, the pseudo-shifter output is blocked and each
  byte uses its own amount.

The **64-bit shifter** is the same arrangement with 32-bit halves.

The **vector shifter** uses 16 of the 16-bit cells and 4 of the 64-bit cells,
and EEW[1] picks which set drives the output. Left shifts (vsll) reuse the
right shifters: the row is bit-reversed and the amounts are reversed element
by element, then the result is reversed back. vsrl and vsll are supported;
arithmetic right shift is not.

### Multiplier (`vector_mul_cell`, `vector_multiplier`)

The cell follows a recursive idea: a W-bit product is the product of the
high halves, the product of the low halves, and the two cross products
shifted by W/2. Written out level by level, it works like this:

- Level 0 is plain 8×8 multipliers.
- Each higher level takes the previous level's neighbouring pair
  {Xh·Yh, Xl·Yl}, which already sits side by side. It then adds the two
  cross products of that level.

So the cell outputs the double-width products for every element width up to
W at once.

The unit puts four 64-bit cells side by side and selects the result for
EEW. vmul takes the low half of each product and vmulhu the high half.
Products are unsigned.

### Divider (`vector_divider`)

A restoring divider, shared by all elements and used one element at a time.
It produces one quotient bit per cycle, so an EEW-bit element takes EEW
cycles. Signed division works on magnitudes and fixes the signs afterwards.
Divide-by-zero and overflow give the RVV-defined results. It runs vdivu,
vdiv, vremu and vrem.

### Slider (`vector_slider`)

The slider concatenates two rows and shifts them by EEW × (slide amount
within a row) bits: right for vslidedown, left for vslideup. Whole-register
parts of the slide amount are handled by the decoder, which picks which two
registers of the group are combined. Elements that a slide-down would read
from beyond VLMAX are written as zero. vslideup leaves elements below the
offset unchanged.

### Cumulative adder (`vector_cumulative_adder`)

A binary tree of adders with levels of 8, 16, 32, 64, 128 and 256 bits. At
the level equal to the element width, each node takes the row data
directly; above it, each node adds the outputs of its two children. The tree
root is therefore the sum of all elements. vredsum masks inactive elements
to zero, sums the row, and accumulates across the group in a temporary
register that starts from vs1[0].

## Loads and stores (`vector_addr_gen`)

| mop | Mode | Address of the next element |
|---|---|---|
| 0 | unit stride | offset += element size |
| 2 | constant stride | offset += rs2, a byte stride as in RVV 1.0 |
| 1 / 3 | indexed | base + index element, read from vs2 with the index width |

The sequencer reads the element from or writes it to the register file, and
steps the generator after each element. Masked-off elements are skipped
without a memory access.

## Sequencer

`vector_core` holds the macro-operation and walks a small state machine:

1. Optionally read v0 (mask).
2. Optionally read vd: compares need the old mask bits, and reductions
   need vs1.
3. For each register of the group, read the sources, execute and write
   with byte enables.
4. Write back the temporary register, for compares and reductions.

Divides and memory operations step element by element through a read
state, then a divide wait or a memory request/response wait.

## Supported instructions

| Kind | Instructions |
|---|---|
| Configuration | vsetvli, vsetivli, vsetvl |
| Integer | vadd, vsub, vrsub, vadc, vsbc, vsll, vsrl (.vv/.vx/.vi where defined) |
| Averaging and multiply | vaaddu, vmul, vmulhu |
| Divide | vdivu, vdiv, vremu, vrem |
| Compare | vmseq, vmsne, vmsltu, vmslt, vmsleu, vmsle, vmsgtu, vmsgt |
| Reduction | vredsum |
| Slides | vslideup, vslidedown (.vx/.vi) |
| Memory | unit-stride, strided and indexed (ordered/unordered) loads and stores for 8–64-bit elements |

All of these work with masking and with LMUL from 1/8 to 8.

Not built:

- floating point;
- widening and narrowing operations;
- saturating, min/max and arithmetic-shift operations;
- signed high multiplies;
- segment, whole-register and fault-only-first memory operations;
- the tail/mask-agnostic fill (undisturbed is used);
- resuming from a non-zero vstart (vstart is readable and writable, but
  instructions start at element 0).

The scalar core itself is not part of this design. Its interface is the
`vector_core` port list.

## Design choices beyond the original description

- **Stride units.** The constant stride is a byte stride (RVV 1.0).
  Scaling it by the element size would break standard strided code.
- **Shifter gates.** The 16/64-bit shifter combines the pseudo-shifter
  output with an OR gate. The 64-bit variant's pseudo-shifter takes a 5-bit
  amount, as a 32-bit half needs.
- **Split-mode amounts.** In split mode each half of a 16/64-bit shifter has
  its own shift amount (`shamt_hi`).
- **Rounding for vaaddu.** The halver gets the adder's carry as the bit
  shifted in, and a second adder adds the rounding bit.
- **Sequencer.** A multicycle state machine replaces a pipeline. The unit
  runs one instruction at a time.
- **AND-OR selects.** Selections after arithmetic use AND-OR gating instead
  of multiplexers: the carry-select sums, the cumulative-tree nodes, the
  shifter and slider outputs, and the execute result. This keeps logic
  synthesis from trying to share those units.

## Verification

Each module has a self-checking testbench in `tb/`. Each one:

- drives random and corner-case stimulus;
- compares against a behavioural model;
- prints `TB_RESULT checks=N failures=M` at the end;
- has a watchdog.

`tb_vector_core` runs the full-size unit. It plays both the scalar core and
a memory that withholds grants and delays load data at random. The run:

1. Loads all registers from random memory.
2. Issues 3000 random instructions across all supported classes, element
   widths, LMUL values, vl values (including 0) and masks, plus illegal
   encodings.
3. After every instruction, compares the whole register file and the
   returned vl against a reference model.
4. At the end, compares all of memory.

It counts each mechanism it exercised:

- configuration and fractional LMUL;
- vl = 0 and illegal instructions;
- masking, register groups and tails;
- compares and reductions;
- slides up and down;
- divides, multiplies, shifts, averages and add-with-carry;
- each load mode, stores and memory stalls.

The run fails if any mechanism never occurred.

## Files

| Path | Contents |
|---|---|
| `rtl/vec_pkg.sv` | Shared types: element width, operation codes, macro-operation record |
| `rtl/vector_core.sv` | Top level: sequencer, memory port, instance wiring |
| `rtl/vector_predecode.sv`, `rtl/vector_udecode.sv` | The two decoder stages |
| `rtl/vector_csr.sv` | CSRs and vset* logic |
| `rtl/vector_regfile.sv` | Vector register file |
| `rtl/vector_execute.sv` | Row execute stage wrapping the lane units |
| `rtl/vector_adder_cell.sv`, `rtl/vector_adder.sv` | Adder / compare |
| `rtl/vector_halver.sv` | Divide-by-two unit |
| `rtl/pseudo_shifter.sv`, `rtl/shifter16.sv`, `rtl/shifter64.sv`, `rtl/vector_shifter.sv` | Shifter |
| `rtl/vector_mul_cell.sv`, `rtl/vector_multiplier.sv` | Multiplier |
| `rtl/vector_divider.sv` | Iterative divider |
| `rtl/vector_slider.sv` | Slide unit |
| `rtl/vector_cumulative_adder.sv` | Reduction adder tree |
| `rtl/vector_addr_gen.sv` | Load/store address generator |
| `tb/rvv_enc_pkg.sv` | Instruction encoders used by the testbenches |
| `tb/tb_*.sv` | One testbench per module; `tb_vector_core.sv` is the end-to-end test |
