# ISSIMD DSP core: a SIMD DSP whose vector width is set by software

This is synthesizable SystemVerilog for an embedded fixed-point DSP core. The
core has eight identical 16-bit processing units that all execute the same
instruction (SIMD). Two ideas set it apart from a plain SIMD machine:

* **Instantly scalable SIMD (ISSIMD).** Mode registers, written by ordinary
  instructions, choose which units take part in the following instructions.
  Any subset of the eight can be on (a vector of that dimension), or a single
  unit can run alone (scalar). A unit that is off writes nothing: no registers,
  flags or memory. Vectors of different lengths can be handled in one program
  without padding or masking code.
* **Reconfiguration to 32 bits.** Each group of four units (DP1–DP4, DP5–DP8)
  can be joined into one 32-bit datapath. The array then works as two 32-bit
  datapaths. The four 17×17 multipliers of a group then form one 32×32
  multiplier with an 80-bit accumulator.

A vector adder sums the accumulators of the active units in one cycle. This
ends a dot product or FIR output that was spread across the datapaths. At
125 MHz the eight MACs give 10⁹ 16-bit MACs/s. The two 32-bit MACs give
2.5·10⁸ 32-bit MACs/s.

The design follows a published processor: a 0.18 µm prototype with 8k×24
program memory and 16 × 1k×16 data memory. The publication describes the
architecture and the datapath arithmetic but not the instruction set. This
RTL therefore stops at the decoded instruction. The core takes a *decoded
control word* (`dec_ctrl_t`) each cycle and brings the fetched 24-bit words
out to an external decoder. Everything behind that boundary is here.

## Block map

```
                 +-------------------+      +-------------------------------+
 seq ops ------> | program_sequencer |----->| pm_mem 8k x 24 (2-cycle read) |--> instr, instr_pc
 irq ----------> | PC/loop/status    | pc   +-------------------------------+
                 +-------------------+                ^ ext writes
 ctrl (dec_ctrl_t, data-address stage)                |
   |--> dag (DAG1) --addr X--+              +-------------------+
   |--> dag (DAG2) --addr Y--+------------->| mem_ctrl          |<--> ext_req/ack/addr/data
   |                         |              +-------------------+
   |                         v                 |16 x dm_bank 1k x 16 (DM1X, DM1Y, ... DM8Y)
   +-- one cycle later (execute stage) --------+--------------------+
        |                                                            |
        v                                                            v
  recfg_adapter A: pu16 DP1..DP4 + acc80   vector_adder   recfg_adapter B: DP5..DP8 + acc80
        ^                ^                                           ^
   issimd_mode (mask, 16/32-bit, scalar/vector, register set)   bus_ctrl (DREG <-> xfer)
```

| module | role |
|---|---|
| `dsp_pkg` | shared types: register names, operation codes, control-word structs |
| `issimd_dsp_top` | the core: wiring, fetch tagging, data-address → execute pipeline register |
| `recfg_adapter` | four `pu16` + `acc80`; 16-bit or 32-bit group |
| `pu16` | one processing unit: `dreg`, `alu16`, `mac16`, `shifter16`, AF/SE/SB, flags |
| `booth_mul17` | 17×17 radix-4 Booth multiplier (one per unit) |
| `mac16` / `acc80` | 40-bit MAC of a unit / 80-bit accumulator of a 32-bit MAC |
| `alu16`, `shifter16`, `dreg` | ALU with carry chain, barrel shifter, register file |
| `vector_adder` | one-cycle sum of selected accumulators |
| `issimd_mode` | mode registers and unit enables |
| `dag` | data address generator (circular, bit-reversed, pre/post-modify) |
| `dm_bank`, `pm_mem` | data and program memories (plain arrays) |
| `mem_ctrl` | shares the memories between the core and the external bus |
| `bus_ctrl` | register transfers between datapaths and the transfer register |
| `program_sequencer` | fetch address, jumps, calls, hardware loops, interrupt |

## Dimension control: who takes part in an instruction

`issimd_mode` holds five fields (`mode_t`): `mask[7:0]`, `w32`, `vec`,
`sidx[2:0]` and `bank`. From them it derives the enables:

| mode | enabled units |
|---|---|
| 16-bit vector (`w32=0, vec=1`) | unit *i* if `mask[i]` |
| 16-bit scalar (`w32=0, vec=0`) | only unit `sidx` |
| 32-bit vector (`w32=1, vec=1`) | group A (DP1+DP2) if `mask[0]`, group B (DP5+DP6) if `mask[1]` |
| 32-bit scalar (`w32=1, vec=0`) | group `sidx[0]` |

Mode writes happen in the execute stage and apply from the next instruction.
The vector adder sums exactly the enabled units, so the mask also sets the
length of a reduction. Reset gives 16-bit vector mode with all eight units on.
An interrupt switches to the secondary register set (`bank`). The status
stack saves the whole mode word, and the interrupt return restores it.

## Inside a processing unit

`dreg` holds sixteen 16-bit registers, numbered in this order:

| 0–3 | 4–7 | 8–11 | 12–15 |
|---|---|---|---|
| AX0 AX1 MX0 MX1 | AY0 AY1 MY0 MY1 | MR2 MR1 MR0 AR | SR2 SR1 SR0 SI |

MR2:MR1:MR0 is the 40-bit MAC accumulator and SR2:SR1:SR0 the 40-bit shifter
result. In each, the top register holds bits 39:32, sign-extended to 16 bits.
A second full set of registers is selected by `bank`.

The port budget is deliberately small: three 16-bit read ports, one 40-bit
read port, one 40-bit write port and two 16-bit write ports. In one cycle a
unit can therefore do the following:

* one compute operation: ALU, MAC or shifter, with operands on read ports a/b,
  MR or SR on the wide port, and the result on the wide write port;
* one load from its DMX block (write port a) and one from its DMY block
  (write port b);
* one store to DMX or DMY (read port c).

A bus-controller read shares port c with the store. A bus write shares write
port b with the DMY load. Assertions in `pu16` flag either clash.

All arithmetic finishes in the execute cycle. Operands are read, computed and
written back at the clock edge, so a result can be used by the next
instruction.

* **MAC** (`mac16`): X and Y are each signed or unsigned, in integer or
  fractional mode. Fractional mode doubles the product (1.15 × 1.15 → 1.31).
  Operations are MUL, MAC, MSU, CLR, RND and SAT. Rounding adds 2¹⁵ and clears
  MR0. Saturation clamps to the signed 32-bit range. The MV flag marks a result
  outside that range.
* **ALU** (`alu16`): PASSX/PASSY, ADD, ADDC, SUB, SUBR, NEG, INC, DEC, AND, OR,
  XOR, NOT and ABS. It sets the flags AZ, AN, AV and AC. The result goes to AR
  or to the feedback register AF, and AF can be the Y operand.
* **Shifter** (`shifter16`): the input is placed in the low half (sign- or
  zero-extended) or the high half of a 32-bit field. It is then shifted by SE
  or an immediate: positive shifts left, negative shifts right. ASHIFT is
  arithmetic and LSHIFT logical. The result can be ORed into SR. EXP sets
  SE = −(redundant sign bits). NORM shifts left by −SE. EXPADJ keeps the
  largest exponent of a block in SB, for block floating point.

## Joining four units into a 32-bit datapath

This part is the least obvious. In 32-bit mode a 32-bit value lives in two
units under one register name: the low half in DP1 and the high half in DP2
(DP5/DP6 in group B). DP3/DP4 do no compute, load or store of their own. The
adapter borrows their multipliers.

**Multiply.** With A = Ah·2¹⁶ + Al and B = Bh·2¹⁶ + Bl:

    A·B = 2³²·(Ah·Bh) + 2¹⁶·(Ah·Bl + Al·Bh) + Al·Bl

The low halves are always unsigned. The high halves are signed or unsigned as
the instruction says. Every factor therefore fits a 17-bit signed number, and
that is why each unit has a 17×17 multiplier rather than a 16×16 one. The
adapter drives the four multipliers as follows:

| multiplier | product |
|---|---|
| DP1 | Al·Bl |
| DP2 | Ah·Bh |
| DP3 | Ah·Bl |
| DP4 | Al·Bh |

`acc80` aligns the four products, adds the 80-bit accumulator
{MR of DP2, MR of DP1} and applies MUL/MAC/MSU/CLR, rounding (at bit 31) and
saturation (to 64 bits). The result is written back into the two MR groups
through the units' override write path. A 32×32 MAC still takes one cycle.

**ALU.** DP2's ALU takes DP1's carry-out as its carry-in and DP1's zero flag
into its own. Every arithmetic operation is written as `a + b + carry`, so
ADD, SUB, NEG, INC and DEC all chain, and DP2's flags are the 32-bit flags.
ABS is the exception: it acts per half.

**Shift.** DP1 shifts its low half logically from the low position. DP2 shifts
its high half from the high position, arithmetically or logically as the
instruction asks. Both use the same amount (DP1's SE or the immediate). OR-ing
the two 32-bit fields gives the shifted 32-bit value, written to SR0 of DP1
and DP2. NORM, EXP and EXPADJ act on each half separately.

## Memories, addresses and the pipeline

Each unit has its own DMX and DMY block (1k×16 each). All eight DMX blocks
receive the same address from DAG1, and all DMY blocks the same address from
DAG2. One instruction can therefore load 16 words and do 8 MACs with only two
address calculations.

Each `dag` has four sets of I (index), M (modify, signed), L (length) and B
(base) registers:

* **Post-modify:** the address is I, then I += M.
* **Pre-modify:** the address is I + M, and I is unchanged.
* **Circular:** with L ≠ 0 the update wraps inside [B, B+L).
* **Bit-reversed:** with `brev`, the update is a reverse-carry add. With
  M = N/2 this walks an N-point buffer in bit-reversed order (FFT reordering).

The pipeline, as built:

1. `program_sequencer` issues the fetch address.
2. `pm_mem` registers the address (pre-fetch).
3. `pm_mem` registers the word (fetch). `instr`, `instr_pc` and `instr_valid`
   go to the decoder.
4. **Data-address stage.** The decoder presents `ctrl` with `ctrl_valid`. The
   DAGs form addresses and update, and the DM reads are issued.
5. **Execute stage**, one cycle later. The units compute, loads are written
   into DREG, stores are written to DM at the address formed in stage 4, and
   mode, bus and vector-add operations act.

Instruction decode sits between stages 3 and 4, outside this RTL. A store is
visible to a load two instructions later, not to the very next one: there is
no forwarding. `dm_bank` has one read and one write port so that a load and
the store of the previous instruction can overlap.

Flow control (`seq_ctrl_t`: JUMP, CALL, RET, DO, RTI, HOLD, with a condition
bit) acts directly on the fetch address. The decoder has to account for the
instructions already in the fetch pipeline. Stack depths are 33 (PC), 8
(loops) and 16 (status). A hardware loop jumps from its last address back to
its start, and its counter runs without extra cycles.

## External access and register transfers

`mem_ctrl` gives the external bus access to every memory when the core leaves
the port free:

* `ext_space=1` selects DM. `ext_addr[13:10]` is the block: even is DMnX, odd
  is DMnY, n = 1 + block/2. `ext_addr[9:0]` is the word.
* `ext_space=0` selects PM, which is granted only while the core is not
  fetching (`run=0`).
* Handshake: hold `ext_req` until the one-cycle `ext_ack`. A write is acked
  after 1 cycle, a DM read after 2 and a PM read after 3. Read data is valid
  with the ack.

`bus_ctrl` moves 16-bit words in the execute stage:

* an immediate into a register of every enabled unit;
* a register of one unit into a register of every enabled unit;
* a register of one unit into the transfer register `xfer`;
* `xfer` into every enabled unit.

`xfer` is the core's window to control registers or a host, and it can be
loaded from outside.

## Where this RTL departs from or goes beyond the published design

* **No instruction set.** The 24-bit encoding and the low-power,
  type-separated decoder are not published. The control-word layout in
  `dsp_pkg` is this design's own.
* **Not modelled:** JTAG and the PLL, because no function is given for JTAG
  and the PLL is an analog macro. Page-mode access and multiprocessor
  arbitration in the memory controller are also not modelled.
* **Arithmetic structure.** The multiplier uses radix-4 Booth recoding as
  published. The Wallace trees and fast carry-lookahead adders are written as
  sums, and the synthesis tool chooses the adder structure.
* **Own choices where the publication gives only the function:**
  * the operation sets of the ALU, MAC, shifter and bus controller;
  * rounding and saturation points;
  * the SE/SB conventions;
  * the DAG register sets and the reverse-carry method;
  * the scalar-mode rule;
  * saturation in the vector adder, whose result goes to MR of DP1;
  * the external handshake and address map;
  * the interrupt vector (address 4) and saving the mode word on the status
    stack;
  * reset values.
* **Not built:** the next-generation features the publication mentions (8-bit
  sub-word splitting, and a 32-bit MAC from two units with a pipelined
  multiplier).

## Simulating

Every testbench in `tb/` checks itself and ends with
`TB_RESULT checks=N failures=M`. The package must be compiled first:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/dsp_pkg.sv tb/tb_issimd_dsp_top.sv --top-module tb_issimd_dsp_top -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run a unit test: `tb_booth_mul17`, `tb_mac16`,
`tb_alu16`, `tb_acc80`, `tb_shifter16`, `tb_dreg`, `tb_pu16`,
`tb_recfg_adapter`, `tb_vector_adder`, `tb_issimd_mode`, `tb_dag`,
`tb_dm_bank`, `tb_pm_mem`, `tb_mem_ctrl`, `tb_bus_ctrl` or
`tb_program_sequencer`.

The unit tests compare each block against arithmetic written independently in
the testbench, using tens of thousands of random vectors for the arithmetic
units. `tb_issimd_dsp_top` runs the full-size core with no parameter changes.
It plays the host and the decoder, and covers:

* program load and fetch, a hardware loop, and an interrupt with register-set
  switch and return;
* 8-way dot products, which take 2 + h instructions for eight h-tap outputs,
  matching the published block-FIR rate of (x/8)(2+h) cycles;
* the same with a 4-unit mask and in scalar mode;
* 32-bit multiply-accumulate in both groups;
* vector adds, including saturation;
* circular and bit-reversed loads;
* stores read back over the external bus, including one that has to wait for
  the core;
* bus transfers.

It counts each of these mechanisms and fails if one never happened.

`tb_dsp_kernels` runs three benchmark kernels on the full-size core.

* **Complete block FIRs** for (x, h) = (64, 16), (128, 7) and (16, 32).
  * Each datapath takes x/8 consecutive outputs.
  * DAG1 walks the samples: M0 = +1, and M1 = −(h−2) on the last tap to step
    back to the next output.
  * DAG2 walks the taps as a circular buffer of length h, so no set-up is
    needed between outputs.
  * A group of eight outputs costs h load+MAC instructions, one closing MAC
    and one store.
  * The test checks the count of exactly (x/8)(2+h) instructions, every
    40-bit accumulator, and every stored result.
* **Complex FIRs** for (x, h) = (8, 16) and (5, 32).
  * All eight units share each output, h/8 taps each.
  * The DMY blocks hold (cr, −ci) pairs for the real phase and (ci, cr) pairs
    for the imaginary phase, so both phases are plain MACs.
  * One output costs a real phase (h/4 MACs per unit), a vector add, an
    imaginary phase and a second vector add: h/2+2 instructions. That is the
    published figure.
  * Loads run one instruction ahead.
  * Each sum leaves DP1 through the transfer register in the next
    instruction, so no third data address is needed.
* **The reordering pass of a 256-point FFT.** A bit-reversed walk of DMX is
  stored in order into DMY on all eight datapaths. The load and the previous
  store share one instruction, so the pass takes 257 instructions.

## How far to trust it

* **Arithmetic units, register file, DAG, memories, sequencer:** each is
  checked in isolation against an independent reference. Each testbench was
  also shown to catch a deliberately broken copy of its block.
* **Integration:** checked by directed end-to-end tests: the mechanism test
  and the two benchmark kernels. There is no random program-level test and
  no reference instruction-set model, since no instruction set exists.
* **Benchmarks not run:** the biquad IIR, because its published figure
  (0.625 cycles per biquad + 5) does not say how sections map onto the units,
  and the FFT butterflies.
* **Pipeline timing** at the decoder boundary, including flow-control delay
  and store-to-load distance, is this design's own. Any real decoder has to
  be written against it.
