# GPCIM: one memory array serving as a vector CPU and a CNN accelerator

In a typical edge AI system, a CPU prepares data, a DMA engine copies it into an
accelerator, the accelerator runs the network, and the DMA copies the results back
for post-processing. Much of the time goes on those copies and on the CPU work between
layers, not on the multiply-accumulates. GPCIM avoids the copies by running both jobs
in the same compute-in-memory (CIM) macros:

* In **CPU mode** each macro is one lane of a SIMD vector processor. Its two SRAM
  arrays act as register file and data cache at once, and its central computing unit
  (CCU) is the ALU. An instruction names memory rows directly, so there are no load
  or store instructions and no separate register file.
* In **DNN mode** the same arrays do a digital CIM dot product. The bit cells of one
  array multiply stored activation bits by weight bits, the CCU's adder trees sum the
  products, and the results are written into the other array.

A CPU program can therefore write the CNN input straight into the array the CNN reads
from. It switches to DNN mode, and the outputs land where the CPU's next instructions
read them. No data moves between cores.

This RTL implements that architecture at the block level. Sizes, encodings and timing
details the architecture leaves open are filled in here; they are listed under
"Where this RTL makes its own choices" below.

## Block diagram

```
            host load port (idle only)
   ┌──────────────┬───────────────┬─────────────────────────────┐
   ▼              ▼               ▼                             │
┌────────┐  ┌───────────┐   ┌──────────────────── lane 0..LANES-1 (cim_macro) ─┐
│ icache │  │weight_sram│   │  ┌────────┐  prod[31:0]  ┌──────────────────┐    │
└───┬────┘  └─────┬─────┘   │  │ DAMEM  │─────────────▶│ CCU              │    │
    │ instr       │ 32x8b   │  │128x32b │◀── wbit ──┐  │ 4 adder trees    │    │
┌───▼────────┐    │ row     │  └───▲────┘           │  │ shared adder/acc │    │
│cpu_pipeline│    ▼         │      │ rd/wr          │  │ ALU (MUL, POPC..)│    │
│ IF │ EX    │  bit select ─┼──────┼────────────────┘  └───▲──────┬───────┘    │
└─┬──────┬───┘  (wsel)      │  ┌───▼────┐  2R + 1W         │      │           │
  │ dec  │SWITCH            │  │ DOMEM  │──────────────────┘      │           │
  │      ▼                  │  │128x32b │◀────────────────────────┘           │
  │  ┌────────┐  da_addr,   │  └────────┘   result / MAC output               │
  │  │dnn_ctrl│─ shift, neg,│                                                  │
  │  └────────┘  acc, write └──────────────────────────────────────────────────┘
  ▼
┌────────┐ MVCSR / PCS
│csr_file│ layer configuration, mode, counters
└────────┘
```

`gpcim_top` holds one instruction cache, one weight SRAM, the CSRs, the CPU pipeline
and the DNN sequencer. It also holds `LANES` CIM macros. Every lane gets the same
control signals and works on its own data.

## The CIM macro (`cim_macro`)

| Part | Role in CPU mode | Role in DNN mode |
|---|---|---|
| DAMEM (`damem`), 128 x 32 b, one read and one write per cycle | data cache | stationary input activations, stored as bit-planes; row read ANDed with per-column weight bits |
| DOMEM (`domem`), 128 x 32 b, two reads and one write per cycle | register file and data cache | output memory |
| CCU (`ccu`) | 32-bit ALU | four 8-input adder trees plus shift-accumulate |

Reads are combinational and writes land at the clock edge. In the silicon this
corresponds to a cycle in which write-back happens first, then the bit lines are
pre-charged and discharged, the sense latches update, and the vector execute follows.
A result written at the end of one cycle is what the next instruction reads, so the
pipeline needs no forwarding.

The CCU shares logic between the modes:

* The one 32-bit adder either adds ALU operands (ADD, SUB and compares) or adds the
  next MAC term to the accumulator.
* In CPU mode the four adder trees count the bits of operand A, for the POPC instruction.
* The operands of whichever half is idle are forced to zero (input gating). The ALU
  output is zero in DNN mode. The adder trees see zeros in CPU mode except during POPC.

## DNN mode: the bit-serial MAC

This is the least obvious part of the design.

**Data layout.** A layer computes up to `n_out` output channels. Each is a dot product
over 32 input channels: 8-bit unsigned activations times 8-bit two's-complement weights.

* The activations sit in 8 consecutive DAMEM rows from `DA_BASE`. Row `DA_BASE+i` holds
  bit `i` of all 32 activations, with bit `c` of the row belonging to input channel `c`.
* Output channel `o` takes its weights from weight-SRAM row `W_BASE+o`. That row holds
  32 weights of 8 bits, with weight `c` in bits `[8c+7:8c]`.

**One cycle.** `dnn_ctrl` picks an input bit `i` and a weight bit `j`:

1. DAMEM reads row `DA_BASE+i`. Each column multiplies its stored bit by bit `j` of
   that column's weight (`prod = row & wbit`).
2. The four adder trees count the 32 products: 8 columns each, then the four counts are
   added, giving a value from 0 to 32.
3. The count is shifted left by `i+j` and added to the accumulator. When `j = 7` it is
   subtracted instead, because that is the weight's sign bit.

**Loop order.** The weight bit is the outer loop and the input bit-plane the inner one.
Each output channel therefore takes exactly 64 cycles. The first cycle clears the
accumulator. In the 64th cycle the final sum goes straight from the adder into DOMEM
row `DO_BASE+o`.

Result per lane and output channel:

```
out[o] = sum_{c=0..31} act[c] * w[o][c]     (act unsigned 8b, w signed 8b, 32-bit result)
```

The weight row is broadcast, so all lanes apply the same weights to their own inputs.
For example, four lanes can compute the same filter at four pixel positions.

A layer of `n_out` channels keeps the macros in DNN mode for exactly `64 * n_out`
cycles.

## Instruction set

Every instruction is 32 bits with a 5-bit opcode in `[31:27]`:

* The first three opcode bits give the **location** of the result, source 1 and
  source 2: 0 means DOMEM, 1 means DAMEM.
* The last two bits give the class.

Addresses are DAMEM or DOMEM row numbers. Constructors for every class are in
`gpcim_pkg` (`enc_r`, `enc_i`, `enc_b`, `enc_s`).

| Class `[28:27]` | Fields | Meaning |
|---|---|---|
| 00 R | `[26:20]` rd, `[19:13]` rs1, `[12:6]` rs2, `[3:0]` op | `rd = rs1 op rs2` in every lane |
| 01 I | `[26:20]` rd, `[19:13]` rs1, `[12:9]` op, `[8:0]` imm (signed) | `rd = rs1 op imm` |
| 10 B | `[26:20]` target PC, `[19:13]` rs1, `[12:6]` rs2, `[2:0]` cond | JMP, BEQ, BNE, BLT, BGE on the lane-0 values |
| 11 S | `[26:20]` rd, `[19:13]` rs1, `[12:6]` imm7, `[5:3]` csr, `[2:0]` func | NOP, MVCSR, SWITCH, PCS, HALT |

ALU operations: ADD, SUB, AND, OR, XOR, SLL, SRL, SRA, SLT, SLTU, MUL (low 32 bits),
MIN, MAX (signed) and POPC.

Rules and constraints:

* DAMEM has a single read port, so an instruction with **both sources in DAMEM** is
  illegal. It stops the core and sets `error`.
* There is no indirect addressing. Loops keep their counters in DOMEM rows and branch
  on lane 0.

The special instructions:

* **MVCSR** writes a CSR. The value is the lane-0 value of rs1, or imm7 when opcode
  bit 2 is set.
* **SWITCH** starts a DNN layer with the configuration currently in the CSRs. The
  pipeline holds the SWITCH in its execute stage until the layer finishes. The core
  then returns to CPU mode by itself.
* **PCS** copies a CSR into row rd of DOMEM in every lane, for example to read the
  layer counter.

CSR map (`gpcim_pkg::csr_e`):

| Index | Name | Access | Meaning |
|---|---|---|---|
| 0 | MODE | read only | 0 CPU, 1 DNN |
| 1 | DA_BASE | read/write | first DAMEM bit-plane row |
| 2 | W_BASE | read/write | first weight row |
| 3 | DO_BASE | read/write | first DOMEM output row |
| 4 | N_OUT | read/write | number of output channels |
| 5 | DNN_DONE | read only | layers completed |
| 6 | CYCLE | read only | cycles since reset |
| 7 | SCRATCH | read/write | free |

A typical sequence that hands data from the CPU to the CNN and back:

```
XORI  DAMEM[p] <- DOMEM[p] ^ -1      ; preprocess, result lands in the CNN input array
MVCSR DA_BASE, W_BASE, DO_BASE, N_OUT
SWITCH                               ; layer runs, outputs land in DOMEM rows
MAXI  DOMEM[o] <- DOMEM[o] max 0     ; post-process in place (ReLU, scale, bias, ...)
```

## Pipeline and timing (`cpu_pipeline`)

The pipeline has two stages:

* **IF** registers the instruction at `pc`.
* **EX** decodes it, reads the operands from the macros, executes and writes back, all
  in one cycle.

Without stalls or branches, one instruction retires per cycle. Branches are resolved in
EX. A taken branch costs one bubble because the instruction fetched behind it is
flushed.

A SWITCH stalls for one cycle while the sequencer starts, then for `64 * N_OUT` cycles.
A program's cycle count is therefore

```
1 + instructions retired + taken branches + sum over SWITCHes of (1 + 64 * N_OUT)
```

## Host port and running a program

While `running` is low:

* `host_ic_*` writes instructions.
* `host_w_*` writes 256-bit weight rows.
* `host_mem_*` writes a DAMEM or DOMEM row of one lane, and reads one back
  combinationally on `host_mem_rdata`.

A one-cycle `start` runs the program from PC 0. The core stops at HALT or at an illegal
instruction; `halted` then goes high, and `error` marks the illegal case.

## Parameters

| Module | Parameter | Default | Note |
|---|---|---|---|
| gpcim_top | LANES | 4 | number of CIM macros / vector lanes |
| gpcim_top | DA_ROWS, DO_ROWS | 128 | rows per lane; the 7-bit address fields limit them to 128 |
| gpcim_top | IC_DEPTH | 128 | instructions; branch targets are 7 bits |
| gpcim_top | W_DEPTH | 64 | weight rows (output channels) |
| gpcim_pkg | NCOL, NTREE, ABITS, WBITS | 32, 4, 8, 8 | columns, adder trees, activation and weight bits |

## Where this RTL makes its own choices

The following points are choices of this RTL rather than fixed by the architecture:

* **Sizes:** the lane count and all memory depths.
* **Encoding:** the instruction field layout, the ALU operation list, the branch
  conditions and the CSR map. The meaning given to PCS (copy a CSR into DOMEM) is also
  a choice.
* **MAC scheme:** the bit-plane storage of activations, unsigned activations with
  signed weights, the 32-column dot product, the 8+8+8+8 split of the adder trees and
  the 64-cycle loop order.
* **Memory model:** combinational reads with edge-triggered writes, which stand in for
  the multi-phase single-cycle memory access.
* **Program and weight loading:** a host port usable only while the core is idle.
* **Clock gating:** no gating cell is instantiated. The accumulator's load enable
  (DNN mode and `acc_en`) is the condition a clock-gating insertion step turns into a
  gated clock. Input gating is in the RTL.
* **Bit cells:** the 9T/8T bit cells, the NAND-based in-cell multiply and the
  pre-charge circuits are represented only by their logic function.

Not implemented:

* Division and exponentiation instructions. CPU-side workloads need them as software
  routines.
* Automatic handling of layers with more than 32 input channels or more than 8-bit
  operands. Larger layers must be split into 32-channel passes, with the CPU adding the
  partial sums.
* Hardware support for turning a layer's 32-bit outputs back into 8-bit bit-planes for
  the next layer. The CPU can do it with shifts, ANDs and ORs, at about three
  instructions per channel and bit. Without indirect addressing this has to be unrolled,
  so the 128-entry instruction memory limits how many channels one program can
  re-lay out.

## Files

`rtl/` holds one module or package per file:

* `gpcim_pkg`: types, constants and the instruction encoders
* `gpcim_top`
* `cim_macro`, `damem`, `domem`, `ccu`, `adder_tree`
* `weight_sram`, `icache`, `csr_file`
* `instr_decoder`, `cpu_pipeline`, `dnn_ctrl`

`tb/` has a self-checking testbench `tb_<module>.sv` for each module. Each one prints
`TB_RESULT checks=N failures=M`. `tb_gpcim_top` runs the whole processor at its default
parameters:

* It loads raw input bit-planes into DOMEM and preprocesses them into DAMEM with vector
  instructions.
* It runs two 4-channel layers through a SWITCH loop.
* It post-processes the outputs with ReLU, shift and bias.
* It checks every lane's results against a reference model.
* It checks the cycle count given by the formula above.
* It counts mode switches, stalls, branch flushes, DAMEM reads and writes by the CPU,
  DNN write-backs, MVCSR and PCS, and fails if any of them never happened.

Two more testbenches run workloads on the default processor:

* `tb_workload_classify` is an image-classification flow. For each lane it does:
  * pixel preprocessing into DAMEM;
  * a 64-input, 8-class fully connected layer, run as two 32-channel DNN passes;
  * CPU addition of the partial sums, then bias and ReLU;
  * a branch-free arg-max.
* `tb_workload_slam` mixes CNN and non-CNN work, as a SLAM pipeline does:
  * an exponentiation by a multiply loop;
  * a two-channel CNN layer;
  * ReLU;
  * a 32-bit restoring division written as a 32-iteration loop of vector
    instructions.

`tb_gpcim_lanes8` builds the processor with 8 lanes and runs a short preprocess,
layer and post-process program on all of them.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/gpcim_pkg.sv tb/tb_gpcim_top.sv --top-module tb_gpcim_top -o sim
./obj_dir/sim
```

Replace `tb_gpcim_top` with any other testbench name to test a single block. The
full-design test finishes in well under a second of simulation time.

Lint: `verilator --lint-only -Wall -Irtl -y rtl rtl/gpcim_pkg.sv rtl/gpcim_top.sv`.
The remaining warnings are:

* unused decode fields and debug signals (`stall`, `flush`) kept for observation;
* the accumulator output of the macro, which is used only inside the CCU;
* `rst_n` appearing both in flip-flops and in `disable iff` of the assertions.
