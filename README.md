# A scalable soft vector co-processor

A small soft CPU in an FPGA runs data-parallel loops slowly: one element per
instruction, one instruction per cycle. The usual way to speed such a loop up
is a custom accelerator, which needs a hardware designer for every kernel. This
design takes the other route. A general-purpose **vector unit** sits next to
the scalar core. Software speeds up by writing vector code, and the hardware is
scaled by one main knob, the number of **vector lanes**. Each lane is a full
copy of the datapath. All lanes get the same control signals and work on
different elements of the same vector instruction. Eight lanes finish a 32-element
instruction in 4 cycles, where the scalar core would need 32.

The architecture follows a published VIRAM-style soft vector processor for
Altera Stratix III devices. Three features were added to suit FPGAs:

* the vector register file is split across the lanes, so it fits small block
  RAMs;
* multiply-accumulate units in the DSP blocks are chained to reduce a vector
  to a sum quickly;
* every lane has a small local memory, used for table lookups.

This repository holds the vector unit in synthesizable SystemVerilog, a 128-bit
on-chip main memory, and self-checking testbenches. The scalar core and its
instruction fetch are **not** included (see "What is outside the RTL").

## Configuration

All sizes are parameters of the top module `soft_vector_processor`. The
defaults are in `svp_pkg` and describe the eight-lane configuration ("V8F"):

| Parameter   | Default | Meaning |
|-------------|---------|---------|
| `NLANE`     | 8       | vector lanes (power of two, at least 4) |
| `MVL`       | 32      | maximum vector length (elements per register) |
| `VPW`       | 32      | element / datapath width in bits |
| `MEMMINW`   | 8       | narrowest memory access (8 = byte, 16, 32) |
| `MULTW`     | 16      | multiplier width (0 = no multiplier) |
| `MACL`      | 2       | MAC units per cascade chain (0 = no MAC units) |
| `LMEMN`     | 256     | local-memory words per element section (0 = none) |
| `LMEMW`     | 32      | local-memory word width |
| `LMEMSHARE` | 0       | 1 merges a lane's sections into one shared table |
| `MEM_LINES` | 4096    | 128-bit lines of main memory (64 KB) |
| `IQ_DEPTH`, `RQ_DEPTH` | 8, 4 | instruction / result queue depths |

Other published configurations are reached by overriding these values:

| Configuration | Overrides |
|---------------|-----------|
| 4 lanes       | `NLANE=4, MVL=16, MACL=1` |
| 16 lanes      | `NLANE=16, MVL=64, MACL=4` |
| 16 lanes, minimal | `NLANE=16, MVL=64, MEMMINW=32, MACL=0, LMEMSHARE=1` |
| 16 lanes, 16-bit  | `NLANE=16, MVL=64, VPW=16, MACL=4, LMEMN=0` |

`MVL/NLANE` (the element slots per lane) is 4 in all of them. `tb_configs`
runs one short program at all four of these sizes. The program covers
loads, stores, masks, MAC chains, `vext.vv` and local memory, wherever the
configuration has them. With `VPW=16`, elements are moved to and from memory
as halfwords.

## How vectors are laid out: lanes and slots

Element `e` of every vector register lives in lane `e mod NLANE`, at
**slot** `e / NLANE`. At the defaults, lane 3 holds elements 3, 11, 19 and 27
in slots 0 to 3. Each lane's share of the 64 registers is one RAM of
`64 × 4` words (`vrf_bank`). The RAM is kept twice, with every write going to
both copies, which gives the two read ports the ALU needs. The eight flag
registers are split across the lanes in the same way (`vflag_file`). Flag
`vf0` or `vf1` is the write mask of a vector instruction: bit `msk` of the
instruction chooses which.

An instruction with vector length `VL` becomes `ceil(VL/NLANE)` **slot
operations**, one per cycle, with all lanes working on the same slot. Element
`e` is active when `e < VL`. Vector data is written only where the active
element's mask flag is set.

## Instruction path and pipeline

```
scalar core ──► instruction queue ──► vector_control ──► NLANE × vector_lane
  (outside)      (instr + scalar)        │  VL, vbase, vinc, vstride
                                         ▼
               result queue ◄──── vext / vmcts    mem_unit ◄──► main_mem (128 bit)
```

The scalar core pushes each vector instruction into the instruction queue
together with its scalar operand (`vi_valid`/`vi_ready`/`vi_instr`/`vi_scalar`).
`vector_control` takes instructions in order and issues one slot per cycle to
all lanes. The lane pipeline has two stages, plus a third for one
instruction:

* **R**: synchronous read of both source registers at `{register, slot}`.
* **X**: the ALU or another source produces the element, which is written
  back. Flags are written, store data is pushed into the lane's store buffer,
  and the local memory is accessed.
* **L**: only for `vldl`. The word read from local memory is written back one
  cycle later.

The register file forwards a write to a read of the same word in the same
cycle. So a dependent instruction can issue right after the last slot of the
one before it, with no stall. `vext` and `vmcts` send a word back through
the result queue (`vr_valid`/`vr_pop`/`vr_data`, first word fall-through).

Cycle counts, from one accepted instruction to the next:

| Instruction class | Cycles |
|---|---|
| arithmetic, logic, compare, flag, `vmac`, `veshift`, `vins`, `vstl` | `ceil(VL/NLANE)` |
| `vldl` (local-memory load) | `ceil(VL/NLANE) + 1` |
| `vmstc`, `vmcts`, `vext` | 1 slot |
| store, any addressing mode | `ceil(VL/NLANE)` to fill the store buffers; the memory unit drains them in the background |
| unit-stride or strided load | 1 to hand it to the memory unit; see "Loads overlap" |
| indexed load | `ceil(VL/NLANE)` to push the offsets; see "Loads overlap" |

An instruction that uses the loaded register sees
`2 + ceil(VL / min(NLANE, 128/width)) + ceil(VL/NLANE)` cycles after an
aligned unit-stride load, which is the published cycle model.

## The memory unit: the hardest part

`mem_unit` sits between the lanes and one 128-bit memory port. It works on
one command at a time, and the controller hands it a memory instruction only
when it is idle. So vector and scalar memory accesses stay in program order.
Addresses are bytes. The stride (`vstride`) counts elements. The
post-increment (`vinc`) and the indexed offsets count bytes.

**Loads (unit stride and constant stride).** The unit reads one 128-bit line
per cycle. One cycle later it moves every element of the access that lies in
that line to its lane's load buffer, up to `min(NLANE, 128/width)` elements.
`mem_align_xbar` does the byte-level alignment. It extracts a byte, halfword
or word at any byte offset of the line, and sign- or zero-extends it. A
strided or misaligned access that touches more lines costs one cycle per line.
When the last element is in a load buffer, the controller runs
`ceil(VL/NLANE)` write-back slots (the internal `VLDWB` operation) from the
load buffers into the register file.

**Loads overlap.** A load does not hold the controller while memory is
read. After the command is handed over, the next instructions issue as
usual, and the memory unit fills the load buffers at the same time. The
write-back slots go in at the next instruction boundary after the memory
unit reports the last element. Only one load can be pending. Until its
write-back, an instruction is held if it:

* names the load's destination register in any field;
* writes a flag register (the write-back is masked by a flag);
* changes VL (the write-back uses it);
* or needs the memory unit.

In-order issue plus this one check keeps results the same as strictly
sequential execution.

**Stores.** The controller reads the data register slot by slot into the
lanes' store buffers and moves on to the next instruction. The memory unit
then drains the buffers on its own. Per cycle it writes up to four
consecutive elements that fall in one line, with byte enables. Elements whose
mask bit was clear are skipped and not written. Later non-memory instructions
run in parallel with the drain. Only the next memory instruction, or a scalar
memory access, waits for it to finish.

**Indexed loads and stores.** The index register is read into the store
buffers as byte offsets, and each element then costs one memory cycle at
`base + offset`.

**Scalar port.** The scalar core reads and writes 32-bit words through `s_*`
(`s_req`, `s_we`, `s_addr`, `s_wdata`, `s_ack`, `s_rdata`). These accesses
are served only while the memory unit has no vector command.

**Vector-op bypass (`vext.vv`).** `vext.vv vd, va, k` sets
`vd[i] = va[i+k]`. Elements with `i+k ≥ MVL` get 0. It uses the memory
unit's datapath without touching memory. All `MVL` source elements go into
the store buffers. `vec_op_bypass` then hands up to `NLANE` elements per cycle
back to the load buffers, each shifted down by `k` positions. Element `j`
leaves lane `j mod NLANE` and enters lane `(j-k) mod NLANE`. After that, the
normal load write-back runs.

## Multiply-accumulate chains

Every group of four lanes feeds one `mac_unit`. `vmac` multiplies the four
active, unmasked element pairs of a slot (low `MULTW` bits, signed) and adds
the products to the unit's accumulator, one slot per cycle. The units are
linked in **cascade chains** of `MACL` units. Each unit passes
`acc + cas_in` to the next, so the last unit of a chain presents the chain's
total. `vcczacc vd` writes the total of chain `c` into element `c` of `vd`.
The other elements of `vd` are left unchanged. It then clears all
accumulators. At the defaults the two MAC units form one chain, so a full
32-element dot product becomes one value in element 0 after one `vmac` and
one `vcczacc`.

## Local memory

With `LMEMN > 0` each lane gets a local memory, with its own address space
that main memory cannot see. Every element gives its own address, taken from
a vector register. `vstl` writes and `vldl` reads, with one cycle of latency.
With `LMEMSHARE = 0` each element slot owns a private `LMEMN`-word section.
With `LMEMSHARE = 1` the sections merge into one table of
`MVL/NLANE × LMEMN` words that all elements of the lane index. A `vstl` with a
scalar data operand is a broadcast: the same value is written to every lane at
each element's own address. Broadcasting addresses 0..255 fills a 256-entry
lookup table, such as an AES substitution table, in every element's section.

## Shift chain, insert and extract

`veshift vd, va` moves every element up by one position through a chain
between neighbouring lanes: `vd[e] = va[e-1]` and `vd[0] = 0`. The last lane
hands its element on to lane 0 in the next slot. `vins vd, sc, n` writes the
scalar into element `n`. `vext va, n` returns element `n` of `va` through the
result queue. Together with `vmac`, these make the sliding-window FIR loop:
shift the sample vector, insert the new sample, multiply-accumulate, and
reduce.

## Control registers

`vctrl_regs` holds `VL` (register 0, clamped to `MVL`), eight base addresses
`vbase0..7` (8..15), eight increments `vinc0..7` (16..23) and eight strides
`vstride0..7` (24..31). They are written by `vmstc` and read by `vmcts`. A
memory instruction can add `vinc` to its `vbase` after it issues, which lets a
loop walk through memory without scalar help.

## Instruction encoding

The published instruction set gives mnemonics but no bit encoding, so this
encoding is the design's own (`vinstr_t` in `svp_pkg`):

```
op[31:26] vd[25:20] va[19:14] vb[13:8] msk[7] sv[6] mw[5:4] uns[3] aux[2:0]
```

* `sv = 1`: operand b is the scalar that came with the instruction.
* `mw`: memory width, 0 = byte, 1 = halfword, 2 = word.
* `uns`: unsigned compare or zero-extending load.
* Memory forms: `va[5:3]` selects `vbase`, `va[2:0]` selects `vinc`, `aux`
  selects `vstride`, `vb` is the index register, and `vb[0]` enables the
  post-increment.
* Flag operands use the low three bits of the register fields.

The operations are add, sub, mul, and, or, xor, sll, srl, sra, rot, absdiff,
min, max, mov, cmpeq, cmplt, cmple, the flag operations (and, or, xor, not,
mov, set, clr), vmac, vcczacc, vldl, vstl, veshift, vins, vext, vext.vv,
vmstc, vmcts, and loads and stores in unit-stride, strided and indexed form.
`mk()` in the package builds an instruction word.

## Top-level interface

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `vi_valid`, `vi_ready`, `vi_instr[31:0]`, `vi_scalar[31:0]` | in/out | instruction queue push |
| `vr_valid`, `vr_pop`, `vr_data[31:0]` | out/in | result queue |
| `s_req`, `s_we`, `s_addr`, `s_wdata`, `s_ack`, `s_rdata` | | scalar word access to main memory |
| `idle` | out | queues empty, nothing running, memory unit idle |

## Files

| Module | Role |
|---|---|
| `svp_pkg` | defaults, opcodes, instruction and memory-command types |
| `soft_vector_processor` | top: queues, controller, lanes, MAC chains, shift chain, memory |
| `vector_control` | decode, slot sequencing, stalls, memory-unit commands |
| `vctrl_regs` | VL, vbase, vinc, vstride |
| `vector_lane` | one lane: register and flag partitions, ALU, buffers, local memory |
| `vrf_bank`, `vflag_file` | register-file and flag partitions of a lane |
| `vlane_alu` | element ALU |
| `lane_local_mem` | lane local memory |
| `mac_unit` | four-lane multiply-accumulator with cascade in/out |
| `mem_unit`, `mem_align_xbar`, `vec_op_bypass` | memory unit, byte alignment crossbar, lane-to-lane bypass |
| `main_mem` | 128-bit on-chip SRAM with byte enables |
| `sync_fifo` | first-word-fall-through FIFO (queues and lane buffers) |

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`, and each has a watchdog. The
end-to-end test `tb_soft_vector_processor` runs the top at its default
parameters. It covers every load and store form, masked stores, MAC chains
with `vcczacc`, the shift chain, broadcast fill and lookup of a 256-word
local-memory table, `vext.vv`, store/compute and load/compute overlap, a
dependent instruction held behind a load, queue back-pressure and register
forwarding. It counts how often each of these happened and fails if
one never did. To run it:

```
verilator --binary --timing -Irtl rtl/svp_pkg.sv tb/tb_soft_vector_processor.sv \
          --top-module tb_soft_vector_processor -Mdir obj && ./obj/Vtb_soft_vector_processor
```

Use the same command for any other testbench. `tb_configs` also needs
`tb/tb_cfg_run.sv` on the command line.

`tb_kernels` runs four small programs on the default configuration and
checks each against a plain computation of the same thing:

* **8-tap FIR.** Per output: `veshift`, `vins` of the new sample, `vmac`
  against the coefficients, `vcczacc`, and `vext` to the scalar side. It
  produces 40 outputs.
* **5×5 median filter.** Unaligned byte loads gather the 25 window values of
  32 pixels into 25 byte arrays. A bubble sort, stopped halfway, then runs in
  memory. Each step is two byte loads, an unsigned compare into `vf1`, a
  masked move, and two byte stores masked by `vf1`. The sort of 32 pixels
  takes about 11,300 cycles, roughly 350 cycles per pixel.
* **Motion estimation.** Two 16×16 windows, 16 pixels apart, are matched at
  once (VL = 32). Each row is post-incremented byte loads, then `vabsdiff`
  and `vadd`. At the end, one `vmac` per window, masked by `vf1`, and a
  `vcczacc` give that window's sum of absolute differences.
* **AES table step.** Stride-4 word loads bring one state column of 32 blocks
  into one register. For each byte there is a shift and mask, a lookup in a
  256-word table in local memory (filled by broadcast), a rotate and an XOR.
  The table holds random words, so only the data movement of the round is
  checked.

## Where this design departs from the published one

* **Overlap is limited.** Memory and arithmetic instructions overlap as the
  published architecture allows, but with one outstanding load and
  conservative hazard rules (see "Loads overlap"). The published cycle
  model ignores overlap. Independent work therefore finishes sooner here
  than that model predicts.
* `vldl` takes one extra cycle per instruction (the L stage) compared with
  `ceil(VL/NLANE)`.
* **Memory line timing.** Main memory is single-cycle on-chip SRAM, read one
  128-bit line per cycle. DDR-SDRAM timing and bursts are not modelled. A
  misaligned unit-stride load that spans more lines than the aligned case
  takes one extra cycle per line.
* **Local-memory size.** A section is taken to hold `LMEMN` words, so a lane
  has `MVL/NLANE × LMEMN` words. Merging keeps that size. This is the reading
  under which the published AES example (a 256-entry table per element on
  the 8-lane configuration) fits.
* **Bypass.** The lane-to-lane bypass serves only vector extraction. It
  rotates whole elements in the memory unit rather than passing through the
  byte crossbar.
* **Flags.** Compares can write any of the eight flag registers. Arithmetic
  instructions set no condition-code flags (carry or overflow). The
  published design mentions such flags but does not define them.
* **Instruction set.** About 40 of the roughly 45 published instructions are
  here. The remaining ones are not named, so they are missing. The encoding,
  `vcczacc`'s placement of chain results, and the direction of `veshift` are
  choices of this design.
* **FPGA mapping.** The RTL is generic. Register files, local memories and
  main memory are inferred arrays. Multipliers and MACs are `*` and `+`.
  Nothing is tied to Stratix III M9K or DSP primitives, and no area or Fmax
  figures are claimed.

## What is outside the RTL

* **The scalar core and instruction fetch.** The published system uses an
  existing Nios II-compatible soft core, which fetches the shared
  instruction stream and forwards vector instructions. Here the
  instruction queue, the result queue and the scalar memory port are top-level
  ports, and the testbenches play the scalar core.
* **External DDR-SDRAM.** The on-chip SRAM option (`main_mem`) is used instead.
* The proposals for future FPGA fabric features (e.g. wider or byte-level
  crossbars in hard logic) are not part of the processor.
