# Drowsy register file with fetch-stage predecode

In an in-order pipeline an instruction touches at most three registers: two
sources read in decode and one destination written in write-back. The other
registers of the file sit idle in that cycle, yet they leak. This design keeps
every register in a low-power *drowsy* state by default. In that state the
register's cells run from a low supply: they keep their value but must not be
read or written. A register is made active only for the cycle in which it is
used, plus a few registers that are always active.

The catch is timing. The source registers are read in decode, so they must
already be active when decode starts. This design decides which registers to
wake while the instruction is still being **fetched**. RISC instructions keep
their register fields at fixed bit positions, so the word coming out of the
I-cache is tapped before it reaches the instruction register (IR). Its three
register fields go straight into the register file's own address decoders,
without any opcode decode. The resulting word lines do two jobs. They wake
those registers at the next clock edge, and they are latched as the read word
lines that decode then uses. The destination is handled later, from the memory
stage (see below). As a result no pipeline stage is added and there is no
stall.

On a random instruction mix the end-to-end testbench keeps about 85 % of all
register-cycles drowsy across the 32 + 32 registers. The design targets a
reduction of roughly 84 % in register-file energy, under the assumption that a
drowsy register costs close to nothing.

## A register's life, cycle by cycle

For an instruction `I` with source fields Rs, Rt and a destination D, with no
stalls:

| cycle | stage of `I` | what happens to its registers |
|-------|--------------|-------------------------------|
| t     | fetch        | the I-cache word is tapped. The Rs/Rt/Rd fields are decoded and shown on `*_wake_next` |
| t+1   | decode       | Rs, Rt and Rd are **active**. Rs and Rt are read through the latched word lines into the operand registers |
| t+2   | execute      | those registers are drowsy again, unless another instruction needs them |
| t+3   | memory       | D is decoded by the write decoder and appears on `*_wake_next` |
| t+4   | write-back   | D is **active** and is written at the end of the cycle |
| t+5   |              | D is drowsy again |

In any cycle the active set of a file is therefore:

    active = reserved | fields(instruction in decode) | dest(instruction in write-back)

`wake_controller` registers this set at every edge and drives `drowsy = ~active`.
The same set is also output one cycle early as `*_wake_next`. A supply switch
can start moving on it before the edge at which the register is needed. The
RTL does not model the analog settling time.

### Always-active registers

The compiler reserves the zero register, the return-value register, the stack
pointer and the return address register, and these are never put to sleep. In
the integer file they are r0, r2, r29 and r31 (the MIPS convention), set by the
`INT_RESERVED` parameter. The floating-point file has none (`FP_RESERVED`).
Integer r0 (`ZERO_REG`) also reads as zero and ignores writes.

### Needless wake-ups

The predecoder cannot tell what a field means. An I-type instruction puts an
immediate where Rd would be, and a jump has no registers at all. The predecoder
therefore always assumes three register operands. A field that is not a
register wakes some register for one cycle for nothing. That costs energy but
is never wrong, because waking a register never changes its contents. For the
MIPS-IV benchmarks the intended use is expected to see roughly 9 % of wake-ups
wasted this way. The end-to-end testbench counts these events.

### Two register files, one predecode

There is an integer file and a floating-point file, each with 32 registers of
32 bits. A field in the fetched word could name a register in either file. The
file is known only after full decode, which has not happened yet at fetch
time. So the predecoded fields wake that register number in **both** files.
The destination is different: by the memory stage its file is known, so only
the right file is woken for write-back. This doubling of the predecode wake-up
is a choice of this design. A predecoder that knew the file from the opcode
could halve it.

## Stalls

`stall` holds IR and therefore decode. In front of the predecoder's decoders
there is a selector. Normally it takes the word tapped from the I-cache. While
`stall` is high it takes the IR instead, so the held instruction's registers
stay active for every cycle it waits in decode. A bubble enters execute; the
execute, memory and write-back stages always advance.

## The register file (`drowsy_regfile`, `drowsy_reg_row`)

The file is an N × M array with two read ports and one write port per issue
slot (`NRP` and `NWP`). Its
decoders are not inside it, because they run a stage early. It takes one-hot
word lines plus the binary addresses, which feed the comparators.

* **Gating.** Each row (`drowsy_reg_row`) ANDs its read and write enables with
  the inverse of its `drowsy` bit. A drowsy row drives zero onto its read bus
  and drops writes. Any such attempted access raises that row's `blocked` bit.
  The top ORs these bits into `access_blocked`, and an assertion requires it to
  stay low. In correct operation it never rises.
* **Read buses.** The rows' outputs are ORed, which stands in for the bit
  lines. The sense amplifiers are analog and are not modelled.
* **Comparators.** The write address is compared with each read address. When
  write-back writes the register that decode reads in the same cycle, the write
  data is forwarded to that read port.
* **Output latches.** The read data leaves the file combinationally. The
  operand registers at the start of execute (`ex_int_rs`, `ex_int_rt`,
  `ex_fp_rs`, `ex_fp_rt`) latch it.

The dual-supply cell (high and low VDD, high-threshold pass transistors) is
transistor-level circuitry. Here it is represented only by the `drowsy` signal,
one bit per register, which is brought out of the top (`int_drowsy`,
`fp_drowsy`) as the supply-select control.

## The destination path (`rd_pipe`)

Decode hands the destination to `rd_pipe`: a valid bit, a write enable, the
file and the register number. The host's instruction decoder supplies these on
`dec_we`, `dec_fp` and `dec_rd`, because the destination sits in Rd or in Rt
depending on the format. The destination travels through three pipeline
registers (execute, memory, write-back). In the memory stage the write decoder
decodes it. The resulting word line wakes the register in the right file and
is latched as the write word line for write-back. The execute-stage and
memory-stage destinations are also outputs, so the host's operand-forwarding
logic can compare against them.

How early the destination wakes depends on the pipeline. With the default
`WAKE_FROM_EX` = 0 the register is active for the write-back cycle only. With
`WAKE_FROM_EX` = 1 a second decoder also reads the execute-stage destination.
The register then wakes a cycle earlier and stays active through memory and
write-back. That suits a supply that needs more than one cycle of warning. The
write word line still comes from the memory-stage decode.

## Issue width

`ISSUE_W` sets how many instructions move through the pipeline side by side.
The default is 1. It matches a register file with two read ports and one
write port, and it matches the accounting above of at most three operand
registers per cycle.

With `ISSUE_W` = 2 the design takes the 2-wide fetch, decode and issue of the
evaluated processor configuration:

* Each file gets four read ports and two write ports.
* Every slot has its own predecoder and its own destination pipeline.
* The wake sets of both slots are ORed.
* A stall holds the whole group.
* Slot 0 is the older instruction. When both slots write the same register in
  one cycle, slot 1 (the younger) wins. This holds both in the array and in
  the forwarding comparators.

At two slots up to six operand registers are active per cycle. The random
end-to-end test then keeps 78 % of register-cycles drowsy, against 85.5 % at
one slot.

## Other instruction formats

Predecode only needs the register fields to sit at fixed bit positions.
Nothing else in the mechanism depends on the instruction set. The field
positions, the data width, the integer zero register and the reserved sets
are parameters. The defaults follow MIPS. For Alpha the settings are:

| parameter | Alpha value | meaning |
|-----------|-------------|---------|
| `XLEN` | 64 | register width |
| `RS_LSB`, `RT_LSB`, `RD_LSB` | 21, 16, 0 | Ra, Rb and Rc fields |
| `ZERO_REG` | 31 | r31 reads as zero |
| `INT_RESERVED` | `32'hC400_0001` | r0 (return value), r26 (return address), r30 (stack pointer), r31 (zero) |

## Interface of the top, `drowsy_rf_core`

The host processor owns the I-cache, the instruction decoder, the ALUs, the
D-cache and the result bus. This block connects to them as follows. Per-slot
signals are `ISSUE_W`-bit vectors, and per-slot words are unpacked arrays
`[ISSUE_W]`. Index 0 is the oldest slot.

| port | dir | meaning |
|------|-----|---------|
| `fetch_valid`, `fetch_instr[ILEN-1:0]` | in | the word leaving the I-cache in this cycle |
| `stall` | in | hold IR/decode this cycle |
| `ir_valid`, `ir_instr` | out | instruction in decode, for the host decoder |
| `dec_we`, `dec_fp`, `dec_rd[log2 NREGS - 1:0]` | in | destination of the instruction in decode (combinational from `ir_instr`) |
| `ex_valid`, `ex_int_rs/rt`, `ex_fp_rs/rt` | out | operands of the instruction in execute, from both files |
| `ex_we/fp/rd`, `mem_valid/we/fp/rd` | out | destinations in execute and memory (for forwarding) |
| `wb_valid/we/fp/rd` | out | destination in write-back |
| `wb_data[XLEN-1:0]` | in | result to write at the end of this cycle |
| `int_drowsy`, `fp_drowsy` | out | per-register drowsy state (supply select) |
| `int_wake_next`, `fp_wake_next` | out | active set of the next cycle |
| `access_blocked` | out | a drowsy register was accessed (error flag) |

Reset is asynchronous and active-low. It clears IR, the pipeline and the
register contents, and leaves only the reserved registers active.

Parameters: `NREGS` = 32 and `XLEN` = 32 come from the evaluated
configuration. `ILEN` = 32. `RS_LSB`, `RT_LSB` and `RD_LSB` default to the
MIPS field positions 21, 16 and 11. `INT_RESERVED` and `FP_RESERVED` are also
parameters. `ZERO_REG` (default 0) names the integer zero register. `ISSUE_W` (default 1)
and `WAKE_FROM_EX` (default 0) are described above.

## Files

| file | content |
|------|---------|
| `rtl/drowsy_rf_pkg.sv` | shared defaults (sizes, field positions, reserved sets) |
| `rtl/addr_decoder.sv` | register address decoder (read and write word decoders) |
| `rtl/drowsy_reg_row.sv` | one register with the drowsy enable gating |
| `rtl/drowsy_regfile.sv` | file of drowsy rows with NRP read and NWP write ports and forwarding comparators |
| `rtl/predecoder.sv` | fetch-stage field extraction, selector and decoders |
| `rtl/wake_controller.sv` | per-register active/drowsy state for one file |
| `rtl/rd_pipe.sv` | destination pipeline and write-back wake-up |
| `rtl/drowsy_rf_core.sv` | top: IR, both files, wake-up logic, operand registers |
| `tb/tb_*.sv` | one self-checking testbench per module, end-to-end variants (2-wide, early destination wake, Alpha format) and the kernel test |

## Where this design goes beyond its source description

The following are choices made here, not given by the design description:

* **Instruction fields.** Only the order of the fields is fixed (condition,
  opcode, Rs, Rt, other, Rd). The bit positions are MIPS positions and are
  parameters.
* **Reserved registers.** The register numbers of the reserved set follow MIPS.
  The integer zero register (`ZERO_REG`, r0 by default) is hard-wired to zero.
* **Predecode of both files.** The fetched fields wake their registers in both
  files.
* **Destination wake-up in memory.** By default the destination is woken from
  the memory stage. The earlier wake from execute is available as
  `WAKE_FROM_EX` = 1.
* **Stall behaviour, reset, flags.** The stall behaviour, the reset values, the
  `blocked`/`access_blocked` flags and the `*_wake_next` outputs are additions.
* **Issue width.** The default is single issue, although the evaluated
  processor configuration is 2-wide. The 2-wide pipeline is available as
  `ISSUE_W` = 2. Write priority between slots is this design's choice.
* **Out of scope.** The supply switch and its wake-up latency, the sense
  amplifiers, the bit-line drivers, and all of the host processor (caches,
  branch predictor, ALUs, instruction decoder) are not part of this RTL.
* **Compiler-driven variant not built.** A compiler-driven alternative exists,
  in which a new instruction puts whole groups of registers to sleep around a
  code region. It is a different mechanism and is not built.

## Verification

Every module has a self-checking testbench that compares the module against a
model written independently in the testbench. Each testbench ends with a line
`TB_RESULT checks=N failures=M`.

* `tb_addr_decoder`: exhaustive, for N = 32 and N = 12.
* `tb_drowsy_reg_row`: random reads and writes while awake or drowsy, on a
  2-read/1-write row and on a 4-read/2-write row. It checks the gating, the
  `blocked` flag, write-port priority and retention across a drowsy period.
* `tb_drowsy_regfile`: random traffic on all ports of a 2R1W file, a 2R1W file
  with a zero register at r0 and at r31, and a 4R2W file. It checks
  forwarding, drowsy reads (which return zero), the blocked vector and two writes to one register.
* `tb_predecoder`: random words with random hold. It checks both the default
  field positions and moved field positions.
* `tb_wake_controller`: the reset state, the exact active set one cycle after
  each request, and falling back to sleep.
* `tb_rd_pipe`: stage timing and the wake and write word lines, with the
  default wake stage and with `WAKE_FROM_EX` = 1.
* `tb_drowsy_rf_core`: the full-size design (no parameter overrides), 20 000
  cycles of random instructions in five classes, with random stalls and fetch
  gaps. A cycle-level reference model predicts the IR, the operands of both
  files, the destination in every stage and the exact drowsy vector of both
  files in every cycle. The testbench requires each of these to occur at least
  once: a stall, same-cycle forwarding, a destination-only wake-up, a needless
  predecode wake-up, a register going back to sleep, and a dropped write to the zero register.
  It also prints the drowsy fraction.
* `tb_drowsy_rf_core_w2`: the same test with `ISSUE_W` = 2. It also requires
  both slots to write the same register in one cycle at least once.
* `tb_drowsy_rf_core_ex`: the same test with `WAKE_FROM_EX` = 1. The model
  adds the execute-stage destination to the expected active set.
* `tb_drowsy_rf_core_alpha`: the same test with the Alpha settings above
  (64-bit data, Rc at bit 0, zero register r31).
* `tb_workload_kernels`: instruction streams from real code. An
  instruction-set model inside the testbench executes two integer kernels
  written in MIPS encodings: a bitwise CRC-32 over 48 bytes and a population
  count over 48 words. The committed stream is fed to the full-size top, one
  instruction per cycle. The testbench acts as the host: it decodes the
  destination, forwards from the memory and write-back stages, and supplies
  the results. It checks every used source operand against the model, reads
  back all 31 integer registers at the end, and checks that execute receives
  one instruction per cycle. Measured results:

  | kernel   | instructions | drowsy register-cycles | needless predecoded fields |
  |----------|-------------:|-----------------------:|---------------------------:|
  | CRC-32   | 3 033        | 87.3 %                 | 25 % of required fields    |
  | bitcount | 7 643        | 88.4 %                 | 37 % of required fields    |

  These small loops are dominated by immediate-form and branch instructions.
  That is why the needless share is higher than the roughly 9 % expected for
  whole benchmark programs.

To simulate one testbench with Verilator (modules are found in `rtl/` and
`tb/` by name; `-Wno-fatal` keeps the testbenches' width warnings on random
stimulus from stopping the build):

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/drowsy_rf_pkg.sv tb/tb_drowsy_rf_core.sv \
        --top-module tb_drowsy_rf_core -o sim
    ./obj_dir/sim

All modules pass Verilator lint (`-Wall`; the remaining warnings concern unused
package constants, the unconnected `rwl_rd_q`/`rd_q` outputs of the predecoder
and the reset used inside assertions) and elaborate in Yosys/slang. The full
design synthesises to about 2 400 flip-flops at the default width, of which
2 048 are the two register arrays.
