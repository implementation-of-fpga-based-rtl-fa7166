# AWE: a small ARM-subset RISC with a logarithmic-add instruction

In a logarithmic number system (LNS) a real value X is stored as its
logarithm x = log2(X). Multiplication and division then become an
ordinary integer add or subtract. Addition is the hard part. It needs the
function s(z) = log2(1 + 2^z), which is read from a table and interpolated.

The AWE is a 32-bit pipelined processor for an FPGA. It runs a subset of
the ARM instruction set. One coprocessor opcode is reused for **LADD**, an
instruction that adds two LNS numbers. LADD has no adder, multiplier or
table of its own. It is a set of extra controller states that borrow the
integer core's ALU, shift-and-add multiplier, register file and memory port.
The s(z) table lives in the ordinary external RAM. So the instruction costs
little logic: mostly decoding and states. It takes 21 or 22 cycles, against
53 cycles for the same algorithm written as AWE software, a speedup of
about 2.5.

Everything is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`.
Self-checking testbenches are in `tb/`.

## LNS addition by interpolation

Values are 32-bit two's-complement base-2 logarithms with 23 fraction
bits. That is about as precise as IEEE single precision. Only positive
reals are represented: there is no sign bit, and no special encodings for
zero or overflow. To add x and y:

1. z = |x - y|, and m = min(x, y);
2. s(z) = log2(1 + 2^z);
3. result = m + s(z), which is log2(2^x + 2^y).

z is split at 9 bits after the binary point. zH = z >> 14 indexes the
table and zL = z mod 2^14 is the remainder. The table holds
s(zH * 2^-9) for zH = 0 ... 13248, as 32-bit words with 23 fraction bits.
That is 52,996 bytes. Each pair of neighbouring entries is joined by a
straight line (Lagrange linear interpolation):

    s(z) ≈ s(zH) + ((s(zH+1) - s(zH)) * zL) >> 14

With 2^-9 steps this gives about 23 correct bits. The tests check that
every result is within 4 units of 2^-23 of the exact value. For
z >= 0x0CF00000 (25.875), s(z) equals z to working precision. The result
is then simply max(x, y) and the table is not read. The table is an ordinary
block of memory words. A testbench computes it with `$ln`/`$pow`, and
software would compute it the same way.

## The processor

### Instruction subset

| class | forms | execute cycles |
|---|---|---|
| data processing | all 16 ARM operations; 8-bit rotated immediate, or a register shifted by a constant (LSL, LSR, ASR, ROR, RRX); optional flag setting | 1 |
| any instruction whose condition fails | — | 1 |
| B / BL | 24-bit relative; BL writes R14 | 3 / 4 |
| LDR / STR | word, base ± 12-bit constant, pre-index (with or without writeback) or post-index | 3 |
| MUL / MLA | low 32 bits of the unsigned product; no early exit | 36 |
| LADD Rd, Rx, Ry | coprocessor data-operation group | 21 (x >= y), 22 (x < y); 3 / 4 beyond the table |
| write to R15 | data processing or LDR with Rd = 15 | +1, plus 2 refill |

All instructions are conditional, using the usual 16 ARM conditions on
N, Z, C and V. Some instructions are not built in hardware: register-specified
shifts, register offsets, byte transfers, LDM/STM, SWP, MRS/MSR, SWI, and
every other coprocessor instruction. In user mode these trap so that software can
emulate them. The branch to itself (`0xEAFFFFFE`) is the halt.

### Pipeline and timing

There are three stages: fetch into `ir1`, decode, and execute from `ir2`.
The execute stage reads its operands from the register file and writes
its result at the end of the same cycle. The next instruction therefore
sees the result without any forwarding logic. Reading R15 gives the
executing instruction's address plus 8, as on the ARM. The pipeline keeps
each stage's address (`pc1`, `pc2`) to supply this value.

There is one memory port for instructions and data. The read is
asynchronous: the data for `mem_addr` arrives in the same cycle. A write
happens at the clock edge. Multi-cycle instructions hold fetch and decode
still while the execute stage steps through its states. Fetching resumes
only in the instruction's last cycle. For LDR and STR the three cycles are:

1. compute the address and write back the base register;
2. the data access, which uses the memory port, so nothing is fetched;
3. write the loaded register and resume fetching.

Register entry 15 is not the program counter. An instruction that writes
R15 writes that entry. An extra state then copies it into `pc` and empties
the pipeline. A taken branch also empties the pipeline, so it costs two
extra cycles.

MUL reads Rs and then Rm into the multiplier. The multiplier then takes
32 shift-and-add steps, one per cycle. After that Rd is written and fetching
resumes: 36 cycles in all. MLA writes no register at the end of the
multiply. Instead it places the instruction `ADD Rd, Rn, <product>` in `ir2`,
and that ADD takes its second operand straight from the multiplier. MLA
therefore also takes 36 cycles, and Rn may be the same register as Rd.

### LADD step by step

Encoding: `cond 1110 0000 Rx Rd 0000 000 0 Ry`. This is a coprocessor data
operation with bits [11:4] zero. Two software rules apply:

- **Rd must differ from Rx and Ry.**
- **The register holding the larger operand is used as scratch.** It ends
  up holding min + s(zH). The register holding the smaller operand is kept.

| cycle | state | action |
|---|---|---|
| 1 | `S_RUN` | The data path sees a never-executed SUB Rx, Ry (condition 1111): z = Rx − Ry, min = Ry, max = Rx. `ir2` is rewritten as a never-executed RSB. |
| (2) | `S_L_SWAP` | Only if z < 0: the RSB gives z = Ry − Rx, and min and max swap. |
| 2 | `S_L_ADDR` | If z ≥ limit: Rd = max, go to the last cycle. Otherwise the ALU forms the table base + 4·zH, and zL goes into the multiplier. |
| 3 | `S_L_LD0` | Read s(zH) into the internal register t. |
| 4 | `S_L_LD1` | Read s(zH+1). At the same time the scratch register = min + t. |
| 5 | `S_L_SLOPE` | The ALU forms c = s(zH+1) − s(zH), which becomes the multiplicand. |
| 6–19 | `S_L_MUL` | 14 multiply steps: c·zL needs only the 14 bits of zL. |
| 20 | `S_L_FINAL` | Rd = scratch + (c·zL >> 14). |
| 21 | `S_RESUME` | Fetch resumes. |

The LNS operation uses no flags. The SUB and RSB steps are presented with
condition "never", so they write neither a register nor a flag. LADD's own
condition field is honoured. The table's base address is a synthesis
parameter, `SB_TABLE_BASE`, so no register has to hold it.

### Supervisor mode: interrupts and traps

The AWE has no banked registers. It uses the PDP-8 method, with one fixed
memory word, `INT_SAVE_ADDR` (default 0x100). In user mode, either an
interrupt (`irq` high) or an instruction that must trap does four things:

- The instruction in execute is abandoned.
- Its address + 12 is stored at `INT_SAVE_ADDR`.
- The processor enters supervisor mode.
- Execution continues at `INT_SAVE_ADDR + 4`.

Interrupts are not taken, and nothing traps, in supervisor mode. There,
unimplemented instructions behave as no-ops. An **LDR into R15 leaves
supervisor mode**. This makes the return an indirect jump through the saved
word. With UR14 at 0xFC and UR15 at 0x100:

    0x104  STR R14,[R15,#-16]   ; save user R14 in UR14
    0x108  LDR R14,[R15,#-16]   ; R14 = saved value (UR15)
    0x10C  SUB R14,R14,#12      ; address of the abandoned instruction
    0x110  STR R14,[R15,#-24]   ; back into UR15
           ...                  ; the service itself
           LDR R14,[R15,#-x]    ; restore user R14 from UR14
           LDR R15,[R15,#-y]    ; return, supervisor mode off

The condition flags are not in memory and have no move instruction, so the
core keeps them itself: on entry it copies the user's N, Z, C, V into an
internal shadow register, and the LDR R15 that leaves supervisor mode copies
them back. An interrupt between a `CMP` and the conditional instruction that
uses it is therefore invisible to the user program, while the routine may
change the flags freely.

After an interrupt, the routine returns to the abandoned instruction, which
then runs again. After a trap, the routine adds 4 so that the trapping
instruction (saved value − 12) is skipped once it has been emulated. One
word is saved and there is one entry point, so the scheme is not reentrant.

## The implicit-style example machines

Two small machines stand beside the processor in the top level. They show
how a sequential, one-state-per-clock description becomes a one-hot
controller and a data path.

- `vito_onehot_example`: two one-hot state flip-flops, s4 and s6. Reset
  puts the one in s4. Register a is loaded through the multiplexer chain
  `s4 ? data1 : s6 ? data2 : a`, so it takes data1 and data2 on alternate
  clocks.
- `vito_regfile_example`: the same controller writes `data1` to
  `r[addr1]` in s4 and `data2` to `r[addr2]` in s6. Both guarded writes
  sit in one clocked block. This is the pattern that lets a register file
  be written at different addresses in different states.

## Modules

| file | role |
|---|---|
| `rtl/awe_pkg.sv` | opcode, shift and condition enums; flags struct; halt encoding |
| `rtl/awe_top.sv` | top: processor + the two example machines |
| `rtl/awe_core.sv` | pipeline, decoder and the whole control state machine, including LADD and supervisor mode |
| `rtl/awe_regfile.sv` | 16 × 32 registers, two asynchronous read ports, one write port |
| `rtl/awe_shifter.sv` | second-operand rotate/shift with carry out |
| `rtl/awe_alu.sv` | the 16 data-processing operations and N Z C V |
| `rtl/awe_cond.sv` | condition-field check |
| `rtl/awe_multiplier.sv` | one-bit-per-cycle shift-and-add multiplier with a step count |
| `rtl/vito_onehot_example.sv`, `rtl/vito_regfile_example.sv` | the example machines |

Parameters of `awe_top` / `awe_core`:

| parameter | default | meaning |
|---|---|---|
| `LNS_EN` | 1 | 1: LADD is built; 0: the plain integer core, where LADD traps |
| `SB_TABLE_BASE` | 0x0001_0000 | byte address of s(0) in memory |
| `LNS_Z_LIMIT` | 0x0CF0_0000 | z at and beyond which LADD returns max(x, y) |
| `ZL_BITS` (core) | 14 | bits of z below the table index; also the multiply step count |
| `INT_SAVE_ADDR` | 0x0000_0100 | word where the return address is saved; code starts at +4 |
| `RESET_PC` (core) | 0 | first fetch address |

Top-level ports: `clk`, and `rst_n` (asynchronous, active low). The memory
port is `mem_addr`, `mem_wdata`, `mem_we` and `mem_rdata`, carrying 32-bit
words at byte addresses. Also `irq`, `supervisor` and `halted`, and the
`ex1_*` and `ex2_*` ports of the example machines. The external RAM itself
is not part of the design. `tb/awe_ram_model.sv` is a behavioural model of
it: 2^19 words of 32 bits (2 MB), with asynchronous read.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. For
example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/awe_pkg.sv tb/awe_asm_pkg.sv tb/tb_awe_top.sv \
        --top-module tb_awe_top -o sim && ./obj_dir/sim

| testbench | what it runs |
|---|---|
| `tb_awe_top` | The whole design at its default parameters. An 8-element LNS dot product is accumulated twice, once with LADD and once with the software routine called by BL. MLA keeps a sum of squares. Two interrupts and one trap are serviced by one routine. The example machines are checked every cycle. Each mechanism is counted, and a mechanism that never occurs is a failure. |
| `tb_awe_lns_speedup` | 48 operand pairs through both LADD and the software routine. Every result and every cycle count is checked. Prints the speedup (about 2.45) and the additions per second at 25 MHz (1.16 million). |
| `tb_awe_core` | Directed programs covering the ALU and flags, loads and stores, branches, MUL/MLA, LADD corner cases and accuracy, the software routine (53 cycles), interrupts and traps. Instruction timings are checked. |
| `tb_awe_alu`, `tb_awe_shifter`, `tb_awe_cond`, `tb_awe_regfile`, `tb_awe_multiplier`, `tb_vito_*` | Unit tests against independent reference models. |

`tb/awe_asm_pkg.sv` contains the instruction encoders used to write test
programs. It also contains the table formula and a reference LNS adder.
Verilator is a two-state simulator. Memory the program does not write
starts with random contents, so programs must initialise whatever they read.

## What follows the source design and what is this implementation's choice

Taken from the original design:

- the instruction subset and its traps;
- the 3-stage pipeline, with register reads and write in the same execute
  cycle;
- the single memory port;
- the cycle counts of LDR (3), MUL (36), the software routine (53) and
  LADD (21/22);
- the 14-step multiply in LADD;
- LADD's first steps as never-executed SUB/RSB instructions;
- fetching s(zH+1) while adding min + s(zH);
- the scratchpad and destination rules;
- the PDP-8 style interrupt, with the +12 offset and LDR R15 leaving
  supervisor mode;
- the halt encoding;
- the number format and the interpolation parameters (N = 9, 14 bits of zL,
  z limit 0x0CF00000).

Chosen here, where the source gives no detail:

- **Memory width.** The original board has a 16-bit-wide RAM. Here the port
  is 32 bits wide with asynchronous read, which keeps the stated cycle counts.
- **Cycle breakdowns.** How the 3, 36 and 21/22 cycles divide into states
  is this design's choice. So are the STR length (3) and the branch costs
  (B 3, BL 4).
- **MLA.** The inserted ADD takes the product from the multiplier, so
  `MLA Rd,Rm,Rs,Rd` works.
- **LADD encoding.** The destination is in bits [15:12]. Bits [11:4] must
  be zero.
- **LADD beyond the table.** Like the software routine, it returns max(x, y),
  in 3/4 cycles.
- **Base and table address.** The logarithm base is 2. The table address,
  the save address and the reset address are parameters with the defaults
  above.
- **Traps.** One save word serves interrupts and traps. Byte transfers,
  register offsets, MRS/MSR and SWI trap. Unimplemented instructions are
  no-ops in supervisor mode.
- **Flags across supervisor mode.** An internal shadow register saves the
  flags on entry and LDR R15 restores them. The source stores the rest of
  the user state in memory but says nothing about the flags.
- **Integer-only build.** With `LNS_EN = 0`, LADD traps like any other
  coprocessor instruction.
- **Reset.** All registers clear.
- **Multiply flags.** MULS sets N and Z and keeps C and V.

Not built: LNS subtraction, signs and special values of LNS numbers, the
alternative of turning ADC into an LNS multiply, and early exit from the
multiplier. The external RAM is only modelled.

## How far it can be trusted

All RTL passes Verilator lint and Yosys (slang) elaboration, with no latches.
Every block has a self-checking testbench. For every block, a deliberately
broken copy was shown to make its testbench fail. The results of LADD and
of the software routine agree bit for bit with an independent reference
model. They are also within 4 units of 2^-23 of exact `log2(2^x + 2^y)`.
Nothing here has been run on an FPGA, and no clock rate is claimed. As a
rough size guide, a generic Yosys synthesis mapped to 4-input LUTs gives
`awe_core` about 3,030 LUTs and 940 flip-flops, of which 512 are the
register file (an FPGA flow would put it in distributed RAM). The same core
with `LNS_EN = 0` is only about 21 LUTs smaller, so LADD costs little beyond
the integer core it reuses. Assertions in `awe_core` check two rules: the multiplier is
running whenever a multiply state waits on it, and a fetch never shares a
cycle with a data access.
