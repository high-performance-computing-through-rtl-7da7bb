# DPFPA: a double precision floating point coprocessor

DPFPA is a coprocessor for the inner loops of scientific simulations, such
as the energy update of a Monte Carlo Metropolis dipole simulation. These
loops repeat a few double precision adds and multiplies millions of times.
A general-purpose CPU spends many cycles on each floating point operation.
DPFPA instead keeps one pipelined adder and one pipelined multiplier busy in
every clock cycle. The loop is written as microcode: one 37-bit word per
cycle, which starts an add or compare, a multiply, an input fetch, up to
three register writes and an output, all in parallel.

The host CPU sends each microcode sequence once and binds it to a 6-bit
op-code. One executive instruction then makes the sequence repeat on every
block of data that arrives, until the next executive instruction. During
the computation the host only streams data in and reads results out.

This repository holds synthesizable SystemVerilog for the accelerator
(DPFPP) with two accelerating units, the shared four-bank cache and the
host-side bus with its cycle counters. Self-checking testbenches cover each
block and the whole accelerator.

## Structure

```
dpfpa_top
├── sub_bus_if          host bus slave, address decode, clock counters
├── cache_mem           4 interleaved banks (cache_bank), 3 requesters
└── accel_unit [2]      one accelerating unit, fully independent
    ├── control_unit
    │   ├── instr_decode   splits the host stream into instructions and data
    │   ├── jump_unit      sequence table, program counter, looping
    │   └── ucode_ram      256 x 37-bit microcode memory
    ├── math_unit
    │   ├── sync_fifo      input FIFO (32), arithmetic FIFO (16), logical FIFO (16)
    │   ├── reg_banks      input, adder and multiplier banks of 4 doubles, plus constants
    │   ├── fp_add_pipe    9-stage adder / comparator
    │   └── fp_mul_pipe    15-stage multiplier
    └── mem_manager        X-Y-Z addressing into the cache, cyclic offsets
```

`dpfpa_pkg.sv` holds all the shared types: the microcode word `uword_t`,
the instruction formats and their builder functions (`mk_wucd`, `mk_seq`,
`mk_exec`, `mk_halt`), the cache request and response structs and the
Memory Manager command.

## The Math Unit and its microcode word

The Math Unit has no program counter and no addresses. Each cycle it executes
the word that the control unit gives it. The fields, MSB first, are:

| field | bits | meaning |
|---|---|---|
| `add_en`, `add_cmp` | 2 | start an add, or a compare whose flags go to the logical FIFO |
| `add_a`, `add_b` | 4 + 4 | operand sources: bank (input, adder, multiplier, constant) and index 0..3 |
| `add_sa` | 2 | factor on operand A: 1, 2, -1, -2 |
| `add_sb` | 2 | factor on operand B: 1, 0.5, -1, -0.5 |
| `mul_en`, `mul_a`, `mul_b` | 1 + 4 + 4 | start a multiply |
| `mul_post` | 2 | factor on the product: 1, 2, 0.5, -1 |
| `fetch` | 1 | pop the input FIFO |
| `in_we`, `in_wa` | 3 | write the input FIFO head into the input bank |
| `add_we`, `add_wa` | 3 | write the value leaving the adder into the adder bank |
| `mul_we`, `mul_wa` | 3 | write the value leaving the multiplier into the multiplier bank |
| `out_en`, `out_src` | 2 | push the adder or multiplier output into the arithmetic FIFO |

The scaling factors cost no cycles: they change only the sign and the
exponent. The constant bank reads 0.0, 1.0, -1.0 and 2.0. It lets a word
pass a value through a pipeline (x*1, x+0), which the test program uses to
move values between banks.

**Timing is the programmer's job.** Operands are read from the banks in the
cycle a word issues. A result appears at the pipeline output exactly 9
(adder) or 15 (multiplier) executed words later. The word that executes in
that cycle must write it to a bank or send it out, or it is lost. There is
no scoreboard or forwarding. The assertions `a_add_result` and
`a_mul_result` fire if a word writes a bank from an empty pipeline slot.

**Stalls freeze the whole unit.** The unit holds the current word, and both
pipelines stop with it, when:

* the word fetches and the input FIFO is empty;
* the word outputs and the arithmetic FIFO is full;
* a comparison leaves the adder and the logical FIFO is full.

The schedule therefore stays correct however irregular the data arrive.
With the data already waiting, a sequence of N words takes exactly N cycles
per pass.

**Arithmetic.** The arithmetic is IEEE 754 binary64 with round to nearest
even. Infinities and NaNs propagate. The design departs from IEEE 754 in two
ways: subnormal inputs and results are flushed to zero, and exact
cancellation gives +0. A comparison returns four flags
`{unordered, greater, equal, less}` in the low bits of a logical FIFO word.
Each pipeline does its real work in three stages (unpack and align, add or
multiply and normalise, round and pack). Plain registers bring it up to the
full depth, so the latency seen by the microcode is the full 9 or 15.

## Instructions and the control unit

Every word from the host is 64 bits. An instruction is a double whose bits
63:52 are all ones, bit 51 is zero and bits 50:48 are non-zero. That is a
signalling NaN, which the arithmetic never produces. Every other word is
data and goes to the input FIFO.

| type (50:48) | name | fields |
|---|---|---|
| 1 | write microcode | address [47:37], word [36:0] |
| 2 | bind sequence | op-code [45:40], first address [21:11], last address [10:0] |
| 3 | execute | op-code [5:0] |
| 4 | halt | stop at the end of the current pass |

The jump unit holds a start and an end address for each of the 64
op-codes. An execute instruction takes effect at once. The program counter
jumps to the start of the new sequence, and any words of the old pass not
yet executed are dropped. The sequence then wraps from its last word back to
its first word without a gap, and repeats until the next execute or halt
instruction. A halt waits for the current pass to finish. The RAM read is
synchronous, so a word executes one cycle after it is addressed. A stall
holds the address, the RAM output and the valid bit together.

Instructions never wait. A data word waits, with `bus_wait` high, while the
input FIFO is full. So a host can queue the next execute instruction while
the unit is still waiting for data.

## The Memory Manager

Each unit can also take its data from the cache. The host sets a base
address and the sides nx, ny and nz of a three-dimensional matrix, stored
with x fastest:
`addr = base + (z*ny + y)*nx + x`. A command gives a lattice point and a
signed offset (dx, dy, dz). The matrix is cyclic: a coordinate that leaves
it re-enters at the opposite side, which gives periodic boundary conditions
for free. Each offset must be no larger than one side.

* **LOAD** reads one word and pushes it into the input FIFO. The push goes
  before any host data word in the same cycle.
* **STORE** pops one arithmetic result and writes it to the cache. While the
  Memory Manager is busy, the host sees the arithmetic FIFO as empty.

The Memory Manager handles one command at a time: one cycle to fold the
offsets, one to form the address, then the cache access, which may wait for
its bank.

## Cache and bus

The cache has four single-port banks, interleaved on the two low address
bits. It has 4096 words in all. Unit 0, unit 1 and the host are its
requesters, in that fixed priority order. Requests to different banks are
granted in the same cycle. Read data arrive one cycle after the grant.

The host bus is a 64-bit memory-mapped slave. A transfer is held while
`bus_wait` is high, and read data come one cycle after the transfer is
taken, with `bus_rvalid`.

| address | access | meaning |
|---|---|---|
| `1xxx_xxxx_xxxx_xxxx` | R/W | cache word `addr[14:0]` |
| unit `u` = `addr[11:8]`, reg 0 | W / R | host word stream / status (`unit_status_t`) |
| reg 1 | R | pop the arithmetic FIFO (0 if empty) |
| reg 2 | R | pop the logical FIFO (0 if empty) |
| reg 3 | W | Memory Manager base |
| reg 4 | W | matrix sides nx [7:0], ny [15:8], nz [23:16] |
| reg 5 | W | command: x, y, z, dx, dy, dz in bytes 0..5, STORE if bit 63 |
| reg 6 | R | cycles in which the unit executed a word |
| reg 7 | R / W | free-running cycle counter / clear all counters |

The counters measure the accelerator's time directly. Reg 6 divided by
reg 7 is how well the unit was fed.

## Where this design departs from the original accelerator

The original description covers the block structure, the pipeline depths,
the 37-bit word and what it can trigger, the operand factors, the 6-bit
op-codes, the NaN-coded instructions, the repeat-until-next behaviour, the
cyclic X-Y-Z addressing, the four cache banks and the clock counters. All of
these are built as described. The following are this design's own choices:

* All encodings: the field order of the microcode word, the instruction
  code points, the bus protocol, the address map, and the Memory Manager
  command format.
* The sizes, which the description does not give: 256 microcode words, FIFO
  depths 32/16/16, 1024 words per cache bank, and 8-bit matrix sides.
* The constant bank, the stall rules, the cache priority order, the
  immediate switch on an execute instruction, and the halt instruction.
* Flush-to-zero for subnormals.
* The host issues the Memory Manager commands. The description does not say
  what drives them.

Not reproduced:

* The tuned Metropolis program, which interleaves two dipoles in a 36-cycle
  loop and pads the multiplier schedule from 15 to 18 slots. The testbenches
  use a plain program of 83 words per dipole, which computes the same
  quantities one dipole per pass.
* The host CPU and the board it sits on are outside this RTL. Their bus is
  the top-level port list.
* A four-unit build was named as possible on the original FPGA.
  `N_UNITS=4` gives it, but only the default of two units is tested.

The state of a lattice is three moment components per dipole. A lattice
of ND dipoles per side therefore needs 3·ND³ words if it is held in the
cache. Only ND ≤ 11 (3993 words) fits the 4096-word cache. Larger lattices
are kept in host memory and streamed through the host word stream, which
has no size limit. For each dipole this stream carries the new angular
terms and the field components of its neighbours.

## Testbenches

Each block has `tb/tb_<module>.sv`. Each one checks the block against values
computed independently, counts checks and failures, and ends with a
`TB_RESULT checks=… failures=…` line. A watchdog ends it if it hangs.
`tb/dipole_prog_pkg.sv` holds the test program and its reference model. The
program computes, for each dipole,
`CT = CTX*(SC*k) + CTY*(SS*k) + CTZ*(C*k) + C`,
`E = -CT²/2` and the new moment `CT*(SC, SS, C)`, and keeps a running sum
of E. The reference rounds every product on its own, as the hardware does,
so the results must match bit for bit.

`tb_dpfpa_top` runs the top at its default parameters:

* Both units run the program at once over the shared bus, 12 dipoles each.
  Unit 0 is fed from the host stream. Unit 1 is fed from the cache through
  Memory Manager commands whose offsets wrap around the matrix.
* A third host thread reads the cache at the same time.
* The test counts input-FIFO stalls, output-FIFO stalls, cache bank waits,
  bus waits, sequence switches, passes, wraps and comparisons. It fails if
  any count is zero.
* It checks that a pass with its data waiting takes exactly 83 cycles.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/dpfpa_pkg.sv \
    tb/dipole_prog_pkg.sv tb/tb_dpfpa_top.sv --top-module tb_dpfpa_top -o sim
./obj_dir/sim
```

Leave out `tb/dipole_prog_pkg.sv` for the testbenches that do not import
it. The end-to-end run takes a few seconds.

## Changing the design

* Pipeline depth: `ADD_STAGES` and `MUL_STAGES` of `math_unit`. The
  microcode must be rescheduled to match.
* Number of units: `N_UNITS` of `dpfpa_top`. The cache gets one more
  requester per unit, and the bus decodes up to 16 units.
* Microcode size: `UCODE_DEPTH`, up to 2048, which is the limit of the
  11-bit address field in the instructions.
* Cache size: `BANK_DEPTH`. The bus reaches 32768 words, and the Memory
  Manager's address width follows `NBANK*BANK_DEPTH`.
