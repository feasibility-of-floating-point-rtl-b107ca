# Floating-point vector modules for a reconfigurable computer

This RTL implements a small family of IEEE-754 single-precision vector
modules for a board of FPGAs attached to a host PC. It follows the published
design "Feasibility of Floating-Point Arithmetic in Reconfigurable Computing
Systems". Each FPGA (a *processing element*, PE) owns one bank of memory. The
host loads a PE with one module, fills its memory with data and a list of
*module instructions*, then releases reset. The module works through the list
on its own and raises an interrupt when it is done. There are seven modules:

| configuration | operation | operands in memory |
|---|---|---|
| `CFG_ADD2`, `CFG_SUB2`, `CFG_MUL2` | C[i] = A[i] op B[i] | two separate vectors A and B |
| `CFG_ADD1`, `CFG_SUB1`, `CFG_MUL1` | C[i] = A[i] op B[i] | one interleaved vector A0, B0, A1, B1, ... |
| `CFG_ACC` | S = sum of X[i] | one vector |

Every module has the same three-part structure:

- a **floating-point core** with a fixed 8-cycle pipeline;
- a **data processor**, made of the operand registers in front of the core (and, in the accumulator, feedback multiplexors);
- a **fetch/decode unit** holding the address counters, the vector-length register, an emptying counter and a comparator.

A small **controller** state machine drives both halves with micro-instructions.

The top level, `rc_matmul_top`, is the board used for the example
application, matrix multiplication. It has four PEs, each with its own memory
port, reset, configuration select and interrupt.

## The floating-point cores

`fp_addsub_core` (parameter `SUBTRACT`) and `fp_mul_core` share one
interface, the one the controllers rely on:

```
left_ready, left_data[31:0]    operand A and its valid flag
right_ready, right_data[31:0]  operand B and its valid flag
result_ready, data_out[31:0]   result, valid exactly 8 cycles after the start
```

An operation starts in every cycle in which both ready inputs are high. There
is no stall. A new operation may start every cycle, and the result appears
exactly `CORE_STAGES = 8` cycles later. Because every core has the same
latency, one controller design serves all of them.

Arithmetic:

- rounding is to nearest, ties to even;
- subnormal inputs are read as zero, and subnormal results are flushed to a signed zero;
- overflow gives a signed infinity;
- any NaN input, inf − inf and 0 × inf all give the quiet NaN `7FC00000`.

The stages are as follows.

| core | stage split |
|---|---|
| adder/subtractor | 1 unpack and order the operands by magnitude; 2 align; 3 add; 4 count leading zeros; 5 normalise; 6 round; 7 renormalise and check the exponent range; 8 pack |
| multiplier | 1 unpack; 2 form two 24×12 partial products; 3 sum them; 4 normalise and form the round bits; 5 round; 6 renormalise; 7 check the range; 8 pack |

The published design fixes the 8-stage pipeline and the interface. The stage
split and the handling of special values are this implementation's choices.

## Module instructions

A module reads its instruction list from address 0 of its memory. Each
instruction is a few consecutive words, of which only the low 18 bits are used:

| module | words |
|---|---|
| two-input | `N`, address of A, address of B, address of C |
| one-input | `N`, address of the interleaved AB vector, address of C |
| accumulator | `N`, address of X, address where the sum is written |

An instruction with `N = 0` ends the list. The module then stops, and `irq`
stays high until reset. The published design uses a program counter and
states that a FINAL signal marks the end of the list, but it does not give a
word format or an end marker. The layout above is this implementation's own.

## Memory schedule of the vector modules

The module has a single memory port, and each element pair needs two reads and
one write. The controller therefore repeats a four-cycle slot for each pair:

```
slot 0: read A[i]
slot 1: read B[i], A[i] arrives and is loaded into R0
slot 2:            B[i] arrives and is loaded into R1 (the core starts)
slot 3: write the result that leaves the core in this cycle
```

The slot is three memory accesses plus one idle cycle, and it produces one
result every 4 cycles. The core takes 8 cycles, so the result of pair i leaves
the core exactly in the write slot of pair i + 2. The controller does not
count on this, however. It writes a result in whatever cycle `result_ready`
is high. If that cycle is a read slot, the read waits one cycle. The
controller therefore works with a core of any latency, with `EMPTY_CYCLES`
set to that latency. The rate depends on the latency:

| core latency | cycles per pair | why |
|---|---|---|
| 4k or 4k + 3 | 4 | writes land in slot 3 or slot 2, so no read ever waits |
| 4k + 1 or 4k + 2 | up to 5 | reads keep meeting writes |

`tb_vec_controller` checks this with stand-in cores of latency 5, 6, 9, 10
and 11. Once the last pair has been read, the controller loads the emptying
counter `ECnt` with the core latency (8) and keeps writing until the
pipeline is empty.

One instruction takes `(K + 2) + 4N + 8` cycles: K = 4 instruction words for a
two-input module and K = 3 for a one-input module. Because a result is written
two pairs after its operands were read, C may be the same area as A, so that
the vectors are computed in place. This is how two vectors of 131,000 numbers
fit in one PE's 2^18 words.

Instruction fetch is pipelined: one word is read per cycle, and each word is
loaded into its register one cycle later. This takes 6 cycles for a two-input
instruction and 5 for a one-input one. The published design quotes 10 and 9.
This is the one timing figure in which this implementation differs; the
4-cycle pair rate and the 8-cycle emptying are as published.

## The accumulator

Summing into one register would need a new number only every 9 cycles: 8 for
the core and 1 for the register. Instead, the accumulator reads one number
per cycle and keeps the core full:

1. **Fill.** While no partial sum has come round the loop, each number is
   added to +0.0 (R1 is cleared).
2. **Accumulate.** Each new number (in R0, from memory) is added to the partial
   sum that leaves the core in the same cycle. That sum is fed back through
   multiplexor M1 into R1. Nine interleaved partial sums circulate, and the
   core does useful work every cycle.
3. **Empty.** After the last read, `ECnt` is loaded with the number of live
   partial sums, min(N, 9). Each partial sum leaving the core is either held
   in R0 (through M0) or, if one is already held, loaded into R1 (through M1)
   so that the two are added. Every such pair reduces `ECnt` by one. When
   `ECnt` reaches 1, the value leaving the core is the total, and it is written
   to memory.

For N ≥ 9 the emptying takes about 40 cycles. The summation order is a tree
over the nine interleaved partial sums, so the rounding of a long sum can
differ from that of a left-to-right loop in software.

The published design describes the three steps, the M0/M1 feedback paths and
the use of `ECnt` during emptying. The published description does not give:

- the forwarding through +0.0;
- the pairing rule;
- the meaning of `ECnt` as a count of live sums, rather than of cycles.

## Fetch/decode unit

`fetch_decode_unit` holds these registers:

| register | purpose |
|---|---|
| `CR0` | read counter of the first (or only) input |
| `CR1` | read counter of the second input; present when `HAS_CR1 = 1` |
| `CW` | write counter |
| `PC` | instruction address |
| `RF` | vector length |
| `ECnt` | 4-bit emptying counter |

It also contains the address multiplexor `M2` and a comparator. The comparator
raises:

- `DONE` once `CR0` has moved `RF` elements from its start (`ELEM_WORDS` words per element: 2 for the interleaved one-input vector);
- `FINAL` when `RF` is zero.

The controller drives the unit with a `fd_uinst_t` micro-instruction each
cycle; `fp_pkg` defines the struct. The two-input unit has five counters,
because it has CR1 as well. The one-input and accumulator units have four.

## Memory port

Every module and PE has the same memory port:

| signal | meaning |
|---|---|
| `mem_req` | memory access this cycle |
| `mem_rw` | 1 = read, 0 = write |
| `mem_addr[17:0]` | word address |
| `mem_wdata[31:0]` | data to write |
| `mem_rdata[31:0]` | read data, valid one cycle after the read request |

The memory has 2^18 32-bit words (1 MB), which fixes `ADDR_W = 18`. It is off
chip and is not part of the RTL. The testbenches use `tb/pe_memory_model.sv`.

## Processing element and top level

`pe` contains all seven modules, built with a `generate` loop. `cfg` selects
which one is active. The others are held in reset, and the memory port and
`irq` come from the selected module. This models reloading the FPGA between
sessions, so change `cfg` only while `rst_n` is low.

`rc_matmul_top` has two parameters: `NUM_PE` (4) and `ADDR_W` (18). It brings
out per-PE arrays of `rst_n`, `cfg`, the memory port and `irq`, plus
`all_irq`, which is high when every PE has finished.

### Matrix multiplication in two sessions

The host splits A into two halves by rows and B into two halves by columns.
PE `p = 2r + c` computes quarter (r, c) of C, with H = M/2:

1. **Session 1.** Each PE is configured as a two-input multiplier. It runs
   H² instructions. Instruction (i, j) forms the M element-wise products of
   row i and column j.
2. **Session 2.** Each PE is configured as an accumulator. It runs H²
   instructions that sum each product vector into C[i][j].

A PE needs `4H² + 1 + 2HM + H²M` words of memory. At 2^18 words the largest
even size is 98 × 98; 100 × 100 would need 270,001 words.

Measured at 50 MHz:

| run | cycles | time |
|---|---|---|
| 96 × 96, session 1 | 916,998 | 18.34 ms |
| 96 × 96, session 2 | 322,565 | 6.45 ms |
| 40 × 40, session 1 | 69,606 | 1.39 ms |
| 40 × 40, session 2 | 33,605 | 0.67 ms |
| 131,000-element two-input vector operation | 524,020 | 10.48 ms |
| 131,000-element accumulation | 131,049 | 2.62 ms |
| 131,000 vector operations split over 2 PEs | 262,020 | 5.24 ms |
| 131,000 vector operations split over 5 PEs | 104,820 | 2.10 ms |
| 131,000-number accumulation split over 2 / 5 PEs | 65,549 / 26,249 | 1.31 / 0.52 ms |

The host's API overhead and the configuration time are not included.

## Files

| file | contents |
|---|---|
| `rtl/fp_pkg.sv` | shared constants, `fp32_t`, enums (`fp_op_e`, `pe_cfg_e`, address and load selects) and micro-instruction structs |
| `rtl/fp_addsub_core.sv`, `rtl/fp_mul_core.sv` | the cores |
| `rtl/fetch_decode_unit.sv` | address management |
| `rtl/vec_data_processor.sv`, `rtl/acc_data_processor.sv` | operand registers, feedback multiplexors, core |
| `rtl/vec_controller.sv`, `rtl/acc_controller.sv` | controllers |
| `rtl/vec_module.sv`, `rtl/acc_module.sv` | complete modules |
| `rtl/pe.sv`, `rtl/rc_matmul_top.sv` | processing element and board |
| `tb/fp_ref_pkg.sv` | reference single-precision arithmetic, computed through double precision with explicit rounding and flushing |
| `tb/pe_memory_model.sv` | behavioural PE memory |
| `tb/vec_ctrl_env.sv`, `tb/vec_ctrl_lat_env.sv`, `tb/vec_mod_env.sv` | per-configuration checking environments used by `tb_vec_controller` and `tb_vec_module` |
| `tb/lat_core_dp_model.sv` | data processor with an adder of any latency, for the controller latency tests |
| `tb/matmul_host.sv` | host environment: data layout, instruction streams and checks for an M × M product |
| `tb/tb_*.sv` | one self-checking testbench per module; each prints `TB_RESULT checks=.. failures=..` |
| `tb/tb_rc_matmul_full.sv` | 40 × 40 and 96 × 96 products on the default top |
| `tb/tb_vector_workloads.sv` | 131,000-element vector and accumulation runs on one PE |
| `tb/tb_parallel_workloads.sv` | 131,000 operations of each module split over 2 and 5 PEs of a five-PE board (`NUM_PE = 5`) |

## Simulating

All files use plain SystemVerilog and need no special defines. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_rc_matmul_full rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_rc_matmul_full.sv
./obj_dir/Vtb_rc_matmul_full
```

To run any other test, replace the top module and its file. The 96 × 96 run
takes a few seconds. The testbenches count checks and failures and also report
the cycle counts. `tb_rc_matmul_top` and `tb_rc_matmul_full` also count how
often each mechanism occurred, and count a failure for any that never did.
The mechanisms are:

- instruction fetch;
- element pairs;
- emptying;
- accumulator fill and feedback;
- partial-sum holding and pairing;
- halt with `irq`;
- reconfiguration.

## Departures and limits

- Instruction fetch takes 6 (two-input) or 5 (one-input, accumulator) cycles instead of the published 10 and 9. The instruction word format and the `N = 0` end marker are this implementation's own.
- Subnormal numbers are flushed to zero, and there is a single quiet NaN. The published design names IEEE operations but does not specify these cases.
- The vector controller handles any core latency. At a latency of 4k + 1 or 4k + 2 it slows to as much as 5 cycles per pair; the published design does not say what rate it reaches at other latencies.
- Reconfiguration is a select input, not a bitstream load; its time (about 130 ms per configuration on the original board) is not modelled.
- The original board has five FPGAs. The top defaults to `NUM_PE = 4`, the matrix-multiplication board; five PEs working in parallel need `NUM_PE = 5`. The PEs share nothing, so running them in parallel changes nothing inside a PE.
- FPGA resource use (CLB counts of the original device) has no counterpart here.
