# A custom no-instruction-set processor for the 8x8 DCT kernel

This is a small processor that does one job: the matrix product at the heart of
the 8x8 discrete cosine transform,

    for (i = 0; i < 8; i++)
      for (j = 0; j < 8; j++) {
        sum = 0;
        for (k = 0; k < 8; k++)
          sum = sum + A[i][k] * B[k][j];
        C[i][j] = sum;
      }

It has no instruction set. A high-level-synthesis flow took the C code as it
stands, split it into basic blocks and three-address statements, scheduled each
block into states under a limit of one data-memory port, and then sized the
datapath to the busiest state. The result is four register units, three
functional units and a program of wide control words, one word per state. Each
word sets every multiplexer, write enable and opcode directly. Nothing is
decoded.

A 2-D DCT of a pixel block X is two runs: `Y = T x X`, then `Z = Y x T'`, where
T is the cosine matrix. One run takes **6314 clock cycles**, the figure
published for this datapath.

The SystemVerilog here rebuilds that processor in RTL. It follows the published
datapath: the units, how variables are bound to registers, and the state
schedules. Where the original description is silent, this RTL makes its own choices.
These include the control-word format, the word width, the memory timing and
the host interface. They are listed in the section on departures below.

## Datapath

```
            +------+  +------+  +------+  +------+
            | Reg1 |  | Reg2 |  | Reg3 |  | Reg4 |     register units: 1 read + 1 write port each
            +------+  +------+  +------+  +------+
               |  read ports, any one to any operand, or the immediate  |
        +------+--------+-----------+------------+----------+
        v               v           v            v          v
   FU1 ADD/MUL       FU2 ADD     FU3 COMP      DMEM address / write data
        |               |           |  \           |
        +---------------+-----------+   `--> flag to the controller
              results, memory data or the immediate --> register write ports
```

| Unit | Module | Does |
|------|--------|------|
| Reg1..Reg4 | `reg_bank` | small register files; read is combinational, write happens at the clock edge |
| FU1 | `fu_addmul` | `a + b` or `a * b` (low 32 bits) |
| FU2 | `fu_add` | `a + b`; with an immediate 0 it also copies a value from one unit to another |
| FU3 | `fu_comp` | signed `a < b`; the flag goes to the controller and can be stored in Reg4 |
| DMEM | `dmem` | 192 x 32-bit, one port, combinational read, write at the clock edge |

There are four register units but far more than four variables. Each unit is
really a small register file. It holds every variable and constant that
register binding assigned to it:

| Unit | Slots (0, 1, ...) |
|------|-------------------|
| Reg1 | A, 8, Addr26, Addr27, T10, T11 |
| Reg2 | B, i, T3, T6, T8, T9 |
| Reg3 | sum, j, k, T5, T12 |
| Reg4 | C, Addr28, T2, T4, T7 |

`A`, `B` and `C` are the base addresses of the three matrices. `8` is the
matrix size, used both as the loop bound and as the row stride. `T*` and
`Addr*` are the temporaries of the three-address code.

Binding only puts two variables in the same unit if no state reads both. With
one read port per unit, every state of the schedule can therefore fetch all its
operands in one cycle. For example, state S3 of the inner loop reads T3, j, A
and T7, so those four sit in four different units. Reset puts the base
addresses and the constant 8 into their slots.

## The program and where 6314 cycles come from

The controller (`ctrl_unit`) is a 5-bit program counter over 26 control words
(`dct_pkg::program_word`). Each word has a next-address field:

- `SEQ`: go to the next word.
- `JMP`: jump to the target.
- `BRF`: branch to the target when the comparator flag of the same cycle is false. This is how a loop is left.
- `RET`: return to word 0 and signal done.

The words, by basic block of the loop code:

| Word | Block | Work | States | Runs per product | Cycles |
|------|-------|------|-------:|-----------------:|-------:|
| 0 | BB0 | i = 0 | 1 | 1 | (start cycle) |
| 1 | BB1 | T2 = i < 8, leave i loop if false | 1 | 9 | 9 |
| 2 | BB2 | j = 0 | 1 | 8 | 8 |
| 3 | BB3 | T2 = j < 8, leave j loop if false | 1 | 72 | 72 |
| 4 | BB4 | sum = 0 | 1 | 64 | 64 |
| 5 | BB5 | k = 0 | 1 | 64 | 64 |
| 6 | BB6 | T2 = k < 8, leave k loop if false | 1 | 576 | 576 |
| 7-14 | BB7 | sum += A[i][k] * B[k][j] | 8 | 512 | 4096 |
| 15-16 | BB8 | T2 = k + 1; k = T2 | 2 | 512 | 1024 |
| 17 | BB9 | end of k loop | 1 | 64 | 64 |
| 18-21 | BB10 | C[i][j] = sum | 4 | 64 | 256 |
| 22 | BB11 | j = j + 1 | 1 | 64 | 64 |
| 23 | BB12 | end of j loop | 1 | 8 | 8 |
| 24 | BB13 | i = i + 1 | 1 | 8 | 8 |
| 25 | BB14 | end of i loop, return | 1 | 1 | 1 |
| | | | | **busy cycles** | **6314** |

The inner-loop body, BB7, is the heart of the design. Its 8 states with one
memory port are:

| State | Statements | Units |
|-------|-----------|-------|
| S1 | T6 = i * 8 | FU1 mul |
| S2 | T3 = k * 8; T7 = T6 + k | FU1 mul, FU2 |
| S3 | T4 = T3 + j; Addr27 = A + T7 | FU2, FU1 add |
| S4 | Addr26 = B + T4; T8 = DMEM[Addr27] | FU2, memory read |
| S5 | T5 = DMEM[Addr26] | memory read |
| S6 | T9 = T8 * T5 | FU1 mul |
| S7 | T10 = sum + T9 | FU2 |
| S8 | sum = T10 | FU2 (+0) |

The memory port limits the schedule: the two loads need states S4 and S5. In
S2 and S3, two additions or an addition and a multiplication run at the same
time. That is why there are two arithmetic units. No state needs two
multiplications, so one adder shares its unit with the multiplier. The store
block BB10 computes `T11 = i*8`, `T12 = T11 + j` and `Addr28 = C + T12`, then
writes `DMEM[Addr28] = sum`.

The source gives the total as 6314 cycles. It also says that every block other
than BB7 and BB10 takes one state. Those two statements do not agree. With one
state for every simple block, the count is 5804 including entry and exit.
6314 is exactly one more state per inner iteration:
2 + 8·5 + 64·10 + 512·11. That extra state is placed in the k increment, which
goes through the temporary T2 in two steps. The entry block runs in the cycle
that accepts `start`, and the exit block is the return to idle. The same extra
state also reproduces the published figure for the 2-port variant
(5802 = 6314 − 512).

## Interface and timing (`dct_processor`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse while idle starts a run; ignored while busy |
| `busy` | out | 1 | high for exactly 6314 cycles per run |
| `done` | out | 1 | one-cycle pulse in the cycle after busy falls |
| `host_we`, `host_addr`, `host_wdata` | in | 1, 8, 32 | write the data memory while idle |
| `host_rdata` | out | 32 | memory word at `host_addr`, combinational, while idle |

The memory layout is row-major, one element per word:

- A (left operand): words 0..63
- B (right operand): words 64..127
- C (result): words 128..191

To compute a 2-D DCT:

1. Write T into A and X into B, then run.
2. Copy C into A and T' into B, then run again.
3. Read the result from C.

Arithmetic is 32-bit two's complement and wraps around. With T scaled by 64 and
8-bit pixels, both passes stay well inside 32 bits.

The parameters of `dct_processor` are `W` (word width, 32), `N` (matrix size
and row stride, 8), `DMEM_DEPTH` (192) and `A_BASE`/`B_BASE`/`C_BASE`
(0/64/128). The program takes its loop bound and row stride from the constant `N`, so
other sizes should work if the memory and the base addresses are resized to
match. Only `N = 8` has been simulated, and the 6314-cycle count holds only for
`N = 8`.

## Departures from the published design, and choices made here

- **Register units as register files.** The binding lists j, k and sum in the
  same register, yet all three are live at the same time. Each register unit is therefore modelled as
  a bank with one read and one write port.
- **Interconnect.** The published datapath drawing shows multiplexers in front
  of each FU operand and in front of Reg1 and Reg4. The drawing does not name
  the sources of each input. Here, every FU operand can take any of the four
  read ports or the immediate. Every write port can take FU1, FU2, FU3, the
  memory data or the immediate. This is a superset of what the program uses,
  so it costs more multiplexer inputs than the original.
- **Immediates.** The constants 0 and 1 of the loop initialisations and
  increments come from an 8-bit immediate field in the control word. The
  binding lists only the constant 8 as register content.
- **Which unit does what** in BB7, beyond "S1's multiplication is on FU1", and
  copying through FU2, are choices made here.
- **k increment in two states.** This is done to match 6314 cycles; see above.
- **Memory timing.** The schedule loads a value and uses it in the next state,
  so reads are combinational, as in distributed RAM. If the memory is mapped to
  a synchronous block RAM, the schedule needs one more state per load.
- **Word width** of 32 bits, the **memory depth** of 192 words, the
  **start/busy/done handshake** and the **host port** are not from the source.
- **Not built:**
  - The 2-port-memory variant: 7-state inner loop, FU2 also multiplies,
    5802 cycles.
  - The datapaths generated for the hand-unrolled version of the code
    (6 or 8 FUs, 16 or 20 registers, 1665 or 1217 cycles). Only their
    component counts are published.

## Files

All files are in `rtl/` unless marked `tb/`.

| File | Contents |
|------|----------|
| `dct_pkg.sv` | enums, the control-word struct, the slot map, the program (`program_word`) |
| `reg_bank.sv` | one register unit |
| `fu_addmul.sv`, `fu_add.sv`, `fu_comp.sv` | FU1, FU2, FU3 |
| `dmem.sv` | data memory |
| `ctrl_unit.sv` | program counter, next-address logic, start/busy/done |
| `dct_datapath.sv` | register units, FUs and their multiplexers |
| `dct_processor.sv` | top: controller, datapath, memory, host port |
| `tb/tb_*.sv` | one self-checking testbench per module |

To change the program, edit `program_word` in `dct_pkg.sv`. Keep each word to
one read and one write per register unit, and at most one memory access.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a hung run. Run them from the project root with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/dct_pkg.sv tb/tb_dct_processor.sv \
              --top-module tb_dct_processor -o sim && ./obj_dir/sim

Substitute any other `tb/tb_<module>.sv` and its top-module name. Verilator
finds the rtl modules through `-Irtl`.

`tb_dct_processor` runs the design at its default sizes. It makes three runs:

- a product of two random signed matrices;
- the two passes of a 2-D DCT of a random 8-bit block, using an integer cosine
  matrix `T[u][x] = round(64·c(u)·cos((2x+1)uπ/16))`.

Each result is compared with a reference computed inside the testbench. Each
run must be busy for exactly 6314 cycles. The testbench also counts the
mechanisms and requires each of them to occur:

- every loop exit;
- FU1 used as an adder and as a multiplier;
- memory reads and writes;
- the two-state increment;
- `start` and host writes ignored while busy.

The unit testbenches cover the rest:

- `tb_ctrl_unit` drives the controller with a model of the loop counters. It
  checks how often each block is visited.
- `tb_dct_datapath` runs the program words of the inner loop and the store
  block on the datapath alone. It checks every temporary state by state.
