# HMSA: a mesh SIMD array with diagonal control units for matrix multiplication

This is a 2-D SIMD processor for dense matrix products. A square array of
processing elements (PEs) is not run by one central controller. Instead, a
**global control unit (GCU)** sits above a row of **local control units
(LCUs)**, one for each diagonal position of the array. LCU *k* drives either
row *k* of the array (**RC-mode**, row control) or column *k* (**CC-mode**,
column control). Every row, or every column, has its own broadcast bus, so all
rows can broadcast at the same time, each from a different PE. The LCUs pick
the source PEs by *diagonal index*: row *i* takes its operand from column
`(i + k') mod DIM`. With this, one step of a matrix product (broadcast a
column of A-elements, multiply-accumulate, rotate B by one PE) takes four
clocks for the whole array. A full N × N product takes

    s² · (s · (2 + 4·DIM) + 1)     steps, with s = N / DIM,

which is `4N³/P + 2N³/(P·√P) + N²/P` for P = DIM² PEs. That is fewer steps
than Cannon's algorithm (`6N³/P + N²/P`) or Fox's algorithm on a plain torus.

The RTL here is a complete, synthesizable implementation at 8 × 8 PEs
(P = 64). It includes an instruction set, the control units, the PE datapath,
the buses and a host interface. Testbenches run real matrix products on it and
check both the results and the clock counts.

## Structure

```
                 host  (program load, PE-memory access, start/done)
                  |
               hmsa_gcu ------------- mode_cc (RC / CC), barrier, cycle count
        +---------+---------+-- ... --+
     hmsa_lcu0  hmsa_lcu1  ...   hmsa_lcu7     each with its own control memory (hmsa_cm)
        |  ctrl, bsel
        v
   hmsa_array:  8 x 8 hmsa_pe, HBUS per row, VBUS per column,
                torus links N/S/E/W to the four neighbours
   hmsa_pe:     hmsa_regfile (8 GPRs) + hmsa_alu (with multiplier)
                + hmsa_shifter + BR/RR/SR + hmsa_pm (dual-ported memory)
```

| Module | Role |
|---|---|
| `hmsa_top` | The whole machine: GCU, DIM LCUs, the PE array. |
| `hmsa_gcu` | Host interface, start/done, RC/CC mode register, barrier across the LCUs, cycle counter. |
| `hmsa_lcu` | Per-diagonal sequencer: PC, index/loop registers X1..X7, address and broadcast-source generation. |
| `hmsa_cm` | Control memory of an LCU: 64 instruction words, asynchronous fetch. |
| `hmsa_array` | PE grid, control routing by mode, HBUS/VBUS, torus neighbour links. |
| `hmsa_bcast_bus` | One HBUS or VBUS: delivers the word of the selected PE to the whole row/column. |
| `hmsa_pe` | Processing element. |
| `hmsa_alu`, `hmsa_shifter`, `hmsa_regfile`, `hmsa_pm` | PE parts. |
| `hmsa_pkg` | Shared types: instruction word, PE control word, opcodes. |

## Row control, column control and who drives a PE

Which LCU a PE obeys depends only on the global mode. PE(i,j) executes LCU
*i*'s instruction in RC-mode and LCU *j*'s in CC-mode. The mode is a single
register in the GCU. LCUs change it with a mode-change instruction, which is
also a barrier: an LCU that reaches it issues NOPs and waits. In the clock in
which the last LCU arrives, the GCU raises `go`, every LCU moves on, and the
new mode applies from the next clock.

Each LCU has its own program counter and its own control memory. This makes
the machine a multiple-SIMD machine: different rows (or columns) can run
different programs. Loaded with the same program, the LCUs run in lock step.
The matrix product relies on that, because its neighbour shifts cross row
boundaries.

## Diagonally indexed concurrent broadcast

This is the central mechanism. For every instruction, an LCU forms

    ea = imm + (X[xp] << xsh) + X[xq]

from its index registers. For `BCAST` (and `BMUL`), ea is an offset. LCU *k*
selects PE `bsel = (k + ea) mod DIM` of its row (RC) or column (CC) as the
driver of that row's HBUS (column's VBUS). Every PE of the row/column then
latches the bus word into its broadcast register BR, in the same clock. All
rows do this at once, each from a different column: with ea = k', row *i*
broadcasts from column `(i + k') mod DIM`.

Put this together with B rotating up by one PE per step and you get the
matrix product. Take one block of A and B, one element per PE:

* PE(i,j) holds `a[i][j]` in r0 and `b[i][j]` in r1; r2 is the accumulator.
* In step k' = 0 … DIM-1:
  1. `BCAST r0, offset k'`: row *i* broadcasts `a[i][(i+k') mod DIM]`.
  2. `MUL r3, BR, r1`.
  3. `ADD r2, r2, r3`.
  4. `SEND north r1`: every b moves one PE up, with wrap-around.
* After t shifts, PE(i,j) holds `b[(i+t) mod DIM][j]`, which matches the
  broadcast `a[i][(i+t) mod DIM]`. After DIM steps, r2 holds
  `c[i][j] = Σ a[i][m]·b[m][j]`, and B is back where it started.

In CC-mode, the same program with `SEND west` computes **B × A** with the
matrices in place. Column *j* broadcasts `a[(j+t) mod DIM][j]` down its VBUS,
while b rotates left. This is how column control supports products that
involve a transpose without moving any data first.

`BMUL` combines the broadcast with the multiply in one clock
(`BR <= bus; rd <= bus * rt`). With x_j in the diagonal PE(j,j) and offset 0
in CC-mode, all DIM² products `a_ij · x_j` of a matrix-vector product form in
a single clock.

## Larger matrices: blocks

For N > DIM each PE holds an s × s grid of elements, s = N/DIM. Element
(r, c) of a matrix lives in PE(r mod DIM, c mod DIM) at word
`base + (r / DIM)·s + (c / DIM)`. The test programs use A at 0, B at s², and
C at 2s². Loops over the blocks i, j, k use the index registers as counters
(X4 = i, X3 = j, X2 = k, X1 = k'). Addresses come straight from the address
form, because s is a power of two: A(i,k) is `0 + (X4 << log2 s) + X2`,
B(k,j) is `s² + (X2 << log2 s) + X3`, and so on. So no clock is spent on
address arithmetic. The loop fields also cost no clock. A `LOOP2` flow field
closes two nested loops in the same instruction as the last shift (and as
the store).

The RC-mode program for C = A × B (see `matmul_prog` in
`tb/hmsa_tb_pkg.sv`):

```
0: MOVI r2, 0
1: LD   r0, [0  + (X4<<sh) + X2]        ; a block (i,k)
2: LD   r1, [s² + (X2<<sh) + X3]        ; b block (k,j)
3: BCAST r0, offset X1
4: MUL  r3, BR, r1
5: ADD  r2, r2, r3
6: SEND north r1 -> r1   | LOOP2 (X1 < DIM -> 3) (X2 < s -> 1)
7: ST   r2, [2s² + (X4<<sh) + X3] | LOOP2 (X3 < s -> 0) (X4 < s -> 0)
8: HALT
```

## Timing

Each instruction takes one clock. Loads, stores, broadcasts, multiplies, adds
and neighbour shifts all complete in the clock in which they are issued:
memory reads on the PE side are asynchronous, and buses and links are
combinational. The program above therefore takes the step count given at the
top, plus one clock per result block (the `MOVI` that clears the accumulator)
and one for `HALT`. A CC-mode product adds two more clocks for its two mode
changes. Measured on the default 8 × 8 array:

| Product | s | Clocks | Step count of the method |
|---|---|---|---|
| 8 × 8 (a 4 × 4 product zero-padded) | 1 | 37 | 35 |
| 16 × 16, RC-mode / CC-mode | 2 | 281 / 283 | 276 |
| 64 × 64 | 8 | 17 537 | 17 472 |
| 128 × 128 | 16 | 139 777 | 139 520 |
| 256 × 256 | 32 | 1 116 161 | 1 115 136 |

The `cycles` output of the top counts the clocks from `start` to the clock
before `done`.

## Capacity

Each PE has 4096 32-bit words of memory, and a product needs 3s² of them (A,
B and C blocks). On the default array, products up to N = 256 fit. N = 512
and larger need 12 288 or more words per PE, so the host has to split them
into sub-products. A 4 × 4 product runs zero-padded to 8 × 8. Other array
sizes are set by `DIM`; the unit tests use DIM = 4.

## Processing element

* Registers r0..r7 reset to zero. Operand fields can also name BR (8), RR (9)
  and SR (10).
* BR: the broadcast register, loaded by `BCAST`/`BMUL` from the HBUS
  (RC-mode) or the VBUS (CC-mode).
* SEND: moves words to a neighbour. The operand is offered to all four
  neighbours and kept in SR. The PE takes the word arriving from the opposite
  side into RR and into rd. `SEND north` therefore reads the south
  neighbour. Links wrap around on both axes.
* Operations: `MOVI` (16-bit sign-extended immediate), `LD`, `ST`, `BCAST`,
  `BMUL`, `MUL` (low 32 bits), `ADD`, `SUB`, `AND`, `OR`, `XOR`, `MOV`, `SHL`,
  `SHR` (imm[4:0] = amount, imm[5] = arithmetic).
* The memory has two ports. The PE port reads asynchronously and writes at
  the clock edge. The host port reads one clock after the address. If both
  ports write the same word in the same clock, the PE's write is kept.

## Instruction word (`instr_t`, 93 bits)

| Field | Meaning |
|---|---|
| `op, rd, rs, rt, imm` | PE operation and operands; `imm` is also the immediate and the shift amount. |
| `xp, xq, xsh` | Address / broadcast offset `imm + (X[xp] << xsh) + X[xq]`. |
| `dir` | SEND direction (N, S, E, W = direction the data moves). |
| `flow` | `NEXT`, `LOOP`, `LOOP2`, `JMP`, `MODE` (barrier, then mode = `mode_cc`), `HALT`. |
| `la_x, la_cnt, la_tgt` | Loop A: X[la_x] counts 0 … la_cnt-1, jumping to la_tgt; it clears itself when the loop ends. |
| `lb_x, lb_cnt, lb_tgt` | Loop B (LOOP2 only): stepped when loop A ends. |

X0 always reads 0. During `MODE` and `HALT` the PEs receive a NOP.
Assertions in the LCU and GCU flag program errors in simulation: a loop
with count 0, LCUs asking for different modes at one barrier, and a barrier
wait outside a run.

## Using the top

1. Write the program. Set `cm_we` with `cm_all = 1` to write every LCU's
   control memory, or with `cm_all = 0` and `cm_sel` to write one LCU's.
2. Load the operands one word per clock: `pm_we`, `pm_row`, `pm_col`,
   `pm_addr`, `pm_wdata`.
3. Pulse `start`. The GCU sets RC-mode and starts all LCUs at address 0.
   `busy` stays high until `done` pulses.
4. Read the results: set `pm_row`, `pm_col` and `pm_addr`; `pm_rdata` follows
   one clock later.

## Where this design makes its own choices

The architecture defines the organisation (GCU, diagonal LCUs with control
memories, PEs with ALU, shifter, GPRs, BR/RR/SR and a dual-ported memory,
HBUS/VBUS, torus links, RC/CC control, the diagonal broadcast index) and the
matrix-product algorithm with its step count. The following are this
design's own choices:

* The instruction set, its encoding, the index/loop registers and the
  `LOOP2` zero-overhead nested loop.
* The word width (32 bits, wrapping arithmetic), 8 registers, 4096-word PE
  memories and 64-word control memories.
* The GCU's barrier-based mode switch, the start/done handshake, the host
  ports and the cycle counter.
* The array size of 8 × 8, matching the 64-processor configuration of the
  evaluation. A 4 × 4 array is DIM = 4.
* The buses are multiplexers, not tri-state lines.
* One extra clock per result block to clear the accumulator, and one for
  `HALT`, beyond the step count. `BCAST`, `MUL` and `ADD` stay separate
  instructions in the matrix-matrix program, so its count matches the
  method's count, which charges one step each. `BMUL` provides the overlap
  for matrix-vector work.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/hmsa_pkg.sv tb/hmsa_tb_pkg.sv tb/tb_hmsa_top.sv --top-module tb_hmsa_top
./obj_dir/Vtb_hmsa_top
```

| Testbench | What it checks |
|---|---|
| `tb_hmsa_top` | Default size: 16 × 16 products in RC- and CC-mode, a barrier with staggered LCUs, a one-clock matrix-vector step. Checks results and clock counts, and that each mechanism occurs. |
| `tb_hmsa_workload` | 4 × 4 (padded), 64², 128² and 256² products against a reference, with clock counts (about 15 s). |
| `tb_hmsa_array` | Control routing by mode, concurrent HBUS/VBUS broadcasts, shifts in all four directions with wrap-around. |
| `tb_hmsa_lcu` | The instruction trace of both product programs against the loop nest, barrier wait, halt, clock count. |
| `tb_hmsa_gcu` | Barrier, mode switch, start/done, cycle counter, host decode. |
| `tb_hmsa_pe` | Random instruction streams against a model, one-clock timing. |
| `tb_hmsa_alu`, `_shifter`, `_regfile`, `_pm`, `_cm`, `_bcast_bus` | The parts, against reference values. |

`tb/hmsa_tb_pkg.sv` holds the instruction builders and the product programs.
It is the place to start when writing new programs.
