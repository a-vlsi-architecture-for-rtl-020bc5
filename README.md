# Lifting-based 2D discrete wavelet transform, row-column architecture

This is synthesizable SystemVerilog for a block-based 2D discrete wavelet transform (DWT)
of the kind JPEG2000 uses. It follows a published VLSI architecture for lifting-based
DWT and runs the two default JPEG2000 filters over several decomposition levels: the
reversible (5,3) and the irreversible (9,7).

Lifting splits a signal into even and odd samples and updates them in turn. Each update
is a short, banded filter step. For the (5,3) filter there are two steps:

    high pass (odd):   y[2i+1] = x[2i+1] - floor((x[2i]   + x[2i+2]) / 2)
    low pass  (even):  y[2i]   = x[2i]   + floor((y[2i-1] + y[2i+1]) / 4)

The block is transformed with a single sample of overlap. Rows and columns have odd
length n, and the first and last sample of every row and column pass through unchanged.
The 2D transform first lifts every row, then every column. The low-low (LL) quarter,
(n/2+1) x (n/2+1) in size, is the input of the next level.

The (9,7) filter has four such steps and a final scaling (see below).

The design uses four identical processors. Two work on rows (RP1, RP2) and two on
columns (CP1, CP2). Banked memories feed them several operands per cycle. Each
processor makes one result per cycle.

## The processor

Every processor (`lift_proc`) does one lifting operation per cycle:

    y = c +/- K * (a + b)

It has three stages:

1. An adder forms a + b.
2. A multiplier (a fixed-point coefficient) or an arithmetic shifter (K a power of two)
   scales the sum.
3. A second adder adds the result to c, or subtracts it from c.

The third operand c is read together with a and b. A short register delay line holds c
until stage 3 needs it.

The first and last stages take one cycle each. The middle stage takes `TM` cycles, on
either path. So a result appears `L = TM + 2` cycles after its operands (3 cycles at the
default `TM = 1`). A programming struct (`lift_cfg_t` in `dwt_pkg`) chooses the path, the
shift, the coefficient and the sign. With (5,3), RP1 and CP1 use "shift by 1, subtract",
and RP2 and CP2 use "shift by 2, add". With (9,7) all four use the multiplier, with the
coefficients alpha, beta, gamma and delta.

Each processor output passes through a shift/multiply unit (`sm_unit`). This unit applies
the constant diagonal scaling (K1 for low pass, K2 for high pass) that some
factorisations need. The (5,3) filter has no such scaling, so the top sets these units to
K = 1. For (9,7) the units after CP1 and CP2 multiply high pass samples by K and interior
low pass samples by 1/K.

## Row module and column module

**Row module** (`row_module`: RP1 -> REG1 -> RP2). RP1 reads three samples of a row from
MEM1 each cycle: x[2i] and x[2i+2] from the even-column bank, and x[2i+1] from the
odd-column bank. It makes y[2i+1]. For RP2 the two odd neighbours of x[2i] are needed:

- y[2i+1] comes straight from RP1's output register;
- y[2i-1] comes from REG1, a one-entry register file (`reg_file`).

RP2 gets x[2i] from a fourth MEM1 read. Its first operation starts 4 cycles after RP1's
first one. A new row can start in the cycle after RP1 has taken the last pair of the
previous one.

**Column module** (`col_module`: CP1 -> REG2 -> CP2). The column transform is *also
computed along rows*, one whole row at a time. This lets column work start long before
the row transform of the block is finished:

- CP1 makes odd row 2m+1:
  `z[2m+1][j] = y[2m+1][j] - (y[2m][j] + y[2m+2][j])/2`, for all j.
- CP2 makes even row 2m:
  `z[2m][j] = y[2m][j] + (z[2m-1][j] + z[2m+1][j])/4`.
  It starts L+1 cycles after CP1 begins row 2m+1. In each cycle it finds `z[2m+1][j]` in
  REG2 and reads `z[2m-1][j]` from MEM2_3, where CP1 stored it one step earlier.
- Rows 0 and n-1 go through CP2 with both lifting operands forced to zero. They come out
  unchanged, with the same latency as the other rows.

## (5,3): row order and the step schedule

This is the part that needs the most care. An odd row can be column-transformed only
after both of its even neighbours have been row-transformed. So the row module does not
go from top to bottom. It takes rows in the order 0, 2, 1, 4, 3, 6, 5, ... `dwt_ctrl`
groups the work into *steps*. A level of size n (with H = n/2 rounded down) takes `H + 3`
steps:

| step k        | row module (cycle 0, cycle H)     | CP1 (cycle 0) | CP2 (cycle L+1)          |
|---------------|-----------------------------------|---------------|--------------------------|
| 0             | rows 0, 2                         | -             | -                        |
| 1 .. H        | rows 2k-1, 2k+2 (if 2k+2 <= n-1)  | row 2k-3 (k>=2) | row 2k-4 (k>=2)        |
| H+1           | -                                 | row 2H-1      | row 2H-2                 |
| H+2           | -                                 | -             | row n-1 (pass)           |

CP2's first row, in step 2, is row 0, also a pass row. For n = 9 the row module
therefore runs rows 0,2 | 1,4 | 3,6 | 5,8 | 7. CP1 runs rows 1, 3, 5, 7 in steps 2 to 5,
and CP2 runs rows 0, 2, 4, 6, 8 in steps 2 to 6.

**Step length.** Within a step the row module needs 2H = n-1 cycles and each column
processor needs n. A step is `S = max(n, 2L + 1)` cycles long, so all four processors run
back to back, and a row started late in one step finishes in the next.

This overlap is safe because the column processors go through a row in order, sample j
at cycle j+1 of their step. The row module writes the samples of a row in the same order,
and at least as fast. The slowest case is the first interior even sample of a row, x[2]. It
can be read from MEM2 `2L + 4` cycles after the row module started the row. CP1 reads it
at cycle 3 of the next step, `S + 3` cycles after that start. Hence `S >= 2L + 1`, which
matters only for small n.

The last step of a level lasts `n + 2L + 3` cycles. Those extra cycles let CP2's last
results, including the LL quarter, reach MEM1 before the next level reads it.

**Data lifetimes.** The steps also make the data lifetimes easy to see, and these set the
MEM2 sizes:

- even row 2m: written in step m-1, last read in step m+2, so 4 even rows are alive;
- odd row 2m+1: written in step m+1, read in step m+2, so 2 odd rows are alive;
- CP1 row 2m+1 in MEM2_3: written in step m+2, read in step m+3, so 2 rows.

Writes and reads run a few cycles into the following step. They never reach the next row
that uses the same slot.

When a level ends, CP2 has already written the LL samples (even rows, even columns) back
into MEM1 as a compact (H+1) x (H+1) block. It writes them in steps that come after the
row module's last read of those MEM1 rows. The next level starts right away at size H+1.
It does so while levels remain and H+1 is odd and at least 3, so a 2^k+1 block gives k
levels: 9 -> 5 -> 3.

**Cycle count.** One level takes `(n/2 + 2) * S + n + 2*TM + 7` cycles. At the defaults
(S = max(n, 7)) that is 72 cycles for n = 9, 42 for n = 5 and 33 for n = 3. `done` pulses
one cycle after the last step.

The reference architecture quotes `2*floor(N/2) + 2Ta + 2Tm + N + 3 + floor(N/2)*N` for
(5,3). That is 60 cycles for N = 9 with unit adder and multiplier delays. Both grow as
N^2/2 for large N, since both produce one coefficient per cycle on each column processor.
The difference comes from the whole-row steps. Here CP1 starts row 1 one step after the
row module does. The reference starts it as soon as row 1's first result exists.

## The (9,7) filter: two passes per level

The (9,7) factorisation has four lifting steps, each of the same three-tap form:

    step 1 (odd):   x[2i+1] += alpha * (x[2i]   + x[2i+2])     alpha = -1.586134342
    step 2 (even):  x[2i]   += beta  * (x[2i-1] + x[2i+1])     beta  = -0.052980118
    step 3 (odd):   x[2i+1] += gamma * (x[2i]   + x[2i+2])     gamma =  0.882911075
    step 4 (even):  x[2i]   += delta * (x[2i-1] + x[2i+1])     delta =  0.443506852
    scaling:        odd x K, even x 1/K                         K     =  1.230174105

These are the JPEG2000 values. `dwt_pkg` holds them with 14 fraction bits. Each product
is rounded down. As with (5,3), the first and last samples are kept, unscaled.

One line needs all four processors here. So a level is done in two passes, and the
column module does not do columns during either of them:

- **Row pass.** For each row, RP1 and RP2 do steps 1 and 2 and write MEM2. A few cycles
  later, CP1 and CP2 follow along the same row, reading it from MEM2, and do steps 3
  and 4. CP1 makes the odd samples. CP2 makes each even sample from the previous CP1
  result, held in REG2, and the current one. CP2 also passes the two boundary samples through. The scaled results
  are written back into MEM1, in place.
- **Column pass.** The same again, with the MEM1 read addresses transposed. Each "row"
  the processors see is now a column of the block. The results leave on the output
  ports with their coordinates swapped back. The LL samples also go into MEM1 for the
  next level.

In a pass, `dwt_ctrl` starts a new line on the row module every `P = n/2 + 1` cycles.
CP1 starts on the same line `D4 = 2L + 3` cycles later. By then the first samples it
needs, RP2's results, have passed the S/M unit and are in MEM2. A delay line in the
controller carries the line number.

P is one cycle more than the row module needs. A line has n results, and the two output
ports take two per cycle. So CP2 spends that extra cycle passing the last boundary
sample. With a long multiplier latency (TM >= 4 on a 9 x 9 block), P is raised to
`ceil((3L + 4) / 4)`, for the MEM2 reason given below.

After the last line the pass waits `2L + 2` cycles past CP1's last start, until the last
result is written. A pass takes `n P + 4L + 5` cycles. A (9,7) level therefore takes
`2 (n (n/2 + 1) + 4*TM + 13)` cycles: 124 for n = 9, 64 for n = 5 and 46 for n = 3.

The reference architecture quotes `2(4Ta + 6Tm + 6 + floor(N/2) N)` cycles, which is 104
for N = 9 with unit delays. The difference is the extra cycle per line and a longer
drain.

Only the column pass is visible on the outputs, and only its results are final. The
row pass works on MEM1 only. When the column pass reads MEM1 transposed, the four reads
of a cycle all fall into one bank. With the LL write that makes 5 accesses, so the top's
MEM1 instance allows 5.

## Memories

All memories are register arrays (`mem_bank`) with combinational read ports and clocked
write ports. Each bank has as many ports as the schedule uses.

- **MEM1** (`mem1`) holds the N x N block. It has two banks: even columns,
  (N/2+1) x N words, and odd columns, (N/2) x N words. Ports address samples by
  (row, col), and the bank is picked inside. The external load, the LL write-back and the
  (9,7) row pass write it; the row module reads it. An assertion checks that no bank sees
  more than `MAX_ACC` accesses (reads plus writes) in a cycle. The default of 4 is what the
  organisation is designed for. The top uses 5, for the transposed (9,7) column pass.
- **MEM2** (`mem2`) holds the row-transformed rows. It has four banks:
  - MEM2_0: odd samples (RP1);
  - MEM2_1: interior even samples 2 .. n-3 (RP2);
  - MEM2_2: the two boundary samples of each row;
  - MEM2_3: complete odd rows after the column step (CP1, read by CP2).

  Banks 0-2 keep 6 row slots: an even row 2m uses slot m mod 4, and an odd row 2m+1 uses
  slot 4 + (m mod 2). MEM2_3 keeps 2 slots. The column processors read by (row, j), and
  the bank is chosen from j and the current length n. The (9,7) passes use the same
  slots. Lines that share a slot are four apart (this happens from n = 7 on). CP2 reads
  the last boundary sample of line k `D4 + H + L + 1` cycles after that line started.
  Line k+4 overwrites it `4P + H` cycles after the same start. Hence the lower bound on
  P given above.

## Interface of `dwt2d_top`

- **Load.** Write the block with `load_we/load_row/load_col/load_d`, one sample per cycle,
  while `busy` is low.
- **Start.** Pulse `start` with `levels` set (1 to 7; the block size sets the real limit)
  and `filter` set to `FILT_53` or `FILT_97`.
- **Results.** Results come out on two ports. Each carries at most one coefficient per
  cycle, tagged with `level`, `row`, `col` and `band`:
  - `out1_*`: CP1 results, odd rows (bands LH and HH);
  - `out2_*`: CP2 results, even rows (bands LL and HL).
- **Coordinates.** Coordinates use the in-place, interleaved layout of that level. An odd
  column is horizontal high pass and an odd row is vertical high pass, so
  `band = {row[0], col[0]}`. Every level's LL samples are also sent out, so the last
  level's LL is available. With (9,7) the same split holds. In the column pass CP1 makes
  the odd samples of each column, which are the block's odd rows.

Parameters: `N` (block size, default 9, odd) and `TM` (multiplier/shifter latency, default
1). `dwt_pkg` sets the sample width `DW = 16`, the coefficient width `CW = 16` and
`FRAC = 14` fraction bits. Arithmetic wraps at DW bits. With 8-bit pixels and three
levels of either filter, the values stay far inside 16 bits. The (9,7) path is integer
arithmetic with floor rounding. It therefore matches a floating point (9,7) only to
within a few units in the last place, and it is not reversible.

## How far it follows the reference, and where it departs

Taken from the reference architecture:

- four processors, each with two adders, one multiplier and one shifter;
- RP1 -> REG1 -> RP2 and CP1 -> REG2 -> CP2;
- S/M units after each processor;
- MEM1 in two banks by parity, and MEM2 in four banks with the contents listed above;
- column processing done row-wise, with CP1 on odd rows and CP2 on even rows;
- the row order 0, 2, 1, 4, 3, ...;
- boundary rows and columns passed through;
- the (5,3) factorisation and its schedule timing inside the row module: RP2 starts 4
  cycles after RP1, with 1-cycle adders and shifter;
- two passes per level for (9,7), with RP1/RP2 doing the first two lifting steps and
  CP1/CP2 the last two;
- LL fed back through MEM1 for the next level.

This design's own choices:

- word widths, rounding (floor, no offset) and reset;
- the whole-row step schedule, its step lengths and the extra cycles at the end of a level;
- MEM2 row-slot counts (6 and 2 rows rather than the reference's per-filter sizes);
- CP2 starting one cycle later than a direct CP1 -> CP2 connection would allow;
- MEM2 banks taking up to 5 accesses in a cycle, one more than the reference's limit,
  and MEM1 too in the (9,7) column pass;
- the (9,7) coefficients, which are the standard JPEG2000 values, and their 14-bit
  quantisation;
- for (9,7): the line period of n/2 + 1 cycles and the CP1 delay of 2L + 3 cycles,
  the transposed MEM1 reads of the column pass, and MEM2 bank 2 for the boundary
  samples. The reference uses only MEM2 banks 0 and 1 for (9,7), and it sizes them for
  a few samples. Here the (5,3) row slots are reused.
- the output tagging.

Not included:

- **Other filters.** The reference architecture also supports C(13,7), S(13,7), (2,6),
  (2,10) and (6,10). Most of them produce an output only every other cycle on this
  hardware. Their coefficients and schedules are not specified here, so they are not
  scheduled. The processor, S/M and memory blocks already support multiplier
  coefficients and diagonal scaling. The (9,7) mode is a template for (6,10), the other
  four-matrix filter.
- **Ext. MEM.** The external memory is outside the design. Its side is the load port and
  the two output ports.

## Simulation

Each file holds one module or package. Every testbench in `tb/` checks itself and ends
by printing `TB_RESULT checks=<n> failures=<n>`. For example, the whole design:

    verilator --binary --timing --assert -Irtl rtl/dwt_pkg.sv tb/tb_dwt2d_top.sv \
              --top-module tb_dwt2d_top -Mdir obj_top
    ./obj_top/Vtb_dwt2d_top

`-Irtl` lets verilator find modules by file name. Always pass the package first.

`tb_dwt2d_top` runs the design at its default parameters. It loads random 9 x 9 blocks and
runs 1-, 2- and 3-level transforms with both filters. It checks every coefficient against
a reference model in the testbench, and checks the cycle count against the formulas
above. The (9,7) model repeats the datapath's fixed-point steps exactly. It also counts
level switches, pass rows, LL write-backs, n = 3 levels (a level of 3 leaves RP2 with
nothing to do), (9,7) levels, switches to the column pass and in-place row-pass writes. The block testbenches (`tb_lift_proc`, `tb_reg_file`, `tb_sm_unit`,
`tb_mem1`, `tb_mem2`, `tb_row_module`, `tb_col_module`, `tb_dwt_ctrl`) test each part
alone, including latencies, the row order and the (9,7) line sequence.

To change the block size, set `N` on `dwt2d_top`: an odd number, 2^k+1 for k levels.
The controller, the memory sizes and the address widths follow from it. `TM` sets the
multiplier and shifter latency; the schedules adapt to it. Both have been simulated
beyond the defaults with both filters: N = 17 with four levels, and TM from 1 to 8. To
repeat this, change the `N` and `TM` localparams in `tb_dwt2d_top` and pass them to its
`dwt2d_top` instance.
