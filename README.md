# Parallel encoders for the CCSDS telemetry LDPC codes

The CCSDS telemetry LDPC codes are quasi-cyclic. Their generator matrices are
systematic, G = [I | W], and W is built entirely from square circulant blocks.
A circulant is fully described by its first row, because every other row is that
row rotated. So the parity of a frame is a sum of rotated first rows, one for each
information bit that is 1. This design computes that sum while the frame streams in.

- A bank of parity accumulators, the **PRCE** (parallel rotate, combine and
  enable), takes several information bits per clock cycle.
- **Function generators** are pure combinational tables. They supply the first
  rows of the circulants that the current bits belong to.
- A **control and buffer unit** reorders the incoming stream so that the PRCE
  always sees bits from several circulant rows at once.

The systematic bits go straight to the output, preceded by the attached sync
marker (ASM) and followed by the parity. The output can optionally be
randomized. The result is a complete channel access data unit (CADU) on an
AXI4-Stream master, with no idle cycles between frames.

Two encoders are provided:

| encoder | code | info bits k | code bits sent | ASM | bus |
|---|---|---|---|---|---|
| `ar4ja_encoder` | AR4JA deep-space family, rates 1/2, 2/3, 4/5, k = 1024/4096/16384 | k | k + 8m (punctured columns omitted) | `034776C7272895B0` | LA·LM bits |
| `c2_encoder` | near-earth (8160,7136) C2 | 7136 | 8160 (7136 + 1022 parity + 2 fill zeros) | `1ACFFC1D` | 16 bits |

Alongside them there is an on-chip **test harness** (`ldpc_test_system`). It
feeds a fixed number of frames into an encoder. It counts the clock cycles the
encoding takes and folds every output word into a 64-bit MISR signature. Finally
it prints the count and the signature as text for a serial terminal.

> **Important:** the circulant first rows of the CCSDS generator matrices are
> not included. The function generators are filled with a deterministic
> pseudo-random stand-in (`ldpc_pkg::gen_bit`, a hash of seed, row, column
> and bit). The datapath, control and timing are independent of the table
> contents. But the codewords are **not** CCSDS codewords until the real first
> rows are put into `ar4ja_func_column` and `c2_func_column`. See
> "Replacing the generator tables" below.

## Parity as a sum of rotated rows

Number the information bits u_0 … u_{k−1} and split W into circulants of size
m × m. Circulant row r has the information bits u_{rm} … u_{rm+m−1}.
Circulant column c gives m parity bits. In this design, row t of a circulant is
its first row g rotated right by t. So

    p_c[j] = XOR over t of  u_{rm+t} · g_{r,c}[(j − t) mod m]

Serially this is a multiply-accumulate. The accumulator holds the partial
parity. Before each new bit it rotates by one position, so the fixed first row
always lines up with the next bit. The PRCE does this LA·LM bits at a time:

- **LA branches** work on LA different circulant rows in parallel. Each branch
  gets its own first row from the function generator.
- **LM bits** of each branch are taken per cycle. The accumulators rotate by
  LM per step, and each bit is combined with the first row rotated by its
  offset within the step.

One step of `ldpc_prce` is therefore

    acc'[c][j] = acc[c][(j + LM) mod m]
               ^ XOR over b < LA, i < LM of  s_feed[b][LM−1−i] & g[b][c][(j + LM − i) mod m]

`s_feed[b][LM−1]` is the earliest bit of branch b. After m/LM steps, one whole
circulant row has been absorbed by every branch. The function generators then
move to the next group of LA rows (`row_grp`). After k/(LA·LM) steps the
accumulators hold the parity of the frame, and `reset_prce` clears them for the
next one. The parity registers are 8m bits for AR4JA (the eight parity
circulant columns) and 2·511 bits for C2.

The parameter trade-off at a fixed bus width LA·LM works like this:

- A larger LA makes each function generator smaller (fewer rows per table),
  which shortens the critical path.
- But a larger LA costs a larger reorder buffer and more latency, because LA
  rows have to be buffered before the first step.

## AR4JA control and buffer unit (`ar4ja_ctrl_buffer`)

The input arrives in order, one circulant row after another. The PRCE, however,
needs LM bits from each of LA rows in the same cycle. The unit solves this with
two memories:

- **Page double buffer.** There are two pages of LA·m bits. Each page is
  written row by row while the frame arrives and read column-wise, as LM-bit
  slices of every row, by the PRCE. A page is filled for group g+1 while group
  g is read.
- **Systematic FIFO** (`sync_fifo`). It holds the same words for the output.
  The systematic part of the CADU cannot start until the ASM has been sent.

The PRCE may process slice p of a group only once that slice has arrived in
every row of the group. That is the condition
`feed_ok = full_bufs != 0 || wcnt > L + p·LM/W`. This means the parity
computation runs a fixed latency of

    L = (LA − 1) · m / (LA·LM)   words

behind the input. The output is then scheduled to match:

- the ASM is sent once `START_WORDS` words of the frame are in (L − A + 2 if L
  is larger than the A = 64/W ASM words, otherwise 1);
- the systematic words follow;
- the parity words are sent last, through a multiplexer over the accumulator
  bits (`par_sel`).

The parity of the last step is ready exactly when the last systematic word
leaves. So the output runs with **no idle cycles**, frame after frame.

The next frame may already be arriving while the parity of the current one is
still being sent. In that case the PRCE waits (`par_pending`), while the page
buffer and the FIFO keep taking input. Input is refused only when the FIFO or
both pages are full.

A single state machine covers every LA/LM combination: INIT, ACCUM, ASM_OUT,
SYST and HALT. The design this follows used separate control units for LA = 1,
for the general case, for latency equal to the ASM length, and for a next frame
arriving during systematic output. Measured systematic latency, from the first
accepted word to the first output word:

| configuration (k = 1024) | this RTL | reference design (incl. I/O registers) |
|---|---|---|
| r 1/2, LA 8, LM 2 | 56 | 58 |
| r 1/2, LA 4, LM 4 | 24 | 26 |
| r 1/2, LA 2, LM 8 | 8 | 10 |
| r 1/2, LA 1, LM 16 | 3 | 2 |
| r 2/3, LA 16, LM 1 | 60 | 62 |
| r 4/5, LA 2, LM 8 | 3 | 4 |

The differences of one or two cycles come mainly from the input and output
registers of the reference design, which are not present here. The reference
design also uses a different control unit for some of these cases.

## C2 encoder (`c2_encoder`, `c2_ctrl`)

The C2 code has 14 × 2 circulants of size 511. Eighteen zeros are prepended to
the 7136 information bits, giving 14 · 511. Two fill zeros follow the 1022
parity bits. One branch (LA = 1) takes 16 bits per cycle.

The difficulty is that 511 is not a multiple of 16. The controller therefore
keeps an **alignment buffer** of N bits:

- It starts with N = 2, the part of the 18 zeros that does not fill a whole
  word. The first all-zero step is skipped.
- Each PRCE step takes the N buffered bits and the first 16 − N bits of the
  current word. The rest of the word goes into the buffer.
- At the last step of each circulant (step 31 of 32), only 15 fresh bits exist.
  A zero is inserted as the 16th bit, and N grows by one.
- After the 14th circulant the buffer holds 15 bits. One extra step, the state
  SYS_EMPTY_BUF, flushes them.

This extra step is the one idle output cycle per CADU. A CADU takes
2 + 446 + 1 + 64 = 513 cycles.

States: IDLE, ASM_1, ASM_2, SYST, SYS_EMPTY_BUF, HALT. When the first word of
the next frame is waiting at the end of the parity, HALT goes straight on to
the ASM.

Because of the alignment, the first row that the function generator supplies
for circulant r is rotated by one more position than for r − 1. In this
design's convention, `c2_func_column` returns the first row rotated right by
14 − r.

## Randomizer and output path

`ccsds_randomizer` is an 8-bit Fibonacci LFSR with h(x) = x^8 + x^7 + x^5 + x^3 + 1:

- it shifts toward bit 0, and bit 0 is the output;
- the feedback (bits 7, 5, 3, 0) enters bit 7;
- it starts at all ones.

It is unrolled to give W bits per cycle, and restarts at every ASM. The sequence
it produces begins `FF 48 0E C0 9A 0D 70 BC`. It is XORed over the systematic
and parity words, never over the ASM. `RAND_EN` turns it off.

The output register is the AXI4-Stream master. The whole encoder runs on the
clock enable `ce = tready_ma | ~tvalid_ma`. A stalled master therefore freezes
every register. `tready_sl = ce & room` is a combinational path from
`tready_ma`, as in the reference design. An assertion in each encoder checks
that TDATA and TVALID hold while a word is stalled. Words are MSB first: bit
W−1 of a word is the earliest bit of the stream.

## Test harness (`ldpc_test_system`)

The harness works like this:

1. A frame source fills the input FIFO. The source is either bytes from a
   serial receiver, paired into words by `ram_packer`, or the `tf_lfsr`
   pseudo-random generator.
2. `test_ctrl` holds the encoder's TREADY low until the run starts:
   - with serial input, when all frames are stored (960 by default);
   - with generated input, when the `debounce`d start button is pressed. The
     LFSR then keeps refilling the FIFO, 5000 frames by default.
3. The CADU words pass through an output FIFO, which is read every cycle, into
   `ldpc_misr`. That is a 64-bit Fibonacci MISR with x^64 + x^4 + x^3 + x + 1.
4. At the end, `bin2bcd` converts the cycle count to decimal.
5. `display_control` prints:

       RDY
       CYCLES TO ENCODE 960 FRAMES : 126722 SIGNATURE IS:D4DF947456468BD1

The UART transmitter and receiver and the clock generator are not part of the
RTL. Their signals are ports of the harness and of the top (`ts_*`). The
measured counts are 126 722 cycles for 960 frames and 660 002 for 5000 frames.
The reference hardware reported 126 780 and 660 059. The signatures cannot
match the reference: the generator tables are stand-ins, and the MISR's
injection order and seed are this design's own.

## Top level (`ccsds_ldpc_top`)

The top holds the AR4JA encoder (k = 1024, rate 1/2, LA = 8, LM = 2), the C2
encoder and the test harness side by side. Each has its own ports; they share
only the clock and the active-low asynchronous reset. The AR4JA parameters
`AR4JA_K`, `AR4JA_RATE`, `AR4JA_LA` and `AR4JA_LM` select any other member of
the family or any other parallelism. LA·LM must divide the frame length, and LA
must divide the number of circulant rows.

## Where this RTL departs from the reference design

- The generator first rows are stand-ins (see above). Everything else is
  independent of them.
- There is one control FSM for all AR4JA configurations instead of several
  specialised ones. Input is accepted during the ASM for LA = 1 as well.
- There are no input and output registers around the encoder core. The
  latency is therefore two cycles shorter (table above).
- The page buffer and the systematic FIFO are separate storage. The reference
  design shared the same memory resources between them.
- The randomizer follows the shift direction drawn in the reference diagram
  (new bit enters the top register), not the one written in its text. The
  figure's version gives the standard sequence.
- The parity multiplexer is kept for LA = 1. The reference design shifts the
  parity out there instead.
- The test harness merges the serial-input and LFSR-input test systems into one
  block, selected by `lfsr_mode`.
- The harness's MISR polynomial degree, LFSR polynomial, byte order, debounce
  time and message line breaks are this design's choices.

## Replacing the generator tables

`ar4ja_func_column` builds a constant table `GTAB[row][col]` of first rows with
the function `ldpc_pkg::gen_bit`, then selects the LA rows of group `row_grp`.
To encode real CCSDS codewords:

1. Replace `gen_bit`, or the table-building function, with the standard's
   first rows. Row r, column c is the first row of the circulant in block row
   r and parity column c. In this design's convention, row t of that circulant
   is the first row rotated right by t.
2. Do the same for `c2_func_column`.
3. Update the testbench reference models, which use the same function.

## Files

| file | contents |
|---|---|
| `rtl/ldpc_pkg.sv` | code constants, ASMs, circulant sizes, stand-in table function |
| `rtl/ldpc_prce.sv` | parity accumulators (PRCE) |
| `rtl/ar4ja_func_column.sv`, `rtl/c2_func_column.sv` | function generators |
| `rtl/ar4ja_ctrl_buffer.sv`, `rtl/c2_ctrl.sv` | control and buffer units |
| `rtl/ccsds_randomizer.sv`, `rtl/sync_fifo.sv` | randomizer, FIFO |
| `rtl/ar4ja_encoder.sv`, `rtl/c2_encoder.sv` | complete encoders |
| `rtl/ldpc_test_system.sv`, `rtl/test_ctrl.sv`, `rtl/display_control.sv`, `rtl/ldpc_misr.sv`, `rtl/tf_lfsr.sv`, `rtl/ram_packer.sv`, `rtl/debounce.sv`, `rtl/bin2bcd.sv` | test harness |
| `rtl/ccsds_ldpc_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/ar4ja_checker.sv`, `tb/c2_checker.sv` | stimulus and reference CADU models used by the encoder and top testbenches |
| `tb/ts_runner.sv`, `tb/tb_harness_workloads.sv` | full-length harness runs for the other tested configurations |

## Simulating

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
      -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/ldpc_pkg.sv tb/tb_ccsds_ldpc_top.sv --top-module tb_ccsds_ldpc_top \
      -Mdir obj -o sim && obj/sim

Replace `tb_ccsds_ldpc_top` with any other `tb_*` file to run that testbench.

`tb_ccsds_ldpc_top` runs the top at its default parameters and does the
following:

- AR4JA and C2 frames at full throughput, then with random stalls on both
  interfaces. Every CADU word is compared with CADUs computed independently as
  a matrix product.
- The harness's complete 960-frame serial test, then after a reset its
  5000-frame generated test. The printed text, the cycle counts and the
  signature are compared with a model.

It counts each mechanism and fails if one never occurred. The mechanisms are:
input and output stalls, the PRCE waiting for the previous parity, the
systematic FIFO full and running dry, the C2 buffer-emptying step, back-to-back
C2 frames, both harness modes, and button bounces. It builds in about a minute
and runs in about 15 s.

`tb_harness_workloads` runs the other hardware tests of the reference design
at their full frame counts: serial input with 960 frames at rates 2/3 and 4/5,
and 127 C2 frames; generated input with 5000 frames at rate 4/5 with LA = 16,
LM = 1, and 1000 C2 frames. It prints each cycle count next to the reference
hardware's: 96 002 / 96 032, 80 642 / 80 658, 65 153 / 65 157 and
420 002 / 420 032. The C2 generated-input run takes 513 002 cycles. The
reference lists 525 317 for that run, which corresponds to about 1024 CADUs.

`tb_ar4ja_encoder` covers six AR4JA configurations, from LA = 1 to LA = 16 and
across all three rates. It checks bit-exact CADUs, zero idle output cycles at
full throughput, and the latencies in the table above.

## How far it can be trusted

Verified in simulation:

- bit-exact CADUs against an independent reference for both encoders, with
  random flow control;
- throughput, with no idle cycles for AR4JA and 513 cycles per C2 CADU;
- the latencies listed above;
- the randomizer sequence;
- the harness cycle counts, which are within 60 cycles of the reference
  hardware's.

Not verified:

- real CCSDS codewords, because the tables are stand-ins;
- the AR4JA k = 4096 and 16384 sizes;
- timing on an FPGA.
