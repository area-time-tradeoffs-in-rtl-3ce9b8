# Folded bit-plane H.264/AVC deblocking filter

This is an H.264/AVC deblocking filter built for a small gate count. A
usual design has a bank of filters, one for each filtering strength. This
one has a single configurable FIR array, the C3F (Configurable Folded
bit-plane FIR Filter). The C3F has only three rows of bit-level cells.
Each filtered pixel is computed as a sum of one-bit partial products,
c_t^j * 2^j * x, where c_t^j is bit j of coefficient c_t. The three rows
work through that sum one product per row per clock, and the partial sum
goes round the rows as many times as it needs. A filter with fewer taps
needs fewer products, so its result comes out sooner. The design gives up
speed (one pixel every N = 4 to 7 clocks) to save area.

The architecture follows the one published in "Area-Time Tradeoffs in
H.264/AVC Deblocking Filter Design for Mobile Devices". That includes the
folded array, the coefficient bit supply module (CBSM+), the two pixel
RAMs, the multiplexer, the control unit, the coefficient sets and the
configurations. Everything the publication leaves open is this design's
own choice, and is listed under "Own choices" below. That covers the host
interface, the reordering hardware, the pixel windows of the modes and the
rounding.

## Filtering modes and how they fit the array

The array has K = 3 folding sets (rows S0, S1, S2). Call the number of
taps k_c and the coefficient length m_c. One output word then needs
L = k_c * m_c one-bit operations. Each clock, the three rows do three
operations on three different words. So a new word can start every
N = L / K clocks, and N is the folding factor. Every mode is therefore set
up so that k_c * m_c is a multiple of 3:

| mode | coefficients | k_c | m_c | L | N | pixels rewritten (own choice of which) |
|---|---|---|---|---|---|---|
| 4 | 1 1 1 2 1 1 1, /8 | 7 | 3 | 21 | 7 | 8: p3..q3 |
| 3 | 1 1 1 2 1 1 1, /8 | 7 | 3 | 21 | 7 | 6: p2..q2 |
| 2, 1 | 1 1 4 1 1, /8 | 5 | 3 | 15 | 5 | 5: p2..q1 |
| 0 (5-tap) | 1 1 4 1 1, /8 | 5 | 3 | 15 | 5 | 4: p1..q1 |
| 0 (3-tap) | 1 2 1 0, /4 | 4 | 3 | 12 | 4 | 2: p0, q0 |

Some entries needed adjusting to fit the array:

- Modes 4 and 3 would need only 2-bit coefficients. A 7-tap filter with
  m_c = 2 gives L = 14, which is not a multiple of 3. So these modes use
  m_c = 3.
- The 3-tap filter runs as a 4-tap filter with c_3 = 0. The number of taps
  must differ from the number of rows.
- N must be coprime with K. This holds for N = 7, 5 and 4.

A filtered pixel at line position `pos` is sum_t c_t * x[pos + centre - t].
The line is p3 p2 p1 p0 q0 q1 q2 q3. A tap that falls beyond p3 or q3 takes
the edge pixel. The sum is rounded as (sum + 2^(s-1)) >> s, with s = 3 for
/8 and s = 2 for /4. The table is `dbf_pkg::mode_cfg`.

With `REDUCIBLE = 0` the array behaves as the plain CBSM variant:

- Every mode runs at N = 7.
- The shorter filters are zero-padded to 7 taps.
- Every mode gives the same results, only slower.

## The folded array (C3F) and its schedule

This is the part that takes the most effort to follow.

**Data path (`c3f`, `c3f_fu`, `c3f_cell`, `c3f_adder`).** Each folding set
is a row of YW = 13 cells. Each cell is an AND gate feeding a full adder.
In one clock a row adds `cb ? x : 0` to a running sum, held in carry-save
form (a sum vector and a carry vector), and registers the result. The word
x travels with the sum and is shifted left by one at every hop, so each
row multiplies by the next power of two. S2 feeds back into S0. Only S0 has
input multiplexers:

- `clear` zeroes the incoming sum when a new output word starts.
- `load` takes a fresh pixel from the parallel input `x_par` when a new tap
  starts.

m_c is a multiple of 3 in every configuration used, so taps always start
in S0. The final adder merges the two carry-save vectors of S2 into y.

**Order of operations.** An output word y_m = sum_t c_t x_{m-t} takes its
L steps in this order:

- Taps run from c_{k_c-1} down to c_0.
- Within a tap, the bits run from weight 2^0 up to 2^(m_c-1).

Step s runs on row s mod 3. The word that starts in S0 at clock t0 is at
step T - t0 in clock T. Words start every N clocks, so three words are in
flight at once. Every row is busy every clock. The example below has
k_c = 2, m_c = 6 and N = 4. It lists what S0 does in one N-clock period
that begins with a word start:

```
clock          t0      t0+1    t0+2    t0+3
S0 works on    c1^0    c0^3    c0^0    c1^3
(step)         s=0     s=9     s=6     s=3
```

The pattern repeats every N clocks. A fresh word can never land on a row
that is still busy with another word, because gcd(K, N) = 1 and L = K*N.
`cbsm` asserts this.

**Coefficient bit supply (`cbsm`).** The array holds no schedule. The CBSM
keeps one tag per row: valid flag, step, tap index, bit index and a word
identifier. Each clock:

- The tags rotate with the data, each advanced by one step.
- S0 receives either the advanced tag from S2 or, at a word start, a fresh
  tag.

From the tags the CBSM drives the coefficient bit of every row, plus
`clear` and `load` for S0. It also drives look-ahead outputs (`nxt_load`,
`nxt_tp`, `nxt_id`) that say which pixel S0 will need in the next clock.
The control unit uses these to read that pixel from RAM one clock early.
A new configuration (N, k_c, m_c and the coefficients) is accepted only
while the ring is empty. The constraints k_c*m_c = K*N, m_c mod K = 0,
k_c != K and N coprime with K are checked by assertions.

**Timing.** A word accepted in clock A (`start_ack`) is on `y` in clock
A + L + 1, together with `done`. Back-to-back words come out every N
clocks.

## Filtering an edge: RAMs, multiplexer, control unit

```
 host --block P--> RAM_P --p--\
 host --block Q--> RAM_Q --q--- MUX --x--> C3F --y--> control unit --> out_*
                        ^         ^         ^
          addr_p/addr_q |     sel |         | coefficient bits, clear, load
                        +---- control unit <---> CBSM+
```

A job filters the four lines that cross one 4x4-block edge:

- Vertical edge (`cmd_dir = 0`): block P is left of block Q, and the lines
  are rows.
- Horizontal edge (`cmd_dir = 1`): P is above Q, and the lines are
  columns.

Blocks are stored row-major, with address = row*4 + column.

The control unit (`dbf_ctrl`) runs each job through four steps:

1. It takes the mode's configuration and waits until the array is empty.
2. It reconfigures the CBSM.
3. It requests one output word per rewritten pixel, line by line. The word
   identifier is {line, position}.
4. For every tap start, it addresses RAM_P or RAM_Q and sets the
   multiplexer so that the right pixel reaches S0 on time. Each pixel is
   re-read from RAM for every tap that uses it, so the array needs no
   delay line.

Finished words are rounded and leave on `out_valid`/`out_q`/`out_addr`/
`out_pix`. Each result carries the block and address of the pixel it
replaces. Writing results back is the host's job. So is the edge order
(vertical edges left to right, then horizontal edges top to bottom, luma
and chroma separately).

**Job timing:**

- A job takes exactly 4*cnt*N + 3*N + 4 clocks from acceptance to
  `job_done`, where cnt is the number of rewritten pixels per line.
- Results come N clocks apart.
- A job presented while another runs is accepted after `job_done`.

## Throughput

Per macroblock there are 48 four-line jobs: 32 luma and 8 for each chroma
plane. This counts only filter clocks, not the block transfers:

| every edge filtered with | clocks / macroblock | CIF fps at 100 MHz |
|---|---|---|
| 3-tap mode 0 (N = 4) | 2304 | 110 |
| random mix of modes | about 6650 | about 38 |
| mode 4 (N = 7, 8 pixels per line) | 11952 | 21 |

For comparison, the published figures for this architecture are:

- Cycles per macroblock: 4480 best, 7552 worst, 5572 on a typical
  sequence.
- Real-time CIF at 30 fps with a 67 MHz clock.

The published description does not say how many pixels per line each
mode rewrites, and the counts above depend on that choice. Wider windows
(8 pixels for mode 4) cost proportionally more.

## Own choices, and where this design departs

- **Pixel windows per mode.** Only the counts (8, 6, 5, 4 or 2) are given.
  The positions in the table are chosen here.
- **Edge handling and rounding.** Taps beyond the 8-pixel line replicate
  the edge pixel. Division uses round-half-up.
- **Input width.** Pixels are 8 bits. The output word is 13 bits, and the
  sum is kept modulo 2^13.
- **Reordering hardware.** The CBSM's rotating tag ring is this design's
  own. It reproduces the published order of operations but may differ in
  hardware from the original reordering circuit.
- **Row control.** The S0 multiplexers are driven by the CBSM's
  `clear`/`load` rather than by free-running clock-derived control
  signals.
- **Reconfiguration and latency.** Reconfiguration waits for the array to
  drain, which takes up to L = 21 clocks. The latency from word start to
  result is L + 1 clocks. The published initial latency of 3 clocks is not
  reproduced.
- **Pixel storage.** Each RAM holds one 4x4 block (16 x 8 bits), with one
  write port for the host and one synchronous read port.
- **Host interface.** The host interface stands in for the unspecified
  system bus: block write ports, a valid/ready job handshake and a result
  stream.
- **Not modelled.** Boundary-strength computation, mode decision and
  macroblock-level sequencing are left to the host.

## Files

`rtl/`:

- `dbf_pkg.sv`: constants, mode enum, configuration struct, mode table
- `deblocking_filter.sv`: top level
- `dbf_ctrl.sv`: control unit
- `cbsm.sv`: coefficient bit supply module (CBSM+)
- `c3f.sv`, `c3f_fu.sv`, `c3f_cell.sv`, `c3f_adder.sv`: folded array, one
  folding set, basic cell, final adder
- `dbf_ram.sv`: pixel block RAM (used twice)
- `dbf_mux2.sv`: p/q multiplexer

`tb/`: one self-checking testbench per module (`<module>_tb.sv`), plus:

- `dbf_ref_pkg.sv`: reference model, written apart from the RTL's mode
  table
- `deblocking_filter_tb.sv`: end to end at default parameters. It covers
  all modes, both directions, folding-factor changes, edge replication,
  queued jobs, and the exact spacing and job-length checks.
- `deblocking_filter_cbsm_tb.sv`: the same with `REDUCIBLE = 0`
- `deblocking_filter_mb_tb.sv`: whole macroblocks in standard edge order
  against a software model, printing clocks per macroblock

Every testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/dbf_pkg.sv tb/dbf_ref_pkg.sv tb/deblocking_filter_tb.sv \
  --top-module deblocking_filter_tb
./obj_dir/Vdeblocking_filter_tb
```

Replace the testbench name to run another one. Each finishes in seconds.

Verilator has only two logic states, so the testbenches reset or write
everything they read.

To try another coefficient set or folding factor, edit
`dbf_pkg::mode_cfg`. Keep k_c*m_c = 3N, m_c a multiple of 3, k_c != 3 and
N not a multiple of 3.
