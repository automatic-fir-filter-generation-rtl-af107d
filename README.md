# A co-partitioned FIR filter on a two-dimensional processor array

This is a streaming FIR filter

    y(i) = sum_{j=0}^{N-1} a(j) * u(i-j)        (u(i) = 0 for i < 0)

built as a K1 x K2 array of multiply-accumulate processors. The filter is treated as a
two-dimensional iteration space, with samples i in one direction and taps j in the other. That
space is cut into tiles twice:
- an inner tile of J1 samples x J2 taps is worked through one point at a time by a single processor;
- an outer tile of K1 x K2 inner tiles is worked on by the whole array at once.

Every value a processor needs comes from itself or a neighbour, through a delay line whose
length is fixed by the schedule. No bus, no global memory access and no data-dependent control
exist inside the array. The array sits between dual-clock FIFOs, so the sample stream can run
on a faster clock than the processors. The coefficients live in small RAMs and can be rewritten
while the filter runs.

The structure follows the published Firgen FIR generator ("Automatic FIR Filter Generation for
FPGAs"): co-partitioning, the schedule and delay-register rule, the processor with its three
multiplexers, the FIFO and coefficient-memory organisation, and full or partial localization.
What a generator would fix per design is here a set of SystemVerilog parameters. The constant
functions in `firgen_pkg` compute the schedule and every delay at elaboration time. The default
parameters are the running example of that work: 12 taps, a 2 x 2 array, 2 x 3 inner tiles, and
16-bit samples and coefficients with a 40-bit result.

## 1. Co-partitioning: who computes which point

Every sample index and tap index is written in mixed radix:

    i = j1 + J1*k1 + J1*K1*l1        j = j2 + J2*k2 + J2*K2*l2

- (j1, j2) is the position inside an inner tile, called the LS tile, after
  "locally sequential".
- (k1, k2) is the processor that owns the tile.
- (l1, l2) numbers the outer tiles, the GS tiles, after "globally sequential".

For a fixed sample block l1 the row of GS tiles runs over l2 = 0 .. L2-1, with L2 = N / (J2*K2).
N must be a multiple of J2*K2.

So processor (k1, k2) handles:
- samples i with (i / J1) mod K1 = k1, which means array row k1 takes runs of J1 consecutive
  samples in turn;
- taps j with (j / J2) mod K2 = k2, which means array column k2 needs only J2*L2 coefficients.

This is why each row has its own input and output FIFO, and each column its own coefficient
memory.

## 2. The schedule

Point (j1, j2, k1, k2, l1, l2) runs on processor (k1, k2) in cycle

    t = lamJ1*j1 + lamJ2*j2 + lamK1*k1 + lamK2*k2 + lamL1*l1 + lamL2*l2

`firgen_pkg` picks the smallest vector that is legal. In the fully localized case:

| coefficient | column-major (default) | row-major (`ROW_MAJOR=1`) |
|---|---|---|
| lamJ1 | 1 | J2 |
| lamJ2 | J1 | 1 |
| lamK1 | (J1-1)*lamJ1 + 1 | same |
| lamK2 | (J2-1)*lamJ2 + 1 | same |
| lamL2 | max((J2-1)*lamJ2 + (K2-1)*lamK2 + 1, J1*J2) | same |
| lamL1 | max((L2-1)*lamL2 + J1*J2, (J1-1)*lamJ1 + (K1-1)*lamK1) | same |

With the defaults this gives (lamJ1, lamJ2, lamK1, lamK2, lamL1, lamL2) = (1, 2, 2, 5, 16, 10).
- **Throughput:** the array takes J1*K1 = 4 new samples every lamL1 = 16 cycles.
- **Latency:** y(i) is finished (J2-1)*lamJ2 + (K2-1)*lamK2 + (L2-1)*lamL2 = 19 cycles after
  u(i) is read.

The two scan orders are the two "LSGP scheduling directions":
- column-major walks down the J1 samples of a tap first;
- row-major walks along the J2 taps of a sample first.

`counter_unit` produces the iteration (valid, j1, j2, l2, l1) of processor (0,0) in every cycle.
It counts a period of lamL1 cycles. Inside it there is a slot every lamL2 cycles, and each slot
runs the J1*J2 points of one tile back to back. l1 saturates rather than wraps, so an endless
stream never looks like its own start again. The counters reach processor (k1, k2) through
lamK1*k1 + lamK2*k2 registers: down column 0, then along each row. Every processor therefore
sees exactly its own iteration, without its own counters.

## 3. Localized dependencies and the delay lines (the hard part)

The filter equation is rewritten as three recurrences in which each point only reads a
neighbouring point:

    a[i,j] = a[i-1,j]           coefficient travels along the sample direction
    u[i,j] = u[i-1,j-1]         sample travels diagonally
    y[i,j] = y[i,j-1] + a*u     partial sum travels along the tap direction

After tiling, the "previous" point (i-1 or j-1) is in one of three places in each dimension:
- case 0: the same tile, on the same processor;
- case 1: the neighbouring tile, on the processor to the left or above;
- case 2: the previous outer tile, on the processor at the far end of the row or column. These
  are the wrap-around links.

The value crosses the link in n = lam . d cycles, where d is the step in tiled coordinates. The
delay of each case splits into a part per dimension:

    dimension 1 (samples): case 0: lamJ1   case 1: lamK1 - (J1-1)*lamJ1   case 2: lamL1 - (J1-1)*lamJ1 - (K1-1)*lamK1
    dimension 2 (taps):    case 0: lamJ2   case 1: lamK2 - (J2-1)*lamJ2   case 2: lamL2 - (J2-1)*lamJ2 - (K2-1)*lamK2

- u uses the sum of both dimensions' parts, giving nine cases.
- a uses only dimension 1.
- y uses only dimension 2.

Every processor registers the a, u and y of its current point. Each register feeds one tapped
shift register (`tap_delay`), and a consumer taps it at n-1 stages. So one chain serves all of a
producer's consumers, and a stall, which freezes the chains, keeps every delay intact.

The default delays are:

| link | producer | delay (cycles) |
|---|---|---|
| u, same tile | own | 3 |
| u, from left / diagonal | left, upper-left | 2 |
| u, from above | upper | 3 |
| u, wrap-around both dimensions | last row, last column | 14 |
| a, same tile / from above | own, upper | 1 / 1 |
| y, same tile / from left / wrap-around | own, left, last column | 2 / 1 / 1 |

Each processor decodes its counters into the case (ci, cj) of its source point, and this
selects the operand:
- Coefficients enter only in the top row, from the column's memory, for the first sample of a
  tile; every other point takes its a from its own chain or from the row above.
- Samples enter only at tap j = 0, read from the row's input FIFO.
- A sample index below zero (i - j < 0 at the start of the stream) selects the constant 0.
- Each finished y(i) leaves the last column at tap j = N-1 and is written to that row's output
  FIFO.

In one period all K1*K2 processors work at once, while the points inside a tile run one after
another. This is how the tile sizes trade area (processors) against the length of the local
delay lines.

**FIFO links (`LINK_FIFO = 1`, default).** A shift register of n stages holds n values, but
the long wrap-around u links, from the last array row back to the first, carry a value that
is needed only at a few points per period. Each of these links with a delay of 3 or more
cycles is a small FIFO (`link_fifo`) instead:
- the producer pushes exactly the u values that some first-row point will read, one GS tile row
  later;
- the consumer pops one value at each point of that case.

Both sides follow the fixed schedule, so the order matches and the fill level stays below the
link delay. Assertions in `link_fifo` flag an overflow or an empty read. The shared delay
chains then only need to reach the short links: with the defaults each u chain drops from 15
stages to 3. `LINK_FIFO = 0` builds every link as a register chain.

Elaboration-time assertions in `proc_array` check that:
- every delay the schedule implies is at least one cycle;
- the tiles of one period fit.

## 4. Partial localization (`PARTIAL = 1`)

Full localization passes every sample through every tile it touches, and it chains the partial
sum through all N taps. That costs many long delay lines and sets the latency. With partial
localization, only the dependencies inside an LS tile stay local; the tile borders are crossed
differently:

- **The sum restarts in every tile.** At j2 = 0 the processor starts from 0 instead of from a
  neighbour's y.
- **An extra partial-sum point per tile row.** Each LS-tile row gets a point j2 = J2, so a tile
  row has J2 + 1 points. At that point the adder takes, instead of a product, the running sum
  of the previous tile along j: from the processor to the left, or, for column 0, from the last
  column of the previous outer tile. These correspond to the extra partial-sum points of the
  method.
- **Samples come from the column-0 delay lines.** The first tap column of tile (k2, l2) needs
  u(i - jb), where jb = J2*k2 + J2*K2*l2 is the tile's first tap. Instead of passing the sample
  from tile to tile, it is taken from the delay chain of the column-0 processor that read
  sample i - jb from its FIFO. That processor's row and the tap distance depend on (j1, k1, k2,
  l2). `firgen_pkg` computes them (`bsrc_row`, `bsrc_dly`) and `proc_array` wires one border
  input per (j1, l2).

The partial-sum chain between columns needs only one cycle (lamK2 = 1). The default schedule
becomes (1, 2, 2, 1, 16, 8) with latency 15 instead of 19, at the same throughput. With small
tiles and many rows the array accepts more than one sample per cycle: K1 = 4, K2 = 2, J1 = J2 = 1,
N = 2, row-major and partial takes 4 samples every 3 cycles. The I/O clock must then be faster
than the filter clock.

Cost: the column-0 u chains become longer, so that they can hold samples until the border
taps read them. With the defaults the border distances are 4 to 54 cycles.

## 5. The processor element (`fir_pe`)

Each processor has one full-precision MAC and three operand multiplexers:

- **MUX_A:** the coefficient memory, or the a delay chains (own, upper).
- **MUX_U:** the input FIFO, or the border input (partial only), or 0, or the nine u links.
- **MUX_Y:** 0, or the y links (own, left, wrap-around); in partial mode also the partial-sum
  links.

The product is sign-extended to ACC_W bits. There is no rounding or saturation, so
ACC_W >= DATA_W + COEF_W + log2(N) keeps it exact. The local control is purely combinational, a
decode of the incoming counters. It also forms the border requests:
- the FIFO read;
- the coefficient address j2 + J2*l2;
- the "result finished" flag, which is registered with y.

**Pipelined MAC (`MAC_PIPE = 1`).** This option puts a register between multiplier and adder.
It holds the product and the adder's operand selects, so the addition happens one cycle after
the point. Every y value is then written one cycle later, and every y-link read also happens
one cycle later, so the link delays do not change. Only the result latency grows by one cycle.
The default is 0, which keeps the example's 19-cycle latency; a multiplier with more internal
stages is not built.

## 6. Around the array: FIFOs, I/O order, coefficients, stalls (`firgen_top`)

- **Two clock domains.** `io_clk` runs the stream ports and `io_control`; `clk` runs the array.
  One `async_fifo` per array row carries samples in and one per row carries results out. These
  are Gray-coded pointer FIFOs with two-flop synchronisers, 16 words deep by default
  (`FIFO_AW`), and first-word fall-through.
- **I/O order.** `io_control` deals the input stream to the row FIFOs in runs of J1 samples,
  row 0 first. It collects the results from the output FIFOs in the same pattern, so `out_data`
  comes out in sample order. Both ends are ready/valid handshakes.
- **Coefficients.** `coef_we`, `coef_tap` and `coef_data` (on `clk`) write a(j) into the memory
  of column (j / J2) mod K2 at address j mod J2 + J2 * (j / (J2*K2)). Each `coef_mem` is a small
  RAM with a synchronous write and an asynchronous read, so the top row gets its coefficient in
  the cycle it asks. Writing during operation is allowed: results that mix old and new
  coefficients are those whose taps are in flight at the change.
- **Stall.** The array has no notion of "no sample". In a cycle where a row must read an empty
  input FIFO, or must write a full output FIFO, `firgen_top` lowers the global enable. Counters,
  delay chains and point registers then all hold, so the schedule continues unchanged once data
  or space is there. Because of this, the last results of a finite stream appear only after
  further samples (zeros, for example) push them through.
- **Resets.** Resets are active-low and asynchronous, one per clock domain, and both are applied
  together. Only control state is reset; data registers need no reset, because nothing reads
  them before valid data has reached them.

## 7. Parameters

| parameter | default | meaning |
|---|---|---|
| K1, K2 | 2, 2 | array rows, columns |
| J1, J2 | 2, 3 | LS tile: samples x taps per processor |
| N | 12 | taps (multiple of J2*K2) |
| ROW_MAJOR | 0 | tile scan order |
| PARTIAL | 0 | partial localization |
| LINK_FIFO | 1 | long wrap-around links as FIFOs |
| MAC_PIPE | 0 | pipeline register between multiplier and adder |
| DATA_W, COEF_W, ACC_W | 16, 16, 40 | sample, coefficient, result width |
| FIFO_AW | 4 | log2 of the FIFO depth |
| L2, LAM_L1, TAP_W | derived | do not override unless the period is to be stretched |

The counters are 8 bits wide (`CNT_W` in `firgen_pkg`), which bounds J1, J2 and L2 at 255.

## 8. Where this implementation departs from the method, and its limits

- **FIFO links.** Which links become FIFOs is this design's own rule (see the end of section 3).
  The partial-localization border links stay shift registers.
- **No generator.** The generator's search for a Pareto-optimal tile size and schedule is not
  hardware. Here the user chooses K, J and the scan order, and the smallest legal schedule
  follows from them.
- **Stall policy, handshakes, resets, FIFO depth and the coefficient write port** are this
  design's own choices; the method does not define them.
- **Partial localization** is this design's own construction of the borders (section 4). It
  reproduces the method's latency of 15 cycles for the example. The method describes its
  partial-sum points only in outline, so where they sit and what feeds them is derived here
  from the recurrence.
- **The 64-tap comparison designs** (2 x 4 and 1 x 8 processors at 12.5 % throughput) run as
  parameter settings. With 4 x 1 tiles the 2 x 4 array reaches exactly 12.5 %. The 1 x 8 array
  with 1 x 8 partial tiles gives 1/9 of a sample per cycle and latency 15, against the published
  12.5 % and 20, whose schedule is not given. Area and clock rate were not measured here.

## 9. Verification

Each module has a self-checking testbench in `tb/`. Each ends with a `TB_RESULT
checks=... failures=...` line and has a watchdog.

- `tb_firgen_top`: the full design at default parameters, checked against a direct convolution.
  - 600 samples, with a coefficient rewrite halfway.
  - Starved input and long output back-pressure, so the array stalls both ways; each stall kind
    is counted.
  - Every sample read is checked to be exactly lamL1 array cycles after the sample J1*K1 earlier.
  - Every result is checked to be written latency + 1 array cycles after its sample was read.
- `tb_firgen_workloads` (with the reusable `top_env`): the full design in five shapes. Each is
  checked against a direct convolution, and each checks the period and latency its schedule
  gives:
  - the example, partially localized;
  - 64 taps on 2 x 4 processors, fully localized, pipelined MAC, 38-bit results;
  - 64 taps on 2 x 4 processors, row-major and partial, 38-bit results;
  - 64 taps on 1 x 8 processors, partial, pipelined MAC, 38-bit results;
  - a 4 x 4 array, pipelined MAC.
- `tb_proc_array` (with `pa_env`): the array alone in five configurations, covering:
  - both scan orders;
  - both localization modes;
  - FIFO and shift-register links;
  - the pipelined MAC.

  It checks values, the period and the latency (19, 7, 15, 2 and 20 cycles), and includes the
  4-samples-per-3-cycles case.
- `tb_fir_pe` checks processors at several array positions, including one fully localized, one
  partially localized and one with the pipelined MAC. It drives random counters and link
  values.
- `tb_counter_unit`, `tb_tap_delay`, `tb_coef_mem`, `tb_async_fifo` and
  `tb_io_control` check each block against an independent model.

To run one with Verilator 5:

    verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/firgen_pkg.sv tb/tb_firgen_top.sv --top-module tb_firgen_top -o sim
    ./obj_dir/sim

Replace `tb_firgen_top` with any other testbench name. To try a different array, change the
parameters of `firgen_top`, for example in `top_env`; the schedule, delays and assertions follow.
