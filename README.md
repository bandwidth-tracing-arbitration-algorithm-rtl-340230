# Dynamic priority adaptation (DPA) for a mixed-clock DMA

Several peripheral cores, each on its own clock, exchange data with one
parent core through FIFOs. A single DMA engine on the parent clock serves all
the FIFOs, one burst at a time. The question is which FIFO to serve next, and
for how long, so that every core gets the bandwidth it needs while its
requirement changes over time.

Dynamic priority adaptation answers it from the FIFOs themselves. Each FIFO
reports how full it is, how fast that has been changing, and how often its
core has just failed to write (FIFO full) or read (FIFO empty). An arbiter
turns these three numbers into a priority and picks the most urgent FIFO. A
burst length calculator then sizes the burst: it grows for a FIFO that is
filling fast and shrinks for one that is draining, so that one channel never
holds the bus for its whole content. The DMA computes the next winner while
the current burst runs, so back-to-back bursts have no gap.

This repository holds synthesizable SystemVerilog for the whole architecture:
mixed-clock FIFO channels with status reporting, the FIFO information bus,
the DPA arbiter, the burst length calculator and the DMA controller, plus
self-checking testbenches.

```
            +-------------+  winner candidate
            | DPA arbiter |-------------+----------------+
            +-------------+             v                |
                  ^              +-------------+         |
                  |              |     BLC     |         |
                  |              +-------------+         |
                  |                     | burst length   |
                  |                     v                v
   FIFO info bus  |             +-----------------------------+      +--------+
   (fib) ---------+-------------|       DMA controller        |<---->| parent |
     ^  ^  ^                    +-----------------------------+      +--------+
     |  |  |                          ^   shared data bus
  +--+--+--+---------------------------+-------------------+
  |  FIFO ch 0 (to parent)   FIFO ch 1 (from parent)  ...  |   DMA clock
  +------------------------------------------------------ -+ ----------------
        ^                          |                           component clocks
        |          CC 0            v              CC 1 ...
```

## The status each FIFO reports

Every channel computes, on the DMA clock, a record `fifo_status_t`
(`rtl/dpa_pkg.sv`):

| field    | meaning |
|----------|---------|
| `c`      | urgency count now: filled cells of a to-parent FIFO, free cells of a from-parent FIFO |
| `c_last` | `c` at the most recent sampling point |
| `dc`     | change of `c` over the last complete sampling period |
| `f`      | failed attempts of the core since the most recent sampling point |
| `f_prev` | failed attempts during the last complete sampling period |

Sampling points come every `S` DMA cycles (32 by default). At each one the
channel records `dc = c(now) - c(previous sampling point)`, which is the fill
speed multiplied by the period. It holds `dc` until the next point and restarts
the fail count. `dc` is never divided by `S`; the equations below are
arranged so that they need no division.

Two details matter:

* **Which count is `c`.** A core fails on a full FIFO when it writes toward
  the parent, and on an empty FIFO when it reads from the parent. To give both
  directions the same meaning ("the more, the more urgent"), a to-parent
  channel reports its filled cells and a from-parent channel its free cells.
  In both cases `c` is the number of words the DMA can move right now.
* **Crossing the clock domain.** Fails happen on the core's clock. Each
  channel counts them with a free-running 16-bit counter that crosses to the
  DMA clock in Gray code. The DMA side subtracts a snapshot taken at the last
  sampling point and saturates the result at 255. Fill counts come from the
  FIFO's own Gray-coded pointers. They lag the far side by two DMA cycles and
  are always conservative, never optimistic.

## Priority

`dpa_priority` evaluates, per channel,

    p = c + f * (c*S + dc*D)          (PRIO_FULL, default)

This is `c + (c + v*D) * f * S` with the fill speed `v = dc / S` substituted.
With no fails the priority is just the fill count. This is the same rule as a
"fullest FIFO first" arbiter. Once a core has failed, the fail count scales up
a term that weighs the current fill against how fast the FIFO has been
filling, so a filling FIFO whose core is already losing data overtakes a
fuller but quiet one. Worked example (S = 32, D = 256): channel A with
`c = 100, f = 0` has p = 100. Channel B with `c = 60, dc = 10, f = 1` has
p = 60 + 1920 + 2560 = 4540, so B wins.

A cheaper form for `S << D`,

    p = (S + D) * (c*f - c_last*f_prev)   (PRIO_REDUCED)

is selectable with the `MODE` parameter. It needs two multipliers, one of them
by a constant. It gives every channel p = 0 until some core fails, so the
default is the full form.

`dpa_arbiter` holds one priority unit per channel. It registers, as winner
candidate, the largest priority among the channels that have `c > 0` and are
not masked. A tie goes to the lower channel number. Priorities are 32-bit
signed. At the defaults the largest value is about 1.9e7.

## Burst length

`blc` sizes the candidate's burst as

    b = (c/2) * (1 + dc/D)   computed as   b = h + ((h * dc) >>> log2 D),  h = c >> 1

A steady FIFO gets half its content. One that filled by a whole depth in the
last period gets all of it, and one that drained by a whole depth gets close
to nothing. The result is limited to 1..c (0 when c = 0), so a single waiting
word is still served. The shift is applied after the product: shifting `dc`
first would round every `|dc| < D` to 0 or -1.

## Transfer sequencing and timing

```
cycle t    channel status (combinational from FIFO pointers and counters)
cycle t+1  fib register: every channel's record, all channels in parallel
           arbiter priorities (combinational) -> candidate register
cycle t+2  cand valid; blc computes burst_len from fib[cand] (combinational)
           DMA takes (cand, burst_len) if idle or on the last beat of a burst
```

* While a burst runs, `dma_controller` masks its channel from the arbiter, so
  the candidate for the next burst is already chosen among the other channels.
  The candidate is taken in the cycle of the last beat, so consecutive bursts
  move one word per cycle without a gap.
* A to-parent beat happens when `up_valid && up_ready`, a from-parent beat when
  `dn_ready && dn_valid`. When the parent holds off, the burst stalls (the
  `stall` pulse).
* The reported counts lag the DMA's own transfers by a few cycles. A burst
  therefore ends early (the `underrun` pulse) when its FIFO runs empty
  (to-parent) or full (from-parent).
* Peak rate: one 32-bit word per DMA cycle. At 132 MHz that is 528 Mbyte/s.

## Top level, `dpa_comm_top`

Parameters: `NUM_CC` = 4 components (so 8 channels); `CH_DEPTH[i]` = 256 words,
the depth of channel i (a power of two, at most `dpa_pkg::MAX_DEPTH`);
`CH_S[i]` = 32 cycles, its sampling period; `DW` = 32 bits; `MODE` =
`PRIO_FULL`. Each priority unit uses its own channel's `S` and `D`. The
burst length calculator selects `log2 D` by the candidate's channel number. Channel 2k is component k's to-parent FIFO,
channel 2k+1 its from-parent FIFO.

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | DMA / parent clock, asynchronous active-low reset |
| `cc_clk[k]`, `cc_rst_n[k]` | in | clock and reset of component k |
| `cc_req[i]` | in | component attempt on channel i: write `cc_wdata[i]` (even i) or read (odd i) |
| `cc_ack[i]` / `cc_fail[i]` | out | same cycle: the attempt succeeded / failed (full or empty) |
| `cc_rdata[i]` | out | word read on a from-parent channel; it is shown whenever the FIFO is not empty and removed by an acknowledged read. It is 0 on to-parent channels |
| `up_valid`, `up_ready`, `up_ch`, `up_data` | out/in/out/out | words to the parent, with their channel |
| `dn_ready`, `dn_ch`, `dn_valid`, `dn_data` | out/out/in/in | words from the parent: the DMA asks for channel `dn_ch` |
| `busy`, `cur_ch`, `cand`, `cand_valid`, `burst_len`, `burst_start`, `stall`, `underrun`, `fib_status` | out | observation of the arbitration |

The parent must eventually answer a from-parent request (`dn_valid`). A parent
that never supplies data leaves the DMA waiting on that burst. When nothing is
written to an empty from-parent FIFO, it shows 256 free cells and ranks high.
The DMA pre-fills it as soon as it wins.

## Where this departs from, or adds to, the original description

Taken from the original description:
* the block structure (FIFO channels, information bus, DPA arbiter, BLC, DMA
  controller, parent);
* the status quantities, the sampling period of 32 cycles and four components;
* the priority and burst length equations;
* the rule that the winner is taken when the current transfer finishes;
* the 528 Mbyte/s DMA bandwidth.

Own choices:
* FIFO depth 256, data width 32 bits, and a DMA clock of 132 MHz (together
  they give the 528 Mbyte/s);
* one to-parent and one from-parent FIFO per component;
* the free-cell count as `c` on from-parent FIFOs;
* Gray-pointer FIFOs;
* sampling every channel's status in parallel each cycle;
* the eligibility rule, the mask and the tie-break;
* applying the shift after the multiply in the burst length, and the burst
  length limits;
* the early end of a burst;
* the valid/ready parent handshake;
* the widths and saturation of counts and priorities.

The reduced priority form is given in the original only in part. The version
here, `(S+D)(c*f - c_last*f_prev)`, is a reconstruction.

Not included: the parent core and the peripheral cores are outside this
design. Their ports are brought out, and the testbenches model them. The
round-robin, fixed-priority and fullest-first arbiters, which served only as
baselines for comparison, are also left out.

## Testbenches

All are self-checking and end with a `TB_RESULT checks=N failures=M` line.

| testbench | what it shows |
|-----------|---------------|
| `tb_dpa_fifo_channel` | both directions across unrelated clocks: data order; exact `c`, `dc`, `f`, `f_prev`, `c_last` around sampling points; fail counting on full and on empty |
| `tb_fib` | register stage and candidate selection |
| `tb_dpa_arbiter` | both priority equations against 64-bit reference arithmetic, eligibility, mask, tie-break, cases where fails change the winner |
| `tb_blc` | burst length against an integer reference, corner cases |
| `tb_dma_controller` | exact burst lengths, no gap between bursts, stalls, early end at empty and at full, from-parent pushes |
| `tb_dpa_comm_top` | whole design at default size. Phases: moderate load; parent stop (fills, fails); backlog recovery (throughput above 90 % of one word per cycle); drain. Every word is checked in order and end to end, and each mechanism must occur |
| `tb_dpa_mixed_sizes` | the same end-to-end test with a different depth (16 to 256) and sampling period (8 to 128) on every channel |
| `tb_dpa_workload` | three 120000-cycle bandwidth-tracing runs. Four components draw a random required bandwidth (means 1.3 to 3.2 transfers per 100 ns) every 10 us. Checks that each component's delivered mean is within 5 % of its required mean and that no word is lost; prints the per-component mean square error |

In the workload runs the total load (6.6 to 8.7 transfers per 100 ns) stays
below the DMA's 13.2. Delivered bandwidth tracks the requirement with a mean
square error of 0.02 to 0.15 (transfers per 100 ns) squared per 10 us window,
and no core fails.

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dpa_pkg.sv \
    tb/tb_dpa_comm_top.sv --top-module tb_dpa_comm_top
./obj_dir/Vtb_dpa_comm_top
```

Every run takes well under a second.

## Files

* `rtl/dpa_pkg.sv`: constants, `fifo_status_t`, and enums for channel direction and priority mode
* `rtl/async_fifo.sv`, `rtl/sync_2ff.sv`: mixed-clock FIFO core and synchroniser
* `rtl/dpa_fifo_channel.sv`: FIFO channel with fail counting and status sampling
* `rtl/fib.sv`: FIFO information bus
* `rtl/dpa_priority.sv`, `rtl/dpa_arbiter.sv`: priority unit and arbiter
* `rtl/blc.sv`: burst length calculator
* `rtl/dma_controller.sv`: DMA engine and shared data bus
* `rtl/dpa_comm_top.sv`: top level
* `tb/`: the testbenches above
