# Event-driven readout for a 1024 x 1024 pixel gas-detector chip

This is the digital readout of a pixel chip for micro-pattern gas detectors.
Each of the 1,048,576 pixels gives a Hit level from its analogue front end.
For every particle hit the chip sends out one word. The word holds the
pixel's row and column, the arrival time (ToA) and the time over threshold
(ToT, a measure of energy). Nothing is read out for pixels without a hit
("event driven"). Times are counted in 5 ns steps, one period of the 200 MHz
chip clock.

The readout works as a funnel. Sixteen pixels share one measurement unit. A
token ring collects those units into a FIFO at the bottom of each group of
four columns. Two levels of arbitration then merge the 256 column FIFOs into
one output stream.

```
pixel Hit levels (1024 x 1024)
  └─ cluster: 4 x 4 pixels  ── SDU (first hit only) ── TDC (ToA, ToT)
       │                      └ ACU (4-bit pixel address)
       │  256 clusters per super column
  └─ token ring ──> SCC: SCR register -> bottom FIFO         (super column = 4 columns)
       │  4 super columns per column block
  └─ CBC: continuous arbiter -> CBC FIFO                      (column block = 16 columns)
       │  64 column blocks
  └─ readout controller: tree of cyclic (round-robin) arbiters, 16 + 4 + 1
       │
     out_valid / out_ready / out_data  (one hit word per clock at most)
```

All modules are synthesizable SystemVerilog. Their defaults are the full
1024 x 1024 array.

## The cluster: first hit, address, time and energy

A cluster is 4 rows x 4 columns of pixels. Its pixels are numbered 0-15 in a
serpentine: 0..3 from left to right in the first row, 4..7 from right to left
in the second, 8..11 from left to right, and 12..15 from right to left in the
last row. One module of each kind below serves the whole cluster (`cluster.sv`):

* **Edge detection.** The cluster keeps the previous cycle's 16 Hit levels.
  A pixel has a rising edge in the cycle where it is high for the first time.
* **ACU (`acu.sv`).** While the cluster is free, the ACU stores the 4-bit
  number of the first pixel that rises. If several pixels rise in the same
  clock, the lowest number wins.
* **SDU (`sdu.sv`).** The SDU makes the single `1_hit` level for the TDC.
  `1_hit` rises in the clock of the first edge. After that it follows only
  that pixel, so its falling edge is the end of that pixel's pulse. The other
  15 pixels cannot disturb the measurement.
* **TDC (`tdc.sv`).** The TDC has no delay line. All TDCs sample one shared,
  free-running 16-bit counter, which advances once per clock.
  * When `1_hit` rises, the counter value becomes ToA.
  * When `1_hit` falls, ToT = counter - ToA, saturated at 255.
  * The result is then held and `done` requests readout.

Timing: take a pulse that is high for *n* sampled clocks from clock *t*.
It gives ToA = time(*t*) and ToT = *n*. The request to the token ring comes
in clock *t+n+1*.

**Dead time.** From the first edge until the token ring has taken its data,
the cluster ignores new edges from all of its 16 pixels. At best this is
ToT + 2 clocks. Waiting for the token, or for room in the bottom FIFO, makes
it longer. A 10-clock (50 ns) pulse read out at once gives 60 ns.

## Token ring (`token_ring.sv`)

The 256 clusters of a super column share one bus to the super column
controller. Exactly one cluster holds the token. If the holder has data and
the controller can take a word, the holder drives the bus. In that same clock
the token jumps to the next requesting cluster in ring order (holder+1,
holder+2, ..., wrapping around). If the holder has nothing to send, the token
jumps without a transfer. The jump covers any distance in one clock, because
it looks ahead over all 256 requests. So a busy super column delivers one hit
per clock, and every requesting cluster is served within one trip around the
ring.

## Two FIFO levels

* **SCC (`scc.sv`)**: the super column controller. Its SCR register takes the
  bus word. It turns the cluster number and pixel number into a row and the
  low two column bits. Then it writes the word into the bottom FIFO.
  `in_ready` counts the word that may still be in the SCR, so no word is ever
  dropped.
* **CBC (`cbc.sv`)**: the column block controller. A continuous arbiter moves
  words from the four bottom FIFOs into the CBC FIFO. It waits while the CBC
  FIFO is full.

Both levels use `sync_fifo.sv`, a first-word-fall-through FIFO: the head word
is always visible and `rd_en` pops it. The default depth is 16 words per FIFO.

## Two ways to arbitrate

Both arbiters have four channels. Each channel is a FIFO seen through its
`empty` flag and head word. Both arbiters use the same states: IDLE and
Read_0 to Read_3. Both go to IDLE when all four channels are empty. From IDLE
they start at the first non-empty channel counting from 0. An empty channel
is skipped, in the order 0, 1, 2, 3, 0, and several empty channels are
skipped in a single clock. They differ in when they leave a channel:

| | stays on channel *k* while | leaves channel *k* |
|---|---|---|
| continuous (`continuous_arbiter.sv`) | *k* is not empty: reads a word each clock | when *k* is found empty (one clock without a read) |
| cyclic (`cyclic_arbiter.sv`) | *k* is the only channel with data | after one word |

The continuous arbiter drains one super column in a burst. It is used once
per column block. The cyclic arbiter shares the output fairly, one word at a
time. It is used in the readout controller.

Each arbiter writes the number of the channel it read into the word's column
field. The column address is therefore complete only after the last level:

| column bits | written by |
|---|---|
| [1:0] | SCC (pixel column inside the cluster) |
| [3:2] | continuous arbiter (super column inside the column block) |
| [5:4], [7:6], [9:8] | cyclic arbiter levels 0, 1, 2 (column block) |

## Readout controller (`readout_controller.sv`)

The cyclic arbiter has four channels, so 64 column blocks need a tree of
three levels: 16, 4 and 1 arbiters. Together with the continuous level, a hit
passes four arbitration levels. Each tree node keeps the word it read in a
one-word register. It offers that register upward as a non-empty "FIFO", and
it reads again in the same clock the register is taken. The tree therefore
passes one word per clock, with one clock of latency per level. The chip
output is a valid/ready pair.

## Hit word (`mpgd_pkg.sv`)

`hit_word_t` is 44 bits: `row[9:0]`, `col[9:0]`, `toa[15:0]`, `tot[7:0]`.
ToA and ToT count 200 MHz clocks. The top also outputs `time_now`, the counter
that the TDCs sample.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `mpgd_readout_top` | `ROWS`, `COLS` | 1024, 1024 | `ROWS` a multiple of 4; `COLS/16` a power of 4 (64, 256, 1024) |
| all FIFO users | `SCC_DEPTH`, `CBC_DEPTH` | 16, 16 | powers of two, this design's choice |
| `mpgd_pkg` | `TOA_W`, `TOT_W` | 16, 8 | this design's choice |

## What follows the source description and what is this design's own

The following are taken from the chip's description:

* the array size, 4-column super columns and column blocks of four super
  columns;
* 256 clusters of 16 pixels, each with its own SDU, ACU and TDC, and the
  4-bit pixel address;
* the token ring, the SCC with SCR and FIFO, the CBC with a continuous
  arbiter and FIFO;
* round-robin arbitration in the readout controller;
* the states of both arbiters, and the 5 ns time step at 200 MHz.

Choices made here, where the description gives no detail:

* **TDC.** It samples a shared counter at both edges of `1_hit`, with ToT as
  the energy measure. The widths are 16 and 8 bits.
* **Pixel numbering.** The serpentine order between the first and the last
  row is assumed.
* **Tie-break.** When several pixels rise in the same clock, the lowest
  number wins.
* **Pixel inputs.** The Hit levels are treated as synchronous to the clock.
* **Token.** It jumps to the next requester in a single clock.
* **SCR.** Read as a plain register stage in front of the bottom FIFO.
* **FIFOs.** Depth 16, first-word-fall-through.
* **Arbiter jumps.** Both arbiters skip several empty channels at once. The
  continuous arbiter goes from Read_3 back to Read_0.
* **Four arbitration levels.** Read as one continuous level plus a
  three-level tree of cyclic arbiters, with a register at each tree node.
* **Output.** A valid/ready handshake with backpressure, and the word layout
  above.
* **Reset.** Synchronous and active low.

The following are not covered by this RTL:

* the analogue pixel front end;
* any clock-domain crossing between pixels and readout;
* the chip's figures of merit: 99 % readout efficiency, 60 ns dead time and
  15 um resolution. They depend on the hit rate and the analogue part, and
  are not simulated here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module with values that the testbench works out itself, has a watchdog, and
ends with a `TB_RESULT checks=N failures=M` line:

* **FIFO, ACU, SDU, TDC, cluster.** Random and directed stimulus checked
  against small reference models. This covers ToT saturation, the dead time
  and the request latency.
* **Token ring.** Ring order, no starvation, and one transfer per clock with
  all clusters requesting.
* **Arbiters.** A cycle-by-cycle reference model of each state diagram, with
  random fill and backpressure.
* **Readout controller.** Per-block word order, the column tags, and one word
  per clock with all 16 blocks full.
* **`tb_super_column`, `tb_column_block`, `tb_mpgd_readout_top`.** Random
  pulses on the pixel array. Every recorded hit must leave exactly once with
  the right row, column, ToA and ToT. The tests also check that each
  mechanism happens at least once and count how often: token passing, a
  stalled bus on a full bottom FIFO, a full CBC FIFO, the continuous stay and
  switch, the cyclic switch, output backpressure, hits dropped during dead
  time, and ToT saturation.

The end-to-end test runs the top at 16 rows x 64 columns (4 column blocks)
with FIFOs of depth 2, so that every level fills. The largest size simulated
is that one. The full 1024 x 1024 array passes Verilator's lint, but that alone takes
about 12 GB of memory and 3.5 minutes. It was not simulated.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/mpgd_pkg.sv tb/tb_mpgd_readout_top.sv \
    rtl/*.sv --top-module tb_mpgd_readout_top -Wno-fatal -o sim && obj_dir/sim
```

To run another test, replace `tb_mpgd_readout_top` with its name, for example
`tb_cyclic_arbiter`. To run the end-to-end test at another size, change `R`
and `C` in `tb/tb_mpgd_readout_top.sv`. `R` must be a multiple of 4, and
`C/16` a power of four.
