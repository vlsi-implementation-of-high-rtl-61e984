# Hybrid register-exchange / trace-back Viterbi decoder

This is a hard-decision Viterbi decoder for a rate-1/2 convolutional code
with constraint length 8 (128 trellis states). It does one trellis step per
clock. Its main idea is in how it stores survivors. A plain trace-back decoder
stores one decision bit per state per step. To walk back one step it must pick
one bit out of 128, which needs a 128:1 multiplexer. Here the decoder stores,
for each state, the best **two-step** path into it: a 2-bit value, written
once every two steps. A small register-exchange stage builds these values, and
the survivor RAM is written 256 bits wide and read 2 bits wide. The RAM's read
addressing then does the 128:1 selection, and each RAM read moves the
trace-back back by two steps.

The structure follows the paper "VLSI Implementation of High Speed Viterbi
Decoder": a branch metric unit, an add-compare-select unit with its path metric
memory and decision unit, and a survivor memory unit that uses the hybrid
scheme, on an FPGA with block RAM. The paper does not give a number of
details. The code generators, the survivor depth, the metric width, the frame
protocol and all cycle timing are choices of this implementation. They are
listed under "Choices and departures" below.

## Block map

```
             +-----+   bm[4]   +------+  dec[128]  +-----------------------------+
 Msg[1:0] -->| bmu |---------->| acsu |----------->| smu                         |
             +-----+           +------+            |  re_combiner -> survivor_ram |--> Valid
                                ^   |  pm_new      |        traceback  <--+       |--> Data[1:0]
                          pm    |   v              +-----------------------------+
                               +-----+                    ^ best
                               | pmm |----> decision_unit --+
                               +-----+      (min_pm -> acsu normalisation)
```

| module          | role |
|-----------------|------|
| `viterbi_pkg`   | code constants: K, state count, widths, generators, start metric |
| `bmu`           | Hamming distance from the received symbol to each of the 4 codewords |
| `acs_node`      | one add-compare-select: keep the smaller of two sums, emit a decision bit |
| `acsu`          | 128 `acs_node`s wired by the trellis |
| `pmm`           | path metric registers, one per state |
| `decision_unit` | comparator tree: smallest metric and its state |
| `re_combiner`   | register-exchange stage that forms the 2-bit two-step survivors |
| `survivor_ram`  | 128 columns x 256 bits, written by column, read 2 bits at a time |
| `traceback`     | walks the RAM backwards and outputs the bits in order |
| `smu`           | `re_combiner` + column counter + `survivor_ram` + `traceback` |
| `viterbi_decoder` | top level, pins `Clk Rst Wr Msg Valid Data` |

## The code and the trellis

* Generators 247 and 371 (octal), the rate-1/2, K = 8 pair with the largest
  free distance (10). `Msg[1]` is the G0 = 247 bit and `Msg[0]` the G1 = 371
  bit. The encoder register is `{u, s}`: the new bit `u` on the left and the
  7-bit state `s` on the right.
* A state is the last 7 information bits, with the newest bit in the MSB.
  Input `u` takes state `s` to `{u, s[6:1]}`. State `p` therefore has two
  predecessors, `i = {p[5:0],0}` and `j = {p[5:0],1}`. The **decision bit**
  is the bit that dropped out of the state: 0 means the survivor came from
  `i`, 1 means it came from `j`. The information bit carried by a state is its
  MSB.
* Branch metrics are Hamming distances (0..2). The ACS keeps the smaller sum.
  It chooses `i` only if `pm_i + bm_i < pm_j + bm_j`, so a tie goes to `j`.
* Metric normalisation: every new metric has the current smallest metric
  (from `decision_unit`) subtracted. At the start of a frame state 0 has
  metric 0 and every other state has 32, so the encoder is assumed to start
  in state 0. After normalisation no metric exceeds 32 + 2*7 + 2 = 48, so 6
  bits are enough.

## Two-step survivors (the hybrid scheme)

This is the part that needs the most care.

**Forming an entry.** The steps of a frame are taken in pairs, `(2c, 2c+1)`.
In the first step of a pair, `re_combiner` only stores the 128 decisions
`d(2c)` in a register. In the second step it has the new decisions
`d(2c+1)`. For each state `p` it then forms

```
d1 = d(2c+1)[p]                 predecessor one step back:  q = {p[5:0], d1}
d0 = d(2c)[q]                   (a 2:1 mux between d(2c)[{p[5:0],0}] and d(2c)[{p[5:0],1}])
entry(c, p) = {d1, d0}          state two steps back:       {p[4:0], d1, d0}
```

The 128 entries form column `c` (256 bits), which is written to
`survivor_ram` at word address `c`. Entry `p` sits at bits `[2p+1:2p]`. So
the extra cost of the scheme is one 128-bit register and 128 two-input
multiplexers. In return, memory is written at an average of 128 bits per
step, and each trace-back read covers two steps.

**Tracing back.** After the last symbol of a frame, `traceback` starts at
the best final state `s` (from `decision_unit`) in the last column. In each
clock it handles one column `c`:

* the two information bits of that column are read straight off the state:
  `u(2c+1) = s[6]` and `u(2c) = s[5]`;
* the entry `{d1, d0}` read at `(c, s)` gives the state before the column,
  `s' = {s[4:0], d1, d0}`.

The RAM has a synchronous read, as a block RAM does. The address of the next
read is therefore computed, without a register, from the entry that has just
arrived, and is presented in the same clock. This keeps the walk at one column
(two steps) per clock. The bits come out last column first, so they are
written into a 128 x 2-bit buffer by column and then played out in frame
order.

**Memory size.** 128 columns x 128 states x 2 bits = 32 Kbit, the data
capacity of two 16 Kbit block RAMs. This sets the largest frame to 256
symbols.

## Interface and timing

| pin | dir | meaning |
|-----|-----|---------|
| `Clk` | in | clock; everything is on the rising edge |
| `Rst` | in | synchronous reset, active high |
| `Wr` | in | high while a frame's symbols are presented, one per clock |
| `Msg[1:0]` | in | received hard-decision symbol (`Msg[1]` = G0 bit) |
| `Valid` | out | `Data` holds two decoded bits |
| `Data[1:0]` | out | `Data[1]` = earlier bit `u(2c)`, `Data[0]` = `u(2c+1)` |

A frame is a run of `L` clocks with `Wr` high. `L` must be even, between 2 and
256. The frame ends at the first clock with `Wr` low; call that clock cycle X.
Then:

* cycles X+1 .. X+L/2: trace-back, one column per clock;
* cycles X+L/2+2 .. X+L+1: `Valid` is high for L/2 consecutive cycles, and
  the pairs come out in frame order.

From cycle X+1 until the last `Valid` cycle the decoder is busy and ignores
`Wr`. A new frame can begin in the clock after the last `Valid`. The path
metrics are reloaded at X, so each frame is decoded on its own. Frames need no
tail bits, since the trace-back starts from the best final state. Bits near
the end of an unterminated frame are, however, less reliable than the rest.
Assertions in `smu` and `traceback` flag frames that are odd-length or too
long, and a trace-back started while one is still running.

Throughput while a frame is being received is one symbol (one decoded bit)
per clock. A whole frame of `L` symbols takes about 2L clocks from its first
symbol to its last output.

## Choices and departures

The following points are this implementation's own choices, or readings of
points the paper leaves open:

* **Constraint length 8 / 128 states.** The paper describes 256 bits written
  per two cycles and 128:1 multiplexers, and so 128 states. It gives no
  generator polynomials; 247/371 were chosen here.
* **Rate 1/2, hard decisions, Hamming metric, smaller-is-better.** These come
  from the paper's 2-bit input, its metric and its ACS flowchart. One sentence
  of the paper speaks of the "largest" total metric winning; with distances
  the smallest must win, and that rule is used here.
* **Frame decoding instead of a sliding window.** The decoder traces back once
  per frame, from the best final state, over the whole frame. The survivor
  memory depth (128 columns) is therefore also the frame limit. There is no
  continuous-stream mode with a fixed trace-back depth.
* **Decision unit** is read as the minimum search that feeds both the metric
  normalisation and the trace-back start. The paper only names this block.
* **Path metric memory** is a register file with enable. The paper's "clock
  gating" is done here as clock enables, not as gated clocks.
* **Survivor RAM** is a plain SystemVerilog array with a wide write port and
  a narrow, synchronous read port, not a vendor block-RAM primitive. A
  synthesis tool may build it from block RAM or from logic.
* **Output buffer and cycle timing** (trace-back then play-out, two bits per
  `Valid`, earlier bit in `Data[1]`, `Wr` ignored while busy) are not in the
  paper.

## Parameters

`viterbi_decoder` takes `K` (default 8), `PMW` (6), `NCOLS` (128 survivor
columns), `G0`/`G1` (247/371 octal) and `PM_INIT` (32). The defaults come from
`viterbi_pkg`. `NCOLS` must be a power of two, and the frame limit is
`2*NCOLS`. `PM_INIT` is the handicap given to every state but 0 at the start
of a frame. If `K` or `PM_INIT` is changed, `PMW` must still hold
`PM_INIT + 2*(K-1) + 2`.
The testbenches cover the default values only; other values elaborate but
are not verified.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* `vit_ref_pkg` is a software model: an encoder and a textbook Viterbi
  decoder with unbounded integer metrics and one-step trace-back. It uses the
  same tie rules and start metrics as the hardware, so the hardware must match
  it bit for bit, even on frames with many channel errors.
* `tb_viterbi_decoder` runs the top level at its default size. It sends
  random frames of 2 to 256 symbols, at error rates from 0 to 20%. It compares
  every output pair with the model and checks the exact `Valid` window. It
  checks that error-free frames come back unchanged, and that writes during a
  busy period and a mid-frame reset do no harm. It also counts full-length
  frames, corrected error frames, normalisation events and ignored writes.
* The block testbenches check each unit against independent calculations:
  an exhaustive BMU test; random ACS cases and ties; the 128-state ACS array
  against the model trellis; the metric registers; the minimum search with
  ties; the two-step packing; RAM read latency and read-during-write; the
  trace-back against a RAM model in the testbench; and the whole survivor unit
  against a one-step trace-back over random decisions.

To run a testbench with Verilator (from the directory that holds `rtl/` and
`tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/viterbi_pkg.sv tb/vit_ref_pkg.sv tb/tb_viterbi_decoder.sv \
    --top-module tb_viterbi_decoder -o sim
obj_dir/sim
```

Replace `tb_viterbi_decoder` with any other `tb_*` module to run that block's
test. Every test finishes in well under a second.
