# Absorption-FIFO pipelining without clock enables

A deep FPGA pipeline usually handles back-pressure with one enable signal
fanned out to every register: when the consumer stalls, the whole pipeline
freezes. That enable net is a timing bottleneck with high fan-out, and on
devices whose routing fabric contains extra pipeline registers without enable
inputs (Intel Stratix 10 HyperFlex "Hyper-Registers") it keeps the pipeline out
of those registers altogether.

This RTL removes the enable. The pipeline runs every cycle. A FIFO at its
output, the **absorption FIFO**, raises an *almost-full* flag early enough that
everything still travelling through the pipeline when the sender is told to
stop fits in the words kept in reserve above the flag. The sender stops; the
pipeline drains into the FIFO; nothing is lost and no pipeline register ever
needs to hold its value.

Two sliding-window datapaths, sum of absolute differences (SAD) and 2D
convolution at a 50x50 window, are provided as example pipelines behind their
own absorption FIFOs.

## The three pieces around the pipeline

```
 sender --in_valid--> [ valid delay line, DEPTH regs ] --wr_req--> +-----------------+
   |  \                                                           |                 | --rd_data-->
   |   `--window--> [ enable-free datapath, DEPTH regs ] --data-->| absorption FIFO |    consumer
   |                                                              |  WORDS words    |
   +<--produce-- [ produce_ctrl ] <--almost_full, empty---------- +-----------------+
                        ^----------- consume ------------------------------ consumer
```

* **Valid delay line** (`valid_delay`). Because the datapath never stops, most
  of what falls out of it may be garbage. The sender's valid bit travels
  through a shift register exactly as long as the datapath, and its output is
  the FIFO's write request.
* **Absorption FIFO** (`absorption_fifo`). A RAM FIFO with a registered read
  port and flags decoded from a registered count.
* **Stall logic** (`produce_ctrl`). `rd_req = consume & ~empty`, and the sender
  may start a new element when `produce = ~almost_full | (PRODUCE_ON_READ & rd_req)`.

`absorption_wrapper` bundles the three; the datapath is instantiated next to it
so that any enable-free pipeline can be used.

## Sizing: why the flag sits DEPTH words below the top

For a datapath of `DEPTH` stages:

| quantity | rule | DEPTH = 13 (50x50) | DEPTH = 2 |
|---|---|---|---|
| FIFO words, RAM sized | `2^ceil(log2(DEPTH+1))` | 16 | 4 |
| almost-full raised at | `WORDS - DEPTH` words | 3 | 2 |
| worst stall penalty, plain stall logic | `DEPTH - (almost_full - 2)` cycles | 12 | 2 |
| worst stall penalty, produce-on-read | 0 | 0 | 0 |

When almost-full rises, the FIFO holds `WORDS - DEPTH` words and at most
`DEPTH` elements are in flight, so the total never exceeds `WORDS`. The `+1`
in the size guarantees at least one word below the flag; a FIFO of exactly
`DEPTH` words would have its flag raised all the time.
These functions live in `abs_fifo_pkg`.

## The stall penalty, cycle by cycle

The cost of absorption is what happens after a long stall. With the plain
rule (`produce = ~almost_full`), the pipeline has drained empty during the
stall. When the consumer resumes, the sender may only restart once the FIFO
has fallen below the flag, and the new data then needs `DEPTH` cycles to come
through. Meanwhile the FIFO runs dry.

Example with `DEPTH = 2`, 4 words, flag at 2, a sender that always has data
and a consumer that stalls until cycle 7 (cycles counted from 1 after reset;
this exact sequence is checked by `tb_absorption_wrapper`):

| cycle | event |
|---|---|
| 1-4 | elements 1-4 enter the datapath; element 1 is written in cycle 3, element 2 in cycle 4 |
| 5 | count = 2, almost-full rises, sender held |
| 5-6 | elements 3 and 4 are absorbed into the reserve; FIFO full |
| 7-10 | consumer reads elements 1-4 |
| 10 | count fell to 1, flag clears, sender starts element 5 |
| 11-12 | **FIFO empty: 2 cycles of penalty** |
| 13 | element 5 is read |

Of the minimum 2 cycles, one comes from having to go below the flag and one
from the FIFO not being fall-through (a word written in cycle *t* can first
be read in *t+1*). The penalty grows linearly with depth and falls back to 2
each time `DEPTH` reaches a power of two and the RAM doubles (depth 7: 8 words,
flag at 1, penalty 8; depth 8: 16 words, penalty 2).

Two ways to remove it are supported:

* **Produce on read** (`PRODUCE_ON_READ = 1`, the default). Every read frees a
  word, so an element started in the same cycle is guaranteed room when it
  arrives. In the example, the sender restarts in cycle 7 together with the
  first read, the FIFO holds 4 words and the refill arrives 3 cycles later, so
  the consumer never waits. The cost: sender and consumer must share a clock.
* **Bigger FIFO.** Override `WORDS` so that `WORDS - DEPTH >= DEPTH + 2`; then
  the words below the flag outlast the refill. The testbench uses 16 words
  for depth 5.

## Example datapaths

`sad_pipeline` and `conv2d_pipeline` take a whole `WIN x WIN` window in
parallel every cycle (element `r*WIN + c`), compute per-pixel `|a-b|` or
`pixel * tap` in one registered stage, and sum with `adder_tree`, a registered
binary tree of `ceil(log2(WIN*WIN))` levels. Latency `1 + ceil(log2(WIN*WIN))`:
13 cycles at 50x50, 5 at 3x3. Pixels are unsigned 8-bit, taps signed 8-bit;
results are 20 bits (SAD, unsigned) and 29 bits (convolution, signed).
Datapath registers have neither enable nor reset.

`absorption_top` places both channels side by side with their own ports
(`sad_*`, `conv_*`); they share clock and reset only.

## Interface timing

* `produce` is combinational in the current cycle; a sender must raise
  `in_valid` only in a cycle where `produce` is high (an assertion checks it).
* `rd_req` says whether `consume` was honoured this cycle; the word appears on
  `rd_data` with `rd_valid` one cycle later.
* `overflow` pulses on a write into a full FIFO; with correct sizing it never
  rises (an assertion checks that too).
* Reset is synchronous and active low; it clears pointers, count and the valid
  delay line, not the RAM or the datapath.

## What is this design's own choice

The absorption scheme itself, its sizing rules, the penalty rule and the
produce-on-read logic follow the published method. The following are choices
made here where the method is silent:

* the datapaths: structure, parallel-window interface, widths, kernel as an
  input; the method was evaluated on SAD, 2D convolution and correntropy
  pipelines whose insides are not given; correntropy (a non-linear similarity
  measure) is not provided for that reason, and no window buffer that turns a
  pixel stream into windows is provided;
* a registered-count FIFO: the flag clears one cycle later than in the
  published walk-through, but the sender, obeying it in the same cycle,
  restarts in the same cycle as there;
* the penalty formula is clipped at zero for oversized FIFOs. The published
  description of the bigger-FIFO option asks for `DEPTH` words below the flag,
  but by the penalty formula that still leaves 2 cycles; the checks here use
  `DEPTH + 2` words below the flag, which gives none;
* default window 50x50, the largest size in the published sweep (3x3 to
  50x50); smaller windows run by zero-padding or by setting `WIN`.

The clock-frequency gains the method is known for are a property of
placement on a particular device and cannot be shown by simulation.

## Files

| file | contents |
|---|---|
| `rtl/abs_fifo_pkg.sv` | sizing functions |
| `rtl/valid_delay.sv` | valid-bit delay line |
| `rtl/absorption_fifo.sv` | FIFO with almost-full reserve |
| `rtl/produce_ctrl.sv` | stall logic |
| `rtl/absorption_wrapper.sv` | the three above together |
| `rtl/adder_tree.sv` | registered adder tree |
| `rtl/sad_pipeline.sv`, `rtl/conv2d_pipeline.sv` | example datapaths |
| `rtl/absorption_top.sv` | SAD and convolution channels |
| `tb/tb_*.sv` | self-checking testbenches; `tb/wrap_harness.sv` and `tb/top_harness.sv` are helpers |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/abs_fifo_pkg.sv \
    tb/tb_absorption_top.sv --top-module tb_absorption_top -o sim
./obj_dir/sim
```

Replace `tb_absorption_top` by any other `tb_*` name. The testbenches:

* `tb_absorption_top`: both channels at full size (50x50, all defaults): a
  40-cycle consumer stall that must leave exactly 16 results absorbed, no
  empty cycle after it, random traffic, drain, every result compared in
  order with a reference, and each mechanism (sender held, read-granted
  production, consumer stall, FIFO full) required to occur. Runs in seconds.
* `tb_window_sweep`: the same end-to-end checks at every other window size
  of the published sweeps (3x3, 6x6, 12x12, 15x15, 18x18, 21x21, 24x24,
  25x25, 35x35), each with its own depth, FIFO size and flag level. About a
  minute.
* `tb_absorption_wrapper`: eight configurations (depths 2, 4, 5, 7, 8, 13;
  plain and produce-on-read; two enlarged FIFOs) with a model pipeline; measures the
  stall penalty against the formula and replays the 2-stage example above.
* `tb_absorption_fifo`, `tb_valid_delay`, `tb_produce_ctrl`,
  `tb_sad_pipeline`, `tb_conv2d_pipeline`, `tb_abs_fifo_pkg`: unit checks,
  including the exact datapath latency.

To change the window, set `WIN` on `absorption_top`; `DEPTH`, FIFO size and
flag follow automatically. To see the stall penalty on the full design, set
`PRODUCE_ON_READ = 0`.
