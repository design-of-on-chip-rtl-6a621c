# On-chip test-pattern memory for a 5 GS/s, 8-bit DAC

Testing a data converter at full speed from an external tester is hard: the
pads and board traces limit bandwidth, and a 5 GS/s, 8-bit input stream would
need many high-speed pins. This design puts the pattern source on the chip. A
2048-bit pattern is loaded slowly through one data pin (1 MHz in the target
system). It is stored in a memory made entirely of shift registers. The memory is
then replayed in an endless loop, and a tree of 2:1 serializers speeds it up to
one 8-bit word per cycle of a 5 GHz clock. Everything is digital. The only
fast input is the 5 GHz clock, `exclock`.

```
            write mode (CLOCK, 1 MHz)                 read mode (Rclk = 625 MHz)
 DATA --> interface --> SIPO 64b --64--> 64 x 32 shift-register memory --64--> serializer --8--> DAC
 CLOCK/ENABLE/RESET --> control unit --clk1M, clk1M-625M, enable-->   ^  (8 pages of 8:1)   clk5G
 exclock (5 GHz) --> clock divider --clk625M (Rclk)--> control unit   |   clk5G/2.5G/1.25G/625M
```

## Sizes and rates

| quantity | value | where set |
|---|---|---|
| memory word | 64 bits | `tester_pkg::WORD_W` |
| memory depth | 32 words (2048 bits) | `tester_pkg::DEPTH` |
| serializer pages / DAC bits | 8 | `tester_pkg::PAGES` |
| write clock `clock` | 1 MHz (any rate works) | external |
| memory read clock | 625 MHz = 5 GHz / 8 | clock divider |
| DAC word rate | 5 GS/s, one word per `exclock` period | clock divider |

One 64-bit word read every 1.6 ns gives 8 bits every 200 ps, so the memory
and the serializer together deliver exactly the DAC's 40 Gb/s.

## Where each bit goes

Serial bit number `n = 64k + 8p + t` is bit `n` of the stream on `data`. It
is stored as bit `8p + t` of memory word `k`. It reaches the DAC as bit `p` of
DAC word `8k + t`. In read mode the DAC sees DAC words 0 to 255 in order, then
the same 256 words again, for as long as the tester runs. To build a pattern,
take DAC sample `j` (0 to 255) and put its bit `p` at serial position
`64*(j/8) + 8p + (j%8)`.

## Clocks (`clock_divider`, `tff`)

Three T flip-flops on `exclock` form a synchronous 3-bit counter. The toggle
inputs come from the Q-bar outputs (T1 = ~Q0, T2 = ~Q0 & ~Q1), so the counter
counts down. On the 000 -> 111 step all three outputs rise together. The outputs
are `clk2g5`, `clk1g25` and `clk625m`, and their rising edges line up with each
other and with the `exclock` edge that causes them. `clk5g` is `exclock` itself.
`clk625m` is the read clock (Rclk).

## Write mode: one memory clock edge per 64 bits

This is the subtle part of the design. The memory is clocked only once per
word, so it does not need a write address.

* `interface_unit` captures DATA, ENABLE and RESET on the **falling** edge of
  the write clock (Wclk). Everything downstream uses the rising edge, half a
  cycle later.
* `sipo` shifts one bit per rising edge of `clk1M`, which is Wclk gated by
  ENABLE. After 64 edges the first bit of the word is in `word[0]`.
* `pulse_gen` is a 6-bit counter on `clk1M` with a synchronous reset to all ones.
  A 6-input NAND drives `pulse_n` low while the count is all ones.
* The memory clock is `clk1M-625M = WRclk | (enable & pulse_n)`. During
  write mode it stays high and drops only in the second half of every 64th
  cycle. Its rising edge is the rising edge that starts the next word.
  On that edge the SIPO is still showing the complete previous word, and the
  memory takes all 64 bits at once.

Number the rising edges of CLOCK from the one at which data bit 0 is presented
with RESET low; that is edge 0. The interface registers the bit on the falling
edge that follows, so data bit `n` is shifted into the SIPO on edge `n + 1`.
Edge 1 also clocks whatever the SIPO holds into the memory. That word is
pushed out again later. Words 0 to 31 are written on edges 65, 129, ..., 2049.
The memory is a 32-deep FIFO, so after edge 2049 it holds exactly words 0 to
31, with word 0 at the output.

**When ENABLE may fall.** In the same numbering, ENABLE may be
lowered at any of edges 2048 to 2111. The design samples it on the following
falling edge. Edge 2048 is 64 x 32 clocks after edge 0, and is the natural
choice. If ENABLE falls earlier, the last word is lost. If it falls later, a
33rd word is written and word 0 is pushed out.

## Switching to read mode without losing data (`clock_mux`, `enable_element`)

When ENABLE falls, three things happen in order:

1. `enable_ser` falls on a falling edge of Wclk. This stops `clk1M` cleanly,
   because Wclk is low at that moment, and it asks the clock switch for Rclk.
2. `enable_element` registers `enable_ser` on the next WRclk rising edge. That
   edge may be the last write edge (edge 2049). The memory samples the old
   value, `enable = 1`, so it still takes the last word from the SIPO. Only
   after that edge does `enable` go low and turn the memory rows into loops.
3. `clock_mux` is a glitch-free switch for unrelated clocks. Each branch has a
   positive-edge flip-flop that synchronises the request, followed by a
   negative-edge flip-flop that drives the AND gate. Each branch is blocked
   until the other branch's gate is off. Wclk is turned off on a falling edge.
   Rclk is turned on on a falling edge of Rclk. No shortened pulse reaches WRclk
   or the memory. The whole switch takes about 1.5 Wclk periods plus 1.5 Rclk
   periods. `read_mode` goes high when Rclk drives the memory.

Asserting RESET (registered like the other inputs) puts the switch back on Wclk.
An assertion in `clock_mux` checks that the two branches are never on together.

## Read mode: recirculating memory and serializer tree

`shift_memory` has 64 rows, each a 32-stage shift register. In front of each
row is a 2:1 multiplexer. When `enable` is high, the row takes its SIPO bit.
When `enable` is low, the row takes its own last stage. In read mode, every
625 MHz edge moves the 32 words one place around the loop. `rd_word` shows
words 0, 1, ..., 31, 0, 1, ... in order.

`serializer` is eight `ser8_page`s. Page `p` takes bits `8p..8p+7` of the memory
word. A page is a tree of seven `ser2_unit`s:

| level | units | clocked by | phase from | output rate |
|---|---|---|---|---|
| Unit625M | 4 | clk1g25 | clk625m | 1.25 Gb/s |
| Unit1.25G | 2 | clk2g5 | clk1g25 | 2.5 Gb/s |
| Unit2.5G | 1 | clk5g | clk2g5 | 5 Gb/s |

The page inputs are wired to the first level in the order b0, b4, b2, b6, b1,
b5, b3, b7. The second level then carries the even bits and the odd bits as two
2.5 Gb/s streams, and the last level interleaves them to b0, b1, ..., b7 in time.

Each 2:1 unit is clocked at its output rate. A negative-edge register samples
the slower clock in the middle of each fast period. On a rising edge that is
also a falling edge of the slow clock, the unit outputs `a` and holds `b`. On
the next rising edge it outputs `b`. Every input is therefore sampled half-way
through its bit, and every output comes from a register. The memory word is
sampled at the falling edge of `clk625m`, half-way through the word.
Its bit `8p` appears on `dac_data[p]` three `exclock` periods later. The pages
add no gaps between words.

## Modules

| file | function |
|---|---|
| `rtl/tester_pkg.sv` | shared sizes |
| `rtl/onchip_tester.sv` | top level |
| `rtl/clock_divider.sv`, `rtl/tff.sv` | 5 GHz -> 2.5 / 1.25 / 0.625 GHz |
| `rtl/control_unit.sv` | interface, pulse counter, clock switch, enable, clock gating |
| `rtl/interface_unit.sv` | falling-edge capture of the external inputs |
| `rtl/pulse_gen.sv` | 6-bit counter and NAND, one pulse per 64 write clocks |
| `rtl/clock_mux.sv` | glitch-free Wclk -> Rclk switch |
| `rtl/enable_element.sv` | enable, delayed one WRclk edge |
| `rtl/sipo.sv` | 64-bit serial-in/parallel-out register |
| `rtl/shift_memory.sv` | 64 x 32 recirculating shift-register memory |
| `rtl/serializer.sv`, `rtl/ser8_page.sv`, `rtl/ser2_unit.sv` | 64:8 serializer tree |

Top ports: `exclock`, `clock`, `data`, `enable`, `reset` (inputs);
`dac_data[7:0]`, `clk5g`, `read_mode` (outputs). The memory is 2048 ordinary
flip-flops. Synthesis may infer it as a memory because it is written as an array.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends by
printing `TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
  rtl/tester_pkg.sv tb/tb_onchip_tester.sv --top-module tb_onchip_tester -o sim
./obj_dir/sim
```

Three whole-design runs use the shared `tb/onchip_tester_run.sv`, and each keeps
the design at its default parameters:

* `tb_onchip_tester` uses random data and a 6.4 ns write clock.
* `tb_onchip_tester_alt` uses the alternating 0101... pattern. Its timing is a
  1-cycle RESET and ENABLE high for 64 x 32 clocks.
* `tb_onchip_tester_1mhz` uses the real 1 MHz write clock, 5000 `exclock` periods
  per write clock. It simulates 2.1 ms in about ten seconds.

They check:

* exactly 32 memory write edges, 64 write clocks apart;
* one switch to Rclk, after which `clk1M` no longer runs;
* the memory clock period in read mode (8 `exclock` periods);
* no pulse on WRclk or the memory clock shorter than half a read period;
* three complete replays of the 256 DAC words, compared word by word with the
  bit mapping above.

The unit testbenches cover the divider's periods and edge alignment, the clock
switch (six switches at random times between unrelated clocks, with a glitch
detector), the pulse positions, the FIFO and loop order of the memory, and the
serializer's bit order and three-cycle latency.

## How far to trust it, and what differs from a silicon implementation

* The RTL is cycle-accurate logic with no delays. The target design is a
  full-custom 90 nm circuit. In that circuit, buffer chains set the skew between
  the derived clocks and the delay of the enable signal, and rise and fall times
  are specified per clock. None of that is modelled. The clock-distribution
  buffers are plain wires.
* Clocks are made by logic: divider flip-flops, a clock switch, and OR/AND
  clock gates. The gating is safe by construction: each gate input changes only
  while the clock it gates is in the non-controlling state. A standard-cell
  implementation still needs clock-tree and hold-time work on these paths.
* The memory-clock gate `WRclk | (enable & pulse_n)` depends on `pulse_n` and
  `enable` changing just after a rising edge of WRclk, while WRclk is high.
* The internal structure of the 2:1 serializer unit is this design's own choice.
  It is the simplest register-based merge. The grouping of memory bits into
  pages, the bit order within a page (b0 first), and the reset values are also
  choices made here:
  * the pulse counter resets to all ones;
  * the clock switch resets to Wclk;
  * the other registers have no reset and are overwritten before use.
* The write clock is nominally 1 MHz. The logic works at any write clock that
  is slower than the flip-flops, and it has been simulated at 1 MHz and at
  156.25 MHz. The read clock must be exactly `exclock` / 8 (625 MHz), because
  the serializer delivers eight DAC words per memory word.
* The two clock gates of the control unit are written as AND/OR gates. They
  behave like the buffered 2:1 multiplexers a custom implementation would use,
  each choosing between a clock and a constant.
* The first serializer level takes `clk625m` as its phase reference, in addition
  to the faster clocks. A register-based 2:1 stage needs to know which half of
  its input bit period it is in.
