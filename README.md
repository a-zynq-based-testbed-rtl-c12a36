# Dual-clock testbed logic for measuring hash cores on a Zynq device

Timing analysis gives a worst-case maximum clock frequency for a hardware hash
core. The real chip on the bench is usually faster, and by an amount that varies
from core to core. This testbed measures that real limit. The core under test runs
on its own clock, which software can change while the system runs. Everything that
talks to the processor (the DMA engine, the timer, the configuration bus) stays on
a fixed system clock. Software streams a message through the core at some
frequency and compares the digest with its own. It then raises or lowers the core
clock and repeats, in a binary search, until it finds the highest frequency that
still gives correct digests.

The logic in this repository is what sits between the two clock domains in the
programmable fabric:

```
              system clock (fixed, e.g. 100 MHz)      |  UUT clock (variable)
                                                      |
 DMA MM2S ==AXI4-Stream==> [ Input FIFO  s_axis_to_fwft_fifo ] --FWFT read-->  +-----------+
                                                      |                       | hash core |
 DMA S2MM <==AXI4-Stream== [ Output FIFO fwft_fifo_to_m_axis ] <--FIFO write-- | (external)|
                              ^ AXI4-Lite:            |                       +-----------+
                              | transfer length,      |
                              | start delay           |
 DMA mm2s_introut --+                                 |
 DMA s2mm_introut --+--> [ Concat irq_concat ] --> processor interrupt
```

`zynq_testbed_pl` is the top. It holds the two FIFOs and the interrupt combiner.
It meets everything else at ports:

- the hash core (`hc_*`)
- the DMA streams and interrupts
- the configuration bus (`s_axi_*`)
- the clock generator (`uut_clk`)

The hash core is replaceable. Any core with a first-word-fall-through (FWFT) FIFO
interface fits.

## Clock domains and the crossing

This is the part of the design that matters most, and the part you must keep
correct if you change anything.

| Clock | What it clocks |
|---|---|
| `sys_clk` | Input FIFO write side, Output FIFO read side, Output FIFO AXI4-Lite registers, both AXI4-Stream ports |
| `uut_clk` | Input FIFO read side (`hc_din`, `hc_src_empty`, `hc_src_read`) and Output FIFO write side (`hc_dout`, `hc_dst_write`, `hc_dst_full`) |

The two clocks have no fixed relationship. `uut_clk` may be faster or slower than
`sys_clk`, and it can change between runs.

Both FIFOs are built on `async_fwft_fifo`, a Gray-pointer asynchronous FIFO:

- Each side keeps a binary pointer one bit wider than the address. It also keeps
  that pointer's Gray code in a flip-flop.
- Only the Gray code crosses to the other side, through two flip-flops. One bit
  changes per increment, so a pointer sampled in mid-change is either the old
  value or the new one, never a mix.
- Empty is "my read pointer equals the synchronised write pointer". Full is "my
  write pointer equals the synchronised read pointer with its two top bits
  inverted".
- The flags are conservative. A word written on one side shows up on the other
  side two or three of that side's clock edges later. The same holds for a slot
  freed by a pop. A flag can stay set a little too long, but it never clears too
  early.

The memory is read asynchronously at the read pointer, so the head word is always
on the output. That is the FWFT behaviour the hash core relies on.

Because of that asynchronous read, a synthesis tool maps the memory to
distributed (LUT) RAM, not block RAM. At 512 x 64 bits this costs a few hundred
LUTs per FIFO. For a block-RAM version, register the read and add a one-word
prefetch stage.

There is a single reset, `sys_aresetn`, active low, from the system side. The
FIFO symbols have only one reset pin each (`s_axis_aresetn`, `m_axis_aresetn`).
Inside each FIFO, `reset_sync` gives every domain its own copy of the reset. The
copy is asserted at once and released on the second edge of that domain's clock.
While the write side is in reset, `s_axis_tready` is low and `fifo_full` is high.
Keep `uut_clk` running while reset is asserted and released.

For timing closure, treat the Gray-pointer paths into the first synchroniser
flip-flop as asynchronous. In a Xilinx flow, use `set_max_delay -datapath_only`
of one destination period. Also constrain the asynchronous memory read from the
write clock.

## Input FIFO (`s_axis_to_fwft_fifo`)

- **Write side:** an AXI4-Stream slave (`s_axis_tdata`, `s_axis_tvalid`,
  `s_axis_tready`) on `s_axis_aclk`. A beat is taken on any edge where
  `tvalid && tready`. `tready` is simply "not full". While there is room, one
  64-bit word is accepted per system clock: 6.4 Gbit/s at 100 MHz, 9.6 Gbit/s at
  150 MHz.
- **No TLAST input:** the core finds message boundaries from the data itself.
- **Read side:** `fifo_dout` holds the head word whenever `fifo_empty` is low.
  Raising `fifo_read` pops that word at the next `fifo_aclk` edge. `fifo_read`
  while empty is ignored.

## Output FIFO (`fwft_fifo_to_m_axis`)

- **Write side:** the hash core writes `fifo_din` with `fifo_write` on
  `fifo_aclk`. Writes while `fifo_full` is high are dropped.
- **Read side:** the FIFO is drained as AXI4-Stream packets on `m_axis_aclk`.
  Two registers shape the stream.

| Offset | Register | Reset | Meaning |
|---|---|---|---|
| 0x0 | TRANSFER_LENGTH | 4 | words per packet; `m_axis_tlast` is high on the last word; 0 is treated as 1 |
| 0x4 | START_DELAY | 0 | system-clock cycles to wait, once output is ready, before the packet starts |

- The registers are 32 bits wide and honour byte strobes.
- Any other offset answers SLVERR: writes to it are dropped and reads return 0.
- The AXI4-Lite port runs on `m_axis_aclk` and `m_axis_aresetn`.
- A write is accepted when AWVALID and WVALID are high together. BVALID follows
  one cycle later. A read answers one cycle after the address is accepted.

The packet sequencer has three states:

1. **IDLE.** Waits until the FIFO holds a word, which is what "output ready to
   send" means here. It then latches both registers. With a delay of 0 it goes
   straight to SEND, so TVALID rises on the next cycle. With a delay of D it goes
   to WAIT.
2. **WAIT.** Counts D cycles. The first TVALID comes exactly D cycles later than
   it would with a delay of 0.
3. **SEND.** TVALID is high whenever the FIFO is not empty. TDATA is the FIFO head
   word. A beat goes out on `tvalid && tready`. The beat numbered
   TRANSFER_LENGTH carries TLAST and returns the sequencer to IDLE, so the next
   packet waits its own delay.

Rewriting the registers during a packet does not change that packet. TVALID may
drop in the middle of a packet if the core has not yet written the next word.
Once TVALID is offered, the beat stays unchanged until TREADY. An assertion
checks this rule.

With a 256-bit digest on a 64-bit bus, the default length of 4 makes one packet
per digest. That packet is one DMA S2MM transfer. The start delay gives software
time to arm the receiving DMA channel before data arrives.

## Interrupt combiner (`irq_concat`)

The DMA raises one interrupt when the message has been sent (`mm2s_introut`) and
another when the digest has been received (`s2mm_introut`). `irq_concat` ORs the
two level interrupts onto the processor's single fabric interrupt (`irq_f2p`).

## Connecting a hash core

| Core side | Top port | Meaning |
|---|---|---|
| input data | `hc_din` | head word of the Input FIFO |
| input available | `hc_src_empty` (active high = none) | |
| input pop | `hc_src_read` | |
| output data | `hc_dout` | |
| output write | `hc_dst_write` | |
| output room | `hc_dst_full` (active high = none) | |

All six are on `uut_clk`. Cores whose interface uses "ready" signals instead
connect through an inverter:

- `src_ready = !hc_src_empty`
- `dst_ready = !hc_dst_full`

The FIFOs carry no framing. Whatever header or length convention the core
expects is written into the message by software.

Cores with a 32-bit interface need `DATA_WIDTH = 32` on the top. The FIFOs and
the streams then become 32 bits wide, and the DMA must be set to match.

## How fast a core can be fed

The input stream delivers one word per system clock. A core whose own throughput
exceeds `DATA_WIDTH x f_sys` is limited by the DMA side, not by its own clock. At
100 MHz that limit is 6.4 Gbit/s. The usual fix is to raise the system clock; the
DMA engine allows up to 150 MHz on this device family.

Published throughputs of 256-bit SHA-3 Round 2 cores, taken at their measured
maximum frequencies, range from about 1 to 7 Gbit/s. Only the fastest of them
(Luffa, about 7.0 Gbit/s) exceeds the 100 MHz limit.

For messages of 10 kB and more, setup and transfer overhead is small next to the
hashing time. Large messages are streamed, never stored, so message size does not
depend on FIFO depth.

## Parameters

| Module | Parameter | Default | Note |
|---|---|---|---|
| `zynq_testbed_pl` | `DATA_WIDTH` | 64 | the DMA stream width used for the evaluated cores |
| | `IN_DEPTH`, `OUT_DEPTH` | 512 | power of two, at least 4; this design's choice |
| `s_axis_to_fwft_fifo`, `fwft_fifo_to_m_axis` | `DATA_WIDTH`, `DEPTH` | 64, 512 | |
| `reset_sync` | `STAGES` | 2 | |

The shared constants are in `testbed_pkg`: response codes, register offsets and
reset values.

## What is fixed by the testbed concept and what is chosen here

These follow the testbed concept:

- the three blocks and their connections
- the two clock domains and which side of each FIFO is on which clock
- the port names of both FIFOs
- the AXI4-Stream and AXI4-Lite interfaces
- the meaning of transfer length and start delay
- OR-ing the two DMA interrupts

These are choices made in this implementation:

- the FIFO depth and the Gray-pointer crossing
- the single reset and its synchronisers
- the register offsets, reset values and SLVERR answer
- treating a length of 0 as 1
- starting the delay as soon as one word is present, and repeating it per packet
- the names of the hash-core ports on the top

Not included, because they are vendor blocks or hard blocks:

- the DMA engine
- the AXI interconnects
- the timer used for the measurements
- the clock generator that produces `uut_clk`
- the processor system

The frequency search itself is software.

## Testbenches

Each testbench checks itself. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_s_axis_to_fwft_fifo`: checks the Input FIFO against a reference queue.
  The reader is stopped to fill the FIFO, and the test checks that exactly DEPTH
  words are accepted. Random traffic then runs with the UUT clock both faster and
  slower than the system clock, and the FIFO is drained.
- `tb_fwft_fifo_to_m_axis`: covers the Output FIFO:
  - register reset values, byte strobes and SLVERR
  - packets of 4, 5 and 0 (sent as 1) words, with TLAST checked on every beat
  - random TREADY stalls
  - the start delay, measured exactly as the difference in latency between
    delay 37 and delay 0
  - the full flag at DEPTH words
- `tb_irq_concat`: checks every input combination.
- `tb_zynq_testbed_pl`: runs the whole top end to end at its default sizes. The
  testbench plays the DMA, the processor's register writes and the clock
  generator. A behavioural stand-in for a hash core (`hash_core_model`, not a
  real hash) is checked against a digest computed in the testbench. It runs:
  - a 10 kB message with a fast core, where the stream must never be held off
    (1281 beats in 1281 cycles)
  - the same message with a slow core, where the Input FIFO holds off the stream;
    start delay 25 and random S2MM stalls
  - 130 short messages into one 520-word packet, which fills the Output FIFO
  
  It counts each mechanism and fails if any never happened.
- `tb_workloads`: runs the twelve 256-bit Round 2 SHA-3 cores on 10 kB, 100 kB
  and 1000 kB messages. Each core is a behavioural stand-in,
  `timing_core_model`. It keeps the published cycle budget of that core: block
  size, cycles per block and fixed cycles. It runs at that core's published
  measured maximum frequency.
  - The ten 64-bit cores use the default top. The two 32-bit cores (Fugue,
    Hamsi) use a second top built with `DATA_WIDTH = 32`.
  - Each run checks the digest and TLAST.
  - Each run checks the ratio of end-to-end time to the core's own hash time.
  - At 1000 kB each run also checks the throughput.
  - The Luffa core is faster than a 64-bit stream at 100 MHz. Its ratio must come
    out at 1.10; at a 150 MHz system clock it must return to 1.00.
  - The run takes about 25 s.

  Measured at 1000 kB:

  | Core | Gbit/s | Core | Gbit/s |
  |---|---|---|---|
  | BLAKE | 3.544 | Keccak | 5.578 |
  | CubeHash | 4.411 | Luffa (100 MHz system clock) | 6.399 |
  | ECHO | 5.969 | Luffa (150 MHz system clock) | 7.036 |
  | Fugue (32-bit) | 3.200 | Shabal | 0.980 |
  | Groestl | 6.306 | SHAvite-3 | 2.846 |
  | Hamsi (32-bit) | 1.332 | Skein | 3.780 |
  | JH | 4.740 | | |

  These rates measure the testbed's transport, not the real cores' logic. The
  real cores are not part of this repository.
- `tb_frequency_search`: runs the measurement procedure on the default top.
  - It hashes 10 kB messages and compares the digests.
  - It changes the UUT clock between runs without a reset, in a binary search
    between 50 and 400 MHz, until the interval is 0.1 MHz wide.
  - The core is `hash_core_model` behind a fault model of a 4.87 ns critical
    path. Above 205.34 MHz every digest word it writes has one bit flipped.
  - The search must end within 0.1 MHz of that limit.
  - Every run, right or wrong, must return exactly one 4-word packet.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_zynq_testbed_pl rtl/testbed_pkg.sv tb/tb_zynq_testbed_pl.sv
./obj_dir/Vtb_zynq_testbed_pl
```

Replace the top module and file to run another testbench. Lint a module with:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/testbed_pkg.sv rtl/<module>.sv
```

Lint reports `SYNCASYNCNET` in `reset_sync`. That is expected: the module is a
reset synchroniser.
