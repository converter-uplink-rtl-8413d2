# Converter uplink

A converter unit carries ADCs and DACs that sample in lock-step with a GPS-disciplined
clock. This RTL moves their data to and from a computer over raw Ethernet frames
(EtherType 0x88B5, no IP). Every transmitted frame carries the GPS time of its
acquisition. Every received data frame carries the GPS time at which its values must
appear on the DAC outputs. What each frame contains is not fixed in hardware. Small
microcode programs pick the channels, written by a management processor, and so does the
rate at which frames are made.

The top module `converter_uplink` holds one shared time base and `N_PORTS` (default 2)
independent uplink ports. Each port has a transmit engine and a receive engine, and each
engine has four data queues A to D plus a low priority (LP) queue for configuration and
status frames. The Ethernet MAC and PHY are not part of this design. Each port presents a
16-bit valid/ready/last stream in its own 62.5 MHz uplink clock, for a hard MAC to connect
to.

## Time: one counter drives everything

The design runs on a 2^26 Hz (67.108864 MHz) master clock. `timing_base` counts it in a
26-bit counter `cnt`, which the 1PPS pulse restarts, so `cnt` is the position within the
second. After a two-flop synchroniser, `cnt` reads 0 three clocks after the 1PPS edge. The
seconds counter is loaded by the processor and advanced by 1PPS. `{sec, cnt}` is the
58-bit time used for stamps.

The converters sample at 2^19 Hz, so one sampling period is 128 clocks.

Each queue names its cycles with three registers. Each holds a 26-bit value in bits 31:6.
Bits 5:0 of TRIG, MASK and ENDM should be ones, except TRIG bit 0, which enables the
queue.

| Register | Meaning |
|---|---|
| MASK | Sets the acquisition (or output) cycle length, MASK+1 clocks. A cycle starts when `(cnt & MASK) == ((TRIG+1) & MASK)`. |
| ENDM | Sets the processing cycle length, ENDM+1 clocks. This is the rate at which frames travel. The cycle with `(cnt & ENDM) == ((TRIG+1) & ENDM)` is the *last* of its processing cycle. |
| TRIG | Sets the phase. |

The *first* cycle is one acquisition period after the last one:
`(cnt & ENDM) == ((TRIG+1+MASK+1) & ENDM)`. Other cycles are "in between".
`cycle_trigger` computes go/first/last combinationally. On the receive side it is used
with `ADVANCE = 128`, so the output microcode runs one sampling period ahead of the
output cycle it serves.

Example: MASK 0x3FF, ENDM 0xFFF, TRIG 0xBFF gives four acquisitions per 4096-clock
(61 µs) processing cycle. They fall at phases 0x000 (first), 0x400, 0x800 and 0xC00
(last).

## Transmit path

Per queue, `tx_microcode_sm` runs a program from a 128-entry microcode RAM. It also has
a 128-word data pool, which holds the MAC header words. One instruction runs per clock.

| Bits | Field |
|---|---|
| 11:0 | source address |
| 15:13 | ignore on last / in between / first cycle |
| 16 | write a 32-bit word to the queue FIFO |
| 17 | start transmission ("go") |
| 31 | end of program |

The source address passes through a two-clock pipeline (`tx_source_mux`): an
instruction's address is written by the instruction two entries later. The source address
map:

| Address | Source |
|---|---|
| 0x000-0x03F | ADC values: filtered, bypassing the filter, and differences of pairs, for 16 ADCs |
| 0x800-0x87F | data pool |
| 0xA00 | GPS seconds |
| 0xB00 | GPS fraction (`cnt` in bits 31:6) |
| 0xF00 | zero |

The GPS stamp is latched when the cycle starts, so it is the acquisition time, not the
time the word is written.

While idle, a machine keeps executing entry 0. For that reason entry 0 should only load
an address. At the cycle start the program runs from entry 0 until an instruction with
the end bit, or entry 127.

A write done by the end instruction carries the end-of-frame bit. With the ignore bits,
one program can build a frame across several acquisition cycles:
- the header and stamp are written on the first cycle only,
- a sample is written on each cycle,
- the end mark and "go" are given on the last cycle only.

In that case "go" must come with the last word. The MAC drains a FIFO at 62.5 MHz × 16
bits, faster than samples arrive, so a frame started early would run dry. When a frame
is written in a single cycle, giving "go" early is fine and lowers latency.

The four machines share the source multiplexer. Queues whose cycles start in the same
clock run one after the other, A first. All of them must finish within the 128-clock
sampling period, which allows about 125 words in all.

`tx_queue_fifo` stores 32-bit words in the converter clock and hands them to the uplink
clock as 16-bit halves, most significant first. It also counts "go" commands across the
clock boundary with a Gray-coded counter. Up to 16 frames can wait; a 17th "go" is
dropped and flagged.

`tx_arbiter` sends one frame per "go" and always finishes the frame it started. It
serves A before B, C, D and LP. It serves LP only inside the LP window:
`(cnt & LPMask) > (LPStart & LPMask) && (cnt & LPMask) <= (LPStop & LPMask)`, evaluated
on the raw counter. If a queue empties in the middle of a frame, the frame is aborted
(`tx_abort`), the rest of it up to its end mark is dropped, and an underflow is flagged.

The processor writes LP frames 16 bits at a time to IO offset 0x3C. Bit 16 marks the
last word, and it also queues the frame for sending.

## Receive path

`rx_arbiter` sits in the uplink clock and reads the header word by word:
- words 6 to 9: type, subtype, version and length,
- words 10 to 13: the stamp.

The subtype's top four bits route the frame:
- One bit set: a data frame for queue A (bit 15) to D (bit 12).
- None set: a configuration/status frame. It goes whole into the LP FIFO, through a
  14-word delay buffer that holds the head of the frame until its class is known.
- Anything else, a wrong type or a wrong version: the frame is dropped and a type error
  is counted.

A data frame is accepted only if all of these hold:
- its length field equals the queue's LEN register,
- its stamp names a *first* output cycle of the queue,
- it arrives inside that cycle's window, `W < S − a ≤ T + W`. Here a is the arrival
  time, S the stamp, T the processing cycle length (ENDM+1) and W = 288 clocks
  (4.29 µs).

So the window is one processing cycle long and closes 4.29 µs before the output cycle
the stamp names. The arrival time is the converter time brought into the uplink clock
through a Gray-code synchroniser.

Rejected frames count as discarded (out of sync). Accepted words are paired into 32-bit
words and written to the queue's FIFO. Words beyond LEN, such as Ethernet padding, are
ignored. A frame that ends early is flagged and padded with zero words, so the queue
keeps its word count.

In the converter clock, `rx_microcode_sm` runs once per output cycle, 128 clocks ahead,
one instruction per clock. Bit 16 pops one word from the FIFO. Two clocks later the word
is written to the DAC at that instruction's address (`dac_output_map`):
- 0x000-0x03F: filtered outputs, outputs bypassing the filter, and ± pairs, where the
  second DAC gets the negated value;
- addresses with bit 11 set are ignored.

Reading an empty FIFO gives zero. Unlike the transmit machine, the receive machine does
nothing while idle.

**Keeping frames in their processing cycle.** The FIFO has no frame boundaries. Frames
for processing cycle k+1 arrive while cycle k is still being output. In steady state
this works: cycle k's words are ahead of them in the FIFO. At start-up, or after a lost
frame, the FIFO is empty. Without a guard, the remaining output cycles of cycle k would
take words meant for k+1, and every later cycle would stay shifted. To prevent this, a
queue that is empty at its first output cycle sits out that whole processing cycle: no
microcode runs and the DAC outputs hold their values. The event is counted as missing.

## Registers

All registers are in the converter clock. IO reads return data one clock after the
request and memory reads two clocks after.

**Top-level IO map**

| Address | Target |
|---|---|
| 0x100008 / 0x10000C | GPS seconds / fraction |
| 0x200000 + 0x100000·p | transmit engine of port p |
| 0x280000 + 0x100000·p | receive engine of port p |

**Top-level memory map**

| Address | Target |
|---|---|
| 0x80000000 + 0x10000000·p | transmit microcode of queue q at +q·0x4000, its data pool at +q·0x4000+0x2000 |
| 0x88000000 + 0x10000000·p | receive microcode of queue q at +q·0x4000 |

**Transmit engine IO**

| Offset | Register |
|---|---|
| 0x00-0x2C | TRIG, MASK and ENDM of A-D |
| 0x30-0x38 | LPStart, LPStop, LPMask |
| 0x3C | status on read, LP FIFO on write |
| 0x40-0x58 | statistics counters |

Transmit status bits:
- 3q, 3q+1, 3q+2: overflow, underflow and too-many-go for A..D, LP,
- 15: arbiter error,
- 16: source decode error.

**Receive engine IO**

| Offset | Register |
|---|---|
| 0x00-0x2C | TRIG, MASK and ENDM of A-D |
| 0x30-0x3C | LEN of A-D, in bytes |
| 0x40-0x68 | counters |
| 0xF8 | status |
| 0xFC | LP FIFO read |

Receive counters, in order: discarded A-D, missing A-D, type errors, length errors,
decode errors.

Receive status bits:
- 0: LP data ready (live),
- 1-4: out of sync A-D,
- 5: type error,
- 6: length error,
- 15: decode error,
- 16-19: missing A-D.

An LP read returns the data in bits 15:0 and the end mark in bit 16. It reads zero when
the FIFO is empty.

Status error bits are sticky and clear when the status word is read. Each statistics
counter counts rising edges of its event.

Set MASK, ENDM and LEN before TRIG, and write TRIG with bit 0 clear before changing
them. The engines treat these registers as static while a queue is enabled, and this is
what makes their use across clock domains safe.

## Clock domains

Three kinds of crossing are used:
- `async_fifo`: Gray-pointer FIFOs, used for all queues.
- `gray_sync`: Gray-coded counters and time.
- `pulse_sync`: toggle synchronisers for error events.

The LP window flag enters the uplink clock through two flops. At the moment the
processor loads a new seconds value, the time seen in the uplink clock may be
inconsistent for a few clocks. A frame arriving then can be misjudged.

The remaining lint warnings are expected. They are of these kinds:
- deliberately unused outputs (FIFO counts) left open,
- unused bits of register words,
- asynchronous resets that also feed logic.

## Where this design chose

The behaviour above follows the specification where it is explicit. The following are
this design's own choices:
- FIFO sizes: 2048×16 transmit and 1024×32 receive per queue, sized for about 1000
  channels; 2048×16 for receive LP.
- The *first* cycle formula.
- The end-of-frame mark on the end instruction.
- The stop at entry 127.
- The abort on underrun.
- The sticky status bits.
- Zero fill of short frames.
- Skipping a processing cycle when a queue is empty.
- The exact window bounds in clocks, and the arrival time taken at the end of the stamp.
- Latching the transmit stamp at the start of the acquisition cycle.
- The GPS fraction at 0x10000C.
- The bus timing.

Where the specification contradicts itself on the enable bit (bit 0 versus "most
significant bit"), TRIG bit 0 is used, as in its register tables.

Known limits:
- A single jumbo frame larger than a queue FIFO (1024 data words, 4 KiB) cannot be
  buffered. Frames are sent only once their "go" is given, and in this design the FIFO
  depth is the practical frame limit.
- The management processor, the EMAC and its registers, the converters and their
  filters, the timing receiver and board peripherals are outside this RTL.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/uplink_pkg.sv tb/tb_rx_engine.sv \
          --top-module tb_rx_engine -o sim && obj_dir/sim
```

`tb_converter_uplink` runs the top at its default parameters as a servo loop:
- The testbench acts as the processor. It loads microcode and registers over the
  IO/memory buses and realigns the time with 1PPS.
- Port 0 sends four-sample frames built by one program using the ignore bits.
- The testbench plays the computer. It answers each frame with the negated samples,
  stamped for the next processing cycle, and checks that DAC 1 outputs them in the right
  output cycles.
- It also checks a stale frame being discarded, missing-frame counting, an LP frame
  leaving inside its window, and a configuration frame read back through the LP FIFO.
- Each mechanism must occur at least once.

`tb_timing_base` runs a full second of the counter (2^26 clocks) and takes the longest,
about half a minute.
