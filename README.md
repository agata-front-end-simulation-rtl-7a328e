# Front-end readout for a segmented germanium detector array

This is a synthesizable SystemVerilog model of one front-end readout slot of
a gamma-ray tracking array: twelve digitised detector channels and one
trigger channel sampled on a common 100 MHz clock, a local trigger, the link
to a global trigger and synchronisation system, and a carrier card that
keeps only the pulses the global trigger validates, builds one event per
validation and copies it over a bus into a memory that a CPU reads.

The central idea is that triggering is two-level and asynchronous to the
data. Every channel records a pulse as soon as the *local* trigger fires,
stamps it with the low 16 bits of the global timestamp and buffers it. The
*global* trigger answers much later with an L1A (level-1 accept). Each
channel then looks back: an L1A arriving at time A validates pulses whose
time T lies in a window that opens `L1A_latency` clocks before A and is
`matching_window` clocks wide. Older pulses are thrown away, newer ones wait
for a later L1A. Everything after that is event building and moving data.

The structure and the names of the blocks, FIFOs and signals follow the
original SystemC model of this front end. Word formats, buffer depths, the
pulse length, the bus protocol and several rules the original leaves open
are choices made here; they are listed below.

## Block map

```
fes (top)
├── gts_if            fiber decoder: timestamp, event number, L1A, command, reset
├── scc               local trigger on the trigger channel
├── carrier
│   ├── mezzanine ×2
│   │   └── channel ×6
│   │       ├── sync_fifo         tstamp_fifo  (L1A times, 16 bit)
│   │       ├── delay line        pre-trigger samples
│   │       ├── sync_fifo         ch_fifo      (pulses, 17 bit)
│   │       ├── trigger_matching
│   │       ├── sync_fifo         ev_fifo      (matched pulses, 18 bit)
│   │       ├── mwd               energy filter
│   │       └── sync_fifo         en_fifo      (energies)
│   ├── sync_fifo ×2      tag FIFOs: 48-bit timestamp, 24-bit event number
│   ├── readout_engine    event builder (global clock)
│   ├── dpram             output buffer, two halves
│   ├── async_fifo ×2     1-bit tokens: ro2dma, dma2ro
│   └── dma_controller    buffer → bus (bus clock)
├── arbiter           round robin between DMA (master 0) and CPU (master 1)
├── out_bus           request multiplexer
└── fast_mem          4096 × 32-bit memory on the bus
```

`fe_pkg` holds the shared sizes and the word types. There are two clocks:
`gclk` for the trigger, the channels and the readout engine, and `bus_clk`
for the DMA, the arbiter, the bus and the memory. The CPU is not modelled.
Its bus master port (`cpu_bus_request`, `cpu_gnt`, `cpu_req`, `bus_rdata`)
is a port of the top. The ADCs are not modelled either: the samples arrive
on `ch[]` and `trigger_ch`.

## The global link (`gts_if`)

One 16-bit word arrives per clock on `fiber_in`, as `{opcode, argument}`:

| opcode | effect |
|---|---|
| 0x01 | L1A: `L1A` pulses for one clock and `event_num` counts up; the new number comes with the pulse |
| 0x02 | CC reset: the 48-bit timestamp restarts from 0 |
| 0x03 | EC reset: the 24-bit event number restarts from 0 |
| 0x04 | command: `cmd` ← argument (selects the spy channel) |
| 0x05 | reset: `rst` pulses for one clock and resets the global-clock side |

`fiber_out = {14'b0, backpressure, trigger_request}`. The counters, the resets
and the signals exchanged with the rest of the slot follow the original. The
fiber word format is invented here, because the original gives none.

## Local trigger (`scc`)

The trigger channel shifts through a window of 9 samples. Each clock the
block counts how many samples before the middle one are smaller than it
and how many after it are larger. On a clean rising edge the count reaches
8; on noise it stays low. When the registered count reaches `threshold`,
`trigger_request` and `local_trigger` go high for `hold_time` clocks. The
trigger re-arms only after the count has dropped below the threshold, so
one edge gives one trigger. `hold_time = 0` disables it. The original also
names an averaging process whose function is not described; it is not
built.

## Inside a channel

**Recording.** Samples pass through a 16-sample delay line. On the rising
edge of `local_trigger` the pulse controller writes one timestamp word and
then 64 delayed samples into `ch_fifo`. If the trigger is first seen high
at clock t, the timestamp word holds the timestamp of clock t, and the
samples are those presented at clocks t−15 … t+48, so 15 samples come from
before the trigger. Bit 16 of a `ch_fifo` word marks a timestamp. Triggers
that arrive while a pulse is being recorded are ignored. If `ch_fifo` lacks
room for a whole pulse (65 words), the pulse is dropped and `ch_overflow`
pulses. With the default 512 words, the buffer holds seven unserved pulses.

**Matching.** `trigger_matching` takes the L1A times from `tstamp_fifo` one
at a time. It computes `trq = A − L1A_latency` and, for the pulse at the
head of `ch_fifo`, `dt = T − trq`, all modulo 2^16:

* `dt` negative as a 16-bit signed number: the pulse is older than the
  window; drop its 65 words.
* `0 ≤ dt ≤ matching_window`: it matches. Write a start-of-pulse word
  carrying T to `ev_fifo`, copy the 64 samples, and pulse `latch_energy`.
* otherwise the pulse is newer: close this L1A.

An empty `ch_fifo` closes the L1A only once the window has passed
(`timestamp − trq > matching_window`), so a pulse that is still inside the
window is not missed. Closing writes an end-of-event word that carries the
number of matched pulses. The original's listing writes only the
start-of-pulse word; the end-of-event word is added here so that the readout
knows where each channel's share of an event ends. A timestamp word found
where a sample was expected means the FIFO is misaligned: the word is
dropped and counted in `n_errors`, and the carrier's sticky `match_error` is
raised. A working recorder never produces this, so it is a consistency
alarm. The machine waits whenever `ev_fifo` is full.

Because the arithmetic is modulo 2^16, `L1A_latency + matching_window` and
the time a pulse can wait in `ch_fifo` must both stay well below 32768
clocks.

**Energy.** The `mwd` filter runs on every sample. It computes
D(n) = x(n) − x(n−M) + (K/2^S)·Σ x(n−M … n−1), then a moving average over
L samples, with M = 256, L = 128 and K/2^S = 13/65536 (a 50 µs decay at
100 MHz). A step of height h gives a trapezoid with a flat top of h. The
energy controller keeps the peak filter output since the last latch and
writes it into `en_fifo` on `latch_energy`. The original only names the
fixed-point filter; the formula is the standard moving-window
deconvolution, and M, L and the decay constant are choices made here.

## Event building (`readout_engine`)

For every L1A, the carrier's tag FIFOs hold the full 48-bit timestamp and
the 24-bit event number. The engine takes a free half of the 4096-word
output buffer and writes 16-bit words:

| word | content |
|---|---|
| 0 | `{truncated, 3'b0, length[11:0]}` (length includes word 0), written last |
| 1, 2 | event number [15:0], {8'h0, event number [23:16]} |
| 3, 4, 5 | timestamp [15:0], [31:16], [47:32] |
| per channel c = 0…11 | `{2'b10, c[3:0], 10'b0}` header |
| per matched pulse | `{2'b01, 14'b0}`, then the pulse time T, then 64 × `{2'b00, sample[13:0]}` |
| | `{2'b11, c[3:0], npulses[9:0]}` trailer |
| | one 16-bit energy word per pulse |

The engine waits while a channel's `ev_fifo` or `en_fifo` is empty, so it
stays in step with matching. Words that do not fit in the 2048-word half are
read from the FIFOs and dropped, and the truncated bit is set: one pulse on
all twelve channels makes 834 words, and three make more than a half. `spy`
shows, one clock late, each sample read from the channel selected by
`cmd[3:0]`, and is 0 otherwise.

**Token exchange.** The halves are handed back and forth as 1-bit tokens
through two depth-2 dual-clock FIFOs: `ro2dma` names a finished half, and
`dma2ro` returns it. After reset both halves are free. `backpressure` is
raised, registered, when the tag FIFOs (16 entries) have two or fewer free
places, or when no half is free. The global trigger is expected to hold back
L1As while it is high.

## DMA and bus

`dma_controller` reads word 0 of the half named by a token, requests the bus
and keeps it for the whole event. It writes each pair of 16-bit words as one
32-bit word `{word 2k+1, word 2k}` to consecutive addresses of a
4096-word ring in `fast_mem`, with a missing odd word sent as 0. It then
returns the token. `dma_wptr` is the next write address; a CPU reads from
its own pointer up to `dma_wptr`. The buffer read latency is one clock and
each read takes three, so at most one bus write happens per seven bus
clocks. This is the throughput limit of the slot: a one-pulse 12-channel
event takes about 2900 bus clocks to move.

The bus is a request/grant scheme with a registered, round-robin grant that
is held as long as the owner keeps requesting. A request is `{valid, we,
addr[15:0], wdata[31:0]}`. A read returns its data one clock later on
`bus_rdata`. The arbiter, the bus and the memory are named in the original
but not described; this protocol is the simplest that serves them.

## Sizes

| parameter | default | where |
|---|---|---|
| samples | 14 bit | `DSIZE_P`, `ADC_BITS` |
| channels | 12 (2 mezzanines × 6) | `NCHAN` |
| pulse time | 16 bit (timestamp LSW) | `TSTAMP_SIZE` |
| delay line / pulse length | 16 / 64 samples | `FIFOLEN_D`, `PULSE_LEN` |
| ch_fifo / ev_fifo | 512 / 512 words | `FIFOLEN_P`, `FIFOLEN_EV` |
| L1A FIFOs | 16 | `MAX_L1A_SERVICE` |
| output buffer | 4096 words | `RO_BUFSIZE` |
| fast memory | 4096 × 32 bit | `MEM_AW = 12` |

The original gives the 14-bit samples, the 16-bit pulse times, the 48-bit
timestamp and the 24-bit event number. Its block diagram shows 24 bits for
the event number, but its carrier declaration has a 16-bit event count;
24 bits are used throughout. The depths and lengths are choices made here.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fe_pkg.sv tb/tb_fes.sv --top-module tb_fes
obj_dir/Vtb_fes
```

`tb_fes` runs the whole slot at its default size. It is both the
end-to-end test and the full-size test. The testbench acts as the global
trigger: it shapes edges on the trigger channel and sends L1As, resets and
commands over the fiber. It acts as the detector, putting a known sequence
on every channel, and as the CPU, reading the memory over the bus. A
reference model takes the trigger times from `trigger_request`, applies the
matching rule and predicts every event word except the energies. The run
goes through several phases and counts each mechanism, failing if one never
occurs:

* normal running with matched, discarded and empty records;
* a trigger burst without L1As, which drops pulses with `ch_overflow`;
* CC and EC resets;
* an L1A burst that fills the tag FIFOs;
* the CPU holding the bus until no buffer half is free;
* closely spaced pulses in a wide window, which give truncated events;
* spy samples and bus contention throughout.

The model predicts pulse drops exactly only while the matching keeps up.
The load in the normal phase is therefore kept below the bus throughput.

`tb_carrier` does the same for the carrier at a reduced size (4 channels,
16-sample pulses). Its timestamps start near 2^16 so that the pulse times
wrap. The other testbenches check single blocks against independent
models: the MWD against its formula, the trigger match against hand-worked
cases including rollover and the error path, and the DMA and the readout
engine against modelled buffers with random stalls.

## Limits

* The misalignment error path is tested only at block level; at system
  level `match_error` is only checked to stay low.
* Pulses that arrive while the matching is blocked (full `ev_fifo`) can
  overflow `ch_fifo`. This is the intended behaviour, but no testbench
  predicts it exactly.
* The memory ring has no flow control towards the DMA: a CPU that falls
  4096 words behind loses data.
* Not modelled: the global trigger processor and its fan-in/fan-out, the
  ADCs, the link to the pulse-shape-analysis farm, the CPU, the
  floating-point MWD variant and the trigger's averaging process.
