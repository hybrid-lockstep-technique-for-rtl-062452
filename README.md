# Trace-based control-flow observer for a dual-core software lockstep

A dual-core processor can protect a computation against soft errors without
lockstep hardware. Both cores run the same program as two bare-metal
threads, each on its own copy of the data. At the end of a protected region
the threads compare their results, and they roll back if the results differ.
That scheme catches corrupted data. It does not catch a core whose control
flow has gone wrong: a jump into data or unmapped memory, an unhandled
exception, or a thread stuck waiting at a barrier. Such a core may never
reach the comparison at all.

This RTL is the hardware half of that scheme. It is an **observer** that
sits on the processor's debug trace port and never touches execution. From
the compressed program-flow trace it rebuilds the program counter (PC) of
every core. It applies two checks to each core:

* **Range check.** Every PC seen must lie inside one of a few
  user-configured address ranges, normally the code of the application.
  Otherwise `cf_error[c]` is set, and `reset_req` asks for a system reset.
* **PC watchdog.** A chosen PC, typically the first instruction of the main
  loop, must reappear within a configured number of cycles. Otherwise
  `hang[c]` is set. Unlike a software watchdog, nothing in the application
  has to kick it: the trace reloads it.

A wrong PC is flagged at most 18 clock cycles after the trace word that
completes its packet. The target was under 30 cycles.

```
 trace port (32-bit words of 16-byte frames, both cores interleaved)
      |
      v
 +-------------------+    bytes + source ID    +-------------+  PC events  +------------+
 | trace_deformatter |------------------------>| pft_decoder |------------>| cf_checker |--> cf_error[0], hang[0]
 +-------------------+   (routed by trace ID)  |   core 0    |             |  core 0    |
      |                                        +-------------+             +------------+
      |                                        +-------------+             +------------+
      +--------------------------------------->| pft_decoder |------------>| cf_checker |--> cf_error[1], hang[1]
                                               |   core 1    |             |  core 1    |
                                               +-------------+             +------------+
   trace_decoder = deformatter + decoders     observer_regs: ranges, reload PC, timeouts, IDs, status
```

## Recovering the PC from the trace

This is the least obvious part of the design. It rests on two layers of the
ARM CoreSight trace architecture. The design implements a subset of each,
written from general knowledge of those protocols.

### Layer 1: the shared port (`trace_deformatter`)

Each core has its own trace macrocell. A funnel merges their byte streams
onto one port and packs them into **16-byte frames**:

| frame byte | meaning |
|---|---|
| odd bytes 1, 3, …, 13 | always a data byte of the current source |
| even byte 2k, bit 0 = 1 | ID change: the new source ID is in bits 7:1 |
| even byte 2k, bit 0 = 0 | data byte; its bit 0 is bit k of byte 15 |
| byte 15 | auxiliary bits. For an ID byte at 2k, bit k = 0 means the new ID applies from the next byte. Bit k = 1 means it applies only after the next byte. |

The word `0x7FFF_FFFF` in the place of a frame's first word is frame
synchronisation. Nothing is decoded before the first one. Words arrive on
`tw_data` with a valid/ready handshake, and frame byte 0 is in bits 7:0.
The block collects four words, lowers `tw_ready`, and walks the 15 payload
positions one per cycle. A frame therefore costs 19 cycles, which is 15
bytes per 19 cycles of throughput. Bytes tagged with ID 0 (padding), or with
an ID no core is configured for, are dropped in `trace_decoder`.

### Layer 2: program-flow packets (`pft_decoder`, one per core)

The trace macrocells are assumed to run with **branch broadcasting**. Every
taken branch then sends its target address, so the decoder needs no copy of
the program. The decoder handles these packets:

| packet | encoding | effect |
|---|---|---|
| A-sync | ≥ 5 × `0x00`, then `0x80` | gains or regains packet alignment |
| I-sync | `0x08`, 4 address bytes (LSB first; bit 0 of the first byte is the Thumb bit, ignored), 1 information byte, `CTXID_BYTES` context-ID bytes | full PC, PC event |
| branch address | header bit 0 = 1; see below | PC event |
| atom | bit 7 = 1, bit 0 = 0 | counted, no address |
| trigger `0x0C`, ignore `0x66`, exception return `0x76` | single byte | none |
| context ID | `0x6E` + `CTXID_BYTES` bytes | skipped |

Branch addresses are **compressed**. The encoder sends only the low-order
groups that changed, and the decoder keeps the upper bits from the previous
address:

| byte | bits carried (ARM state) | continuation |
|---|---|---|
| 0 | PC[7:2] in bits 6:1 | bit 7 |
| 1 | PC[14:8] in bits 6:0 | bit 7 |
| 2 | PC[21:15] | bit 7 |
| 3 | PC[28:22] | bit 7 |
| 4 | PC[31:29] in bits 2:0; bit 6 = exception bytes follow | – |

Exception bytes, each with bit 7 meaning "another follows", are skipped.
Any other header byte is a protocol error. The decoder then drops out of
sync and ignores its core's bytes until the next A-sync. No PC event comes
out before the first I-sync, or before a full five-byte branch address.

What this means for coverage: the observer sees every taken-branch target
and every synchronisation point. Between those points the core is taken to
run sequentially, so a fault that only corrupts straight-line execution
without a branch is not visible here.

## The checks (`cf_checker` = `pc_range_checker` + `pc_watchdog`)

* `pc_range_checker` compares each PC event in parallel with `NUM_RANGES`
  ranges. The bounds `lo..hi` are inclusive and each range has an enable
  bit. If the PC is in no enabled range, `violation` pulses and the sticky
  `error` flag is set. The first bad PC is captured for software. With
  checking on and no range enabled, every PC is a violation.
* `pc_watchdog` counts clock cycles. A PC event equal to `wd_pc` resets the
  count to 0. When the count reaches `timeout`, `hang` is set, exactly
  `timeout` cycles after the last reload. The counter then holds until the
  next reload. Each core has its own reload PC and timeout.

Both flags stay set until software writes the clear bit or the block is
reset. `reset_req` is the OR of the `cf_error` flags.

## Timing

| path | cycles |
|---|---|
| frame's last word accepted → data byte at frame position p on the deformatter output | p + 2 |
| last byte of a packet → PC event | 1 |
| PC event → `cf_error` / `violation` | 1 |
| **last trace word → `cf_error`**, packet ending at position p (p ≤ 14) | **p + 4 ≤ 18** |
| watchdog reload → `hang` | `timeout` (+1 from the PC event) |

## Register map (`observer_regs`, 32-bit word addresses)

| addr | name | contents |
|---|---|---|
| 0x00 | CTRL | [0] range check enable, [1] watchdog enable, [2] write 1 to clear `cf_error` and `hang` |
| 0x01 | STATUS (RO) | [1:0] cf_error, [3:2] hang, [5:4] decoder in sync, [6] frame sync seen |
| 0x02 | TRACE_ID | [6:0] source ID of core 0, [14:8] of core 1 (0 = none) |
| 0x04 + c | WD_PC | watchdog reload PC of core c |
| 0x06 + c | WD_TIMEOUT | watchdog time of core c, in clock cycles |
| 0x08 + c | RANGE_EN | range enable bits of core c |
| 0x0A + c | LAST_PC (RO) | last PC decoded for core c |
| 0x0C + c | BAD_PC (RO) | first out-of-range PC of core c |
| 0x10 + 16c + 2r | RANGE_LO | low bound of range r of core c |
| 0x11 + 16c + 2r | RANGE_HI | high bound of range r of core c |

Writes take effect on the clock edge where `cfg_we` is high. Reads are
combinational from `cfg_addr`. Every register resets to 0, so both checks
are off and no trace ID is selected until software configures the block.
Typical setup: trace IDs, one range covering the application's code (plus
the exception vectors if exceptions are expected), the main-loop head as the
watchdog PC, then CTRL = 3.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NUM_CORES` | 2 | `observer_ip`, `trace_decoder`, `observer_regs` | cores observed (the register map holds 2) |
| `NUM_RANGES` | 4 | `observer_ip`, checkers, `observer_regs` | allowed ranges per core (the map holds up to 8) |
| `CTXID_BYTES` | 0 | `pft_decoder`, `trace_decoder` | context-ID bytes after I-sync and `0x6E` (0..4) |
| `CNT_W` | 32 | `pc_watchdog` | watchdog counter width |

Two cores is the dual-core target. The number of ranges, the context-ID size
and the counter width are this design's choices.

## Files

| file | content |
|---|---|
| `rtl/observer_pkg.sv` | PC and trace types, packet codes, register addresses |
| `rtl/observer_ip.sv` | top level |
| `rtl/trace_decoder.sv`, `rtl/trace_deformatter.sv`, `rtl/pft_decoder.sv` | trace front end |
| `rtl/cf_checker.sv`, `rtl/pc_range_checker.sv`, `rtl/pc_watchdog.sv` | per-core checks |
| `rtl/observer_regs.sv` | configuration and status |
| `tb/tb_trace_pkg.sv` | stimulus models: program-flow packet encoder, funnel/formatter model |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
It also carries a cycle-count watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/observer_pkg.sv tb/tb_trace_pkg.sv tb/tb_observer_ip.sv \
    --top-module tb_observer_ip -o sim
./obj_dir/sim
```

Replace `tb_observer_ip` with any other `tb_<module>` to run that test.

`tb_observer_ip` runs the whole observer with its default parameters. Two
cores execute random branch-heavy code in a shared code range, with
exception entries into a vector range, and pass the main-loop head
regularly. Their traces are interleaved and framed by the funnel model. The
test then checks, in turn:

* nothing is flagged, and LAST_PC matches each core's last branch target;
* a wild jump on core 1 raises `cf_error[1]` and `reset_req` within 30
  cycles. It measures 9 cycles, and 18 in the slowest frame position. Core 0
  stays clean and BAD_PC holds the target;
* clear works;
* withholding core 0's main-loop head raises `hang[0]` exactly after its
  timeout, while core 1 does not hang.

The test counts every mechanism (frame sync, ID change, port stall, A-sync,
I-sync, branch, atom, exception entry, range violation, watchdog reload and
expiry, clear) and fails if any never happened. It finishes in well under a
second.

`tb_matmul_workload` runs the observer on a realistic workload: both cores
running a duplicated 20×20 integer matrix multiplication with one coarse
checkpoint. The trace is modelled from the program's loop structure:

* the main-loop head;
* a spin barrier;
* three nested loops of 20, one branch packet per back-edge;
* a second barrier;
* a 400-step result comparison on the primary core, while the shadow core
  waits.

One fault-free run is about 4,900 trace words, or 23,400 observer cycles.
The test then sets the watchdog time to 1.5 runs. It checks three failure
modes:

* **Fault-free run.** No flag rises, and each core reloads its watchdog
  once.
* **Unmanaged exception.** Core 1 jumps to the vector table from inside the
  inner loop. `cf_error[1]` and `reset_req` rise within 30 cycles, measured
  at 9.
* **Missed barrier.** Both threads spin forever at the barrier. This is
  valid code, so the range check stays quiet. Both watchdogs expire, and not
  before their time.

The unit testbenches compare against reference values worked out in the
testbench:

* thousands of random interleaved bytes through the frame format;
* random compressed branches of every length, from 1 to 5 bytes;
* random PCs against random ranges, including exact bounds;
* exact watchdog expiry times;
* register read-back.

## Choices made here

The required behaviour (range check, reset request, trace-reloaded
watchdog, per-core checkers, latency under 30 cycles) was given. Everything
below was chosen for this RTL. Change these first if your trace setup
differs:

* **Trace port shape.** 32-bit words with valid/ready, byte 0 in the low
  bits, and only the full frame sync. Halfword sync and narrower ports are
  not handled.
* **Packet subset.** ARM-state branch compression only; Thumb-state
  branches are not decoded. Cycle-accurate mode, timestamps and VMID packets
  are unsupported. Context ID tracing is off by default.
* **Exception bytes** are assumed to appear only after a five-byte branch
  address.
* **Sticky flags** are cleared through CTRL. Each core has its own
  watchdog PC and timeout. The watchdog counts observer clock cycles.
* **Register interface.** A plain word-addressed port, not a standard bus.
  Wrap it in a bus adapter as needed.
* **Throughput.** The deformatter handles 15 trace bytes per 19 cycles. The
  observer's clock must be fast enough for the trace port's byte rate.
  Otherwise the port has to be buffered in front of `tw_data`.

The processor cores, their trace macrocells, the trace funnel and the data
protection software are not part of this RTL. The testbench package only
models the funnel's output format and the trace packets.
