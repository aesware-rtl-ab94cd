# AESware: one AES accelerator shared by many small RISC-V cores

Small edge and IoT processors must encrypt the data they send and decrypt
what they receive. AES in software on a simple core costs thousands of
cycles per block. A private AES accelerator next to every core is fast, but
in a multicore chip most of those accelerators sit idle while they still
draw power. AESware takes the middle road. One lightweight AES engine
handles AES-128, AES-192 and AES-256, and every core in the processor
shares it. A small scheduler in front of the engine decides who goes next.
It also tells a core to do the job in software when waiting for the engine
would take longer than doing it itself.

This repository holds synthesizable SystemVerilog for the accelerator (the
scheduler and the AES engine), for the per-core bus muxes that reach it,
and for a top level that wires them up for a configurable number of cores
(eight by default). The cores, the on-chip network, the memories and the
peripherals of the surrounding processor are not included. Their
connection points are ports of the top level.

```
 core 0 bus ──► core_bus_mux ──┬─────────────────────────────► interconnect port 0
                               │ APB1            APB2
 core 1 bus ──► core_bus_mux ──┼──┐               ┌──
   ...                         │  ▼               ▼
                        ┌──────┴──────────────────────────────────────┐
                        │ aesware                                     │
                        │  aesware_apb1 ─► aesware_arbiter ─┐         │
                        │       ▲  (tag + direction bits)   │ grant   │
                        │       └───────────────────────────┤         │
                        │  aesware_apb2_mux ◄───────────────┘         │
                        │       │                                     │
                        │  aes_operator: input router ─► round-key    │
                        │    generator ─► encoder | decoder ─► result │
                        │       └── AESware_state (idle) ──► arbiter  │
                        └─────────────────────────────────────────────┘
```

## How a core uses the accelerator

Each core reaches AESware directly through its own `core_bus_mux`, so AES
traffic never crosses the interconnect. The AESware window is 8 KiB at
`AWR_BASE` (default `0x5000_0000`). The lower 4 KiB are the core's **APB1**
port to the scheduler, and the upper 4 KiB are its **APB2** port to the
AES engine. All other addresses go unchanged to the core's interconnect
port.

A job has three phases:

1. **Request (APB1).** Write to offset `0x000`:
   `{sw_time[15:0], 14'b0, keylen[1:0]}`. `keylen` is 0, 1 or 2 for a
   128-, 192- or 256-bit key. `sw_time` is how many cycles this core would
   need to do the same job in software.
2. **Wait for the verdict (APB1).** Read offset `0x000`. Bits `[1:0]` are
   the direction bits, and bits `[2 +: TAGW]` hold the core's own tag.
   | value | meaning |
   |---|---|
   | 0 | no request |
   | 3 | request queued, keep polling |
   | 1 | the engine is reserved for you: go to APB2 |
   | 2 | do this job in software |
3. **Run the job (APB2, only after verdict 1).**
   | offset | register |
   |---|---|
   | `0x000` TYPE | bit 0: 0 encrypt, 1 decrypt; bits 2:1: key length |
   | `0x010`–`0x01C` TEXT | 4 words of plain or cipher text, most significant word first |
   | `0x020`–`0x03C` KEY | `Nk` = 4/6/8 key words, most significant first |
   | `0x040` STATUS | bit 0 idle, bit 1 result valid |
   | `0x050`–`0x05C` RESULT | 4 result words |

   Writing the last key word (word `Nk-1` of the key length in TYPE) starts
   the engine. The core may read RESULT at once: the read is held with
   PREADY low until the result exists. Reading the fourth result word ends
   the job and releases the engine to the next core.

While one core holds the engine, an APB2 access from any other core ends at
once with PSLVERR. APB1 writes from several cores in the same cycle are
taken one per cycle, lowest core number first; the others see PREADY low. A
second request from a core that is already queued gets PSLVERR.

## The scheduler (`aesware_arbiter`)

This is the part of the design that most needs explaining. It keeps three
arrays with one slot per core:

- the **queue**, holding the core tag, the estimated engine time of the job
  and the core's software time;
- the **priority array**, where 0 is served first and the values of the
  waiting entries are always 0..n-1;
- the **age array**, counting how often an entry has been pushed back.

The estimated engine time comes from the key length: 244, 321 and 390
cycles for 128, 192 and 256 bits (`EST_*` in `aes_pkg`). Those are the
published figures for the original engine. They are larger than what this
RTL needs (next section), so the estimate errs on the cautious side.

The decisions are made by five small combinational blocks, each in its own
module, that look at all slots at once:

| module | answers |
|---|---|
| `aesware_sjf` | at which priority a new request enters |
| `aesware_threshold_detector` | which entry has waited past the age threshold |
| `aesware_topmost_selector` | which slot holds priority 0 |
| `aesware_wait_estimator` | the expected hardware time of every entry |
| `aesware_sw_preferable` | which entry should give up and use software |

`aesware_arbiter` holds the arrays and applies one of their answers per
clock. It also ages the entries that are pushed back and clears the age of
a promoted one.

Each clock the scheduler handles at most one event, in this order:

1. **Arrival.** The new entry starts at the back of the queue with age 0.
   Then a shortest-job-first step moves it forward past every entry at the
   tail that is *longer* than it. It stops behind the last entry that is
   not longer. Every entry it passes drops one place, and its age goes up
   by one.
2. **Ageing.** If an entry's age exceeds `NCORE/3` (integer division, so 2
   for eight cores), it swaps places with the entry just ahead of it and
   its age goes back to 0. Long jobs therefore cannot be starved by a
   stream of short ones.
3. **Pop.** When the engine is idle (`AESware_state` = 1) and no core holds
   it, the entry with priority 0 leaves the queue. Its core gets verdict 1,
   the engine is reserved for that core, and every other entry moves up one
   place. The reservation ends when the engine has gone busy and come back
   to idle, which happens after the last result word is read.
4. **Software check.** For every entry the scheduler sums the estimated
   times of all entries at or ahead of it, itself included. This is the
   entry's expected hardware time. The first entry, in priority order,
   whose hardware time exceeds its software time leaves the queue, and its
   core gets verdict 2. Only one entry is removed per cycle. The check
   repeats on later cycles, so a queue that becomes too deep drains into
   software quickly.

A worked example, checked by `tb_aesware_arbiter`: the engine is busy, and
cores 1 (256-bit), 2 (128), 3 (128) and 4 (192) request in that order.
Shortest-job-first pushes core 1 back three times. Its age reaches 3, which
is above 2, so it swaps ahead of core 4. The engine then serves cores 2, 3,
1, 4.

Things to know before you rely on it:

- The expected hardware time ignores the job running at that moment. A
  core that reports a small `sw_time` can still be sent to software while
  it is alone in the queue.
- A new arrival blocks a pop in the same cycle. The pop then happens one
  cycle later.
- Each core may have only one request waiting. The queue depth is `NCORE`.

## The AES engine (`aes_operator`)

The engine is iterative and small. It does one AES transformation of the
whole 128-bit state per clock.

- **Input router** (`aes_input_router`). It decodes APB2 writes into the
  type, text and key registers, and raises `start` one cycle after the
  last key word.
- **Round-key generator** (`aes_roundkey_gen`). It expands the key into
  44, 52 or 60 words, one word per clock, and keeps them in a 60×32
  register array that both engines read. The generator does not decide
  from `i mod Nk` whether to apply RotWord, SubWord and Rcon. Instead a
  20-bit *Nk-advisor* register, loaded with a pattern per key length, is
  checked at its LSB and shifted right once per step. In this RTL a step is
  a segment of `Nk` words (4 words for 256-bit keys). On the first word of
  a segment, LSB 1 means RotWord+SubWord+Rcon and LSB 0 means SubWord only.
  The patterns are `0x003FF`, `0x000FF` and `0x01555`. Rcon starts at 1
  and is advanced with `xtime` after each use.
- **Encoder** (`aes_encoder`). It steps through IDLE → load text →
  AddRoundKey(0), then SubBytes → ShiftRows → MixColumns → AddRoundKey.
  A counter goes up at each AddRoundKey. A *guide* bit (`count < Nr`)
  decides whether MixColumns is done and whether another round follows.
  The last round skips MixColumns and returns to IDLE.
- **Decoder** (`aes_decoder`). It steps through IDLE → load text →
  AddRoundKey(Nr), then InvShiftRows → InvSubBytes → AddRoundKey(Nr-count)
  and, while guide is 1, InvMixColumns. Round keys are used in reverse
  order.
- **Output mux and result register.** They pick the encoder or decoder
  output by the operation in TYPE. They hold the result until the core has
  read all four words.

The S-box and inverse S-box (`aes_sbox`) are 256-byte ROMs. `aes_pkg`
computes them at elaboration from their definition: the GF(2^8) inverse
modulo x^8+x^4+x^3+x+1, followed by the affine transform with constant
0x63. The engine uses 16 forward boxes, 16 inverse boxes and 4 in the key
generator. The state is packed in FIPS-197 byte order: bits 127:120 are
row 0, column 0, and bytes run down the columns.

**Timing.** The count starts at the clock edge that takes the last key
write. The key expansion takes `1 + 4(Nr+1) - Nk` cycles (41/47/53). The
encoder or decoder takes `4·Nr + 2` cycles (42/50/58). Hand-over takes 2
more. The result can therefore be read after **85, 99 or 113 cycles** for
128-, 192- or 256-bit keys. Add 2 cycles per APB transfer: 9 to 13 writes
and 4 reads. A complete AES-128 job then takes about 111 cycles, or
2.2 µs at 50 MHz.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NCORE` | 8 | `aesware_system`, `aesware`, arbiter, APB ports | number of cores sharing the engine (the original work builds 1, 2, 4 and 8) |
| `TAGW` | `$clog2(NCORE)` | same | width of a core tag |
| `AGEW` | 4 | `aesware_arbiter` | width of an age counter (saturating) |
| `AWR_BASE` | `0x5000_0000` | `aesware_system`, `core_bus_mux` | base of the 8 KiB AESware window |
| `EST_128/192/256` | 244/321/390 | `aes_pkg` | estimated engine time per key length, for scheduling |
| `TIME_W` | 16 | `aes_pkg` | width of time fields |

The ageing threshold is `NCORE/3`. With 1 or 2 cores it is 0, so an entry
that is pushed back is promoted again on the next cycle.

## Where this RTL departs from the original design, and what it adds

The published AESware describes its blocks and its scheduling algorithm
but not their cycle-level behaviour or its bus encodings. Everything below
is this implementation's own choice:

- All register maps, field layouts, the direction-bit encoding, the
  address window, and the rule that the last key word starts the engine.
- The separate APB1 port per core with serialization, and the PSLVERR
  responses.
- The cycle-level rules of the scheduler described above: one event per
  cycle, shortest-job-first by insertion, promotion by swapping, and the
  hardware-time sum without the running job. Where the original sources
  disagree on ageing, this RTL promotes an entry when its age *exceeds*
  `NCORE/3`, rather than when it reaches it.
- The meaning of the Nk-advisor bits and their patterns (only the 20-bit
  width and the LSB-and-shift rule are given).
- The engine speed. The original engine is reported at 244/321/390 cycles
  per job (4.88 µs for AES-128 decryption at 50 MHz). This one is about
  twice as fast, because it spends one clock per transformation. It uses
  more parallel S-boxes than a byte-serial engine would.
- Where the S-boxes live. The original places the S-box, the round
  constants and the inverse S-box together in the round-key generator.
  Here the key generator has its own four S-boxes, and Rcon is a register
  doubled in GF(2^8) instead of a table. The encoder has sixteen S-boxes
  and the decoder sixteen inverse S-boxes. All are copies of one
  elaboration-time table, so sharing them would save area but cost cycles.
- A one-core build (`NCORE=1`) keeps a one-entry scheduler. The original
  single-core processor leaves the scheduler out. The scheduler can still
  send the lone core to software if its `sw_time` is below the engine
  estimate.
- A block called `char2hex` is part of the original accelerator, but its
  function is not described, so it is not included.
- The processor around the accelerator (RISC-V cores, a 3×5-router
  network-on-chip, 64 K SRAM, Flash, IROM, UART/SPI/I2C/I2S, boot and
  reset control, AXI/AHB/APB bridges) comes from other sources and is not
  part of this RTL. The core bus is modelled as a simple APB-style
  request/response (`bus_req_t`/`apb_rsp_t`) rather than AXI.
- All registers use an asynchronous active-low reset `rst_n`. The
  round-key array is not reset.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with
`TB_RESULT checks=N failures=M` and has a watchdog. AES results are checked
against the published FIPS-197 examples (`tb/tb_aes_vec_pkg.sv`): the key
expansion examples of appendix A and the cipher examples of appendix C for
all three key lengths. Random blocks are also encrypted and decrypted
round-trip.

| testbench | what it shows |
|---|---|
| `tb_aes_sbox` | published S-box entries; inverse undoes forward for all 256 bytes; forward box is a permutation |
| `tb_aes_roundkey_gen` | first, second and last round keys for 128/192/256-bit keys; ready after 41/47/53 cycles |
| `tb_aes_encoder`, `tb_aes_decoder` | appendix C results for all key lengths; 42/50/58 cycles; back-to-back operation |
| `tb_aes_input_router` | register routing, start timing, refused writes |
| `tb_aes_operator` | complete APB jobs, 85/99/113-cycle latency, wait states on early reads, random round trips |
| `tb_aesware_arbiter` | immediate pop; shortest-job-first with ageing (order 2, 3, 1, 4); software redirection |
| `tb_aesware_sjf`, `tb_aesware_threshold_detector`, `tb_aesware_topmost_selector`, `tb_aesware_wait_estimator`, `tb_aesware_sw_preferable` | 2000 random queues each, against reference models that walk the queue in priority order |
| `tb_aesware_apb1`, `tb_aesware_apb2_mux`, `tb_core_bus_mux` | serialization and stalls, tag/direction reads, grant routing and refusals, address decoding |
| `tb_aesware` | four cores sharing the accelerator; no two owners at once |
| `tb_aesware_system` | the full eight-core top at default parameters, run end to end (see below) |
| `tb_workload_request_rate` | subsystems of one, two, four and eight cores, each core issuing jobs at 10k, 100k, 520k and 1040k requests per second (50 MHz clock); the per-size harness is `tb_rr_cluster` |

`tb_aesware_system` runs ten jobs on each of eight cores concurrently,
mixed with interconnect traffic. It checks every hardware result. It fails
if any of the following never happens: hardware jobs of each of the six
kinds, a job sent to software, a shortest-job-first reorder, an ageing
promotion, a serialized APB1 write, an APB2 wait state, a refused APB2
access, or interconnect traffic.

`tb_workload_request_rate` gives each core the software times of a small
in-order core: 3081, 3691 and 4317 cycles for 128-, 192- and 256-bit keys.
Each core keeps at most one request in flight. The run printed:

| cores | 10k/s | 100k/s | 520k/s | 1040k/s |
|---|---|---|---|---|
| 1 | queue 1, wait 6 | queue 1, wait 6 | queue 1, wait 6 | queue 1, wait 6 |
| 2 | queue 1, wait 6 | queue 1, wait 6 | queue 2, wait 123 | queue 2, wait 127 |
| 4 | queue 1, wait 6 | queue 2, wait 73 | queue 4, wait 351 | queue 4, wait 327 |
| 8 | queue 1, wait 6 | queue 8, wait 591 | queue 8, wait 769 | queue 8, wait 833 |

"queue" is the deepest queue seen and "wait" the mean number of cycles
from request to verdict. The exact figures shift with the random key
lengths. No job is sent to software in any of these runs. Even with eight
256-bit jobs queued, the expected hardware time (at most 8 × 390 = 3120
cycles) barely reaches the shortest software time. The real wait is
shorter still, because this engine is faster than its estimates. The
software path takes over earlier with faster cores (smaller `sw_time`),
with larger time estimates, or with cores that keep several requests in
flight, which the one-slot-per-core queue does not allow.

To run a testbench with Verilator 5, list the package files first:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_aesware_system \
    rtl/aes_pkg.sv tb/tb_aes_vec_pkg.sv rtl/*.sv tb/tb_aesware_system.sv
./obj_dir/Vtb_aesware_system
```

For a lint run of the design alone:
`verilator --lint-only -Wall rtl/aes_pkg.sv rtl/*.sv --top-module aesware_system`.
The only lint warnings are unused package constants and
`SYNCASYNCNET`. The latter appears because the concurrent assertions use
`rst_n` in `disable iff` while the flops reset asynchronously on it, and
it is harmless.

## Files

- `rtl/aes_pkg.sv`: types (`keylen_e`, `aes_op_e`, `dir_e`, APB bundles),
  the register map, engine time estimates, GF(2^8) and state functions, and
  the S-box tables.
- `rtl/aesware_system.sv`: top level, per-core muxes plus one accelerator.
- `rtl/core_bus_mux.sv`: per-core mux between AESware and the interconnect.
- `rtl/aesware.sv`: accelerator wrapper.
- `rtl/aesware_apb1.sv`, `rtl/aesware_arbiter.sv`, `rtl/aesware_apb2_mux.sv`:
  request port, scheduler, engine port.
- `rtl/aesware_sjf.sv`, `rtl/aesware_threshold_detector.sv`,
  `rtl/aesware_topmost_selector.sv`, `rtl/aesware_wait_estimator.sv`,
  `rtl/aesware_sw_preferable.sv`: the scheduler's decision blocks.
- `rtl/aes_operator.sv`, `rtl/aes_input_router.sv`,
  `rtl/aes_roundkey_gen.sv`, `rtl/aes_encoder.sv`, `rtl/aes_decoder.sv`,
  `rtl/aes_sbox.sv`: the AES engine.
- `tb/`: one testbench per module, the shared test vectors, and the
  request-rate workload (`tb_workload_request_rate` with its harness
  `tb_rr_cluster`).
