# ABCStar digital readout core in SystemVerilog

ABCStar is the front-end readout chip of the ATLAS Phase-II silicon strip
tracker. Each chip sees 256 strips. Every 25 ns bunch crossing (BC, 40 MHz)
its analog front end gives one hit bit per strip. The digital part must keep
all of these bits long enough for the first-level trigger (L0) to choose some
crossings. It then keeps the chosen crossings until a readout request arrives
for each one. Finally it compresses the hits into clusters and sends them out
on one 160 Mb/s serial line.

This repository holds synthesizable RTL for that digital part. The block
chain, the 256-strip width, the mask and edge-detection rules, the three
trigger kinds (L0, PR, LP), the 12-bit cluster at 40 MHz, the packet field
widths and the pin list follow the description in *A UVM Based Testbench
Research for ABCStar*. That text describes most blocks only by what they do.
The internals in this repository are therefore one way to build them. Where
a choice is this design's own, this file and the module headers say so.

## Data flow

```
stripdata[255:0] ─► input_register ─► l0_buffer ──L0──► evt_buffer ──PR/LP──► cluster_finder ─► readout ─► DataOut
                     (mask, edge)     (512 BCs)         (256 events,          (1 cluster/BC)     (packets,
                                                          by L0ID)                                 160 Mb/s)
L0_CMD, LP_PR ─► command_decoder ─► register_bank (mask, modes, latency)
                                  └► top_logic (BCID/L0ID counters, request queues, read sequencer)
```

1. **Input register** (`input_register`). The hit source is ANDed with the
   256 mask bits, so a 0 bit silences a bad or noisy strip. The result enters
   a three-crossing window per strip, and the edge detection mode decides
   which hits count. The window is written oldest sample first:

   | mode | name  | a strip is hit when        |
   |------|-------|----------------------------|
   | 00   | HIT   | 1XX, X1X or XX1            |
   | 01   | LEVEL | X1X (the middle sample)    |
   | 10   | EDGE  | 01X (0, then 1)            |
   | 11   | CLEAR | never                      |

   The output describes the middle crossing. Its BCID travels with it, so
   the packet reports the crossing that was really triggered.
   Four working modes select the hit source:
   - data taking: the strip inputs;
   - BCID printing: the 4-bit BCID repeated over the strips;
   - mask loading: the mask bits themselves;
   - pulse test: a one-BC pulse on every strip, started by a command.

   The source names the last three modes but not what they do. The
   behaviour listed here is this design's choice.
2. **L0Buffer** (`l0_buffer`). This is a 512-word circular memory written
   every crossing. An L0 takes the word written *latency* crossings earlier
   and passes it on. The latency is programmable from 1 to 511 BCs.
3. **EvtBuffer** (`evt_buffer`). Events accepted by L0 are stored at the
   address given by their 8-bit L0ID. PR and LP requests name the event by
   its L0ID, so they read it straight back. An event can be read until 256
   later L0s have overwritten its word.
4. **Top logic** (`top_logic`). It counts BCIDs (4 bits) and L0IDs (8 bits).
   PR and LP requests wait in two 16-deep queues. The read sequencer serves
   one request at a time, PR before LP: it reads the event and hands it to
   the cluster finder with its header (TYP, L0ID, BCID). A request that
   arrives when its queue is full is lost and counted on `dropped_requests`.
5. **Cluster finder** (`cluster_finder`). It holds one event and gives one
   cluster per BC:
   - the lowest hit strip becomes the cluster address;
   - the three strips above it become a 3-bit pattern;
   - those four strips are then cleared.
6. **Readout** (`readout`). It packs the clusters into packets, passes them
   through a dual-clock FIFO into the RCLK domain, and shifts them out at one
   bit per RCLK cycle. When the FIFO is full, the cluster finder waits.
7. **Command decoder** (`command_decoder`) and **register bank**
   (`register_bank`). The decoder unpacks the two trigger/command lines into
   L0 pulses, PR/LP requests and register commands.

## The two input lines

Each line carries two independent bit streams, one per BC clock edge. Each
stream gives one bit per crossing:

| pin    | sampled on the rising BC edge | sampled on the falling BC edge |
|--------|-------------------------------|--------------------------------|
| L0_CMD | CMD (command stream)          | L0                             |
| LP_PR  | LP                            | PR                             |

The edge assignment comes from the source. The framing on each stream is
this design's own. All streams idle at 0.

- **L0**: each 1 is one trigger. An L0 sampled in BC *n* is seen by the
  L0Buffer at the rising edge *n*+2. That edge selects the word written
  *latency* crossings earlier. Measured from the input pins, the triggered
  crossing is the one whose strip sample was taken at rising edge
  *n* − *latency* − 1. This is the middle sample of the edge-detection
  window.
- **PR, LP**: frames of 9 bits, `1` then the L0ID (MSB first).
- **CMD**: frames of 48 bits, `1, op[2:0], chipID[3:0], addr[7:0], data[31:0]`.
  A frame is executed when its chip ID matches the `chipID` pins or is the
  broadcast value `4'hF`.

  | op | action                                              |
  |----|-----------------------------------------------------|
  | 0  | register write                                      |
  | 1  | register read (answer sent as a packet)             |
  | 2  | soft reset: pointers, queues, counters, packet builder |
  | 3  | BCID and L0ID counter reset                         |
  | 4  | digital test pulse (used by the pulse-test mode)    |

`abcup`, the serial input reset, abandons any frame in progress while high.

## Registers

| addr      | bits  | meaning                                   | reset |
|-----------|-------|-------------------------------------------|-------|
| 0x00      | [1:0] | edge detection mode                       | 01 (LEVEL) |
|           | [3:2] | working mode: 0 data, 1 BCID, 2 mask, 3 pulse | 0 |
| 0x01      | [8:0] | L0 latency in BCs (1..511)                | 128 |
| 0x10-0x17 | [31:0]| mask bits, word *k* = strips 32*k*+31..32*k*, 1 = on | all 1 |

The map is this design's own.

## Packets on DataOut

The serial output idles at 0 and sends each packet MSB first:

```
start 110 | TYP[3:0] | L0ID[7:0] | BCID[3:0] | 1..4 cluster words of 12 bits | trailer 0
```

- **Field widths.** These follow the source (3 + 4 + 8 + 4 + 12·n + 1 bits).
  The start value, the trailer value and the TYP codes are this design's:
  1 = PR, 2 = LP, 3 = register read-back.
- **Cluster word.** The word is `{last, addr[7:0], next[2:0]}`:
  - `addr` is the lowest hit strip of the cluster;
  - `next[k]` is the hit of strip `addr+k+1`;
  - `last` marks the final cluster of the event.

  An event without hits is sent as the single word `12'hFFF`. No real
  cluster can be that word, because strip 255 has no strips above it.
- **Packet length.** A receiver knows the length from the clusters: a packet
  ends after a word with `last` set, or after the fourth word. An event with
  more than four clusters is sent as several packets with the same header.
- **Register read-back.** It uses TYP 3, the register address in the L0ID
  field, BCID 0 and three words holding `{4'b0, data[31:0]}`.

Consecutive packets are separated by one idle bit. A packet of *n* clusters
therefore holds the line for 21 + 12·*n* + 1 RCLK cycles. The cluster finder
can produce 480 Mb/s of cluster words, three times what the line carries. The
four-packet FIFO absorbs bursts; beyond that the cluster finder stalls.

## Clocks and reset

- BC (40 MHz) clocks everything except the serializer, which runs on RCLK
  (160 MHz).
- The two clocks may have any phase relation. Packets cross between them
  through a gray-pointer FIFO (`async_fifo`).
- `RSTB` and `powerUpRstb` are both active low, and either one resets the
  whole chip. Reset is asserted at once and released on each clock through
  `reset_sync`.

## Sizes and limits

| quantity | value | origin |
|---|---|---|
| strips | 256 | source |
| cluster / packet fields | 12 bits, 1-4 per packet | source |
| L0Buffer | 512 × 260 bits, latency 1-511 BCs | own choice |
| EvtBuffer | 256 × 260 bits (one per L0ID) | own choice, from the 8-bit L0ID |
| PR / LP queues | 16 requests each | own choice |
| readout FIFO | 4 packets | own choice |

At the rates the source evaluates, the buffers are deep enough. L0s
arrive every 40 BCs on average (1 MHz). LP requests come at up to the same
rate, and PR requests at about a tenth of it. Both follow their L0 by about
480 BCs. That leaves about 12 events waiting in the EvtBuffer, against
256 words. The serial line keeps up as long as events average fewer than
about 8 clusters. Denser events fill the request queues, and requests are
then dropped and counted.

Not built:
- the analog front end (preamplifier, shaper and discriminator per strip);
  its outputs are the `stripdata` port;
- the input pads;
- the power-up reset circuit; its output is the `powerUpRstb` port.

## Files

`rtl/`:

| file | contents |
|---|---|
| `abc_pkg.sv` | shared constants and types |
| `abcstar_top.sv` | top level |
| `input_register.sv`, `l0_buffer.sv`, `evt_buffer.sv`, `cluster_finder.sv`, `readout.sv`, `top_logic.sv`, `command_decoder.sv`, `register_bank.sv` | the blocks |
| `serial_frame_rx.sv`, `sync_fifo.sv`, `async_fifo.sv`, `reset_sync.sv` | helpers |

`tb/` holds one self-checking testbench per block, plus
`abc_line_driver.sv`, which drives the two trigger/command lines.

The chip-level testbenches share `abcstar_env.sv`. It drives only the chip
pins, runs the whole chip at its default size, decodes every packet from
`DataOut` and compares it with a reference model. A parameter selects the
run, and each of the four tops below picks one:

| testbench | what it runs |
|---|---|
| `tb_abcstar_top` | Every edge mode and working mode, mask changes, latencies from 50 to 511, counter reset, soft reset, test pulses and register reads. It counts how often each mechanism happened (back-pressure, split events, empty events, PR served ahead of LP, and so on); a mechanism that never happened is a failure. |
| `tb_workload_edge_modes` | LEVEL, HIT and EDGE modes in turn, in two rounds: LEVEL for 250 events, then HIT and EDGE for 125 each (about 20000, 10000 and 10000 BCs). All 256 channels must be seen hit at the input-register output in each mode. |
| `tb_workload_mask_bits` | Eight runs of 100 events, with new mask bits written by command before each. Every channel must be seen both passed and blocked by its mask bit. |
| `tb_workload_trigger_mix` | 8800 L0s, about 11000 packets. The measured mean L0 interval (40 BCs) and request delay (480 BCs) are checked. |

The three workload runs use fewer than six hit strips per BC. L0 intervals
are drawn around a mean of 40 BCs. Every event gets an LP, and one in ten
also gets a PR, each about 480 BCs after its L0. The edge-mode and
trigger runs also check that all 256 channels show up in the events read
from the EvtBuffer.

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/abc_pkg.sv tb/tb_abcstar_top.sv \
    --top-module tb_abcstar_top -y rtl -y tb -o sim
./obj_dir/sim
```

Replace `tb_abcstar_top` with any other `tb_*` file to run one block's test.
Each full-chip test takes a few seconds.

## Where this design departs from, or goes beyond, the source

- **Internals.** The top logic's behaviour, the L0Buffer and EvtBuffer
  depths, and the L0 latency range are not given by the source. The same
  holds for the cluster word layout, the command framing and opcodes, the
  register map, the packet start/trailer values and TYP codes, and the
  read-back packet. All of these are choices made here.
- **Working modes.** The three test working modes are only named in the
  source. Their behaviour here is an interpretation.
- **PR and LP.** Serving PR before LP, and dropping requests when a queue is
  full, are choices made here.
- **Command edges.** The source's pin list also mentions commands on the
  rising edge of LP_PR. Here commands travel only on L0_CMD, and the rising
  edge of LP_PR carries LP.
- **Verification.** The source's verification assertions survive here as
  concurrent assertions in the RTL:
  - in the input register, one assertion per edge mode checks the output
    against the last three masked samples;
  - also in the input register, one assertion per working mode checks the
    selected, masked source;
  - every L0 produces one EvtBuffer write on the next BC;
  - the L0 latency is never 0;
  - no FIFO overflow;
  - nothing follows the last cluster of an event.
