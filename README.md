# NA62-style triggerless TDC readout with an FPGA L0 trigger

This RTL models the trigger and data-acquisition chain of a fixed-target kaon experiment.
Nothing in the front end waits for a trigger. Every TDC hit is timestamped, packed into
fixed 6.4 us frames and kept in a buffer. The lowest trigger level is built from the data
itself: each readout board turns its hits into per-slot multiplicities ("primitives"). A
central trigger processor combines the primitives of several detectors and issues L0
accepts. Each accept goes back to every board, which pulls out the hits near the trigger
time and ships them to the PC farm as UDP packets.

The hierarchy follows the real hardware:

```
na62_tdaq_top
 ├─ N_TEL62 x { 4 x tdcc            (TDC controller of one TDC daughter-board)
 │              tel62               (readout motherboard)
 │               ├─ 4 x pp_fpga     (pre-processing FPGA, one per daughter-board)
 │               │    pp_merger → pp_monitor / pp_primitive_gen / pp_trigger_buffer
 │               └─ sl_fpga         (central "sync-link" FPGA)
 │                    ttc_decoder, sl_event_builder, sync_fifo (fragment buffer),
 │                    sync_fifo (length queue), udp_packer, primitive_merger }
 └─ l0tp                            (L0 trigger processor)
```

By default there are four boards. They stand for the two positive detectors (RICH, CHOD)
and the two negative ones (MUV, LAV) of the L0 selection. Each board has 4 × 4 HPTDCs of
32 channels, so 512 channels per board.

## Time scale and frames

Everything is aligned to one burst-long time base:

| quantity | width | LSB | notes |
|---|---|---|---|
| coarse timestamp `ts` | 32 bit | 25 ns | cleared by `sob` (start of burst) |
| fine time | 8 bit | ~100 ps | from the TDC |
| TDC time word | 19 bit | ~100 ps | = ts[10:0] : fine[7:0] |
| frame number | 24 bit | 6.4 us | = ts[31:8] |
| slot in frame | 8 bit | 25 ns | = ts[7:0] = TDC time[15:8] |

A frame is 256 clocks of 40 MHz. At every frame boundary the TDC controller "triggers"
its TDCs. That trigger closes the frame that just ended, and the frame's hits are sent on
as one packet. There is no trigger at `ts = 0` (right after `sob`), so the first packet
is frame 0, sent at `ts = 256`. A hit is recovered as `{frame, slot}` from the frame header number and bits
15:8 of its time. The TDC time keeps only 11 coarse bits. The upper bits come from the
header, which is why a hit has to arrive in the frame it belongs to.

## Word formats (`na62_pkg`)

All links carry 32-bit words. Bits 31:30 give the kind:

| kind | layout |
|---|---|
| hit `00` | `[29]` trailing edge, `[28:22]` channel (2 bits of TDC + 5 bits), `[21:19]` 0, `[18:0]` time |
| aux `01` | payload, used for the trigger type (bits 15:8) |
| header `10` | `[29:24]` source, `[23:0]` frame number or trigger number |
| trailer `11` | `[29:18]` word/hit count, `[17:0]` error or loss count |

The same three-part shape (header, body, trailer) is used at every level. That covers TDC
frames, merged PP frames, PP responses to a trigger and SL event fragments.

## Data path, stage by stage

**tdcc / tdc_frame_builder.** One frame builder runs per TDC. It writes the hits into a
256-word FIFO as they arrive. At the frame tick it records `{frame, count, dropped}` in a
small descriptor queue. An emitter sends header, hits and trailer on the 32-bit bus with
valid/ready, starting two clocks after the tick. A hit that meets a full FIFO is dropped,
counted in the trailer, and the total is kept.

**pp_merger.** The merger waits until all four TDC buses present a header. It then emits
one merged frame: header (PP index, frame number), the hits of TDC 0, 1, 2 and 3 in turn,
and a trailer with the summed hit count and errors. A TDC whose frame number disagrees
adds 0x20000 to the error field and is counted. The merged stream has no back-pressure,
one word per clock. It feeds three consumers at once.

**pp_monitor.** This block counts leading hits per channel (128 counters), frames, and
frames with errors. These are read combinationally through `rd_addr`: 0..127 are the
channels, 128 frames, 129 error frames.

**pp_primitive_gen.** This block histograms leading hits per 25 ns slot (saturating
8-bit counts). When a trailer arrives, a 256-clock scan reads and clears the frame's
histogram. It emits a primitive `{ts = frame:slot, multiplicity}` for every slot at or
above `threshold`, and `threshold = 0` turns primitives off. The scan takes as long as a
frame, and frames can arrive slightly bunched, so there are three banks. One is filling,
one is being scanned, and one is waiting to be scanned. A frame that would need a fourth
bank is counted in `overrun_total`.

**pp_trigger_buffer.** This is the heart of the PP and the hardest part to follow.

- **Storage.** Hits are written into a circular RAM of `HIT_DEPTH` words. The RAM keeps
  27 bits per hit: edge, channel and time. A directory of `FRAME_SLOTS` entries records,
  per frame, its number, its absolute start address and its hit count.
- **Requests.** A request `{num, type, T}` comes from the SL. It asks for all hits with
  `{frame, slot}` in `T-W .. T+W`, where W is the `window` input and the range is clamped
  at 0.
- **Service.** The read FSM waits until the last frame needed is complete. It then sends
  the response header. For each frame in range it looks up the directory. The entry is
  valid only if its frame tag matches and its hits have not been overwritten. In that case
  it reads the frame's hits one per clock and forwards those inside the window. Otherwise
  it counts the frame as lost.
- **Response.** The trailer carries the number of hits sent and the number of frames lost.
- **Queue.** Requests wait in a 16-deep queue. A request that arrives while the queue is
  full is dropped and counted.

At the defaults the store holds 1.6 ms of data at the full input rate. That is more than
the 1 ms maximum L0 latency of the experiment.

**ttc_decoder.** This block keeps its own copy of the burst timestamp. An L0 accept
(`l1a`) marks a request pending and captures its time as `ts - latency`. `latency` is the
fixed delay from the trigger decision to the accept at the board, and it is programmable.
The next broadcast supplies the trigger type. The request `{number, type, time}` leaves
one clock later and goes to all four PPs and to the event builder. The number is
sequential and cleared by `sob`. If a second accept comes before a type arrives, the first
request goes out with type 0 and is counted.

**sl_event_builder.** For each queued request, this block writes one fragment into the
fragment buffer:

1. a header (board id, trigger number);
2. the timestamp;
3. an aux word with the type;
4. the four PP responses, passed through unchanged;
5. a trailer with the fragment length and error bits. Bits 3:0 mark a PP that returned
   the wrong trigger number; bits 7:4 mark a PP that reported lost frames.

The fragment length also goes into a length queue. Writing stalls while either queue is
full.

**udp_packer.** The packer starts a packet when `mep_factor` fragments are queued, or when
at least one is queued and `mep_timeout` clocks have passed since the last packet started (or
since the queue was last empty). It adds fragments while the count is below `mep_factor` and
the payload stays within 1472 bytes. `mep_factor = 0` stops output. A packet is a byte
stream for a GbE MAC, sent MSB first:

| bytes | content |
|---|---|
| 14 | Ethernet: destination MAC, source MAC, type 0x0800 |
| 20 | IPv4: DF, TTL 64, UDP, identification = packet counter, header checksum computed on the fly |
| 8 | UDP: ports, length, checksum 0 |
| 4 | MEP header: fragment count, source id, payload length in words |
| 4·n | the fragments |

Before sending, the packer makes one pass over the queued lengths (state `P_SUM`) so that
all length fields are known. `eth_last` marks the final byte.

**primitive_merger.** The four PP primitive streams go into 16-deep queues with a
round-robin reader. The output is tagged with the PP index. An overflow is counted per
lost primitive.

## The L0 decision (`l0tp`)

Each detector input writes a bit into a circular occupancy map (1024 slots of 25 ns). The
bit goes at the slot given by the primitive's timestamp. Every clock, one slot
`e = now - eval_delay` is evaluated. A trigger is issued for `e` when all of these hold:

- the reference detector `ref_det` has a primitive exactly at `e`;
- every detector in `pos_mask` has one within `e ± window`;
- no detector in `neg_mask` has one within `e ± window`;
- no `choke` or `error` line is active.

Vetoes, choke inhibits and error inhibits are counted separately. Slots are cleared
`window+1` slots after evaluation. A primitive whose window has already been evaluated is
dropped and counted as late.

`eval_delay` must cover the worst primitive latency. That latency is about 2 frames
(12.8 us, ~520 clocks) from hit to primitive, since a frame is only closed and scanned
after it ends. The end-to-end test uses 900. The accept carries the slot `e` as its
timestamp.

## Interfaces and conventions

- **Clock and reset.** A single clock (`clk`, 40 MHz nominal) drives everything. Reset
  `rst_n` is asynchronous and active low. It clears control state and counters but not
  RAM contents.
- **Streams.** Streams that can be stalled use valid/ready. The merged PP stream and the
  primitive streams are valid-only. `sync_fifo` has assertions for writes when full and
  reads when empty.
- **Top-level ports.** All ports of `na62_tdaq_top` are plain packed arrays or the
  `trig_t` struct. They cover the HPTDC hit inputs, the TTC inputs, the configuration
  registers, the L0 accept output, the per-board byte streams, a monitor read port (board,
  PP, address) and status counters.
- **Closing the trigger loop.** Between the L0 accept (`l0_trig_*`) and the boards' TTC
  inputs (`l1a`, `brcst_*`) sit the LTU and the TTC system. They are not part of this RTL,
  so the loop is closed outside the top. The testbench does this with a fixed delay.

## Where this design departs from the real system

The real system is specified only at the level of function for most blocks. Everything
below the block level here is this design's own choice. That covers:

- the word formats;
- the merge order;
- the primitive algorithm;
- the monitor contents;
- the fragment and MEP layouts;
- the L0 matching;
- every handshake.

The main structural differences are:

- **One clock.** The real boards use 40 MHz TDC buses, 160 MHz PP–SL buses, a 640 MHz
  DDR2 and a 125 MHz GbE MAC. This design runs everything at the 40 MHz experiment clock.
  As a result, the byte-wide packet output carries 320 Mb/s instead of 1 Gb/s.
- **On-chip buffers.** A circular RAM of 65536 words replaces each PP's 2 GB DDR2. A
  32768 × 32 FIFO replaces the SL's 1 Mb QDR RAM, at the same capacity.
- **Missing parts.** The following are not modelled: the HPTDC chips, TTCrx, QPLL, the
  GbE MAC/PHY, the slow control (credit-card PC, glue card, I2C/JTAG configuration), the
  TDC emulator, the calibration outputs, the daughter-board SRAM, the inter-board
  auxiliary buses, and the LKr-specific uses of the L0TP board.
- **One buffer per TDC.** Each TDC has a single 256-word frame FIFO. The real chip has one
  256-word buffer per 8-channel group.
- **No links to the trigger processor.** Primitives reach the L0TP on direct wires, not
  over Ethernet. The daisy-chain links between boards are not modelled either. The same
  holds for the NIM/LEMO trigger path of the L0TP board.
- **Capacity limits.**
  - One PP can sustain about 250 hits per frame, about 39 MHz.
  - The extraction scan reads every stored hit of the frames it visits. At 1 MHz of
    triggers this limits one PP to about 3 MHz of hits.
  - The byte-wide output saturates at roughly 0.8 MHz of triggers even with empty
    fragments, so a 1 MHz L0 rate cannot leave one board at this clock.

## Simulating

Every block has its own self-checking testbench in `tb/`, named `tb_<module>`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. The package must be read first:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_pp_trigger_buffer rtl/na62_pkg.sv tb/tb_pp_trigger_buffer.sv
./obj_dir/Vtb_pp_trigger_buffer +verilator+rand+reset+2
```

`tb_na62_tdaq_top` runs the complete system at its default parameters in about 20 s of
simulation. It drives random hits on four boards and plants correlated events. Detectors 0
and 1 are positive; 2 and 3 are negative. Some events are vetoed, and the choke and error
lines are raised during one event each. The test loops L0 accepts back through the TTC
inputs and then checks:

- the L0 triggers and the reasons for rejection;
- that every fragment, decoded from the Ethernet byte streams, holds exactly the hits
  expected in its window;
- the packet addresses and lengths (the IP checksum is checked in the packer's own test);
- a monitor read of every channel of one PP.

It counts each mechanism it exercises: triggers, vetoes, choke and error inhibits,
multi-event packets, timeout packets, extracted hits and monitor reads. A mechanism that
never happened counts as a failure. `tb_pp_latency_workload` runs one PP at its default sizes under the experiment's load. It
sends 2.5 MHz of hits, a quarter of a 10 MHz detector, for 280 frames. It issues L0
requests that each ask for a time 1 ms in the past and checks every answer. It also checks
that a request 1.76 ms old reports its frames as lost.

`tb_pp_trigger_buffer` overrides the buffer sizes to
reach overwrite (lost-frame) cases quickly. The other testbenches use the defaults.

## Changing it

- **Number of boards.** `N_TEL62` in `na62_tdaq_top` sets the number of boards, which is
  also the number of L0TP detector inputs.
- **PP store size.** `HIT_DEPTH` and `FRAME_SLOTS` size the PP store; keep `HIT_DEPTH` a
  power of two.
- **Fragment buffer.** `QDR_DEPTH` sizes the fragment buffer.
- **Length queue.** The length queue in `sl_fpga` must stay at most 128 deep, because the
  packer reads its level as 8 bits.
- **L0TP timing.** `eval_delay + window + 1` must stay below the L0TP map size (`NSLOT`).
- **Trigger latency.** `latency` (TTC path) must equal the delay from an L0 accept's
  evaluated slot to the `l1a` at the board. The accept's timestamp is `e`, so the top's
  testbench uses `eval_delay + loop delay`.
