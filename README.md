# IEEE 802.15.3 MAC piconet in SystemVerilog

This is a cycle-level hardware model of a small IEEE 802.15.3 wireless personal
area network: several devices share one radio channel, and one of them, the
piconet coordinator (PNC), sets the timing for all of them. Each device holds a
complete MAC built from small hardware blocks:
- an output path that buffers, fragments, retries and times frames;
- an acknowledgement engine;
- a PHY interface;
- an input path that routes, acknowledges and reassembles what it receives.

A channel controller joins the devices. It detects when two transmissions
overlap, so collisions, backoff and retransmission really happen between
devices instead of being stubbed out.

The block partition follows the MAC function stack in the thesis *A Modeling
and Verification Platform for Communication SoC Designs*. The thesis proposes a
co-simulation platform for communication SoCs, with an event queue, virtual
devices, a channel controller and an instruction-set-simulator shell, and uses
it to develop an 802.15.3 MAC. Only the hardware parts are written here: the
MAC and the channel. The simulation-platform software is not part of this
design.

## The superframe: when a device may transmit

Time on the channel is divided into superframes. Each one has three parts:

```
 |<------------------------------- SF_LEN ------------------------------->|
 | beacon | CAP (contention, CSMA/CA)    | CTA 0 | CTA 1 | CTA 2 | CTA 3 | idle |
   BEACON_LEN      CAP_LEN                 CTA_LEN each
```

* **Beacon.** The coordinator (device 0, `IS_PNC=1`) sends a broadcast beacon.
  Its payload carries the superframe length, the CAP length, the CTA length and
  the owner of each of the four CTAs. Every device decodes the beacon
  (`beacon_decoder`) and restarts its superframe timers (`superframe_control`)
  from it. The coordinator cannot hear its own transmission, so it passes the
  beacon it sent straight to its own decoder.
* **CAP (contention access period).** Devices compete using CSMA/CA. In this
  design, command frames use the CAP.
* **CTAP (channel time allocation period).** The CAP is followed by four
  channel time allocations (CTAs) of equal length. Each CTA belongs to one
  device, which may transmit in it without contention. In this design, stream
  (data) frames use the CTAs. By default CTA *k* belongs to device *k*.

A device's timers run from the moment its beacon decoder finishes. That is a
few cycles after the coordinator's own timers start. The `OVERHEAD` margin in
the timing controls covers this skew, and the PHY leaves no extra guard time.

## The output path and the link handshake

Inside a device, the output blocks are stacked. Each pair of neighbouring blocks
is connected by a `mac_link_if` link with the same three operations:

| signal | from → to | meaning |
|---|---|---|
| `req` + `frm` | upper → lower | one-cycle pulse: please send this frame |
| `cfm` + `ok` | lower → upper | one-cycle pulse: finished, success or failure |
| `clr` | upper → lower | one-cycle pulse: abandon the outstanding request; no confirm follows |

A block has at most one request outstanding. With this uniform contract, a
failure confirm travels back up to the block that decides what to do about it,
and a clear travels down and aborts whatever is in progress.

```
 stream port ─► stream_output_buffer ─► fragmentation ─► retransmission ─► cta_timing_control ─┐
                                                                                               ├─► link_arbiter ─► send_and_wait ─► phy_if ─► channel
 command port ─► frame_fifo ─► (command controller) ─► retransmission ─► cap_timing_control ───┘       (streams first)   ACK, beacon share TX
```

* **`stream_output_buffer`.** A FIFO of MSDUs. Each entry records its request
  time (`now`). The head is sent down, and the buffer watches a delay bound: if
  `now − t_req ≥ DELAY_BOUND` before the head succeeds, the buffer:
  - clears the stack below;
  - reports failure for that MSDU;
  - moves on to the next MSDU.

  A head that has already expired before it is sent is dropped without being
  sent.
* **`fragmentation`.** Cuts an MSDU of `len` units into fragments of at most
  `FRAG_SIZE`, numbered 0, 1, …, with `last` set on the final one. It sends one
  fragment at a time. If any fragment fails, the whole MSDU fails.
* **`retransmission`.** Resends a failed frame up to `MAX_RETRY` times, then
  gives up. The retry count travels in the frame (`frm.retry`), which the CAP
  backoff uses to pick its window.
* **`cta_timing_control`.** Sends a frame only if
  `cta_remaining ≥ air_time + OVERHEAD` inside the device's own CTA.
  Otherwise it holds the frame until the next CTA starts and checks it again.
* **`cap_timing_control`.** CSMA/CA backoff, described below.
* **`link_arbiter`.** Lets the two timing controls share one send-and-wait
  engine. A pending stream request wins.
* **`send_and_wait`.** The immediate-ACK engine:
  1. Wait until the transmitter is free, then send.
  2. After the transmit confirm, wait up to `ACK_TIMEOUT` cycles for an ACK
     whose source is the frame's destination and whose sequence and fragment
     numbers match.
  3. Confirm success or failure.

  A broadcast frame succeeds without an ACK.
* **`phy_if`.** Holds the transmitter on the channel for the frame's air time,
  then confirms. Three sources share it in fixed priority: the ACK responder,
  then the beacon generator, then send-and-wait. The receiver listens whenever
  the device is not transmitting (half duplex). CCA is the channel's busy
  indication, registered.

## CSMA/CA backoff in the CAP

This block is the most intricate part of the design, and its rules interact.

1. On a request, wait for the CAP. The frame must fit in the rest of the CAP
   (air time + `OVERHEAD`). If it does not, it waits for the next CAP.
2. Choose a backoff count uniformly in 0..BW. The window BW comes from the
   table [7, 15, 31, 63], indexed by the frame's retry count: 7 for a first
   attempt, one step wider after each failure, capped at 63. The random number
   comes from a 16-bit Galois LFSR (polynomial 0xB400) masked by BW. Each
   device has its own seed, so devices draw different numbers.
3. The countdown runs only while the channel is idle. First the channel must
   have been idle for `BIFS` cycles. Then the count drops by one every `SLOT`
   idle cycles.
4. Any busy cycle suspends the countdown and restarts the BIFS wait. The count
   is kept.
5. If the CAP ends, or the frame no longer fits, the backoff is suspended with
   its count kept. It resumes in the next CAP.
6. When the count reaches 0, the frame is sent.

A device cannot observe a collision directly. When two frames collide, neither
is acknowledged, so the sender's ACK timeout fires, the frame is retried, and
the retry widens the window. That is how "collision widens the window" is
implemented here.

## The input path

`phy_if` → `dispatch`, which keeps only frames addressed to this device or
broadcast and routes them by type:

* **beacon** → `beacon_decoder`. The decoder rejects beacons with
  `sf_len = 0` or `cap_len + 4·cta_len > sf_len`. It then sets up
  `superframe_control`, which produces CAP start/end/active/remaining and, for
  this device's own CTAs, CTA start/active/remaining.
* **ACK** → `send_and_wait`.
* **data** → `defragmentation` → stream input buffer (a `frame_fifo`).
  Defragmentation rebuilds one MSDU at a time from fragments that arrive in
  order:
  - a repeated fragment is dropped, which happens when the ACK was lost and
    the sender retried;
  - a gap discards the partial MSDU.
* **command** → input command buffer (a `frame_fifo`).

For unicast data and command frames, dispatch also triggers `ack_responder`.
It waits `SIFS` cycles, then sends an `ACK_LEN`-long ACK to the frame's source.

## The piconet and the channel

`uwb_piconet` (the top) instantiates `N_DEV` `mac_device`s (device 0 is the
coordinator) and one `channel_controller`. The channel keeps a loading
counter: the number of active transmitters.

**Who hears whom.** The `HEAR` matrix sets which devices hear each other:
row *j* lists the devices that device *j* hears. Each device's carrier sense
(`busy[j]`, its CCA) is high while any transmitter it hears, or its own, is
active.

**Collisions** are judged at each receiver. A frame from device *i* is lost
at receiver *j* if, during the frame, either of these happened:
- another device that *j* hears transmitted;
- *j* itself transmitted, since a half-duplex receiver misses what arrives
  while it is sending.

When *i*'s frame ends, every other device that hears *i*, has its receiver on
and saw the frame clean receives it. `ch_collision` pulses if some listener
lost it.

**Hidden nodes.** Clearing a pair of bits in `HEAR` makes two devices hidden
from each other. Each then senses an idle channel while the other transmits.
It can start on top of the other, and a third device that hears both loses
both frames. This is the hidden-node problem.

**Noise.** `NOISE_PER_1024` sets a random per-frame loss. With probability
`NOISE_PER_1024`/1024, drawn from an LFSR, an otherwise clean frame is lost
at every receiver and `ch_noise` pulses.

The defaults (`HEAR` all ones, no noise) give an ideal channel, on which a
frame is lost exactly when the loading counter exceeds 1 during it.

Frames are descriptors (`mac_pkg::frame_t`): type, source, destination,
sequence, fragment number, last flag, retry count, length and a 64-bit payload
tag. One length unit is one clock cycle of air time. No bits are modulated:
the PHY and radio are not modelled beyond timing.

## Parameters

All sizes are this design's own choices. The thesis gives no numbers except the
backoff window table.

| parameter | default | meaning |
|---|---|---|
| `N_DEV` | 4 | devices in the piconet |
| `HEAR`, `NOISE_PER_1024` | all ones, 0 | channel: who hears whom; frame loss per 1024 frames |
| `SF_LEN` / `CAP_LEN` / `CTA_LEN` / `BEACON_LEN` | 3200 / 1024 / 512 / 32 | superframe timing, in cycles |
| `OWNERS` | {3,2,1,0} | owner of CTA *k* is `OWNERS[k]` |
| `FRAG_SIZE` | 256 | maximum fragment length |
| `DELAY_BOUND` | 12000 | stream MSDU lifetime, in cycles |
| `MAX_RETRY` | 3 | retries before a frame is dropped |
| `BIFS`, `SLOT` | 4, 4 | CAP idle time before countdown; cycles per backoff slot |
| `SIFS`, `ACK_LEN`, `ACK_TIMEOUT` | 2, 8, 32 | ACK timing |
| `OVERHEAD` | 48 | time added to air time when checking fit |
| `BUF_DEPTH` | 8 | depth of every buffer |

Field widths are set in `mac_pkg`: 4-bit device IDs (ID 15 is broadcast),
12-bit lengths, 16-bit timers, 2-bit retry count, 4 CTAs.

Synthesis of the default top gives about 4.5 k cells and 10.9 k flip-flop bits,
plus 13 k bits of buffer memory.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each testbench
prints `TB_RESULT checks=N failures=M` and stops itself. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_uwb_piconet \
  rtl/mac_pkg.sv rtl/mac_link_if.sv $(ls rtl/*.sv | grep -v -e mac_pkg -e mac_link_if) \
  tb/tb_uwb_piconet.sv
./obj_dir/Vtb_uwb_piconet
```

`tb_uwb_piconet` runs the top at its default parameters for 24 superframes,
which takes a few seconds:
- every device streams MSDUs to its neighbour in its CTA;
- devices 1–3 send bursts of commands to the coordinator in the CAP.

A scoreboard checks that every MSDU and command confirmed as delivered
arrives intact at its destination, that no MSDU arrives twice, and that
nothing arrives that was never sent. The testbench also counts each mechanism and fails if any count
stays at zero:
- beacon set-up, fragmentation, CTA suspension;
- backoff suspension by a busy channel and by CAP end;
- collisions, ACK timeouts, retries, window growth;
- delay-bound expiry, and a clear from the upper layer.

`tb_uwb_piconet_impaired` runs the same traffic with two impairments:
- devices 1 and 3 are hidden from each other;
- 16 frames in 1024 are lost to noise.

It also checks that the hidden pair really overlapped and that noise
really dropped frames. A command whose ACK alone was lost can arrive twice,
because the MAC filters repeated fragments of a stream but not repeated
commands.

`tb_mac_device` runs one coordinator against a modelled peer with a shortened
superframe.

The simulator is two-state, so every register has a reset. The testbenches
count events only after reset.

## Where this design departs from 802.15.3 and from the reference stack

* **Channel.** The reference channel controller names noise and the
  hidden-node effect without defining them. Here noise is a fixed per-frame
  loss probability, and a hidden pair is a fixed "cannot hear" relation. No
  signal levels, distances or bit errors are modelled.
* **Beacon.** The beacon payload layout is this design's own, not the
  standard's information elements. The CTA schedule is a fixed parameter of the
  coordinator. CTA management (allocating channel time on request) and the
  information-element buffer are not built.
* **CTAs.** CTAs have equal lengths and are laid out back to back after the
  CAP. The standard gives each CTA its own start and duration.
* **Carrier sense.** In the reference stack, CAP control starts and ends a
  CCA measurement. Here CCA is a continuous busy level that CAP control reads
  every cycle.
* **Unbuilt links.** The reference stack also lets the stream output buffer
  and CTA management post requests into the command buffer. Those links are
  not built; commands come only from the upper-layer port.
* **Traffic split.** Streams use only CTAs, and commands use only the CAP.
* **Receive switching.** The reference stack switches the PHY between transmit
  and receive modes. Here the receiver is simply on whenever the device is not
  transmitting.
* **Arbitration.** The reference stack does not say how the CTA and CAP timing
  controls share send-and-wait, or how ACK, beacon and data share the
  transmitter. The arbiter and the fixed priorities are this design's own.
* **Fragments and defragmentation.** At most 16 fragments per MSDU.
  Defragmentation keeps one MSDU in progress per device.
* **Software platform.** The simulation platform around the MAC is software
  and not part of this RTL: the event queue, virtual devices, traffic feeder,
  the instruction set simulator and its shell. The testbenches take the place
  of the traffic feeder.
* **Unused signals.** Some status outputs are left unconnected at the top of a
  device, for example `in_sf`, the command buffer's count, the ACK responder's
  drop pulse and the defragmenter's discard pulse. They exist for debugging and
  for software that would read them.
