# reliable_link: a lossless packet link over Gigabit Ethernet for an FPGA

A host computer and an FPGA can exchange data over Ethernet at up to
1 Gbit/s per direction. But Ethernet delivers frames on a best-effort basis.
A frame can arrive corrupted, and the MAC then flags it as bad. A frame can
also disappear, and a receiver that is not keeping up can miss one.
`reliable_link` is the FPGA end of a link that hides all of this from the
application. Each side hands over fixed-size packets, and the other side gets
them exactly once, in order and intact, in both directions at the same time.

The design sits between two interfaces:

- **The client interface of an Ethernet MAC.** This is the embedded
  tri-mode MAC of a Xilinx Virtex-5 or anything with the same signals. The
  MAC checks and appends the FCS, pads short frames and drives the PHY. Those
  parts are not in this design.
- **An upper layer.** The application writes outgoing packets into a
  transmit buffer and reads incoming packets from a receive buffer.

Between the two there are three layers:

- **Network layer (`rx_link`, `tx_link`, `magic_packet`).** It turns the
  MAC's byte streams into requests to the ARQ and back. It filters out
  frames that do not belong to the link. It builds outgoing frames. It lets a
  host register itself and reset the link remotely.
- **Sliding-window ARQ (`arq_master`, `arq_target`).** ARQ means automatic
  repeat request. It numbers packets, acknowledges them, resends lost ones
  and delivers them in order.
- **Packet buffers (`packet_buffer`, used twice).** These are the only place
  where payload is stored. The ARQ only moves pointers to buffer slots; it
  never copies data.

The receive and transmit halves of the MAC run on separate, unrelated clocks.
The design keeps the two halves apart and lets only a few words cross between
them.

## Frame format

Every link frame is an ordinary Ethernet II frame. The link adds a 3-byte
header in front of the payload:

| byte   | field       | content                                                        |
|--------|-------------|----------------------------------------------------------------|
| 0–5    | destination | the registered host (outgoing); not checked (incoming)         |
| 6–11   | source      | `LOCAL_MAC` (outgoing); must equal the registered host (incoming) |
| 12–13  | Type        | `0x8899`                                                       |
| 14     | SEQ         | sequence number of the packet (0 in an ACK-only frame)         |
| 15     | ACK         | cumulative acknowledgement: last SEQ received in order          |
| 16     | seqv        | `0x01` data frame, `0x00` ACK-only frame                       |
| 17…    | payload     | exactly `PACKET_SIZE` bytes (data frames only)                 |

- Multi-byte fields go out most significant byte first.
- SEQ and ACK are 8 bits. Two sequence numbers are told apart modulo 256, so
  the window can be at most 127 packets. The least the scheme needs is a
  number range of 2·window+1, so the default window of 16 has plenty of
  margin.
- An ACK-only frame is 17 bytes long. The MAC pads it to the 60-byte minimum.
- A data frame carries an ACK number too. In a busy full-duplex link most
  acknowledgements therefore ride on data frames.

A second frame type controls the link. The **magic packet** has Type
`0x0F0F`, and the first five payload bytes (frame bytes 14–18) are the ASCII
codeword `RESET` (`52 45 53 45 54`). It is described below.

## Receive path: deciding while the frame streams in

The MAC receive interface cannot be stalled. A frame arrives one byte per
clock while `dvld` is high. One cycle after the last byte, `goodframe` or
`badframe` reports the FCS verdict. `rx_link` never buffers a frame. It
decides what to do with a frame while the frame is still arriving, driven
by a byte counter:

1. **Bytes 0–13.** The header is sampled into registers.
2. **Bytes 14–15.** SEQ and ACK are sampled. By byte 15 the filter has
   decided: the source address must be the registered host and the Type must
   be `0x8899`. A frame that fails is ignored until it ends (`SLEEP`). The
   ARQ never hears of it.
3. **Byte 16 (seqv).**
   - For an ACK-only frame, `rx_link` just waits for the verdict
     (`WAIT_CRC`).
   - For a data frame, `rx_link` raises `tgt_valid` with the SEQ number for
     one cycle (`REQUEST`). The target must answer in the next cycle
     (`WAIT_NEXT`).
4. **The target's answer.**
   - `write` with a slot number on `writebuf`: the payload goes into that
     slot (`WRITING`), byte 17+k to position k.
   - `drop`, or no answer at all: the payload is discarded. The frame's ACK
     number is still used.
5. **The FCS verdict** (`WAIT_CRC`).
   - On `goodframe`, the frame's ACK number goes to the ARQ master.
     For a data frame that was written completely, `tgt_writenext` pulses and
     the target commits the slot.
   - On `badframe`, or if the frame was too short, nothing reaches the ARQ.
     The half-written slot is simply overwritten later.

The payload passes through a one-byte delay register. The byte that arrives
while the target is being asked is therefore written too, and the write
enable can depend on the target's answer in the same cycle.

Because a slot only counts as received after `writenext`, a corrupted frame
leaves no trace in the ARQ state. Only its bytes sit in a slot that is still
free. This request-then-commit split is the core of the receive side.

## Transmit path: two state machines and a multiplexer

`tx_link` has a transmitter FSM that talks to the ARQ and the MAC. It has a
framebuilder FSM that selects what goes on the byte bus. Both are stepped by
one byte counter.

- **Transmitter FSM.**
  - `READY` waits for a request. The master's `m_valid` asks for a data
    frame. A pending ACK request from the target asks for an ACK-only frame.
  - On a request it latches SEQ, ACK number and destination, raises
    `tx_dvld` and presents the first byte.
  - `WAIT_FOR_ACK` holds that first byte until the MAC answers `tx_ack`.
    The MAC answers once the wire is free.
  - `WRITE` then sends one byte per clock.
  - `DELAY` drops `tx_dvld` for one cycle. For a data frame it pulses
    `m_next` to close the session with the master.
- **Framebuilder FSM.** It walks through header, SEQ, ACK, seqv and payload.
  The payload comes from the transmit buffer slot that the master names on
  `readbuf`. The buffer has one cycle of read latency, so the read position
  is issued one byte ahead.

When the master and the target ask at the same time, a data frame goes out.
It carries the current ACK number, so the target's request is answered too.

**Timing.** A data frame occupies the MAC interface for
1 + 17 + `PACKET_SIZE` + 1 cycles after `tx_ack`, and an ACK-only frame for
19. At 125 MHz that is line rate. With the Ethernet preamble, FCS and
inter-frame gap added, a 1500-byte packet uses 1541 byte times on the wire.
That leaves about 121 MB/s of payload per direction.

## The ARQ

### Master: sending with a window

`arq_master` keeps a window of up to `WINDOW` packets, starting at `base`,
the oldest packet not yet acknowledged. Three counters describe the window:

| counter | meaning                                                    |
|---------|------------------------------------------------------------|
| `fill`  | packets written by the upper layer                          |
| `sent`  | packets sent in the current round                           |
| `hi`    | packets sent at least once (`hi` can be larger than `sent`) |

While `fill < WINDOW` the master shows the upper layer the next free slot
(`ul_ready`, `ul_slot`).

While a written packet is unsent, the master raises `valid` with its SEQ
number and slot. It waits as long as it takes for `next`, with no time
limit.

ACK numbers are cumulative. An ACK number `a` retires every packet from
`base` to `a`, as long as `a` lies among the `hi` packets sent so far.
Retiring packets frees their slots. A lost ACK therefore costs nothing once
a later one arrives.

There is one timer of `MASTER_TIMEOUT` cycles. It covers the oldest
outstanding packet: it starts when something is outstanding and restarts
whenever an ACK moves `base`. When it expires, the master goes back to
`base` and sends every outstanding packet again ("go back to base"). A
request that is already with `tx_link` is finished first.

During such a resend round an ACK can arrive for a packet that was sent
earlier but not yet resent. `hi` makes sure that ACK is still accepted.

### Target: receiving, ordering and acknowledging

`arq_target` answers each request one cycle later:

- **write** when the SEQ number lies in the receive window and that slot
  has not been received. The slot is chosen by SEQ number, so packets that
  arrive out of order inside the window are kept.
- **drop** for a duplicate.
- **drop** for a packet ahead of the window. The target then asks at once
  for an ACK-only frame. That tells the far master where the receiver
  stands.

Each slot has a received bit, which `writenext` sets. `exp_seq` advances
over consecutive received packets. `ack_num = exp_seq − 1`, and
`ack_update` pulses whenever it moves.

The upper layer sees the oldest packet as soon as it is received
(`ul_valid`, `ul_slot`). Its `ul_done` frees the slot and moves the window.
So the window is limited by what the upper layer has not read yet.

A timer of `TARGET_TIMEOUT` cycles starts when a packet is committed while
no timer runs. A duplicate also starts it, because a duplicate means the
sender missed an ACK. When the timer expires, the target asks for an
ACK-only frame. An acknowledgement therefore never waits longer than that,
even when there is no data to piggyback it on.

The timer starts at the commit, not at the request, on purpose. The request
comes at byte 17 of a frame. A timer started there can expire while the
payload is still arriving, and the ACK-only frame then carries the old
number. With a window of one packet nothing else would send the new number,
and every packet would wait for the master's timeout.

### Choosing the timeouts

- **Target timeout.** It should be a few hundred cycles. An ACK-only frame
  costs about 60 byte times on the wire. Waiting much longer holds up the
  far master, whose window only moves on ACKs.
- **Master timeout.** It only matters when a frame is really lost. It must
  be longer than the time an ACK can take to come back. That time is about
  window × packet size byte times: 24000 cycles (192 µs) at the defaults.
  The default of 125000 cycles (1 ms) also leaves room for a host whose
  software reacts in milliseconds.

## Packet buffers

`packet_buffer` holds `WINDOW` slots of `PACKET_SIZE` bytes. Byte P of slot
W is at address W·`PACKET_SIZE` + P.

| port  | width                    | used by                                  |
|-------|--------------------------|------------------------------------------|
| `net` | one byte                 | the network layer                        |
| `ul`  | `UL_BYTES` bytes per word | the upper layer; byte k of word P is at position `UL_BYTES`·P + k |

- Each port has its own clock.
- Reads take one cycle, like a block RAM.
- The memory is a word array with byte-lane writes, so synthesis maps it to
  dual-port block RAM.
- `NET_WRITES=1` makes it the receive buffer: the network writes, the upper
  layer reads.
- `NET_WRITES=0` makes it the transmit buffer: the upper layer writes, the
  network reads.
- `PACKET_SIZE` must be a multiple of `UL_BYTES`.

At the defaults each buffer holds 16 × 1500 = 24000 bytes. Yosys maps the
whole top to 384000 bits of buffer memory plus the loopback store.

## Clock domains

The receive half runs on `rx_clk`:

- `rx_link`, `magic_packet`, `arq_target`
- the receive buffer
- the upper layer's receive port

The transmit half runs on `tx_clk`:

- `arq_master`, `tx_link`
- the transmit buffer
- the upper layer's transmit port

The following information crosses between them:

| what                                                         | from → to                 | how                                      |
|--------------------------------------------------------------|---------------------------|------------------------------------------|
| ACK numbers from received frames                             | `rx_link` → master        | `cdc_word_sync`                          |
| the target's ACK number, with a sticky flag for "ACK-only frame wanted" | target → `tx_link` | `cdc_word_sync` (reset value 255, matching a freshly reset target) |
| the registered host address                                  | `magic_packet` → `tx_link` | `cdc_word_sync`                         |
| the magic packet's ARQ reset                                  | → master                  | two-flip-flop synchroniser               |

`cdc_word_sync` is a toggle request/acknowledge handshake. The source keeps
the newest word and ORs flags together while a transfer is in flight. No
update is lost, though intermediate values can be skipped. Skipping is
harmless for cumulative ACK numbers and for an address.

Each domain has its own synchronous, active-high reset. Assert both together
at power-up.

## Magic packet: registering the host

After power-up the link accepts frames only from `DEFAULT_HOST_MAC` and sends
to it. A host takes over the link by sending a magic packet. `magic_packet`
watches every frame, also frames the filter rejects. When Type and codeword
match:

- The ARQ reset goes high from the cycle after the last codeword byte until
  the frame ends. It resets both the target and, through a synchroniser, the
  master.
- After `goodframe`, the frame's source address becomes the host address.
  From then on it is both the filter and the destination of all frames, and
  `host_update` pulses.

A magic packet with a bad FCS still resets the ARQ, because the reset has
started before the verdict is known. It does not change the host.

## Loopback mode

With `loopback_en` high, the upper-layer ports are cut off and a `loopback`
unit becomes the application. `loopback_en` is a receive-domain input, and it
is synchronised into the transmit domain. The loopback unit:

1. Reads each received packet into its own memory of
   `PACKET_SIZE/UL_BYTES` words.
2. Writes the packet into a free transmit slot.

It holds one packet at a time. A packet therefore spends at least four
packet lengths in the loop: received, read, written, sent. A host can send a
file, let the FPGA echo it and compare the result. This checks ordering and
integrity end to end with no application logic on the FPGA. Change
`loopback_en` only while the link is idle.

## Parameters of `reliable_link`

| parameter          | default                  | meaning |
|--------------------|--------------------------|---------|
| `PACKET_SIZE`      | 1500                     | payload bytes per packet, fixed for the link |
| `WINDOW`           | 16                       | slots per buffer = ARQ window (1..127) |
| `UL_BYTES`         | 4                        | upper-layer word width in bytes |
| `MASTER_TIMEOUT`   | 125000                   | resend timeout in `tx_clk` cycles (1 ms at 125 MHz) |
| `TARGET_TIMEOUT`   | 500                      | delay before an ACK-only frame, `rx_clk` cycles |
| `LOCAL_MAC`        | `48'h02_00_00_00_00_A5`  | source address of outgoing frames |
| `DEFAULT_HOST_MAC` | `48'h02_00_00_00_00_01`  | host accepted before the first magic packet |

Both ends of a link must agree on `PACKET_SIZE` and `WINDOW`.

### Upper-layer protocol

- **Transmit (`tx_clk`).**
  1. Wait for `ul_tx_ready`.
  2. Write the packet's `PACKET_SIZE/UL_BYTES` words with
     `ul_tx_we`/`ul_tx_pos`/`ul_tx_wdata`, in any order.
  3. Pulse `ul_tx_done` for one cycle.
- **Receive (`rx_clk`).**
  1. Wait for `ul_rx_valid`.
  2. Read words by `ul_rx_pos`. Each word appears on `ul_rx_rdata` one cycle
     later.
  3. Pulse `ul_rx_done` for one cycle.

The slot number is handled inside the design.

## Files

| file | content |
|---|---|
| `rtl/link_pkg.sv` | frame constants (types, header sizes, codeword, seqv values), `mac_rx_t` |
| `rtl/reliable_link.sv` | top level |
| `rtl/rx_link.sv`, `rtl/tx_link.sv` | network layer, receive and transmit |
| `rtl/magic_packet.sv` | host registration and remote ARQ reset |
| `rtl/arq_master.sv`, `rtl/arq_target.sv` | sliding-window ARQ |
| `rtl/packet_buffer.sv` | dual-port, dual-clock slot buffer |
| `rtl/cdc_word_sync.sv` | word handshake between clock domains |
| `rtl/loopback.sv` | echo upper layer for testing |
| `tb/*_tb.sv` | one self-checking testbench per block |
| `tb/reliable_link_tb.sv` | two linked ends at reduced sizes |
| `tb/reliable_link_full_tb.sv` | the same test with every parameter at its default |
| `tb/link_channel.sv` | lossy channel model standing in for MAC, PHY and cable |
| `tb/ul_writer.sv`, `tb/ul_reader.sv` | upper-layer models that write and check numbered packets |
| `tb/reliable_link_perf_tb.sv`, `tb/perf_pair.sv` | throughput over window and packet sizes |
| `tb/reliable_link_stress_tb.sv` | long lossy runs over a sweep of windows and timeouts |

## Simulating

Every testbench is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. Using Verilator 5:

```sh
tb=reliable_link_tb            # or any other tb/*_tb.sv
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module $tb -Mdir obj_$tb -y rtl -y tb +libext+.sv \
  rtl/link_pkg.sv tb/$tb.sv
./obj_$tb/V$tb
```

Verilator finds the other modules in `rtl/` and `tb/` by their file names.
With `--assert`, assertions also check three handshakes in every run:

- the master's send request to `tx_link` holds until `next`;
- the target answers each request in the next cycle;
- `tx_link` holds `tx_dvld` and the first byte until `tx_ack`.
The testbenches reset everything they read, so they also pass with
`+verilator+rand+reset+2`.

### The end-to-end test

The end-to-end testbenches connect two `reliable_link` instances, A and B,
through two `link_channel` models. All four clocks are unrelated. Each
channel:

- answers `tx_dvld` after a random busy time;
- pads frames to 60 bytes;
- corrupts some frames (delivers them with `badframe`);
- loses some frames entirely.

The test runs in this order:

1. Both ends start unregistered, so the first peer frame is filtered.
2. A magic packet to each end registers the peers.
3. Both ends stream packets at the same time. B's reader stalls for a while,
   so A's window fills and A's master runs ahead of B's receive window.
4. A foreign frame is injected.
5. B switches to loopback mode and echoes packets that A writes and then
   checks.

The test counts each of these mechanisms and fails if any count is zero:

- filtered frames
- magic packets and ARQ resets
- corrupted and lost frames
- master timeouts
- duplicates dropped
- frames ahead of the window
- ACK-only frames
- ACKs that retire packets
- full transmit window
- busy MAC
- looped packets

`reliable_link_full_tb` runs this test with every parameter at its default
(1500-byte packets, window 16, 1 ms resend timeout). It takes a few seconds.

### Throughput

`reliable_link_perf_tb` measures throughput. It builds one pair of ends per
configuration, joined by a channel that loses nothing. The upper layers are
fast enough not to slow the link. All clocks run at 125 MHz. The rate is
payload delivered to the receiving upper layer:

| configuration                         | MB/s per direction |
|---------------------------------------|--------------------|
| window 16, 1500 B, both directions    | 117.2              |
| window 16, 1500 B, one direction only | 122.5              |
| window 1 / 2 / 8 / 32, 1500 B, both   | 46.8 / 56.8 / 117.3 / 117.1 |
| 64 / 3000 / 5000 / 7200 B, window 16, both | 74.1 / 121.0 / 122.6 / 123.3 |
| window 16, 1500 B, far end in loopback mode | 116.8 (echoed packets) |

The channel model delivers at most 1500/1530 of the byte rate: 17 header
bytes, one status cycle and a 12-byte gap per frame. That limit is
122.5 MB/s, which the one-way case reaches.

In full duplex the default ACK timer (500 cycles) is shorter than a frame.
So ACK-only frames slip in between data frames, at about 74 byte times each.
That is where the difference between 117 and 122 MB/s goes. A longer target
timeout lets the ACKs ride on data frames instead.

Small windows are slow. A window of one packet is stop-and-wait: the sender
idles until its packet has been acknowledged.

In loopback mode the echo adds latency to each packet. Reading it out of
the receive buffer takes PACKET_SIZE/4 + 1 cycles, and writing it into the
transmit buffer takes PACKET_SIZE/4 more, since the upper-layer port is four
bytes wide. Together that is about half the time the packet spends on the
wire. Packets stream through the window, so this latency costs little
throughput. A slow upper layer at the sending end costs far more.

The test fails unless:

- full duplex exceeds 100 MB/s in each direction;
- one-way exceeds 120 MB/s;
- no rate exceeds the line rate;
- window 1 is slower than window 16;
- every echoed packet comes back intact, no faster than one-way streaming.

### Stress over timeouts

The original link had one known fault that was never explained. After a
few seconds, the sending window of one end and the receiving window of the
other could disagree about the last acknowledged packet. That direction then
stopped for good. Whether it happened depended on the timeout settings, and
a change of a few percent made it go away.

`reliable_link_stress_tb` looks for this fault. It runs eight pairs of ends
in full duplex with 200 to 300 packets each way. The channels corrupt and
lose data and ACK-only frames at random: 3 % each, and 10 % each in one
pair. The pairs differ in window (1 to 16), packet size (64 or 256 bytes),
ACK timeout, resend timeout and seed. Two pairs differ only by 3 % in both
timeouts.

Every pair must deliver every packet intact, in order and once, in both
directions. A link that stopped would leave its pair unfinished, and the
watchdog would name it. No pair has stopped. A resend here always restarts
at the oldest unacknowledged packet. ACK numbers are cumulative and are
used only from frames with a good FCS. So the two windows can only
disagree for as long as ACKs keep being lost.

### Block testbenches

The block testbenches check:

- cycle-level behaviour: the one-cycle target answer, one byte per cycle on
  the MAC, arq_rst lasting length − 18 cycles, the exact timer expiry;
- edge cases: short and corrupted frames, wrong codewords, sequence-number
  wrap-around, ACKs during a resend round.

## Departures from the original design and limits

The original design (a Virtex-5 implementation described in a 2014 thesis)
reused an existing ARQ core and a reference packet buffer and described
only their interfaces and behaviour. So `arq_master`, `arq_target` and
`packet_buffer` here are independent implementations of that behaviour:

- go-back-to-base resend with one timer;
- received bits per slot;
- request-then-commit on the receive side.

The network layer follows the original structure closely: the same states,
a counter-driven receive FSM and two FSMs on the transmit side. It differs
in these points:

- **Two extra receive states.** `REQUEST` and `WAIT_NEXT` give the target
  its one-cycle answer explicitly. A target that does not answer in time
  makes the frame be dropped, as in the original.
- **ACK numbers only after a good FCS.** The original could pass an
  ACK-only frame's number to the master as soon as the frame was recognised.
  Here every ACK number waits for `goodframe`, so a corrupted number is never
  used.
- **Magic-packet codeword.** It is compared byte by byte as it arrives, not
  collected into a small memory first. The result is the same.
- **Choices the original leaves open.** The clock-domain crossings, seqv
  encoding, byte order, MAC addresses, upper-layer word width and timeout
  values are this design's own.
- **Loopback as a mode.** Loopback is a mode of the top, not a separate
  build.

Limits:

- Packet size and window are fixed at elaboration. Every data frame carries
  exactly `PACKET_SIZE` bytes.
- The buffers are plain inferred memory. Buffers for large packets
  (7200 bytes × 16) are large.
- SEQ and ACK are one byte each, so `WINDOW` ≤ 127.
- The design has not been run on hardware or against the host-side software
  of the original link. It has only been checked in simulation, with the
  channel model standing in for MAC, PHY and host.
