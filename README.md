# Ethernet-to-optical bridge with a processor port

This is a gigabit bridge between a copper Ethernet port and a point-to-point
optical link. It is the kind of bridge used for free-space or fibre links.
Frames that arrive on the Ethernet side go out on the optical side, and the
reverse. The bridge also has a second job: a soft processor (a MicroBlaze in
the original system) must be reachable over the same Ethernet port, so it
can run a small IP stack and report link statistics. It must not need a
second Ethernet MAC, and it must not take bandwidth from the bridged
traffic.

The design does this at the level of the MAC client interface:

- Frames from Ethernet whose destination MAC address equals a
  software-programmable register go to the processor instead of the optical
  link.
- Frames from the processor are merged into the Ethernet transmit stream
  whenever the optical side has nothing waiting.
- The processor reads and writes frames as ordinary memory, through the
  second port of a dual-port RAM.

```
            eth_clk                      sfp_clk
 Ethernet  ---W--> [ETH-SFP FIFO] --R(MAC compare)--> sfp_mac --> sfp_txd
 MAC client <--R-- [SFP-ETH FIFO] <--W--------------- sfp_mac <-- sfp_rxd
  (eth_*)      ^                      |
               |                      v
          [UB-ETH FIFO]          [ETH-UB FIFO]
               ^                      |             ub_clk
               +---- bram_controller -+---- dp_bram port A
                                               port B --> processor (ub_b_*)
```

`W` is a write-in state machine (`frame_writer`). `R` is a read-out state
machine: `eth_sfp_readout` toward the optical side, `sfp_eth_readout` toward
Ethernet. Everything in the diagram is in `rtl/`, and the top level is
`fso_bridge_top`. The parts outside it are brought out as ports:

- the copper PHY and the Ethernet MAC (a MAC with a byte-wide client
  interface);
- the optical transceiver and its serializer/deserializer;
- the processor and its bus.

## Clock regions

There are three clocks, and each one has its own synchronous active-low
reset:

| Clock | Domain |
|---|---|
| `eth_clk` | The Ethernet MAC client interface. At 125 MHz this is 1 Gb/s. |
| `sfp_clk` | The optical MAC. It handles one 10-bit code group per clock. |
| `ub_clk` | The processor and the RAM controller. |

All crossings happen inside the four frame FIFOs and in the MAC address
register:

| FIFO | Written in | Read in | Depth (entries) |
|---|---|---|---|
| ETH-SFP | eth_clk (Ethernet receive) | sfp_clk (optical transmit or to processor) | 4096 |
| SFP-ETH | sfp_clk (optical receive) | eth_clk (Ethernet transmit) | 4096 |
| ETH-UB | sfp_clk (routing decision) | ub_clk (RAM controller) | 2048 |
| UB-ETH | ub_clk (RAM controller) | eth_clk (Ethernet transmit) | 2048 |

An entry is a byte plus an end-of-frame flag (`eth_pkg::fifo_word_t`). The
two main-line FIFOs hold two maximum-size frames, so one frame can be read
out while the next is written. The processor FIFOs hold one frame. All
depths are parameters of `flow_controller` and `fso_bridge_top`
(`*_AW` = log2 depth).

## Frame FIFOs: nothing leaves until it is known to be good

The Ethernet MAC reports whether a frame was good (GF) or bad (BF) only
after the frame's last byte. For that reason, `async_frame_fifo` has two
write pointers:

- The **working pointer** advances with every byte written.
- The **committed pointer** is the only one the reader sees.

A `wr_commit` pulse copies the working pointer into the committed pointer.
It includes a byte written in the same cycle. A `wr_drop` pulse moves the
working pointer back to the committed pointer, so the partial frame
disappears without the reader ever seeing it.

Only the committed pointer crosses to the read clock. It crosses as a Gray
code through two flip-flops. The read pointer crosses back the same way for
the full flag. Reads are show-ahead: when `rd_empty` is low, `rd_data` is
the oldest committed byte, and `rd_en` consumes it. A committed frame
becomes visible three read-clock edges after the commit.

`frame_writer` drives the FIFO from the MAC client receive interface
(`rx_dv`, `rx_data`, `rx_good`, `rx_bad`). It holds each byte for one cycle,
because the last byte of a frame is only recognisable when GF arrives. On GF
it writes the held byte with the end flag and commits in the same cycle. It
drops the frame in two cases:

- on BF;
- when the FIFO was full for any byte of the frame, so an overflowing frame
  is never half-delivered.

In both cases the frame is counted in the statistics.

One consequence is that the bridge is store-and-forward. A frame's delay is
one frame time plus a few tens of clocks, and the read-out side can never
underrun the MAC it feeds.

## Routing Ethernet frames: header look-ahead

`eth_sfp_readout` waits for a committed frame in the ETH-SFP FIFO. It then
reads the first six bytes, which are the destination MAC address, into a
small buffer. `mac_compare` checks those bytes against the MAC address
register. The first byte on the wire is compared with register bits
[47:40]. One decision cycle later the frame goes one of two ways:

- **To the processor** if the address matches exactly. The six buffered
  bytes are written to the ETH-UB FIFO, and the rest of the frame is copied
  from the ETH-SFP FIFO behind them. If the ETH-UB FIFO fills up during the
  copy (the processor has not collected earlier frames), the frame is
  dropped there and the rest of it is still drained, so the main line is
  not blocked.
- **To the optical side** otherwise. The buffered bytes are replayed on the
  client transmit interface, and the rest of the frame follows from the
  FIFO.

The decision applies to the whole frame. A frame to the processor is not
copied to the optical link. A frame shorter than six bytes never matches.
Broadcast and multicast addresses get no special treatment, so they go to
the optical side.

The header phase takes 7 clocks. It overlaps the interframe gap of the
optical MAC, so it costs no bandwidth.

The client transmit interface behaves as follows, on both MACs:

1. `tx_dv` rises with the first byte.
2. That byte is held until the MAC answers with `tx_ack`.
3. From the next cycle on, one byte is presented per clock.
4. `tx_dv` falls after the last byte.

### MAC address register

`mac_addr_reg` is written from the processor clock (`ub_mac_wr_en`,
`ub_mac_wr_data`) and read back on `ub_mac_addr`. A toggle handshake
carries the new value into the clock of the compare unit. The 48 bits are
stable there when they are sampled, and the new address is in use three
destination-clock edges after the write. The value after reset is the
parameter `MAC_RESET` (02:00:00:00:00:01).

## Toward Ethernet: the optical line comes first

`sfp_eth_readout` feeds the Ethernet MAC from two FIFOs. At each frame
boundary it polls the SFP-ETH FIFO first, and it takes a processor frame
from UB-ETH only when SFP-ETH is empty. A frame is never interrupted. Each
time a waiting processor frame is passed over, the `ub_deferred` counter is
incremented.

Because both FIFOs only show complete frames, processor frames fit into the
gaps between optical frames. With a long unbroken optical stream, however,
they wait until the stream ends. Setting the parameter `FAIR = 1` replaces
strict priority with 1:1 alternation whenever both FIFOs have a frame. The
default is `FAIR = 0`, which gives strict priority.

## Processor port

The processor sees the frames in a 4 KB dual-port RAM, `dp_bram`:

- 1024 words of 32 bits.
- Byte write enables, with bit 3 for bits [31:24].
- Read-first behaviour and one-cycle read latency on both ports.

Port A belongs to `bram_controller`. Port B (`ub_b_*`) is the processor's
memory port, so frames are just memory to software. The RAM holds two
2 KB buffers:

| Bytes | Buffer |
|---|---|
| 0 - 2047 | receive buffer |
| 2048 - 4095 | transmit buffer |

Byte *i* of a frame is in word *i*/4, lane *i* mod 4, and lane 0 is bits
[31:24] (big-endian). The largest Ethernet frame, 1530 bytes, fits in one
buffer.

**Receive** (Ethernet to processor):

1. As soon as the ETH-UB FIFO holds a frame, the controller copies it into
   the receive buffer, one byte per clock.
2. After the last byte, `ub_rx_ready` rises; this is the receive interrupt.
   `ub_rx_len` gives the length.
3. The processor reads the frame through port B and pulses `ub_rx_ack`.
4. Only after the ack is the next frame copied in.

Bytes beyond 2048 are not stored, and `ub_rx_len` is capped at 2048.

**Transmit** (processor to Ethernet):

1. The processor writes a frame into the transmit buffer.
2. It drives `ub_tx_len` and pulses `ub_tx_ready`.
3. The controller reads the buffer word by word and pushes the bytes, with
   the last one flagged, into the UB-ETH FIFO. It waits whenever that FIFO
   is full.
4. It commits the frame and pulses `ub_tx_ack`. The buffer is then free for
   the next frame.

`ub_tx_busy` is high from the request to the ack. A transmit word read
takes port A for one clock, and a receive copy in progress waits for that
clock.

## Optical link

The optical side needs only framing, line coding and alignment. It needs
none of the address, pause or statistics functions of an Ethernet MAC.
`sfp_mac` provides exactly that. It has the same client interface as the
Ethernet MAC and one 10-bit code group per `sfp_clk` on `sfp_txd` /
`sfp_rxd`, with bit 9 (code bit *a*) first on the line.

**Transmit** (`sfp_mac_tx` and `enc_8b10b`). The framing is in the style of
1000BASE-X:

- Idle is sent as /I2/ (K28.5 D16.2), or as /I1/ (K28.5 D5.6) when the
  running disparity must be brought back to negative.
- A frame is sent as /S/ (K27.7), six preamble bytes 0x55, the delimiter
  0xD5, the client's bytes, /T/ (K29.7) and /R/ (K23.7). A second /R/ is
  added when needed, so that ordered sets start at even positions.
- A new frame waits for `IFG_MIN` (12) characters counted from /T/.
- No frame check sequence is added. The Ethernet FCS delivered by the MAC
  travels inside the frame, and link errors are caught by the 8b/10b code
  instead.

**Receive** (`comma_align`, `dec_8b10b` and `sfp_mac_rx`):

- `comma_align` keeps a 20-bit window of the two latest raw words and looks
  for the comma (0011111 or 1100000) at all ten offsets. From then on it
  cuts code groups at the offset of the last comma found. `sfp_aligned`
  rises with the first comma, and `sfp_realign_cnt` counts moves to a new
  offset.
- `dec_8b10b` decodes each group and flags code errors and running
  disparity errors separately.
- `sfp_mac_rx` finds /S/, skips the preamble up to 0xD5, passes data bytes
  on with `rx_dv`, and ends the frame at /T/ with a GF pulse. It gives a BF
  pulse instead if any character of the frame had a code or disparity
  error, or if a comma, an unexpected control character or a loss of
  alignment interrupted the frame.

The bad frame is then dropped by the SFP-side `frame_writer`, exactly like
a bad Ethernet frame.

The 8b/10b tables live in `code8b10b_pkg`. The encoder is written from
three small tables:

- the 5b/6b sub-block for the negative running disparity;
- the 3b/4b sub-block for data;
- the 3b/4b sub-block for control characters.

The rule of the code complements each sub-block when the disparity in
front of it is positive and the sub-block is unbalanced. A.7 replaces
P.7 for x = 17, 18, 20 at negative disparity, and for x = 11, 13, 14 at
positive disparity. The decoder inverts the same tables, so the two cannot
disagree.

Latency: a client byte appears on `sfp_txd` two clocks after it is
accepted. A code group on `sfp_rxd` reaches the client receive interface
four clocks later.

Throughput: with `sfp_clk` equal to `eth_clk`, the optical framing costs
about the same 20 characters per frame as Ethernet's preamble and
interframe gap. Occasionally one more character is needed for the even
alignment. Sustained minimum-gap Ethernet bursts are therefore carried at
line rate, and the ETH-SFP FIFO absorbs the odd extra character. A
2.5 Gb/s transceiver can also run `sfp_clk` faster than `eth_clk`, which
gives headroom.

## Top-level ports

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `eth_clk`, `sfp_clk`, `ub_clk` and the matching `*_rst_n` | in | 1 | clocks and synchronous active-low resets |
| `eth_rx_dv`, `eth_rx_data`, `eth_rx_good`, `eth_rx_bad` | in | 1, 8, 1, 1 | Ethernet MAC client receive (DV, data, GF, BF) |
| `eth_tx_dv`, `eth_tx_data` | out | 1, 8 | Ethernet MAC client transmit |
| `eth_tx_ack` | in | 1 | MAC took the first byte |
| `sfp_txd` | out | 10 | code group to the serializer |
| `sfp_rxd` | in | 10 | raw word from the deserializer (any alignment) |
| `sfp_aligned` | out | 1 | receive alignment found |
| `ub_b_en`, `ub_b_we`, `ub_b_addr`, `ub_b_din` | in | 1, 4, 10, 32 | RAM port B, processor side |
| `ub_b_dout` | out | 32 | RAM port B read data |
| `ub_rx_ready`, `ub_rx_len` | out | 1, 12 | receive interrupt and length |
| `ub_rx_ack` | in | 1 | receive buffer released |
| `ub_tx_ready`, `ub_tx_len` | in | 1, 12 | transmit request and length |
| `ub_tx_ack`, `ub_tx_busy` | out | 1, 1 | transmit buffer released, copy in progress |
| `ub_mac_wr_en`, `ub_mac_wr_data` | in | 1, 48 | MAC address register write |
| `ub_mac_addr` | out | 48 | MAC address register read-back |
| `stats` | out | `flow_stats_t` | ten 16-bit frame counters: received/dropped per side, routed, merged, deferred |
| `sfp_frames_sent`, `sfp_char_errors`, `sfp_realign_cnt` | out | 16, 16, 8 | optical link counters |

The `stats` counters are in the clock of the block that counts them:

| Clock | Counters |
|---|---|
| eth_clk | `eth_rx_*`, `from_*`, `ub_deferred` |
| sfp_clk | `sfp_rx_*`, `to_*`, `ub_dropped` |

They are meant for observation, not for logic in another domain.

## Parameters of `fso_bridge_top`

| Parameter | Default | Meaning |
|---|---|---|
| `ETH_SFP_AW`, `SFP_ETH_AW` | 12 | log2 depth of the main-line FIFOs |
| `ETH_UB_AW`, `UB_ETH_AW` | 11 | log2 depth of the processor FIFOs |
| `BRAM_AW` | 10 | word address width of the dual-port RAM (two 2 KB buffers) |
| `FAIR` | 0 | 0: optical frames strictly first; 1: 1:1 alternation |
| `IFG_MIN` | 12 | minimum gap between optical frames, in characters |
| `MAC_RESET` | 02:00:00:00:00:01 | MAC address after reset |

Coarse synthesis of the top at these defaults gives about 1400 cells and
1000 flip-flops, plus 143,552 bits of memory. The memory is the four FIFOs
and the RAM. The FIFO arrays are read asynchronously (show-ahead), so they
map to distributed RAM, or to block RAM with an output register added.

## Where the design goes beyond its source

The original system description fixes the following:

- the block structure and the four FIFOs;
- routing by destination MAC address;
- the software-writable MAC register;
- the optical-first merge, with 1:1 aggregation as an option;
- the 2 KB per-direction RAM and its ready/ACK handshakes;
- the fact that the optical MAC is reduced to synchronisation and 8b/10b.

Everything below is this design's own choice:

- the FIFO depths and the clock that runs each FIFO side;
- the commit/drop mechanism;
- dropping frames on FIFO overflow;
- the header look-ahead;
- the RAM layout, the byte order and the length registers;
- the optical framing characters and the interframe gap;
- the alignment method;
- the statistics counters.

Points to be aware of:

- The optical link has no frame check sequence of its own. It relies on
  8b/10b code and disparity errors. An error that turns one valid code
  group into another valid one with the right disparity is not detected
  here. It is still caught by the Ethernet FCS at the final receiver.
- There is no clock-tolerance compensation on the optical receive side.
  `sfp_rxd` must already be in the `sfp_clk` domain; the recovered clock
  and any idle insertion or removal are handled outside.
- Frames longer than the receive buffer are truncated in the buffer, as
  described above.
- Simultaneous writes to the same RAM word from both ports are not
  arbitrated. The controller and the software use separate buffers at any
  given time.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_codec_8b10b` | Encoder output against the code tables in both disparities. Round trip of all 256 data and 12 control characters. Rejection of invalid groups and of disparity errors. |
| `tb_comma_align` | Alignment at every bit offset. Realignment after a slip. |
| `tb_async_frame_fifo` | Random commit/drop traffic across unrelated clocks against a reference queue. Full and empty behaviour. |
| `tb_frame_writer` | Good, bad and overflowing frames against a model. |
| `tb_mac_compare` | Random and near-miss addresses, short headers. |
| `tb_mac_addr_reg` | Value and latency of the clock crossing. |
| `tb_eth_sfp_readout` | Routing and byte-exact forwarding. ETH-UB overflow. Transmit handshake timing. |
| `tb_sfp_eth_readout` | Strict priority and 1:1 alternation. |
| `tb_dp_bram` | Both ports, byte enables, read-first behaviour. |
| `tb_bram_controller` | Receive and transmit handshakes. Buffer contents. Stall on a full FIFO. |
| `tb_sfp_mac` | Loopback through a bit-shifted line. Framing, interframe gap, bad-frame reporting. |
| `tb_flow_controller` | The four paths together on three clocks. |
| `tb_fso_bridge_top` | The whole bridge at its default parameters. See below. |

`tb_fso_bridge_top` surrounds the bridge with the following models:

- an Ethernet MAC client model;
- a processor model that serves the receive interrupt through RAM port B and
  sends frames through the transmit buffer;
- a second `sfp_mac` as the far end of the optical link, with the line
  shifted by 7 bits.

It checks that every frame arrives byte-exact on the right side. It also
checks that each mechanism happens at least once:

- a bad frame dropped;
- a processor frame deferred behind optical traffic, and never started while
  optical frames were waiting;
- ETH-UB overflow;
- a transmit stalled on a full UB-ETH FIFO;
- a MAC register rewrite;
- code-group alignment;
- a line error reported as a bad frame.

Finally, it checks that a burst of twenty 1000-byte frames crosses from
Ethernet to optical at one byte per clock. The measured figure is 1019
clocks per frame.

To run a testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/eth_pkg.sv rtl/code8b10b_pkg.sv tb/tb_fso_bridge_top.sv \
    --top-module tb_fso_bridge_top -o sim
./obj_dir/sim
```

The other testbenches run the same way. Replace the last file and the top
module name. `tb_fso_bridge_top` finishes in a few seconds.
