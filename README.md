# Hardware accelerators for a 5G edge node

A 5G edge node sits between the radio access network and the core. It runs
latency-critical work close to the users: part of the baseband processing
of the distributed unit (DU), packet switching with security functions,
and application processing on packet streams. This RTL holds three
accelerators of such a node. They do not share data and sit side by side
in one top module, `edge5g_top`:

| Part | What it does | Top-level ports |
|------|--------------|-----------------|
| DU downlink OFDM chain | expands A-law compressed I/Q sub-carriers, runs the inverse FFT of one OFDM symbol, prepends the cyclic prefix | `du_*` |
| SYN-flood switch | match-action switch that forwards IPv4 traffic and drops TCP port scans on monitored IP sessions | `sw_*` |
| Processing-function (PF) pipeline | two input pipelines of token-bucket DDoS filters, a slot for an image-processing function, a shared MAC learning switch and four output queues, all set up by a host over AXI4-Lite | `pf_*` |

All three are synchronous to one clock `clk` with an active-low
asynchronous reset `rst_n`. Streams use valid/ready handshakes. A value
moves when both are high on a rising edge.

## Top level: `edge5g_top`

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `OFDM_N` | 4096 | OFDM symbol size (number of sub-carriers), a power of two |
| `OFDM_CP` | `OFDM_N*5/64` = 320 | cyclic-prefix length in samples |
| `IPM_ENTRIES` | 10000 | monitored IP sessions in the SYN-flood switch |
| `FWD_ENTRIES` | 64 | forwarding-table entries in the SYN-flood switch |
| `PF_IN`, `PF_OUT` | 2, 4 | input pipelines and output ports of the PF pipeline |

`OFDM_CP = N*5/64` gives every row of the 5G numerology: 128→10, 256→20,
512→40, 1024→80, 2048→160, 4096→320 and 8192→640.

Packet streams carry the struct `net_pkg::axis_beat_t`. It holds 256 bits of
`tdata`, 32 bits of `tkeep` and `tlast`. Byte 0 of a frame (the first
byte on the wire) is `tdata[7:0]`. Every packet starts in a new beat.

The pedestrian-detection function, the Ethernet MACs, PCIe/DMA and the
radio front end are not part of the RTL. The image-processing slot of
each PF pipeline is brought out as a pair of streams: `pf_pd_m_*` leaves
the DDoS filters and `pf_pd_s_*` goes back to the switch. Tie each
`pf_pd_m_*` to its `pf_pd_s_*` to bypass the slot.

## DU downlink: A-law → iFFT → cyclic prefix (`ofdm_du_dl`)

```
 8-bit A-law I,Q ─► alaw_expand ─► ifft_core (INVERSE=1) ─► cp_insert ─► 16+16-bit I/Q
  (N per symbol)     1 cycle        load / compute / unload   fill / play   (N+M per symbol)
```

**A-law expansion (`alaw_expand`).** It decodes each 8-bit G.711 A-law code
into a 16-bit signed sample. First the even bits are inverted. Bit 7 is
then the sign, with 1 meaning positive. Bits 6:4 are the segment and
bits 3:0 the mantissa. The magnitude is `16m+8` in segment 0 and
`(16m+264) << (s-1)` above it. The largest magnitude is 32256. The unit
has one register stage, so it adds one cycle.

**Inverse FFT (`ifft_core`).** The inverse transform is made from a forward
transform. The core conjugates each sample on the way in, runs an integer
radix-2 decimation-in-time Cooley–Tukey FFT, and conjugates the results on
the way out. `INVERSE=0` leaves out both conjugations and gives a forward
FFT, for an uplink. The core is one small engine that works in three
phases over a single symbol memory of N complex words:

1. *Load*, N cycles. Sample k is written to the bit-reversed address of k.
   This splits the input into single points.
2. *Compute*, (N/2)·log2 N cycles. One butterfly per cycle, in place,
   stage by stage. In stage s the butterfly with index j pairs the
   addresses `a = ((j>>s)<<(s+1)) | pos` and `a + 2^s`, where
   `pos = j mod 2^s`. It uses twiddle `W^(pos·N/2^(s+1))`.
3. *Unload*, N accepted cycles. The results leave in natural order.
   `out_last` marks sample N-1.

The twiddles are `round(32767·cos)` and `round(32767·sin)` of
`2πk/N` for k < N/2, in Q1.15. They are computed at elaboration by a
constant function, so there is no ROM file. Each butterfly forms
`t = b·W` with rounding (`+2^14 >>> 15`). It then outputs `(a+t)/2` and
`(a−t)/2`, each with rounding and saturation. Halving in every stage
scales the result by 1/N. The inverse output is therefore the normalised
IDFT `x[n] = (1/N)·Σ X[k]·e^{+j2πkn/N}`, which cannot overflow 16 bits.
The cost is about log2 N / 2 bits of precision over all stages.
The testbenches accept ±4 LSB against a real-valued DFT.

At N = 4096 one symbol takes 4096 + 24576 + 4096 cycles. The core takes
a new symbol only after the last output of the previous one has left.
`fft_busy` is high during the compute phase. This engine is built for
small area, not for throughput. See *Departures* below.

**Cyclic prefix (`cp_insert`).** The block stores the N time-domain samples
of a symbol in a buffer. It then reads them back from address N−M,
wrapping past N−1 to 0, for N+M samples. The output is
`x[N−M..N−1], x[0..N−1]`. `out_first` marks the first prefix sample and
`out_last` the last sample of the symbol.

## SYN-flood switch (`p4_synflood_switch`)

This switch is a parser / match-action / deparser pipeline, the structure
of a P4 program on a programmable data plane. The program forwards IPv4
traffic and defends the servers behind it against TCP SYN floods and port
scans. The security controller chooses which (source, destination) address
pairs to watch. For each watched pair the data plane keeps per-session
state and drops the attack in hardware, at line rate.

```
          ┌──────────── packet beat FIFO (FIFO_BEATS) ────────────┐
s_* ─────►│                                                        ├──► release / discard ─► m_*, m_tdest
          └─► hdr_parser ─► forwarding CAM (ip_dst → port)         │          ▲
                         └► IP match CAM ({ip_src,ip_dst} → idx) ─► synflood_guard ─► decision FIFO
```

- **Parser (`hdr_parser`).** It snoops the accepted beats and collects the
  first 64 bytes of each packet. One cycle after the second beat (or after
  the only beat) it presents the Ethernet addresses and type, the IPv4
  addresses, and the TCP ports and flags. IPv4 is recognised by type
  0x0800 and a version/IHL byte of 0x45. TCP is recognised by protocol 6.
  Fields of absent headers read as zero.
- **Tables (`flow_cam`).** Both tables are fully associative. Every entry
  is compared in one cycle, and the lowest matching index wins. The
  control plane writes entries through `fwd_wr_*` and `ipm_wr_*`. A
  forwarding miss, or a non-IP frame, goes to `default_port`.
- **Session state and decision (`synflood_guard`).** Each IP-match entry
  has two registers: `last_port`, the destination port of the last SYN,
  and `attempts`. A *SYN* is a TCP segment with SYN set and ACK clear.
  For a SYN that hits a monitored session:

  ```
  attempts  := (dport == last_port + 1) ? attempts + 1 : 1
  last_port := dport
  drop      := attempts > threshold
  ```

  With a threshold of 3, a scan of ports 81, 82, 83, 84, … lets 81–83
  through and drops every port from 84 on. Other traffic is never
  dropped. The registers keep counting while packets are dropped, so a
  scan that keeps going stays blocked. A scan that jumps to a
  non-consecutive port starts again at 1. Writing an IP-match entry clears
  its two registers. The registers have no reset, so write an entry before
  you rely on its state. The read-modify-write finishes in one cycle, so
  back-to-back SYNs of one session see each other's updates.
- **Deparser / output.** Headers are not changed. The decision
  (drop, one-hot egress port) enters a small FIFO. The output side either
  sends the buffered beats of the packet at its head with `m_tdest`, or
  discards them whole. Counters: `cnt_fwd`, `cnt_drop`, `cnt_syn`
  (monitored SYNs).

Throughput is one beat per cycle. A packet's first beat leaves 4 cycles
after its second beat was accepted, when the output is free. The input
stalls only when the packet FIFO or the decision FIFO is nearly full.

## PF pipeline (`pf_pipeline`)

```
input 0 ─► DDoS PF (window 0) ─► DDoS PF (window 1) ─► pd slot 0 ─┐
                                                                  ├─► pkt_arbiter ─► mac_learn_switch ─► 4 output queues
input 1 ─► DDoS PF (window 2) ─► DDoS PF (window 3) ─► pd slot 1 ─┘
                     ▲ configuration from pf_regs (AXI4-Lite) ▲
```

Each processing function (PF) can be enabled, bypassed or set up by the
host at run time, without touching the traffic of the other functions.

**DDoS PF (`token_bucket_pf`).** This is a token bucket on one stream,
chosen by its source and destination MAC. Tokens grow by one every
`token_period` cycles, up to `bucket_size`. Each matching packet takes
one token when one is left. Otherwise the whole packet is dropped: the
filter clears `tvalid` on its beats. It never holds back the stream.
Its only stage is one register, with `s_ready = !m_valid || m_ready`, so
it adds one cycle and runs at one beat per cycle. Non-matching traffic,
and all traffic while the filter is disabled, passes untouched. Tokens
count packets. With a fixed packet size P bytes and clock f, a rate limit
of R bit/s is `token_period = f·8·P / R`. For example, 800 Mb/s of 100-byte
packets at 156.25 MHz is 156 cycles.

**Arbiter (`pkt_arbiter`).** It picks between the two pipelines packet by
packet, round robin. It holds its choice until `tlast`, and it reports the
input index. That index is the source port of the switch.

**MAC learning switch (`mac_learn_switch`).** On the first beat of each
packet it runs two look-ups in a CAM of `MAC_ENTRIES` (64) entries:

- *learn*: a non-group source MAC is written with its input port. A hit
  updates the port, so a station can move. A miss writes the entry at a
  round-robin replacement pointer.
- *forward*: a known unicast destination goes to its port. If that port
  is the input port, the packet is filtered (dropped). An unknown or group
  destination is flooded to every port except the input port.

The one-hot port mask goes with every beat. A beat leaves the switch only
when every queue in its mask has room. Each output port has a FIFO of
`QUEUE_BEATS` (64) beats. Counters: `cnt_learn`, `cnt_flood`.

**Register map (`pf_regs`).** This is an AXI4-Lite slave with 12-bit
addresses and 32-bit data. Byte strobes are honoured. Each DDoS PF has a
32-byte window at `i·0x20`. PF k (0 or 1) of input p uses window `2p+k`.

| Offset | Name | Contents | Access |
|--------|------|----------|--------|
| 0x00 | CTRL | bit 0: enable | RW |
| 0x04 | SRC_LO | source MAC [31:0] | RW |
| 0x08 | SRC_HI | source MAC [47:32] | RW |
| 0x0C | DST_LO | destination MAC [31:0] | RW |
| 0x10 | DST_HI | destination MAC [47:32] | RW |
| 0x14 | BUCKET | bucket size, tokens | RW |
| 0x18 | PERIOD | clock cycles per token | RW |
| 0x1C | DROPS | packets dropped by this PF | RO |

After reset every filter is disabled, with bucket 16 and period 1.
Unmapped addresses read as zero and ignore writes. A write completes when
both AW and W are present, and B follows one cycle later. R follows AR
after one cycle. The bank handles one access at a time.

## Sizes and what they cost

- **OFDM, N = 4096:** 4096-word sample memory, 2048-word twiddle table and
  4096-word prefix buffer, each word 32 bits. The symbol size is fixed
  when the core is built: set `OFDM_N` to any size of the numerology
  (128 to 8192; the prefix follows). There is no run-time size switch.
- **SYN-flood switch, 10000 sessions:** 10000 × 64-bit CAM keys plus
  10000 × 24 bits of session state. The parallel CAM look-up is the
  largest and slowest logic in the design. At 256 bits per cycle the
  switch handles 10 Gb/s from about 40 MHz up.
- **PF pipeline:** each pipeline and the shared switch move 256 bits per
  cycle, which is 40 Gb/s at 156.25 MHz. That is more than enough for
  several 10 Gb/s inputs.

## Departures from the reference design

- **iFFT engine.** The reference hardware uses a vendor streaming
  radix-4 FFT core with four outputs per cycle, which does not stall the
  stream. Here the engine is a single-butterfly radix-2 core written
  out in full, about (N/2)·log2 N cycles per symbol. It has the same
  arithmetic idea: an integer Cooley–Tukey FFT, used as an iFFT through
  conjugation. It needs a faster clock or several instances to match a
  streaming core.
- **Cyclic prefix.** The reference inserts the prefix behind a streaming
  iFFT without extra cycles. Here a symbol buffer adds N+M output cycles
  after each transform.
- **A-law in hardware.** In the reference flow the midhaul samples are
  expanded before they reach the FPGA. Here the expansion is the first
  stage of the chain, so the chain takes the compressed 8-bit samples.
- **Scaling.** The iFFT scales by 1/N, one halving per stage. The
  reference does not give its scaling.
- **SYN-flood rule details.** The per-session registers, the
  consecutive-port rule and the threshold follow the reference program.
  The restart at 1, the saturating 8-bit count and the clear-on-write are
  this design's choices. The threshold is an input. The reference uses 3
  in its example program and mentions 10 as an example value.
- **Token bucket in packets.** The reference sets the bucket and token
  rate to limit a stream to a bit rate. Here tokens count packets, which
  matches a bit rate only for a known packet size.
- **Table sizes.** Forwarding table 64 entries and MAC table 64 entries,
  with round-robin replacement and flooding on a miss. These are this
  design's choices.

## Verification

Each block has a self-checking testbench in `tb/`. It compares against
values computed in the testbench: a real-valued DFT, a G.711 decoder, or a
model of the table and session state. Each testbench prints
`TB_RESULT checks=… failures=…`.

| Testbench | What it shows |
|-----------|---------------|
| `tb_alaw_expand` | all 256 codes on I and Q, under back-pressure |
| `tb_ifft_core` | N=64 iFFT and FFT against a real DFT (±4 LSB), exact (N/2)·log2 N compute cycles |
| `tb_cp_insert` | prefix order and markers for several symbols, random stalls |
| `tb_ofdm_du_dl` | three A-law symbols end to end, N=64, M=5 |
| `tb_hdr_parser` | TCP, UDP, non-IP, 1- and several-beat frames |
| `tb_flow_cam` | random keys, deletes, duplicate keys (lowest index wins) |
| `tb_synflood_guard` | scan, interleaved sessions, restart, non-SYN, clear, threshold change |
| `tb_p4_synflood_switch` | scan of ports 81..100 with threshold 3 (17 drops), byte-exact forwarding, counters |
| `tb_token_bucket_pf` | bucket cap, burst of matching packets, refill rate, disable |
| `tb_mac_learn_switch` | 300 packets: learning, moves, replacement, flooding, filtering |
| `tb_pf_regs` | every register, byte strobes, AW/W skew, late responses |
| `tb_pf_pipeline` | host setup over AXI4-Lite, rate-limited flow, learn/flood/unicast from two inputs |
| `tb_edge5g_top` | all three parts at once at N=64 and 16 sessions, counting each mechanism |
| `tb_edge5g_full` | the same at the default sizes: two 4096-point symbols, 10000 sessions |
| `tb_ofdm_numerology` | one symbol at each smaller numerology size, N=128..2048 with M=10..160, samples and compute cycles |
| `tb_pf_ddos_cases` | the six rate-limiting cases (one or two filters on one or two streams, below and above the threshold) with a camera-like third stream, scaled to a 20-cycle token period; checks delivered counts and that latency is identical in all cases |

The end-to-end tests count, and require at least once: DU symbols with
correct prefixes, output back-pressure, table forwarding, default-port
forwarding, SYN drops, allowed scan packets, token-bucket drops, MAC
learning, flooding and unicast.

To run one with Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/ofdm_pkg.sv rtl/net_pkg.sv tb/pkt_tb_pkg.sv tb/tb_edge5g_top.sv \
    -y rtl --top-module tb_edge5g_top -o sim
./obj_dir/sim
```

Replace `tb_edge5g_top` with any other testbench name. `tb_edge5g_full`
simulates in well under a minute. Everything that is read is reset or
written first, so a two-state simulator with random initial values gives
the same result.
