# Pipelined IP forwarding engine for an ATM-based router

A router built around an ATM switch receives IP packets as AAL5 frames that
a SAR (segmentation and reassembly) controller has put back together. This
engine sits between four such receive SARs and four transmit SARs, one pair
per 622 Mbit/s switch port, and makes the forwarding decision for every
packet. It does so in hardware: each header goes through a five-stage
pipeline (check, CAM lookup, label-information read, rewrite, classify)
that takes 20 clocks at 100 MHz (200 ns). A new header can enter every 8
clocks, the time of a lookup. The payload never goes into the engine. While
the rewritten header is sent out, the engine asks the receive SAR for the
rest of the frame and switches that SAR's payload bus straight onto the
outgoing bus (cut-through).

The engine handles IPv4 and single-label MPLS in four link encapsulations:
LLC/SNAP (RFC 2684), PPP, a bare MPLS shim, and a null encapsulation. For
routed IPv4 it does longest-prefix matching. For MPLS it does an exact
match on the label. Label push, swap and pop, TTL decrement, DS
(DiffServ) code-point rewrite and checksum regeneration come from an 8-byte
entry per route. Outgoing packets are queued by DS class. A scheduler with
strict priority may interrupt a long low-priority packet for an urgent one.

```
            header path (shared)          +-----------------------------------------------+
 Rx SAR 0..3 ==========> header fetcher ->| hdr queue 0..3 -> round robin                 |
            rx_avl / rx_en_n / rx_sel_pl  |   phase 1  header analysis + checks   (3 clk) |
                                          |     | control / bad header ----------+        |
                                          |   phase 2  CAM lookup (LPM / exact) (8 clk)   |
            CAM routing coprocessor <---->|     | miss --------------------> exception q  |
                                          |   phase 3  label info, 2 SRAM reads (4 clk)   |
            label information SRAM  <---->|   phase 4  header rewrite         (3 clk) <---+
                                          |   phase 5  DS -> output queue     (2 clk)     |
            host (routing processor) ---->| manager: writes CAM + SRAM                    |
                                          | output queues 3..0 -> scheduler -> multiplexer|
            payload path (shared) =======>|----------------------------------------> Tx   |
                                          +-----------------------------------------------+
```

## Interfaces

All transfers use one UTOPIA-like rule. A word moves in a cycle where the
slave holds `avl` high and the master holds its active-low `en_n` low. A
master decides `en_n` from its own registered state, never from `avl` in
the same cycle. The slave can therefore pause a transfer at any word by
dropping `avl`, and the master carries on with the next word once `avl`
returns. The SARs are always the masters and the engine is always the
slave. Towards a receive SAR, `en_n` low means "I have a word". Towards a
transmit SAR it means "I can take a word", and the engine's `tx_avl` says a
word is on `tx_data`.

| group | signals | notes |
|---|---|---|
| Rx SARs | `rx_arrived[3:0]`, `rx_avl[3:0]`, `rx_en_n[3:0]`, `rx_sel_pl[3:0]` | `rx_arrived`: a reassembled frame is waiting. `rx_sel_pl` picks the bus for each SAR: 0 = header path, 1 = payload path. |
| header path | `rx_hdr_data[31:0]`, `rx_hdr_len[15:0]`, `rx_hdr_encap[1:0]` | The first 8 words of the frame, zero-padded. The frame length and the VC's encapsulation are valid with the words. |
| payload path | `rx_pl_data[31:0]` | Frame words 8 and on, from the SAR whose `rx_sel_pl` is high. |
| Tx SARs | `tx_avl[3:0]`, `tx_en_n[3:0]`, `tx_data[31:0]`, `tx_sop`, `tx_eop`, `tx_src[1:0]` | One shared outgoing bus. `tx_src` names the receive SAR the packet came from. |
| CAM | `cam_req`, `cam_op[1:0]`, `cam_addr[16:0]`, `cam_data[63:0]` out; `cam_done`, `cam_hit`, `cam_index[16:0]` in | The ops are LPM compare, exact compare and write. `cam_done` is a one-cycle pulse, 5 cycles after the request (50 ns). |
| host | `host_valid`/`host_ready`, `host_cmd[1:0]`, `host_index`, `host_addr`, `host_plen`, `host_data[63:0]` | Commands: 0 = route, 1 = label, 2 = label-information entry, 3 = no-op. |

The label-information SRAM (`lib_sram`) is inside the top as an array of
2^18 x 32 bits. The CAM is a separate device, so its port is brought out.

### Interleaved packets on the Tx bus

Because of preemption (see below), the words of two packets can alternate
on the outgoing bus. `tx_sop` and `tx_eop` mark the first and last word of
each packet, and `tx_src` tells which packet a word belongs to. A Tx SAR
must therefore reassemble per `(port, tx_src)`. At most four packets can be
open at once.

## The header fetcher

The fetcher visits the receive SARs in turn. For each SAR it spends one
*status check* cycle, then either fetches a header or skips, and then
spends one *transition* cycle moving to the next SAR. It fetches only when
all three of these hold:

1. the SAR's header queue has room, meaning the last header taken from it
   has moved on;
2. the SAR reports a frame (`rx_arrived`);
3. the payload of the SAR's previous packet has been sent completely
   (`pl_done` from the scheduler).

A fetch raises `rx_avl` for that SAR with `rx_sel_pl` low and collects 8
words, so one header costs 10 cycles and a skipped SAR costs 2. Rule 3
means a SAR never has two packets between header fetch and payload end.
This keeps each SAR's payload in frame order without any buffering.

## Pipeline and timing

| phase | block | clocks | what happens |
|---|---|---|---|
| 1 | `hdr_verify` | 3 | Decode the encapsulation: LLC/SNAP EtherType 0800, 8847 or 0806 (ATMARP); PPP protocol 0021, 0281 or other (control); MPLS; null. Locate the IP header. In parallel, check version = 4, TTL > 1, IHL = 5 (no options) and header checksum. For MPLS, check S = 1 and label TTL > 1. Build the CAM key. |
| 2 | `lookup_ctrl` | 8 | Arrival check (1), key extraction (1), CAM compare (5 = 50 ns), index fetch (1). IPv4 uses LPM on the destination address. MPLS uses a 64-bit exact match on the label. |
| 3 | `lib_fetch` | 4 | Two 32-bit SRAM reads at `{index,0}` and `{index,1}` give the 64-bit entry. |
| 4 | `hdr_modify` | 3 | Rewrite fields (TTL minus hop count, DS or EXP, label op), then recompute the IPv4 checksum, then re-encapsulate. |
| 5 | `pkt_classifier` | 2 | Map DS to a priority and push into that output queue. |

The total is 50 ns + 15 T = 20 clocks (200 ns) from the moment phase 1
accepts a header to the write into an output queue. Phase 2 is the longest
stage, so a new lookup can start every 8 clocks (12.5 Mpackets/s). Each
phase holds its result until the next phase takes it. A header that
finishes phase 1 while phase 2 is busy therefore waits in phase 1.

Headers that are not looked up go to a small *exception queue*
(`exc_ctrl`). These are ATMARP or PPP control frames, headers that fail a
check, and lookup misses. Phase 4 takes from the exception queue when
phase 3 has nothing for it. Such a packet is not modified. It goes out on
Tx port `EXC_PORT` (default 0, towards the routing processor) at the
highest priority.

### Label information entry (64 bits)

| bits | field | meaning |
|---|---|---|
| 63:62 | `out_encap` | 0 LLC/SNAP, 1 PPP, 2 MPLS shim only, 3 null |
| 61:60 | `tx_port` | outgoing switch port |
| 59:58 | `op` | 0 IP, 1 push, 2 swap, 3 pop |
| 57 | `ds_replace` | overwrite the DS field (IP) or EXP (MPLS) |
| 56:51 | `ds` | new DS code point |
| 50:48 | `exp` | EXP for a pushed or swapped label |
| 47:44 | `hop` | amount subtracted from the TTL |
| 39:20 | `label` | outgoing label for push or swap |

For a swap, only the shim changes and the IP header is left as received.
For a push or a pop, the IP header's TTL, DS field and checksum are updated
as for plain IP forwarding. The DS value that picks the output queue is the
outgoing one. The mapping uses the class-selector bits `ds[5:3]`: 5–7 go to
queue 3, 3–4 to queue 2, 1–2 to queue 1, and 0 to queue 0.

### Route encoding

The manager stores a route as one ternary 64-bit CAM word. The upper half
is `addr & mask` and the lower half is `mask & ~addr`. A bit outside the
prefix stores (0,0) and matches both key values. The CAM returns the lowest
matching index. The host must therefore place longer prefixes at lower
indices. The CAM model used in the testbenches keeps exact-match labels in
a separate index range.

## Scheduler, preemption and cut-through

The scheduler (`tx_scheduler`) always serves the highest non-empty
priority. While it is sending a packet, it checks every cycle whether
higher-priority work is waiting. If so, and if the current packet still has
more than `THRESH` words to go (default 16), it does three things:

- it stops the current packet after the word just sent;
- it parks the packet's state (position in the header, payload words left)
  in a suspended slot one priority above the packet's own;
- it starts the urgent packet.

A suspended packet is served before any queued packet of the same priority.
It resumes from the word where it stopped. If it is in its payload phase,
it resumes by re-selecting the payload path of the same Rx SAR, which has
kept its place. A packet is not preempted when it is already at the top
priority or when the slot above it is taken.

The header words come from the output queue entry. When only `PREFETCH`
(default 2) header words remain, the scheduler raises `rx_sel_pl` for the
packet's Rx SAR. The SAR then has its payload ready by the time the header
ends. From then on, `pkt_mux` joins the payload bus and the Tx bus
directly:

- `tx_data` is `rx_pl_data`;
- the Tx SAR's `tx_avl` is high while the Rx SAR's `rx_en_n` is low (a
  word is offered);
- the Rx SAR's `rx_avl` is high while the Tx SAR's `tx_en_n` is low (a word
  can be taken).

The engine stores no payload. When the last payload word has moved, the
scheduler pulses `pl_done` for that SAR, and the fetcher may take the SAR's
next header.

## Capacity and throughput

| quantity | value |
|---|---|
| forwarding entries | 128K (17-bit CAM index); SRAM 2^18 x 32 bits = 8 Mbit |
| lookup rate (phase 2 alone) | one per 8 clocks = 12.5 Mpackets/s |
| header fetch rate | one per 10 clocks = 10 Mpackets/s. This limits the end-to-end rate. |
| measured, 40-byte packets, 4 ports loaded | 12.0 clocks/packet = 8.3 Mpackets/s. Four 622 Mbit/s ports need 7.8. |
| measured, 576-byte packets | 3.18 Gbit/s on the outgoing bus. Four ports need 2.49. |

## Departures and limits

- **Throughput.** The header fetch (10 clocks for 8 words), not the 8-clock
  lookup, sets the sustained packet rate.
- **One packet per SAR in flight.** This follows from the fetch condition.
  It keeps frames in order without a payload buffer, but a slow Tx port
  holds back its Rx SAR.
- **Header stage times.** The three-clock header analysis, the 8-word
  header chunk and the queue depths are this design's choices. The queue
  depths are 1 per SAR for header queues, 2 for the exception queue and 4
  per priority for output queues.
- **Label-information read.** This read takes 4 clocks, matching the
  20-clock total rather than the 3 clocks stated elsewhere for it.
- **Exception path.** IP options, label stacks deeper than one label,
  expired TTLs, bad checksums, non-IPv4 versions and lookup misses are not
  forwarded. They go unmodified to the exception port.
- **No transport-layer lookup.** Each packet gets exactly one lookup:
  longest-prefix on the IPv4 destination, or exact match on the MPLS label.
  Except under LLC/SNAP plus an MPLS shim, the 8-word header chunk already
  carries the TCP/UDP port numbers, so a port-based exact match could be
  added in phase 2.
- **External parts.** The CAM, the SARs and the switch interfaces are
  external. Only behavioural models of them exist, in `tb/`. Their real
  buses will need adapters.
- **Unused key bits.** The CAM key's upper 32 bits are always zero: keys
  are 32-bit addresses or 20-bit labels on a 64-bit CAM. Synthesis reports
  these as constant outputs.

## Source files

`rtl/`:

| file | content |
|---|---|
| `fwd_pkg.sv` | constants, encodings, record types, checksum/encoding helpers |
| `ip_fwd_engine.sv` | top level |
| `header_fetcher.sv`, `rr_select.sv` | header fetch arbitration; round robin over header queues |
| `hdr_verify.sv`, `lookup_ctrl.sv`, `lib_fetch.sv`, `hdr_modify.sv`, `pkt_classifier.sv` | phases 1–5 |
| `exc_ctrl.sv` | queue for packets that skip the lookup |
| `sync_fifo.sv` | first-word-fall-through FIFO (header, exception and output queues) |
| `tx_scheduler.sv`, `pkt_mux.sv` | transmit scheduling with preemption; cut-through multiplexer |
| `fwd_mgr.sv`, `lib_sram.sv` | table writes from the host; label-information memory |

`tb/` holds one self-checking testbench per block (`tb_<block>.sv`) and the
end-to-end test `tb_ip_fwd_engine.sv`. That test runs the top with default
parameters, checks every frame against a byte-level reference model
(`tb_ref_pkg.sv`), checks the 20-clock latency and the 8-clock lookup, and
makes every mechanism happen at least once: the exception path, a miss, an
LPM and an exact match, a held fetch, preemption and resume, a paused
payload and the early payload request. `tb_line_rate.sv` measures the
sustained rate. `cam_model.sv`, `rx_sar_model.sv` and `tx_sar_model.sv` are
behavioural models of the external parts.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. With
Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_ip_fwd_engine \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fwd_pkg.sv tb/tb_ref_pkg.sv tb/tb_ip_fwd_engine.sv -o sim
./obj_dir/sim
```

For a unit testbench, leave out `tb/tb_ref_pkg.sv` and name the other
testbench, e.g. `--top-module tb_tx_scheduler ... tb/tb_tx_scheduler.sv`.
The end-to-end and line-rate tests also need `tb/tb_ref_pkg.sv`. The
simulator has no X state, so every register that is read is reset or
written before use.
