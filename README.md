# A hardware RoHC header compressor

Voice over IP sends small payloads, typically 20 to 40 bytes of speech every 20 ms, behind 40 bytes of IPv4/UDP/RTP header (60 with IPv6). On a radio link most of the air time then carries headers. Robust Header Compression (RoHC, RFC 3095) removes this overhead. Per flow, the compressor and decompressor keep a shared *context*: the last header seen plus a few patterns. After start-up, the compressor sends only what the decompressor cannot predict, typically a 1-byte packet carrying 4 bits of RTP sequence number (SN) and a 3-bit CRC.

This repository holds SystemVerilog for the compressing side of RoHC profile 1 (RTP/UDP/IP). It also recognises profile 2 (UDP/IP) and profile 0 (anything else). The design follows a published one-stage "full hardware" compressor architecture. That architecture is a stack of controllers working one after another on one packet and sharing a few datapath units. Some separate accelerators from an earlier hardware/software version of the design are included too: a parallel CRC unit and a one-cycle LSB encoder.

What the compressor delivers per packet is a decision, not the packet bytes:

- the packet type (IR, IR-DYN or one of 38 compressed formats);
- the compressor state;
- the number of bits needed for SN, IP-ID and timestamp (TS);
- the CRC for that packet type;
- the updated context, written back to the external context memory.

Turning that decision into bytes (the *packetizer*) is not included, because it needs the bit layouts of every RFC 3095 packet format. See "Limits" below.

## The pieces of the problem

RoHC sends a field in one of three ways:

- **Not at all**, when the decompressor can derive it. The context holds the static fields (addresses, ports, SSRC) and the slowly changing ones (TOS, TTL, payload type…).
- **As its k least significant bits (LSB encoding).** The decompressor picks the value closest to its reference inside an *interpretation interval* `[ref − p, ref + 2^k − 1 − p]`. The compressor must choose the smallest such k.
- **Scaled or as an offset**, so that LSB encoding works on small numbers:
  - the IPv4 IP-ID is sent as `IP-ID − SN`;
  - the RTP timestamp is sent as `TS / stride`, where the stride is usually 160 for 8 kHz speech at 20 ms.

Three things make this harder than it looks, and most of the logic handles them.

1. **The compressor doesn't know what the decompressor has.** Packets get lost, so the compressor keeps a *sliding window* of the last 4 reference values it sent. It uses enough bits for every one of them: W-LSB, `k = max(g(min), g(max))`.
2. **Changes must be sent more than once.** Unidirectional and optimistic modes (U/O) have no acknowledgements, so a changed field is repeated in the next 2 packets (the optimistic approach). Every 32 packets the dynamic part is refreshed (IR-DYN), and every 64 packets the whole header (IR).
3. **There are 38 compressed formats.** Each carries a different number of SN, IP-ID and TS bits, with or without a CRC, and some can update the decompressor's context while others cannot. The compressor must find the smallest one the mode allows that carries everything needed.

## Architecture

`rohc_compressor` (top) runs a finite-state machine. Each state uses one or more of the blocks below:

| Step | Block(s) | What happens |
|---|---|---|
| LOAD | `rohc_sp_ram` | Header words are read from the 1 KiB packet RAM, which the host fills beforehand. The context read is issued at the same time. |
| CLASS | `rohc_classifier`, `rohc_parser` | Choose profile 0/1/2 and find the header offsets. Split the header into a static record and a dynamic record. |
| FETCH | — | Wait for the context. If the context is empty or belongs to another flow, start a fresh one with the default values (byte-ordered, non-random IP-ID, stride 1, U mode). |
| IPID | `rohc_ipid_detect` | Decide whether the IPv4 IP-ID counts with the SN, counts byte-swapped (a little-endian host), or is random. Compute the IP-ID offset. |
| RTP | `rohc_rtp_detect`, `rohc_divider` | Decide whether the TS followed the stride (no "jump"). Re-estimate the stride when it did not. Compute `TS / stride` and `TS mod stride` on the shared 33-cycle divider. |
| FLAGS | `rohc_ctx_change`, `rohc_bitpack` | Raise one flag per kind of change (static, per-IP-level TOS/TTL/DF/byte order/randomness, UDP checksum on/off, RTP P/X/PT, stride, offset, TS jump). |
| DECIDE | `rohc_field_select`, `rohc_comp_state` | OR in the flags of the last 2 packets from the window. Decide IR (static change or 64-packet timeout), IR-DYN (dynamic change or 32-packet timeout), or a compressed packet in state FO or SO. |
| WLSB | `rohc_wlsb_enc`, `rohc_lsb_enc`, `rohc_lod` | Bits needed for SN, IP-ID offset (inner IPv4 only, not when random) and TS. The TS bits are scaled after a jump, unscaled when stride or offset changed, and none when TS follows the SN. |
| SEARCH | `rohc_pkt_search` | Find the first allowed packet type in the capability table whose fields are wide enough. Fall back to IR-DYN when none fits. |
| CRC | `rohc_crc_ci` (9 × `rohc_crc_par`) | CRC-3, CRC-7 or CRC-8 over the original header: 4 bytes per cycle, then a 2- and/or 1-byte step for the tail. |
| UPDATE | 5 × `rohc_sliding_window` | Write the context back. A context-updating packet writes everything: reference header, TS pattern, counters, and windows of SN, IP-ID offset, scaled TS, TS and flags. Any other packet writes only the IP-ID pattern (the last two IP-ID/SN pairs and the byte-order/random flags). |

Shared types live in `rohc_pkg`: the flag record, the header records, the 38-row packet capability table, the context record and the result record.

### Timing

A packet takes about 110–120 clock cycles from `start` to `done`. The test measures at most 119, with the context arriving 4 cycles after the request. Most of this is the 33-cycle divider plus the header load. The reference architecture quotes 4.1 µs per packet at 100 MHz (410 cycles) including packet output. The datapath has no pipelining: one packet is in flight at a time.

## The LSB encoder without logarithms

`k` has closed forms in the distance between value and reference. With `p = a·2^(k−b) − c`, where (a, b, c) is (1, 5, 1) for SN, (0, 0, 0) for IP-ID and (1, 2, 1) for TS:

- value ahead by Rfd: `k1 = ⌈log2(Rfd − c + 1) + b − log2(2^b − a)⌉`
- value behind by Rbk: `k2 = ⌈log2(Rbk + c) + b⌉`, used when Rbk ≤ 2^(kmax−b) − c

`rohc_lsb_enc` evaluates only the applicable form. A leading-one detector writes the variable term as `2^X + R1`. The constant term is `2^Y + R2`, taken from a small table. The integer part is X ± Y. The ceiling adds 1 exactly when `R1/2^X > R2/2^Y`, which the encoder tests as `R1·2^Y > R2·2^X` with a shift by |X − Y|. So there is no rounding error: the testbench compares about 20,000 cases with an exhaustive interval search.

SN has a shortcut: 4 bits whenever Rfd ≤ 14 or Rbk ≤ 1, since 4 is the smallest SN field any packet has. Otherwise SN uses the k > 4 branch, so at least 5 bits.

## Packet type search

`rohc_pkt_search` holds a 38-bit `disabled_pkt` register, one bit per compressed format, ordered from the most compact (bit 0, R-0) to the largest. The search runs in two stages.

**1. Masks.** On start, the register is loaded with masks, one condition each:

| Condition | What the mask leaves enabled |
|---|---|
| U/O mode | Only packets with a CRC, excluding R-0-CRC. |
| R mode | No UO packets (the CRC-3 ones). |
| Mode transition pending | Only UOR-2 with extension 3. |
| RTP marker bit set | Everything except R-0, R-0-CRC and UO-0, which have no room for the bit. |
| Any other field to send (TOS, TTL, byte order, stride…) | Only extension-3 packets. |

**2. Search.** Each cycle a least-significant-zero detector picks the first enabled packet as a one-hot vector, which selects its row of the capability table directly. If that packet carries enough SN, IP-ID and TS bits, it is the answer. Otherwise its bit is set and the next cycle tries the next one. The search takes at most 40 cycles; a steady voice stream finds UO-0 on the first try.

## CRC

`rohc_crc_par` is the shift register unrolled over DATA_W bits, i.e. `crc' = H1·data ⊕ H2·crc`. The convention:

- data bytes are taken in order, each least significant bit first;
- the register shifts toward its top bit;
- the initial value is all ones.

`rohc_crc_ci` puts the three RoHC polynomials side by side at 8, 16 and 32 data bits:

- CRC-3: x³+x+1
- CRC-7: x⁷+x⁶+x³+x²+x+1
- CRC-8: x⁸+x²+x+1

A header of any length is handled in 32-bit steps and then one 16- and/or one 8-bit step, with no padding. The compressor uses it for its CRC stage. It also stands alone as the accelerator of the hardware/software version, where software calls it as a one-cycle custom instruction.

## Interfaces of the top

- **Packet in.** Write the header (and payload) into the packet RAM as big-endian 32-bit words, with `pkt_we`, `pkt_addr` and `pkt_wdata`, while `busy` is low. Then pulse `start` with `uid` (the flow/user number) and `pkt_len` in bytes.
- **Context memory** (external). The compressor pulses `ctx_rd_req` with `ctx_addr = uid`. Any latency is fine: it waits for `ctx_rd_valid` with `ctx_rdata`. The write-back is a single `ctx_wr_req` pulse with `ctx_wdata`. The context is one 1445-bit `ctx_t` word; a real system would map it onto a DRAM burst.
- **Result.** `done` pulses for one cycle and `result` (`result_t`) holds:
  - the profile;
  - the packet type (0–37 compressed, 38 IR-DYN, 39 IR) and the state;
  - `k_sn`, `k_ipid` and `k_ts`, and whether TS goes unscaled;
  - the CRC type and value;
  - the IP-ID offset and the scaled TS;
  - the FS flags, which say which fields the packet must carry.
- **Mode and feedback.** There is no feedback channel. The mode (U/O/R) and the "mode transition pending" bit are read from the context, so a feedback handler would set them there. The test does exactly that.

## Where this design makes its own choices

These points are not fixed by the architecture it follows:

- **CRC input.** The CRC covers the original, uncompressed header for every packet type. The reference computes the IR CRC over the packetized header, which does not exist here. For CRC-3 and CRC-7 the reference first extracts a set of fields and packs them with no gaps. It does not list those fields, so here the CRC runs over the header bytes in wire order. A decompressor has to use the same convention.
- **Masks.** The contents of the packet-type masks are this design's, derived from the packet table.
- **IP-ID.** Extension 3 is forced whenever a field only extension 3 carries must be sent. The outer IP-ID of a tunnel is never offset-encoded. The reference keeps NBO and RND flags for both IP levels (Table 6.3); this design keeps them for the inner level only.
- **Profile 2.** Profile 2 numbers packets itself (context SN + 1).
- **Timeouts.**
  - The IR and IR-DYN timeout counters advance only on context-updating packets.
  - The timeouts are disabled in R mode.
- **TS jump.** A TS "jump" means the packet is neither a repeat of the reference SN nor exactly the next SN with TS advanced by one stride.
- **UDP checksum.** A checksum change is flagged when the UDP checksum switches between zero (unused) and non-zero.
- **Windows and wrap-around.**
  - Window minimum and maximum are unsigned.
  - Distances wrap modulo 2^16 or 2^32.
  - An empty window asks for the full field width.
- **Divider.** It is a restoring divider, one bit per cycle.

## Limits

- **No packetizer.** The output is the decision, not the packet bytes.
- **No feedback.** There is no ACK/NACK processing and no mode-transition procedure.
- **One packet at a time.** The throughput target of a 2.5 Gbit/s link, about 2.6 M packets/s or 38 cycles per packet at 100 MHz, needs a pipelined design, which is not included.
- **Not included:** a CSRC list, IP options, IPv4 fragments, IPv6 extension headers.
- **Testing depth.** The compressed packet types have been checked for the choice the search makes, not against a decompressor.

## Simulation

Every block has a self-checking testbench in `tb/`. It prints `TB_RESULT checks=N failures=M`, and a watchdog ends it if it hangs. With Verilator 5:

```sh
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb --top-module tb_rohc_compressor \
  rtl/rohc_pkg.sv tb/tb_rohc_compressor.sv -y rtl -y tb
./obj_dir/Vtb_rohc_compressor
```

Replace the module name for the other testbenches: `tb_rohc_crc_par`, `tb_rohc_lsb_enc`, `tb_rohc_pkt_search` and so on. The classifier and parser testbenches share `tb/rohc_tb_hdr.svh`, a header builder.

`tb_rohc_compressor` runs the top at its default parameters. It includes a behavioural context memory and builds real IPv4/UDP/RTP headers. It drives one voice flow through these stages:

- start-up: three IR packets, then UO-0;
- 140 steady packets, with IR and IR-DYN refreshes at exactly 64 and 32 packets;
- a silence gap (TS jump);
- a TTL change, which produces extension-3 packets;
- a marker bit;
- an SN jump too large for any compressed packet (IR-DYN);
- a destination change (IR again);
- R mode (R-0);
- a pending mode transition (UOR-2 with extension 3).

Beside that flow it also sends:

- flows with random and byte-swapped IP-IDs;
- a TCP packet (profile 0);
- a non-RTP UDP packet (profile 2);
- an IPv6 flow;
- an IPv4-in-IPv6 flow.

Each event is counted, and the test fails if one never happens. Every CRC is checked against a bit-serial model, and every packet against a 410-cycle budget.
