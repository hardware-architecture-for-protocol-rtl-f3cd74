# Deep-pipeline protocol processor for Ethernet / IP / TCP-UDP reception

A received Ethernet frame is checked and classified while it streams past, without first being stored. It moves one 32-bit word at a time through a chain of twelve registers. Each register feeds one small, dedicated *functional page* (FP). Each page picks out the header fields it needs as they pass and reports what it found: a value, a flag, or a request to discard the packet. A central *controller and counter* unit decides when each page starts and which pages are awake. It collects the pages' verdicts and, one clock after the last word has left the pipeline, hands a packet descriptor to a supporting microcontroller.

Layers 2, 3 and 4 are handled at the same time, each page on its own part of the frame. So no per-layer latency builds up, and at gigabit rate the pipeline never stalls. The receive path covers:

- Ethernet CRC, destination MAC address and length/type.
- IP version, header length, total length and header checksum.
- IPv4/IPv6 destination address.
- Protocol, including walking IPv6 extension headers.
- Fragment bookkeeping for IPv4 and IPv6.
- TCP/UDP length and the TCP/UDP checksum, including checksums that span several fragments.

A stand-alone 8-bit CRC-32 generator is instantiated next to the processor in the same top module. It uses the augmented (Glaise–Jacquart) form.

## Data path

```
GMII ─► psu ─► [0]─►[1]─►[2]─►[3]─►[4]─►[5]─►[6]─►[7]─►[8]─►[9]─►[10]─►[11]   data_pipeline
                │    │    │    │    │    │    │    │    │    │    │     │
               ECC  EDA  ELT  IVF  IHL  ITL  IHC  IDA  IPN  IRA  TUL   TUC     functional pages
                └────────────── start / en / frame_end / discard / flags ──── cc
```

**`psu`** turns the GMII byte stream into words. It removes the preamble and start delimiter, then packs four bytes into a word. The first byte goes in bits [31:24].

Each word (`pipe_word_t` in `gppp_pkg`) carries:

- `valid`
- `sof` and `eof`
- a 4-bit byte mask `be`
- the byte offset `boff` of its first byte in the frame

Pages find fields by offset, using `byte_at()` and `half_at()` from the package, and never by counting words. So a field is found whatever the header layout ahead of it was.

With one GMII byte per clock, a word enters the pipeline every fourth clock and three bubbles (`valid = 0`) follow it. The pages use those idle clocks to finish their work.

A completed word is held back in the PSU until the next byte arrives or `rx_dv` falls, because only then is it known whether the word is the frame's last. A partial last word is masked. An `rx_er` anywhere in the frame is reported with the last word.

**`data_pipeline`** is the register chain, 12 stages by default. Only one frame is in it at a time: the minimum inter-frame gap plus preamble (20 byte clocks) is longer than the pipeline.

**Page placement.** Page *i* reads register *i*. A page sits after every page whose result it needs, so values only flow forward. Examples:

- The header length (page 4) is known before the header checksum (page 6) needs its end offset.
- The transport offset (page 8) is known before the TCP/UDP length page (10) must start.

## The pages

All pages share one fixed control interface:

- `start` fires the page on the word now at its tap.
- `en` puts the page to sleep while low.
- `discard` asks the controller to drop the packet. It stays set until the next `start`.

Pages that need the end of the frame also get `frame_end`. Anything else (`is_v4`, `hdr_len`, `l4_off`, …) is a page-specific control input or flag.

| page | module | what it does |
|---|---|---|
| 0 ECC | `eccfp` | CRC-32 over the whole frame and its FCS, 32 bits per clock. The byte mask handles a short last word. Discards unless the residue is right. |
| 1 EDA | `edafp` | Compares destination MAC with the configured station address. Flags broadcast and multicast (each acceptance is configurable). Discards frames for others. |
| 2 ELT | `eltfp` | Reads length/type. Classifies 802.3 length, IPv4, IPv6, ARP/RARP. A byte counter pulses `pay_end` when the payload ends. For an IP frame the end comes from the total length page. |
| 3 IVF | `ivffp` | IP version nibble. |
| 4 IHL | `ihlfp` | Header length: IHL×4, or 40 for IPv6. Gives the header end offset and flags IHL < 5. |
| 5 ITL | `itlfp` | IP datagram length (IPv6: payload length + 40) and its end offset in the frame. |
| 6 IHC | `ihcfp` | IPv4 header checksum: adds both halves of each word, then adds that into the accumulator. Discards unless the sum is 0xFFFF. |
| 7 IDA | `idafp` | Collects the 32- or 128-bit destination address. Compares it with 8 configured entries in parallel, one clock after the address has passed. Discards on no match. |
| 8 IPN | `ipnfp` | IPv4 protocol, or IPv6 next header. Walks hop-by-hop, routing, destination-options and fragment headers until TCP, UDP, ICMP, IGMP or ICMPv6. Gives protocol and transport offset. |
| 9 IRA | `irafp` | Fragment bookkeeping for IPv4 and IPv6 (see below). |
| 10 TUL | `tulfp` | TCP/UDP segment length (datagram end − transport offset) and payload length. Checks the UDP length field (a flag only). |
| 11 TUC | `tucfp` | TCP/UDP checksum with the pseudo header, per packet or across fragments. |

## Control: firing, layer enables, discard

The **controller** (`cc`) is a four-state machine: idle, run, drop, finish. It starts pages at three kinds of instant:

- **Layer-2 pages** start on the first word of the frame.
- **IP pages and the checksum page** start on the word at byte 12, which holds the first IP byte.
- **The TCP/UDP length page** starts on the word that holds the transport header. The protocol page found that offset, and it differs with IPv4 options or IPv6 extension headers. This is the one data-dependent firing decision.

**Enables.** A page is enabled when all of these hold:

- It is selected in the configuration.
- The machine is running.
- No discard has been requested.
- Its protocol layer applies to this packet.

Two rules decide whether a layer applies:

- Layer-3 pages are off for a frame that is neither IPv4 nor IPv6 (ARP, 802.3 length frames).
- Layer-4 pages are off for an IP packet that is not TCP or UDP (ICMP, say), unless it is a fragment.

**Discard.** When any enabled page raises `discard`, every page is switched off until the next frame. The PSU keeps running so that it finds that frame.

A page's `discard` output may still hold the previous frame's verdict until the page is started again. The controller therefore counts a discard only from pages that have already been fired in the current frame.

The descriptor `pkt` (`pkt_desc_t`) holds:

- `accept`, and the reason for each discard (receive error, CRC, MAC, IP header checksum, IP address, transport checksum, fragment)
- ethertype, IP version, ARP flag
- transport protocol, offset and length
- fragment and reassembly-complete flags
- frame length

Counters `cnt_frames`, `cnt_accepted` and `cnt_discarded` count the decisions.

## Configuration chain

All configuration is held in one scan chain clocked by `cfg_clk`, which is stopped during operation. The chain runs `cfg_din` → controller (12-bit page-select mask) → MAC page (50 bits) → IP address table (8 × 130 bits) → `cfg_dout`, 1102 bits in all.

Bits are shifted most-significant first. The first bit shifted in ends at the far end, so a full vector is sent as `{ip_table, mac_page, select_mask}`, MSB first.

| part | layout |
|---|---|
| MAC page | `{station[47:0], accept_broadcast, accept_multicast}` |
| IP table entry | `{valid, is_ipv6, addr[127:0]}` (IPv4 addresses in the low 32 bits), entry 7 first |

Shifting the vector through a second time returns it on `cfg_dout`. The end-to-end test uses that to read the configuration back.

## Fragments and the checksum across them

The TCP/UDP checksum of a fragmented IP datagram covers the whole datagram. Yet each fragment is processed on its own, as it arrives, in any order.

**`irafp`** keeps a table of `NCTX` (4) reassembly contexts. For each context it stores:

- the key: IP version, source address, identification, and for IPv4 the protocol
- the bytes received so far
- whether the last fragment has arrived and, if so, the total length
- the fragment offsets already seen, up to `MAXF` (8)
- a time-out counter

IPv4 fragments are recognised from the flags and fragment offset in the header. For IPv6 the protocol page, while walking the extension headers, reports where the fragment header sits. The reassembly page then reads the offset, the M flag and the 32-bit identification there. A fragment header with offset 0 and M clear marks a whole datagram, which is treated as unfragmented.

When a fragment's last word passes, and the frame is not being dropped for another reason, the page does one of the following:

- opens a new context;
- adds the fragment to an existing context;
- discards the fragment as a duplicate (an offset already seen);
- discards it because the table is full.

It then tells the checksum page:

- which context the fragment belongs to;
- whether the context is new;
- whether this is the first fragment (offset 0);
- whether the datagram is now complete, and its length.

`frag_boff` gives the fragment's payload position in the datagram, for whatever stores the payload. A context that does not complete within `TIMEOUT` clocks is released with a `reasm_timeout` pulse naming its slot.

**`tucfp`** keeps a back-up accumulator per context (`NSLOT`). Each fragment's payload sum is added into the context's accumulator. The pseudo header goes in exactly once, in two parts:

- The address part is added with the fragment at offset 0.
- Protocol and total length are added when the datagram completes. Only then is the length known.

The complete sum is checked on the fragment that completes the datagram, and that fragment is discarded if the sum is wrong.

For unfragmented packets the sum is formed in one pass:

- The pseudo header comes from IPv4 bytes 26–33 or IPv6 bytes 22–53 as they pass.
- The segment is summed from the transport offset to the datagram end.
- An odd last byte is padded with zero.

UDP over IPv4 with checksum 0 means "no checksum" and is not checked.

## CRC in augmented form

Both CRC units follow the bit-reflected Ethernet order, with polynomial 0xEDB88320 in that order.

**`crc32_gen8`** divides in the augmented form: the register is preset to 0x46AF6449, which is 0x9226F562 when stored bit-reflected. Four zero bytes must follow the data. The output register holds the inverted register, which after those four bytes is the FCS (least significant byte sent first). It has three registers in a row (input, CRC, output), so the FCS is ready three clocks after the last zero byte is given.

**`eccfp`** uses the same preset and step, 32 bits per clock. Run over a frame and its FCS, the register ends at 0xFFFFFFFF (`CRC32_GJ_RESIDUE_R`).

## Timing

| event | clocks |
|---|---|
| GMII byte → word | one word per 4 clocks; the last word leaves 1 clock after `rx_dv` falls |
| pipeline | 12 clocks, one per register |
| last GMII byte → `pkt_done` | **15 clocks** (1 hold-back + 1 PSU register + 12 pipeline + 1 controller) |
| IP address compare | result 1 clock after the last address word |
| CRC generator | output 3 clocks after a byte is given |

At 125 MHz this is one GMII port at line rate: 31.25 M words/s through a datapath that could take one word every clock. Frames can follow each other at the minimum gap.

A 10 Gb/s port needs one word per clock at 312.5 MHz. The pipeline and pages already accept that, but it needs a 32-bit-wide front end in place of the GMII byte packer, and this design does not have one.

## Parameters

| where | parameter | default | meaning |
|---|---|---|---|
| `gppp_pkg` | `W` | 32 | word width |
| `gppp_pkg` | `OFFW` | 16 | byte-offset width (frames up to 64 KiB) |
| `gppp_top`, `irafp` | `NCTX` | 4 | reassembly contexts (and back-up accumulators) |
| `gppp_top`, `irafp` | `TIMEOUT` | 1 875 000 000 | reassembly time-out in clocks (15 s at 125 MHz) |
| `irafp` | `MAXF` | 8 | fragments remembered per datagram |
| `idafp` | `NADDR` | 8 | IP destination addresses |
| `data_pipeline`, `cc` | `STAGES` | 12 | pipeline registers, one per page |

## Files

- `rtl/`: one module or package per file. `gppp_pkg.sv` holds the word and descriptor types, protocol constants, and the CRC and one's-complement helpers. `gppp_top.sv` is the top.
- `tb/`: a self-checking testbench per module, `tb_<module>.sv`. Shared packet builders and reference models (bit-serial CRC, byte-wise checksums) are in `tb/gppp_tb_pkg.sv`.
  - `tb_gppp_top.sv` runs the whole processor at its default parameters. It loads and reads back the configuration, then sends 28 frames back to back at the minimum gap: good IPv4/IPv6 TCP/UDP traffic, IP options, IPv6 extension headers, ICMP, ARP, an 802.3 frame, a maximum-size frame, one frame per discard reason, out-of-order fragments (two IPv4 datagrams, one of them corrupted, and one IPv6 datagram) and a duplicate fragment. It checks every descriptor and the 15-clock latency, and counts each mechanism.
  - `tb_gppp_top_timeout.sv` repeats the fragment case with a 3000-clock time-out to see a context released.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/gppp_pkg.sv tb/gppp_tb_pkg.sv tb/tb_gppp_top.sv --top-module tb_gppp_top
./obj_dir/Vtb_gppp_top
```

## What is not here, and where the design is its own

**Not built:**

- **Microcontroller.** It configures the processor, stores payload, allocates memory and talks to the host. Its side is brought out as ports:
  - the configuration chain
  - descriptor and counters
  - `frag_boff`
  - `pay_len`
  - the time-out outputs
- **Payload memory.** No payload store or memory allocation is built. The descriptor gives the offsets that such logic would need.
- **MII (4-bit, 10/100 Mb/s) front end.** The PHY side is GMII only. A nibble packer ahead of `psu`, with a byte strobe, would be needed for the slower ports.
- **Overlapping fragments.** They are not detected; only repeated offsets count as duplicates.

**This design's own choices:**

- **Pipeline and front end.** The tap order, the single clock, the GMII front end and the PSU's hold-back scheme.
- **Data formats.** The word format with byte offsets, the descriptor contents, the configuration-vector layouts and the chain order.
- **Reassembly sizes.** The number of contexts and the time-out value.
- **Extra length check.** The UDP length check in the TCP/UDP length page.
- **Synchronous CRC preset.** The generator's preset is a synchronous input rather than an asynchronous set/reset on the register.
