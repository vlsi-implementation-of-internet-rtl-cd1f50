# TCP/UDP checksum page for 10 Gigabit Ethernet

A receive-side hardware unit that checks the Internet checksum of TCP and UDP
packets, over IPv4 and IPv6, while the packet streams past at one 32-bit word
per clock. Nothing is buffered. The unit reads the IP header as it goes by,
picks out the fields of the pseudo header, and adds up the TCP/UDP data. It
reports the result four clocks after the last word. That is early enough for
the next packet to follow with no gap beyond the Ethernet inter-frame gap.

The unit also handles IP fragments. It keeps the partial sums of up to two
fragmented packets in registers. Fragments may arrive in any order, and the
fragments of two packets may be interleaved. When the last missing fragment
arrives, the unit reports the checksum of the whole reassembled packet.

At 32 bits per clock, 10 Gb/s needs a 312.5 MHz clock. The design was
conceived as one "functional page" of a protocol processor. In that processor,
other pages strip the link layer and deliver the IP packet. A separate
reassembly unit takes care of the fragments themselves.

## The arithmetic

The Internet checksum is the 1's complement sum of all 16-bit words of the
TCP/UDP segment plus a pseudo header:

| | IPv4 pseudo header | IPv6 pseudo header |
|---|---|---|
| addresses | 32-bit source, 32-bit destination | 128-bit source, 128-bit destination |
| protocol | 8-bit protocol, zero-extended | next header, zero-extended |
| length | 16-bit TCP/UDP length | TCP/UDP length (32-bit field) |

A received packet is intact when the sum over everything, including the
transmitted checksum field, is 0xFFFF ("negative zero"). A segment of odd
length is padded with a zero byte.

1's complement addition is associative and commutative. This is what makes
the design possible: words can be added in whatever order they arrive, and
fragments can be merged in any order.

Each clock, the calculation unit (`calc_unit`) adds three 16-bit terms: the
high half of the operand, the low half, and the accumulator. It uses two
16-bit 1's complement adders in series (`oc_add16`), with an operand
multiplexer in front. That adder pair is the unit's critical path.

`oc_add16` is a carry-lookahead adder with end-around carry. The carry out of
bit 15 equals the group "generate" of all 16 bits, so it is known without
first doing a carry-propagating addition. Every bit carry is then
`G[i-1:0] | P[i-1:0] & G[15:0]`, which is one prefix tree (Kogge-Stone, four
levels) and no second pass. The only way to get 0x0000 is to add 0x0000 and
0x0000. Every other zero sum comes out as 0xFFFF.

## Pseudo header and fragments: how each term is counted once

This is the subtle part of the design. Each packet, or each fragment, goes
through the accumulator in the following order:

1. **Header words.** The address words are added as they pass. IPv4 words 3
   and 4 are the addresses, and IPv6 words 2 to 9. No other header word is
   summed, including the IPv4 options and the IPv6 extension headers.
2. **First payload word.** The accumulator now holds exactly the address
   part of the pseudo header. Its value is copied into the pseudo-header
   register `ph`.
3. **Payload words.** These are added with a byte mask from the length
   counter. Bytes past the IP length are dropped. These can be the Ethernet
   padding of a short frame, junk in the last word, or the padding of an odd
   length.
4. **After the last word** (finish cycles FIN1 to FIN4, below), what happens
   depends on the packet:

| packet | FIN2 adds | FIN4 adds | the accumulator then holds |
|---|---|---|---|
| not a fragment | protocol, and the TCP/UDP length | nothing | the complete checksum |
| fragment, first of its packet to arrive | protocol only | nothing | a partial sum: addresses + protocol + this fragment's data. It is stored in a free memory place |
| fragment, packet already in memory | `~ph` and the stored partial sum | the total length, if this fragment completes the packet | the stored sum plus this fragment's data. Adding `~ph` cancels this fragment's own copy of the addresses |

Adding `~ph` works because `x + ~x` is 0xFFFF, which is zero in this
arithmetic. The result: for any arrival order, the final sum holds the
addresses and the protocol exactly once, the total length exactly once, and
every data byte once.

Fragments start at multiples of 8 bytes in the TCP/UDP data, so each
fragment's 16-bit words line up with those of the whole packet. This is why
partial sums can simply be added together.

**Length bookkeeping.** Each fragment's TCP/UDP length `flen` is:

- IPv4: total length − 4·IHL.
- IPv6: payload length minus the extension headers.

The end of a fragment is 8·offset + `flen`. Only the last fragment (MF = 0)
gives the packet's total length. Every fragment adds `flen` to the stored
byte count. The packet is complete when the total length is known and the
byte count equals it. The memory place is then released, and the total length
goes into the sum as the last pseudo-header term.

## Interface and timing

Module `tucfp` (parameter `N_ENTRIES`, default 2):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous reset, active low |
| `in_valid` | in | 1 | `in_data` carries a word; may drop anywhere inside a packet |
| `in_sop` | in | 1 | first word of the IP header |
| `in_eop` | in | 1 | last word of the frame |
| `in_data` | in | 32 | packet bytes, the first byte in bits 31:24 |
| `busy` | out | 1 | a packet is being taken or finished |
| `res_valid` | out | 1 | one-clock strobe of the result |
| `res` | out | `result_t` | status, 16-bit sum, IPv6 flag, fragment flag, protocol, TCP/UDP length, memory place |
| `ra_drop`, `ra_drop_slot` | in | 1, 4 | lets the reassembly unit free a memory place, e.g. when it gives up on a packet |
| `occupied` | out | `N_ENTRIES` | memory places in use |

```
clock edge   E        E+1    E+2    E+3    E+4         E+5
             last     FIN1   FIN2   FIN3   FIN4        next packet's
             word in                       res_valid=1 first word may be
                                           busy=0      taken here
```

The fifth cycle after the last word is the earliest that the next packet may
start. An assertion in `tucfp_control` flags an `in_sop` that arrives while
`busy` is high. Frames may be longer than the IP length says, for example
because of Ethernet padding, and the extra bytes are ignored.

`res.status` takes these values (`tucfp_pkg::status_e`):

| status | meaning |
|---|---|
| `ST_OK` / `ST_BAD` | the final sum is / is not 0xFFFF. Applies to a whole packet, or to a fragmented packet whose last missing piece just arrived (`l4_len` is then the total length) |
| `ST_FRAG_PENDING` | the fragment was stored, and more fragments are missing |
| `ST_NO_SLOT` | a fragment of a new packet arrived, but every place is taken. It is not stored |
| `ST_NOT_L4` | not checked: the protocol is neither TCP nor UDP, an IPv6 extension header is longer than 64 bytes, or something other than TCP/UDP follows an IPv6 fragment header |
| `ST_MALFORMED` | not checked: bad version or IHL, or the frame ends before the IP length |

## The four units

**`calc_unit`** holds the accumulator and the pseudo-header register `ph`,
and the operand multiplexer selects one of these operands:

| operand | high half | low half |
|---|---|---|
| data | masked word, high half | masked word, low half |
| protocol/length | protocol | length |
| merge | `~ph` | stored partial sum |
| total | total length | — |

**`length_counter`** contains three pieces of hardware:

- A 4-bit header counter counts the words left in the current header: the
  IPv4 header with its options, the ten-word IPv6 header, or one extension
  header.
- One 16-bit counter has a single adder whose operands are multiplexed. In
  turn it computes:
  - total length − 4·IHL;
  - the remaining TCP/UDP bytes, which give the byte mask of each word;
  - 8·offset + `flen`;
  - the stored byte count + `flen`.
- A 13-bit subtractor removes IPv6 extension headers from the payload length.
  These headers are multiples of 8 bytes, so it works on bits 15:3.

**`frag_memory`** has `N_ENTRIES` register places. Each place holds a key
(version, source, destination, identification, and the protocol for IPv4)
and a state (partial sum, bytes received, total length, total-known flag).
A lookup compares every place at once and registers the match vector in the
first clock. The second clock encodes it into hit / place / lowest free
place. The answer is therefore ready two clocks after the first payload word.
That is in time even when a fragment carries a single word.

**`tucfp_control`** is a 16-state FSM:

| states | what they handle |
|---|---|
| `V4_W1`…`V4_W4`, `V4_OPT` | the IPv4 header |
| `V6_W1`, `V6_ADDR` | the fixed IPv6 header |
| `V6_EXT`, `V6_EXT_REST` | hop-by-hop, routing, destination-options and fragment headers |
| `PAYLOAD` | the TCP/UDP data |
| `SKIP` | packets that are not checked |
| `FIN1`…`FIN4` | the finish cycles |

The finish cycles do the following:

- **FIN1:** fragment end.
- **FIN2:** protocol/length or merge, plus the byte-count sum.
- **FIN3:** write or release the memory place, and decide whether the packet
  is complete.
- **FIN4:** add the total length and register the result.

## Where this design departs from the original

- The original controller has 76 states. Their encoding is not published.
  This FSM covers the same cases, listed above, with 16 states and its own
  finish sequence.
- The accumulator register sits in the calculation unit. The original design
  seems to keep the working register in the memory unit. Behaviour is the
  same.
- The contents of the key, the way the 13-bit subtractor is used, the `~ph`
  merge, and the reassembly handshake (`occupied`, `ra_drop`, the place
  number in each result) are this design's own choices.
- These cases are not supported:
  - IPv6 extension headers longer than 64 bytes (the header counter has 4
    bits);
  - extension headers after an IPv6 fragment header;
  - jumbograms.
- A UDP checksum field of zero is not treated as "no checksum".
- The IPv4 header checksum is not checked here.
- The clock rate has not been measured. The original reached 381 MHz in a
  0.18 µm process after synthesis (12.2 Gb/s). This RTL has not been timed
  in any technology. The critical path should be the same one: from the FSM,
  through the operand multiplexer and the two adders, into the accumulator.

## Files

| file | contents |
|---|---|
| `rtl/tucfp_pkg.sv` | shared types: key, stored state, operations, status, result |
| `rtl/oc_add16.sv` | 1's complement carry-lookahead adder |
| `rtl/calc_unit.sv` | operand multiplexer, two adders, accumulator, pseudo-header register |
| `rtl/length_counter.sv` | header counter, 16-bit counter, 13-bit subtractor |
| `rtl/frag_memory.sv` | register memory of fragmented packets |
| `rtl/tucfp_control.sv` | FSM |
| `rtl/tucfp.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_tucfp_linerate` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Run one with Verilator
5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/tucfp_pkg.sv tb/tb_tucfp.sv --top-module tb_tucfp -o sim
./obj_dir/sim
```

`tb_tucfp` runs the whole page at its default size (two memory places) in
about a second. Its packet generator does the following:

- builds TCP and UDP segments with correct checksums, and corrupts about one
  in four or five of them;
- wraps them in IPv4 headers (with and without options) or IPv6 headers (with
  and without extension headers);
- fragments some of them on 8-byte boundaries, including one-word last
  fragments;
- shuffles the fragments and interleaves two packets;
- fills a memory that is already full;
- drops a place through the reassembly port;
- sends ICMP packets and truncated frames;
- inserts random `in_valid` stalls;
- sends every frame with the minimum five-cycle gap.

A reference model checks each result field by field, along with its
four-clock latency and the `occupied` vector. The reference computes the sum
with a plain 32-bit accumulation and is independent of the RTL. The
testbench counts each of these mechanisms and fails if one never occurred.

`tb_tucfp_linerate` sends bursts of minimum-size and maximum-size packets
(46-byte and 1500-byte IP packets) with no stalls. The first burst is spaced
the way a 10 Gb/s Ethernet link delivers them: the IP packet plus 38 bytes of
Ethernet overhead. The second burst uses the page's own minimum gap. In the
second burst the page takes 4.10 link bytes per clock, above the 4.0 that a
10 Gb/s link delivers at 312.5 MHz. A minimum frame takes 16 clocks in the
page (12 words plus 4 finish clocks) and occupies 21 clocks on the link.

The unit testbenches cover the following:

| testbench | what it covers |
|---|---|
| `tb_oc_add16` | corner cases and 200 000 random pairs |
| `tb_calc_unit` | random operation streams against a folding reference |
| `tb_length_counter` | directed length arithmetic and masks |
| `tb_frag_memory` | lookup, allocation, a full memory, release, drop, and a random model |
| `tb_tucfp_control` | per-cycle operation traces for whole packets, fragments (hit, allocate, complete, no place), IPv6 with an extension header, and ICMP |

## Changing it

- **More memory places.** Set `N_ENTRIES` on `tucfp`, up to 16; the slot
  fields have 4 bits. The compare stays parallel, so the area grows with
  about 300 key bits per place.
- **Longer extension headers.** Widen the header counter in `length_counter`
  and relax `ext_too_long`.
- **A wider or pipelined data path.** This needs a new `calc_unit` (more
  terms per clock, or a register between the two adders) and a new finish
  schedule in `tucfp_control`.
