# Modular packet header parser

This RTL finds the protocol headers of a packet while the packet streams past on a wide data bus.
It reports each header's type and byte offset, and can also pick out the classic 5-tuple (IP addresses,
protocol, ports). It implements the architecture of the paper *Low-Latency Modular Packet Header Parser for
FPGA*. That architecture has three parts:

- a chain of stages;
- in each stage, small per-protocol parsers that share one common interface;
- an optional pipeline register between every two stages.

The pipeline registers are the tuning knob. With none of them, a packet word passes through the whole
chain in one clock, so latency is lowest. Each register you enable shortens the critical path and so
allows a faster clock, but it adds one clock of latency and some flip-flops.

Supported header stack: Ethernet, then up to two VLAN tags, up to two MPLS labels, IPv4 or IPv6, up to
two IPv6 extension headers, and TCP or UDP.

## The stage chain

A header parser needs only two things from the header before it: where this header starts and what
type it is. Each stage therefore receives one *(type, offset)* pair and passes one on.

- Stage 0 is told that an Ethernet header starts at byte 0.
- Each stage holds parsers for one position in the stack. All its parsers see the same inputs: the
  bus word, the word's byte offset in the packet, and the incoming pair.
- A multiplexer, selected by the incoming type, forwards the result of the matching parser.
- If the stage has no parser for the incoming type, the pair is passed on unchanged. This is how
  absent optional headers (no VLAN, no MPLS, no extensions) skip their stages.

| stage | parsers | reads | next header at |
|---|---|---|---|
| 0 | Ethernet | EtherType, bytes 12-13 | +14 |
| 1, 2 | VLAN (0x8100 or 0x88A8) | EtherType, bytes 2-3 | +4 |
| 3, 4 | MPLS | S bit (byte 2, bit 0); if S = 1, also the first nibble after the label | +4 |
| 5 | IPv4, IPv6 | IPv4: IHL (byte 0) and protocol (byte 9). IPv6: Next Header (byte 6) | IPv4: +4·IHL. IPv6: +40 |
| 6, 7 | IPv6 extension | next header (byte 0) and length (byte 1) | +8·(len+1), or +8 for Fragment |
| 8 | TCP, UDP | TCP: data offset (byte 12). UDP: nothing | TCP: +4·doff. UDP: +8 |

Parsing ends at one of these types:

- `P_PAYLOAD`: the data behind TCP or UDP.
- `P_UNKNOWN`: an EtherType, IP protocol or IHL/data-offset value the parser does not support.
- A header type that no later stage handles. For example, a third MPLS label or a third extension
  header stays in the pipeline as the final header, and the result shows where parsing stopped.

MPLS does not name the protocol it carries. After the bottom label, the MPLS parser therefore looks at
the first nibble of the next byte: 4 means IPv4, 6 means IPv6, anything else gives `P_UNKNOWN`.

## Waiting for a field: how results can arrive in later words

This is the part that takes most care. The bus carries DW/8 bytes per clock. With a narrow bus (for
example 128 bits, 16 bytes), the field a parser needs may only arrive several words after the packet
starts. A field may also be split across two words.

Every field read goes through `field_grab`. It watches for byte *i* of a field that starts FO bytes
into a header at offset *po*, and treats the byte as present when

    po + FO + i  ∈  [data_off, data_off + DW/8)

where `data_off` is the packet offset of the current word. Each stage has its own
`data_offset_counter` for this. When a byte is present, `field_grab` takes it from the bus and also
keeps it in a register. From then until the end of the packet, the field is available in every word,
whichever words its bytes came in.

Every *(type, offset)* pair (`hdr_t`) therefore carries a `known` bit. It is low until the word that
brings the last byte the result depends on. In that same word it goes high, with no extra clock, and
it stays high until the end of the packet.

Because each parser is combinational from the current word, one word can resolve the whole stack. With
the default 2048-bit (256-byte) bus, a normal header stack fits in the first word, so the payload
offset is known in that word. With a 128-bit bus, stage 8 may first learn its TCP offset in word 4, and
the chain result follows in that same word.

No field is ever needed before its header's offset is known. Each header's offset is decided by bytes
that come before it, or, for MPLS, by the header's own first byte. So nothing is missed by waiting for
`known`.

## Pipeline placement and latency

`PIPE_MASK` bit *i* puts a register between stage *i* and stage *i*+1. There are 8 positions, so 0 to 8
pipes can be used, in 2^8 placements per bus width. Each register stores everything that travels with
the word: data, flags, the pair for the next stage, and the header list.

The top always adds one output register. Latency is therefore `popcount(PIPE_MASK) + 1` clocks from a
word going in to the same word coming out. This matches the evaluation in the paper: for every row of
its results table, latency × throughput / bus width comes to pipes + 1 clock periods. For example,
21.1 ns × 96.9 Gb/s / 2048 b ≈ 1.0 and 38.6 ns × 478.1 Gb/s / 2048 b ≈ 9.0.

The paper reports the following points on a Xilinx Virtex-7 870HT. They are reference values only:
clock rate and area cannot be checked with this RTL in simulation.

| bus bits | pipes | Gb/s | latency ns | LUT-FF pairs |
|---|---|---|---|---|
| 256 | 0 | 14.5 | 17.1 | 3 238 |
| 512 | 0 | 28.4 | 18.0 | 4 053 |
| 2048 | 0 | 96.9 | 21.1 | 17 685 |
| 2048 | 1 | 158.5 | 25.9 | 18 547 |
| 2048 | 2 | 212.8 | 28.9 | 18 317 |
| 2048 | 4 | 333.0 | 30.8 | 21 775 |
| 2048 | 5 | 352.0 | 34.9 | 22 373 |
| 2048 | 7 | 453.0 | 36.2 | 26 728 |
| 2048 | 8 | 478.1 | 38.6 | 29 301 |

The defaults (`DW = 2048`, `PIPE_MASK = 0`, `EXTRACT = 1`) are the latency-optimised row. The paper does
not say which pipe positions each row used.

## Interface (`packet_parser`)

Parameters:

- `DW`: bus width in bits, a multiple of 8 (tested with 128, 256, 512 and 2048).
- `PIPE_MASK`: 8 bits, one per pipeline position.
- `EXTRACT`: 1 includes the 5-tuple extractor.

Input stream:

- `in_data`, `in_valid`, `in_sop` (first word), `in_eop` (last word).
- Byte *b* of a word, with byte 0 first on the wire, is `in_data[8*b +: 8]`.
- Idle cycles may appear anywhere, including inside a packet.
- `in_sop` and `in_eop` count only in a word with `in_valid` high; in idle cycles they are ignored.
- There is no back-pressure: a word is accepted every clock that `in_valid` is high.
- Assertions in `packet_parser` check the framing: every packet opens with `in_sop` and closes with
  `in_eop`. They also check that a resolved `out_next` never turns unresolved within a packet.

Output: the same words and flags after the latency above. With each word come the results known so
far for that packet:

- `out_hdrs[k]`: for stage *k*, the header it received (`known`, `typ`, `off`) and `hit`, which says
  whether the stage parsed that header or only passed it on. Entries with `hit` set, in stage order,
  are the packet's header stack.
- `out_next`: the header after the last stage, normally `P_PAYLOAD` and the payload offset.
- `out_tuple`: the 5-tuple. `valid` means the addresses and protocol are captured and the transport
  header is resolved. `ports_valid` means the transport header is TCP or UDP and its ports are
  captured. IPv4 addresses are in bits [31:0]. For IPv6, `protocol` is 6 or 17 when the chain ends in
  TCP or UDP, and otherwise the fixed header's Next Header byte.

All result bits refer to the packet that the word belongs to. Sample them in the `eop` word, or in any
earlier word once they are set.

## 5-tuple extraction

The paper's parser primarily outputs offsets, not field values. Offsets are what a packet editor needs,
and the fields can then be picked out by multiplexers. `field_extractor` is that optional multiplexer
layer. It takes the headers received by the IP stage (5) and the transport stage (8) and uses
`field_grab` instances to collect the addresses, the protocol and the ports. With `EXTRACT = 0` it is
left out and `out_tuple` is zero. This saves its logic when only offsets are needed, for example when
the packet is only written to.

## What comes from the paper and what is this design's own

From the paper:

- the common parser interface (GPPI): data word, word offset and header offset in; next type and
  offset out. Here the inputs are the `gppi_if` interface and the output is a `hdr_t` port;
- one data offset counter per stage;
- parsers sharing inputs, with a type-selected output multiplexer;
- the field-on-bus condition above;
- optional pipeline registers between stages;
- the supported protocol stack and its limits (two VLAN, two MPLS, two extensions);
- the optional 5-tuple extractor;
- the evaluated bus widths and pipe counts.

This design's own choices:

- The stage order, in particular VLAN stages before MPLS stages.
- The type encoding and 16-bit offsets.
- The `known` bit and the keeping of captured bytes for later words.
- Passing unhandled types through a stage.
- Guessing the MPLS payload type from the IP version nibble.
- The header layouts, taken from the protocol standards. The paper only names the protocols.
- The set of recognised EtherTypes and extension header codes: Hop-by-Hop 0, Routing 43, Destination
  Options 60, Fragment 44. Others, such as AH and ESP, end parsing as unknown.
- Treating IHL < 5 and TCP data offset < 5 as unknown.
- The output register, the output format, the asynchronous active-low reset and the byte-lane order.

The paper's implementation was hand-written VHDL for one FPGA. This is an independent SystemVerilog
implementation and has not been synthesised for or measured on that device.

Known limits:

- No back-pressure.
- Offsets saturate at 65280 in very long packets. This is harmless because headers are near the start.
- A truncated packet simply ends with some `known` bits still low.

## Files

`rtl/`:

- `parser_pkg.sv`: types (`proto_e`, `hdr_t`, `rec_t`, `tuple_t`), the stage layout (`stage_protos`),
  EtherType and IP protocol decoding.
- `packet_parser.sv`: top level, the chain, the extractor and the output register.
- `parser_stage.sv`: one stage.
- `gppi_if.sv`: the Generic Protocol Parser Interface. It is the input bundle all parsers of a stage
  share: bus word, `valid`, `sop`, word offset and incoming header. Each stage has one instance.
- `data_offset_counter.sv`, `field_grab.sv`: the two basic blocks.
- `eth_parser.sv`, `vlan_parser.sv`, `mpls_parser.sv`, `ipv4_parser.sv`, `ipv6_parser.sv`,
  `ipv6_ext_parser.sv`, `tcp_parser.sv`, `udp_parser.sv`: protocol parsers. All have the same ports:
  `clk`, `rst_n`, a `gppi_if.parser` port and the `nxt` output.
- `field_extractor.sv`: 5-tuple extraction.

To add a protocol:

1. Write a parser with the same ports (`gppi_if.parser` in, `hdr_t nxt` out), using `field_grab` for
   each field it reads.
2. Add its type to `proto_e` and to `stage_protos`.
3. Add its instance to `parser_stage`.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus:

- `pkt_gen_pkg.sv`: a random packet generator that also computes the expected results from what it
  built.
- `parser_checker.sv`: drives and scores a `packet_parser`.
- `parser_run.sv`: one parser configuration together with its checker.
- `tb_packet_parser.sv`: three configurations side by side: 128-bit with all 8 pipes, 256-bit with 4
  pipes, and 512-bit with no pipes and no extractor. 1200 random packets. It also fails if any
  mechanism was never exercised: each VLAN/MPLS/extension count including one beyond the limit,
  options, fragments, unsupported protocols, multi-word resolution, idle cycles, back-to-back packets,
  pipelining, and v4/v6 extraction.
- `tb_packet_parser_full.sv`: the top with all defaults, 300 packets.
- `tb_parser_table.sv`: the nine bus-width and pipe-count rows of the table above, 150 packets each. The
  pipes are spread along the chain.

The checker verifies:

- every output word, and that it comes out exactly `popcount(PIPE_MASK)+1` clocks after it went in;
- that `out_next.known` rises in exactly the word holding the last byte it depends on;
- every stage entry and the tuple in the last word.

## Simulating

With Verilator 5, for example the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/parser_pkg.sv tb/pkt_gen_pkg.sv tb/tb_packet_parser.sv --top-module tb_packet_parser
    ./obj_dir/Vtb_packet_parser

To run a block's testbench, replace the last file and the top name, for example
`tb/tb_ipv4_parser.sv --top-module tb_ipv4_parser`. `tb/pkt_gen_pkg.sv` is only needed by the three
`packet_parser` testbenches. Each testbench ends by printing `TB_RESULT checks=N failures=M`. Every
testbench runs in well under a second.
