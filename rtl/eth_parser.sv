// eth_parser: Ethernet II header parser (GPPI).
//
// Reads the 16-bit EtherType, 12 bytes into the header, and decodes it into
// the next header type (IPv4, IPv6, VLAN, MPLS or unknown). The next header
// starts 14 bytes after this one. nxt.known rises in the word that carries
// the second EtherType byte and stays high to the end of the packet; it is
// combinational from the current word. The header layout is the Ethernet
// standard's; the set of decoded EtherTypes is this design's choice.
//
// The protocol is one of the paper's supported stack; how its header is read
// follows the protocol standard. DW must equal the gppi_if instance's width.
module eth_parser
  import parser_pkg::*;
#(
  parameter int unsigned DW = 2048
) (
  input  logic          clk,
  input  logic          rst_n,
  gppi_if.parser        gppi,      // shared inputs: bus word, word offset, header type/offset
  output hdr_t          nxt        // type/offset of the following header
);
  logic [15:0] etype;
  logic        et_ok;

  field_grab #(.DW(DW), .FO(12), .FL(2)) u_et (
    .clk, .rst_n, .data(gppi.data), .valid(gppi.valid), .sop(gppi.sop), .data_off(gppi.data_off),
    .po_known(gppi.hdr.known), .po(gppi.hdr.off), .field(etype), .ok(et_ok));

  always_comb begin
    nxt.known = et_ok;
    nxt.typ   = ethertype_to_proto(etype);
    nxt.off   = gppi.hdr.off + off_t'(14);
  end

endmodule
