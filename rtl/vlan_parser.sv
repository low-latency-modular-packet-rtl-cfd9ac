// vlan_parser: IEEE 802.1Q / 802.1ad VLAN tag parser (GPPI).
//
// A VLAN tag is 4 bytes: the tag control information and the EtherType of
// what follows, 2 bytes into the tag. The next header starts 4 bytes after
// the tag. nxt.known rises in the word that carries the second EtherType
// byte. The parser chain holds two VLAN stages, as the supported stack
// allows up to two tags.
//
// The protocol is one of the paper's supported stack; how its header is read
// follows the protocol standard. DW must equal the gppi_if instance's width.
module vlan_parser
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

  field_grab #(.DW(DW), .FO(2), .FL(2)) u_et (
    .clk, .rst_n, .data(gppi.data), .valid(gppi.valid), .sop(gppi.sop), .data_off(gppi.data_off),
    .po_known(gppi.hdr.known), .po(gppi.hdr.off), .field(etype), .ok(et_ok));

  always_comb begin
    nxt.known = et_ok;
    nxt.typ   = ethertype_to_proto(etype);
    nxt.off   = gppi.hdr.off + off_t'(4);
  end

endmodule
