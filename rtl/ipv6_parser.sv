// ipv6_parser: IPv6 fixed header parser (GPPI).
//
// The fixed header is 40 bytes; its Next Header field is byte 6. It decodes
// to TCP, UDP, an extension header (Hop-by-Hop 0, Routing 43, Destination
// Options 60, Fragment 44) or unknown. nxt.known rises in the word that
// carries byte 6.
//
// The protocol is one of the paper's supported stack; how its header is read
// follows the protocol standard. DW must equal the gppi_if instance's width.
module ipv6_parser
  import parser_pkg::*;
#(
  parameter int unsigned DW = 2048
) (
  input  logic          clk,
  input  logic          rst_n,
  gppi_if.parser        gppi,      // shared inputs: bus word, word offset, header type/offset
  output hdr_t          nxt        // type/offset of the following header
);
  logic [7:0] nh;
  logic       nh_ok;

  field_grab #(.DW(DW), .FO(6), .FL(1)) u_nh (
    .clk, .rst_n, .data(gppi.data), .valid(gppi.valid), .sop(gppi.sop), .data_off(gppi.data_off),
    .po_known(gppi.hdr.known), .po(gppi.hdr.off), .field(nh), .ok(nh_ok));

  always_comb begin
    nxt.known = nh_ok;
    nxt.typ   = ipproto_to_proto(nh, 1'b1);
    nxt.off   = gppi.hdr.off + off_t'(40);
  end

endmodule
