// ipv4_parser: IPv4 header parser (GPPI).
//
// Reads the header length IHL (low nibble of byte 0, in 32-bit words) and
// the protocol field (byte 9). The next header starts 4*IHL bytes after this
// one and is TCP (6), UDP (17) or unknown. An IHL below 5 is malformed and
// gives type unknown. nxt.known rises in the word that carries the later of
// the two bytes.
//
// The protocol is one of the paper's supported stack; how its header is read
// follows the protocol standard. DW must equal the gppi_if instance's width.
module ipv4_parser
  import parser_pkg::*;
#(
  parameter int unsigned DW = 2048
) (
  input  logic          clk,
  input  logic          rst_n,
  gppi_if.parser        gppi,      // shared inputs: bus word, word offset, header type/offset
  output hdr_t          nxt        // type/offset of the following header
);
  logic [7:0] vihl, proto;
  logic       vihl_ok, proto_ok;

  field_grab #(.DW(DW), .FO(0), .FL(1)) u_ihl (
    .clk, .rst_n, .data(gppi.data), .valid(gppi.valid), .sop(gppi.sop), .data_off(gppi.data_off),
    .po_known(gppi.hdr.known), .po(gppi.hdr.off), .field(vihl), .ok(vihl_ok));

  field_grab #(.DW(DW), .FO(9), .FL(1)) u_proto (
    .clk, .rst_n, .data(gppi.data), .valid(gppi.valid), .sop(gppi.sop), .data_off(gppi.data_off),
    .po_known(gppi.hdr.known), .po(gppi.hdr.off), .field(proto), .ok(proto_ok));

  always_comb begin
    nxt.known = vihl_ok && proto_ok;
    nxt.typ   = (vihl[3:0] < 4'd5) ? P_UNKNOWN : ipproto_to_proto(proto, 1'b0);
    nxt.off   = gppi.hdr.off + off_t'({vihl[3:0], 2'b00});
  end

endmodule
