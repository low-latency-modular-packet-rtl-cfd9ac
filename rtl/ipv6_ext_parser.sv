// ipv6_ext_parser: IPv6 extension header parser (GPPI).
//
// Handles both extension types of parser_pkg. For P_IP6EXT (Hop-by-Hop,
// Routing, Destination Options) byte 0 is the next header and byte 1 the
// length in 8-byte units not counting the first 8 bytes, so the next header
// starts 8*(len+1) bytes on. For P_IP6FRAG the header is always 8 bytes and
// only byte 0 is needed. nxt.known rises in the word that carries the last
// byte needed. The chain holds two of these stages, as the supported stack
// allows up to two extension headers.
//
// The protocol is one of the paper's supported stack; how its header is read
// follows the protocol standard. DW must equal the gppi_if instance's width.
module ipv6_ext_parser
  import parser_pkg::*;
#(
  parameter int unsigned DW = 2048
) (
  input  logic          clk,
  input  logic          rst_n,
  gppi_if.parser        gppi,      // shared inputs: bus word, word offset, header type/offset
  output hdr_t          nxt        // type/offset of the following header
);
  logic [7:0] nh, len;
  logic       nh_ok, len_ok;
  logic       is_frag;

  field_grab #(.DW(DW), .FO(0), .FL(1)) u_nh (
    .clk, .rst_n, .data(gppi.data), .valid(gppi.valid), .sop(gppi.sop), .data_off(gppi.data_off),
    .po_known(gppi.hdr.known), .po(gppi.hdr.off), .field(nh), .ok(nh_ok));

  field_grab #(.DW(DW), .FO(1), .FL(1)) u_len (
    .clk, .rst_n, .data(gppi.data), .valid(gppi.valid), .sop(gppi.sop), .data_off(gppi.data_off),
    .po_known(gppi.hdr.known), .po(gppi.hdr.off), .field(len), .ok(len_ok));

  assign is_frag = (gppi.hdr.typ == P_IP6FRAG);

  always_comb begin
    nxt.typ = ipproto_to_proto(nh, 1'b1);
    if (is_frag) begin
      nxt.known = nh_ok;
      nxt.off   = gppi.hdr.off + off_t'(8);
    end else begin
      nxt.known = nh_ok && len_ok;
      nxt.off   = gppi.hdr.off + off_t'({len, 3'b000}) + off_t'(8);
    end
  end

endmodule
