// mpls_parser: MPLS label stack entry parser (GPPI).
//
// A label stack entry is 4 bytes; the bottom-of-stack bit S is bit 0 of its
// third byte. With S = 0 another MPLS entry follows. With S = 1 MPLS does not
// name its payload, so the parser looks at the first nibble of the byte that
// follows the entry (the IP version field): 4 gives IPv4, 6 gives IPv6,
// anything else unknown. In both cases the next header starts 4 bytes on.
// nxt.known rises in the word that carries the S bit (S = 0) or the byte
// after the entry (S = 1). Guessing the payload from the version nibble is
// this design's choice.
//
// The protocol is one of the paper's supported stack; how its header is read
// follows the protocol standard. DW must equal the gppi_if instance's width.
module mpls_parser
  import parser_pkg::*;
#(
  parameter int unsigned DW = 2048
) (
  input  logic          clk,
  input  logic          rst_n,
  gppi_if.parser        gppi,      // shared inputs: bus word, word offset, header type/offset
  output hdr_t          nxt        // type/offset of the following header
);
  logic [7:0] tc_s, nib;
  logic       s_ok, nib_ok;

  field_grab #(.DW(DW), .FO(2), .FL(1)) u_s (
    .clk, .rst_n, .data(gppi.data), .valid(gppi.valid), .sop(gppi.sop), .data_off(gppi.data_off),
    .po_known(gppi.hdr.known), .po(gppi.hdr.off), .field(tc_s), .ok(s_ok));

  field_grab #(.DW(DW), .FO(4), .FL(1)) u_nib (
    .clk, .rst_n, .data(gppi.data), .valid(gppi.valid), .sop(gppi.sop), .data_off(gppi.data_off),
    .po_known(gppi.hdr.known), .po(gppi.hdr.off), .field(nib), .ok(nib_ok));

  always_comb begin
    nxt.off = gppi.hdr.off + off_t'(4);
    if (!tc_s[0]) begin
      nxt.known = s_ok;
      nxt.typ   = P_MPLS;
    end else begin
      nxt.known = s_ok && nib_ok;
      case (nib[7:4])
        4'd4:    nxt.typ = P_IPV4;
        4'd6:    nxt.typ = P_IPV6;
        default: nxt.typ = P_UNKNOWN;
      endcase
    end
  end

endmodule
