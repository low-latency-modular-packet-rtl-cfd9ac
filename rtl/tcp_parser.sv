// tcp_parser: TCP header parser (GPPI).
//
// The Data Offset field (high nibble of byte 12) gives the header length in
// 32-bit words; the payload starts 4*DataOffset bytes after the header and
// is reported as type P_PAYLOAD, the end of the supported stack. A Data
// Offset below 5 is malformed and gives type unknown. nxt.known rises in the
// word that carries byte 12.
//
// The protocol is one of the paper's supported stack; how its header is read
// follows the protocol standard. DW must equal the gppi_if instance's width.
module tcp_parser
  import parser_pkg::*;
#(
  parameter int unsigned DW = 2048
) (
  input  logic          clk,
  input  logic          rst_n,
  gppi_if.parser        gppi,      // shared inputs: bus word, word offset, header type/offset
  output hdr_t          nxt        // type/offset of the following header
);
  logic [7:0] doff;
  logic       doff_ok;

  field_grab #(.DW(DW), .FO(12), .FL(1)) u_doff (
    .clk, .rst_n, .data(gppi.data), .valid(gppi.valid), .sop(gppi.sop), .data_off(gppi.data_off),
    .po_known(gppi.hdr.known), .po(gppi.hdr.off), .field(doff), .ok(doff_ok));

  always_comb begin
    nxt.known = doff_ok;
    nxt.typ   = (doff[7:4] < 4'd5) ? P_UNKNOWN : P_PAYLOAD;
    nxt.off   = gppi.hdr.off + off_t'({doff[7:4], 2'b00});
  end

endmodule
