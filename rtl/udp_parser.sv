// udp_parser: UDP header parser (GPPI).
//
// The UDP header has a fixed length of 8 bytes, so no field has to be
// waited for: the payload (type P_PAYLOAD) starts 8 bytes after the header
// and is known as soon as the UDP header's own offset is known. The clock,
// reset, bus word and word offset belong to the common parser ports and are
// not used here (lint reports them as unused).
//
// The protocol is one of the paper's supported stack; how its header is read
// follows the protocol standard. DW must equal the gppi_if instance's width.
module udp_parser
  import parser_pkg::*;
#(
  parameter int unsigned DW = 2048
) (
  input  logic          clk,
  input  logic          rst_n,
  gppi_if.parser        gppi,      // shared inputs: bus word, word offset, header type/offset
  output hdr_t          nxt        // type/offset of the following header
);
  always_comb begin
    nxt.known = gppi.hdr.known && gppi.valid;
    nxt.typ   = P_PAYLOAD;
    nxt.off   = gppi.hdr.off + off_t'(8);
  end

endmodule
