// field_extractor: optional header field extraction (classic 5-tuple).
//
// Uses the header offsets found by the parser chain to pick header fields
// out of the data stream: source and destination IP address, protocol, and
// the TCP or UDP source and destination ports. ip_hdr is the header received
// by the IP stage, l4_hdr the header received by the TCP/UDP stage. Every
// field is taken with a field_grab, which waits for the field to appear on
// the bus and keeps it, so the extracted values build up word by word and
// stay valid to the end of the packet.
//
// tuple.valid rises in the first word where the addresses and the protocol
// are captured and the transport header is resolved; tuple.ports_valid in
// the first word where the transport header is TCP or UDP and its ports are
// captured. IPv4 addresses are returned in bits [31:0]. The protocol is the
// IPv4 protocol byte, or for IPv6 6/17 when the chain ends in TCP/UDP and
// otherwise the fixed header's Next Header byte. All outputs are
// combinational from the current word. The extracted field set follows the
// paper; these encodings are this design's choice. The module can be left
// out of the parser (packet_parser EXTRACT = 0).
module field_extractor
  import parser_pkg::*;
#(
  parameter int unsigned DW = 2048
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] data,
  input  logic          valid,
  input  logic          sop,
  input  hdr_t          ip_hdr,
  input  hdr_t          l4_hdr,
  output tuple_t        tuple
);
  off_t data_off;
  logic v4, v6, l4_tcpudp;
  logic [63:0]  v4_addr;
  logic [255:0] v6_addr;
  logic [7:0]   v4_proto, v6_nh;
  logic [31:0]  ports;
  logic v4_addr_ok, v6_addr_ok, v4_proto_ok, v6_nh_ok, ports_ok;

  data_offset_counter #(.DW(DW)) u_doc (.clk, .rst_n, .valid, .sop, .data_off);

  assign v4 = ip_hdr.known && ip_hdr.typ == P_IPV4;
  assign v6 = ip_hdr.known && ip_hdr.typ == P_IPV6;
  assign l4_tcpudp = l4_hdr.known && (l4_hdr.typ == P_TCP || l4_hdr.typ == P_UDP);

  field_grab #(.DW(DW), .FO(12), .FL(8)) u_v4_addr (
    .clk, .rst_n, .data, .valid, .sop, .data_off, .po_known(v4), .po(ip_hdr.off),
    .field(v4_addr), .ok(v4_addr_ok));
  field_grab #(.DW(DW), .FO(9), .FL(1)) u_v4_proto (
    .clk, .rst_n, .data, .valid, .sop, .data_off, .po_known(v4), .po(ip_hdr.off),
    .field(v4_proto), .ok(v4_proto_ok));
  field_grab #(.DW(DW), .FO(8), .FL(32)) u_v6_addr (
    .clk, .rst_n, .data, .valid, .sop, .data_off, .po_known(v6), .po(ip_hdr.off),
    .field(v6_addr), .ok(v6_addr_ok));
  field_grab #(.DW(DW), .FO(6), .FL(1)) u_v6_nh (
    .clk, .rst_n, .data, .valid, .sop, .data_off, .po_known(v6), .po(ip_hdr.off),
    .field(v6_nh), .ok(v6_nh_ok));
  field_grab #(.DW(DW), .FO(0), .FL(4)) u_ports (
    .clk, .rst_n, .data, .valid, .sop, .data_off, .po_known(l4_tcpudp), .po(l4_hdr.off),
    .field(ports), .ok(ports_ok));

  always_comb begin
    tuple = '0;
    tuple.is_v6 = v6;
    if (v4) begin
      tuple.src_ip   = {96'd0, v4_addr[63:32]};
      tuple.dst_ip   = {96'd0, v4_addr[31:0]};
      tuple.protocol = v4_proto;
      tuple.valid    = v4_addr_ok && v4_proto_ok && l4_hdr.known;
    end else if (v6) begin
      tuple.src_ip   = v6_addr[255:128];
      tuple.dst_ip   = v6_addr[127:0];
      tuple.protocol = !l4_tcpudp ? v6_nh : (l4_hdr.typ == P_TCP) ? 8'd6 : 8'd17;
      tuple.valid    = v6_addr_ok && v6_nh_ok && l4_hdr.known;
    end
    tuple.ports_valid = ports_ok;
    tuple.src_port    = ports[31:16];
    tuple.dst_port    = ports[15:0];
  end

endmodule
