// parser_pkg: types and constants shared by the modular packet header parser.
//
// The Generic Protocol Parser Interface (GPPI) is the common port list of
// every protocol header parser: the current data-bus word, the byte offset of
// that word in the packet, and the type and byte offset of the header the
// parser is to read. Its output is the type and offset of the next header.
// The type/offset pair is carried as hdr_t; its `known` bit says whether the
// pair has been resolved yet for the packet (it may only become known when a
// later bus word brings the field it depends on).
//
// The stage layout (which protocols each of the nine stages parses) follows
// the supported protocol stack: Ethernet, up to two VLAN tags, up to two MPLS
// labels, IPv4 or IPv6, up to two IPv6 extension headers, TCP or UDP. The
// order of the stages, the type encodings and the 16-bit offset width are
// this design's own choices.
package parser_pkg;

  // Width of all byte offsets (packet offset, data-bus offset).
  parameter int unsigned OFF_W = 16;
  typedef logic [OFF_W-1:0] off_t;

  // Header types. P_PAYLOAD marks the end of the supported stack (the
  // data behind TCP or UDP), P_UNKNOWN a next protocol the parser does not
  // support; both end parsing.
  typedef enum logic [3:0] {
    P_ETH     = 4'd0,
    P_VLAN    = 4'd1,
    P_MPLS    = 4'd2,
    P_IPV4    = 4'd3,
    P_IPV6    = 4'd4,
    P_IP6EXT  = 4'd5,   // IPv6 extension with length byte (Hop-by-Hop, Routing, Destination Options)
    P_IP6FRAG = 4'd6,   // IPv6 Fragment extension header (fixed 8 bytes)
    P_TCP     = 4'd7,
    P_UDP     = 4'd8,
    P_PAYLOAD = 4'd9,
    P_UNKNOWN = 4'd10
  } proto_e;

  localparam int unsigned NUM_PROTOS = 11;
  typedef logic [NUM_PROTOS-1:0] proto_mask_t;

  // GPPI header descriptor: type and byte offset of one protocol header.
  typedef struct packed {
    logic   known;
    proto_e typ;
    off_t   off;
  } hdr_t;

  // One entry of the parsed header list: the header a stage received and
  // whether that stage parsed it (hit) or passed it on unchanged.
  typedef struct packed {
    hdr_t hdr;
    logic hit;
  } rec_t;

  // Extracted 5-tuple. IPv4 addresses sit in bits [31:0], upper bits zero.
  typedef struct packed {
    logic         valid;        // addresses and protocol captured
    logic         is_v6;
    logic [127:0] src_ip;
    logic [127:0] dst_ip;
    logic [7:0]   protocol;
    logic         ports_valid;  // TCP or UDP ports captured
    logic [15:0]  src_port;
    logic [15:0]  dst_port;
  } tuple_t;

  // Stage layout.
  localparam int unsigned NUM_STAGES = 9;
  localparam int unsigned IP_STAGE   = 5;   // stage whose input header is the IP header
  localparam int unsigned L4_STAGE   = 8;   // stage whose input header is TCP/UDP

  function automatic proto_mask_t stage_protos(int unsigned s);
    proto_mask_t m = '0;
    case (s)
      0:       m[P_ETH]  = 1'b1;
      1, 2:    m[P_VLAN] = 1'b1;
      3, 4:    m[P_MPLS] = 1'b1;
      5:       begin m[P_IPV4] = 1'b1; m[P_IPV6] = 1'b1; end
      6, 7:    begin m[P_IP6EXT] = 1'b1; m[P_IP6FRAG] = 1'b1; end
      8:       begin m[P_TCP] = 1'b1; m[P_UDP] = 1'b1; end
      default: m = '0;
    endcase
    return m;
  endfunction

  // EtherType decoding (Ethernet and VLAN).
  function automatic proto_e ethertype_to_proto(logic [15:0] et);
    case (et)
      16'h0800:           return P_IPV4;
      16'h86DD:           return P_IPV6;
      16'h8100, 16'h88A8: return P_VLAN;
      16'h8847, 16'h8848: return P_MPLS;
      default:            return P_UNKNOWN;
    endcase
  endfunction

  // IP protocol / IPv6 next-header decoding.
  function automatic proto_e ipproto_to_proto(logic [7:0] p, logic allow_ext);
    case (p)
      8'd6:              return P_TCP;
      8'd17:             return P_UDP;
      8'd0, 8'd43, 8'd60: return allow_ext ? P_IP6EXT : P_UNKNOWN;
      8'd44:             return allow_ext ? P_IP6FRAG : P_UNKNOWN;
      default:           return P_UNKNOWN;
    endcase
  endfunction

endpackage
