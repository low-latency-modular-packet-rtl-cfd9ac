// pkt_gen_pkg: random packet generator and reference results for the
// packet parser testbenches.
//
// pkt_c::build() draws a random header stack (Ethernet, 0-2 VLAN tags,
// 0-3 MPLS labels, IPv4 with random options, IPv6 with 0-3 extension
// headers, TCP/UDP or an unsupported protocol, random payload) and writes
// its bytes. While doing so it records, from its own knowledge of what it
// built, the chain of header types and offsets, the last byte each result
// depends on, and the expected 5-tuple. expect_stages() then derives what
// each of the nine stages should receive; one label or extension header
// more than the stage chain supports is generated on purpose, so parsing
// must stop there.
package pkt_gen_pkg;
  import parser_pkg::*;

  typedef struct {
    proto_e typ;
    int     off;
    int     need;   // last packet byte this header's type/offset depends on
    int     rd;     // last byte the parser of this header reads (-1: none)
  } layer_t;

  // Stage layout as the testbench understands the supported stack.
  function automatic bit stage_handles(int k, proto_e t);
    case (k)
      0:       return t == P_ETH;
      1, 2:    return t == P_VLAN;
      3, 4:    return t == P_MPLS;
      5:       return t == P_IPV4 || t == P_IPV6;
      6, 7:    return t == P_IP6EXT || t == P_IP6FRAG;
      8:       return t == P_TCP || t == P_UDP;
      default: return 0;
    endcase
  endfunction

  class pkt_c;
    logic [7:0] b[$];
    layer_t     chain[$];
    // expected per-stage input header, hit flag, and final output
    proto_e     st_typ[NUM_STAGES];
    int         st_off[NUM_STAGES];
    bit         st_hit[NUM_STAGES];
    layer_t     final_hdr;
    // expected tuple
    bit         t_valid, t_v6, t_ports;
    logic [127:0] t_src, t_dst;
    logic [7:0] t_proto;
    logic [15:0] t_sport, t_dport;
    // what was drawn
    int nvlan, nmpls, l3, next_ext, ihl;
    bit has_frag;
    int l4;   // 0 TCP, 1 UDP, 2 other

    function automatic logic [7:0] rnd8();
      return 8'($urandom);
    endfunction

    function void put(logic [7:0] v);
      b.push_back(v);
    endfunction

    function void put_rand(int n);
      repeat (n) b.push_back(rnd8());
    endfunction

    function void put16(logic [15:0] v);
      b.push_back(v[15:8]);
      b.push_back(v[7:0]);
    endfunction

    function void add_layer(proto_e t, int rd);
      layer_t l;
      l.typ  = t;
      l.off  = b.size();
      l.rd   = rd;
      l.need = -1;
      if (chain.size() > 0) begin
        layer_t p = chain[chain.size()-1];
        l.need = (p.rd > p.need) ? p.rd : p.need;
      end
      chain.push_back(l);
    endfunction

    // Build one packet. Layer list first, then bytes.
    function void build();
      proto_e layers[$];
      int     ext_code[$];
      int     v6_nh0, start, r;
      b.delete();
      chain.delete();
      ext_code.delete();
      nvlan = $urandom_range(0, 2);
      r = $urandom_range(0, 9);
      nmpls = (r < 5) ? 0 : (r < 7) ? 1 : (r < 9) ? 2 : 3;
      r = $urandom_range(0, 9);
      l3 = (r < 4) ? 4 : (r < 9) ? 6 : 0;      // 4: IPv4, 6: IPv6, 0: unsupported
      next_ext = 0;
      has_frag = 0;
      r = $urandom_range(0, 9);
      l4 = (r < 5) ? 0 : (r < 9) ? 1 : 2;
      ihl = 5;
      layers.push_back(P_ETH);
      repeat (nvlan) layers.push_back(P_VLAN);
      repeat (nmpls) layers.push_back(P_MPLS);
      if (l3 == 4) layers.push_back(P_IPV4);
      if (l3 == 6) begin
        layers.push_back(P_IPV6);
        r = $urandom_range(0, 9);
        next_ext = (r < 4) ? 0 : (r < 6) ? 1 : (r < 9) ? 2 : 3;
        repeat (next_ext) begin
          r = $urandom_range(0, 3);
          ext_code.push_back((r == 0) ? 0 : (r == 1) ? 43 : (r == 2) ? 60 : 44);
          layers.push_back((r == 3) ? P_IP6FRAG : P_IP6EXT);
          if (r == 3) has_frag = 1;
        end
      end
      if (l3 != 0 && l4 == 0) layers.push_back(P_TCP);
      if (l3 != 0 && l4 == 1) layers.push_back(P_UDP);

      t_valid = 0; t_v6 = 0; t_ports = 0; t_src = '0; t_dst = '0;
      t_proto = '0; t_sport = '0; t_dport = '0;
      v6_nh0 = 0;

      for (int i = 0; i < layers.size(); i++) begin
        bit     last = (i == layers.size() - 1);
        proto_e nx   = last ? P_UNKNOWN : layers[i+1];
        start = b.size();
        case (layers[i])
          P_ETH, P_VLAN: begin
            logic [15:0] et;
            case (nx)
              P_VLAN:  et = ($urandom_range(0, 1) != 0) ? 16'h8100 : 16'h88A8;
              P_MPLS:  et = ($urandom_range(0, 1) != 0) ? 16'h8847 : 16'h8848;
              P_IPV4:  et = 16'h0800;
              P_IPV6:  et = 16'h86DD;
              default: et = ($urandom_range(0, 1) != 0) ? 16'h0806 : 16'h88CC;
            endcase
            add_layer(layers[i], start + ((layers[i] == P_ETH) ? 13 : 3));
            put_rand((layers[i] == P_ETH) ? 12 : 2);
            put16(et);
          end
          P_MPLS: begin
            bit s = (nx != P_MPLS);
            add_layer(P_MPLS, start + (s ? 4 : 2));
            put_rand(2);
            put({rnd8() & 8'hFE} | 8'(s));
            put_rand(1);
          end
          P_IPV4: begin
            logic [7:0] pr;
            r = $urandom_range(0, 3);
            ihl = (r == 0) ? $urandom_range(6, 15) : 5;
            pr = (nx == P_TCP) ? 8'd6 : (nx == P_UDP) ? 8'd17 : 8'd1;
            add_layer(P_IPV4, start + 9);
            put(8'h40 | 8'(ihl));
            put_rand(8);
            put(pr);
            put_rand(2);
            for (int j = 0; j < 8; j++) put(rnd8());
            t_src = {96'd0, b[start+12], b[start+13], b[start+14], b[start+15]};
            t_dst = {96'd0, b[start+16], b[start+17], b[start+18], b[start+19]};
            t_proto = pr;
            t_valid = 1;
            put_rand(ihl * 4 - 20);
          end
          P_IPV6, P_IP6EXT, P_IP6FRAG: begin
            logic [7:0] nh;
            int eidx = i - (1 + nvlan + nmpls);   // index of the next extension
            case (nx)
              P_TCP:                nh = 8'd6;
              P_UDP:                nh = 8'd17;
              P_IP6EXT, P_IP6FRAG:  nh = 8'(ext_code[eidx]);
              default:              nh = 8'd58;
            endcase
            if (layers[i] == P_IPV6) begin
              add_layer(P_IPV6, start + 6);
              put(8'h60 | (rnd8() & 8'h0F));
              put_rand(5);
              put(nh);
              put_rand(33);
              for (int j = 0; j < 16; j++) begin
                t_src = {t_src[119:0], b[start+8+j]};
                t_dst = {t_dst[119:0], b[start+24+j]};
              end
              v6_nh0 = int'(nh);
              t_v6 = 1;
              t_valid = 1;
            end else if (layers[i] == P_IP6FRAG) begin
              add_layer(P_IP6FRAG, start);
              put(nh);
              put_rand(7);
            end else begin
              int len = $urandom_range(0, 2);
              add_layer(P_IP6EXT, start + 1);
              put(nh);
              put(8'(len));
              put_rand(6 + 8 * len);
            end
          end
          P_TCP: begin
            int doff = $urandom_range(5, 8);
            add_layer(P_TCP, start + 12);
            put_rand(12);
            put(8'(doff << 4) | (rnd8() & 8'h0F));
            put_rand(doff * 4 - 13);
          end
          P_UDP: begin
            add_layer(P_UDP, -1);
            put_rand(8);
          end
          default: ;
        endcase
      end
      // terminal entry
      start = b.size();
      if (l3 != 0 && l4 < 2) add_layer(P_PAYLOAD, -1);
      else                   add_layer(P_UNKNOWN, -1);
      // payload: at least one byte; after MPLS its first nibble must not
      // look like IPv4 or IPv6
      put(8'h00 | (rnd8() & 8'h3F));
      put_rand($urandom_range(0, 40));
      expect_stages();
      // tuple
      if (t_valid) begin
        if (st_typ[8] == P_TCP || st_typ[8] == P_UDP) begin
          t_ports = 1;
          t_sport = {b[st_off[8]], b[st_off[8]+1]};
          t_dport = {b[st_off[8]+2], b[st_off[8]+3]};
          if (t_v6) t_proto = (st_typ[8] == P_TCP) ? 8'd6 : 8'd17;
        end else if (t_v6) begin
          t_proto = 8'(v6_nh0);
        end
      end
      // an IP header that the IP stage never receives yields no tuple
      if (!(st_typ[5] == P_IPV4 || st_typ[5] == P_IPV6)) begin
        t_valid = 0; t_ports = 0;
      end
    endfunction

    function void expect_stages();
      int idx = 0;
      for (int k = 0; k < NUM_STAGES; k++) begin
        st_typ[k] = chain[idx].typ;
        st_off[k] = chain[idx].off;
        st_hit[k] = stage_handles(k, chain[idx].typ);
        if (st_hit[k]) idx++;
      end
      final_hdr = chain[idx];
    endfunction
  endclass

endpackage
