// tb_field_extractor: self-checking test of the 5-tuple extraction module.
//
// Puts an IPv4 header, an IPv6 header or a non-IP header at a random offset
// of a random packet, followed by TCP, UDP or an unsupported transport
// header, and presents their types and offsets as the parser chain would
// (each known from the first word or only from the word holding the header
// start). The bus is 128 bits, so IPv6 addresses straddle words. In every
// word the valid flags must rise exactly in the word that brings the last
// needed byte, and the fields must match the bytes that were placed.
module tb_field_extractor;
  import parser_pkg::*;

  localparam int DW = 128, BPW = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [DW-1:0] data;
  logic   valid, sop;
  hdr_t   ip_hdr, l4_hdr;
  tuple_t tuple;

  field_extractor #(.DW(DW)) dut (.*);

  logic [7:0] pkt [256];
  int checks = 0, failures = 0, n_v4 = 0, n_v6 = 0, n_ports = 0;

  task automatic fail(string what);
    failures++;
    if (failures < 10) $display("FAIL: %s", what);
  endtask

  initial begin
    int ipo, l4o, nw, kf_ip, kf_l4, kind, l4k_sel, ip_need;
    proto_e ip_t, l4_t;
    logic [127:0] e_src, e_dst;
    logic [7:0]   e_proto;
    valid = 0; sop = 0; data = '0; ip_hdr = '0; l4_hdr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      foreach (pkt[i]) pkt[i] = 8'($urandom);
      kind = $urandom_range(0, 4);
      ipo  = $urandom_range(0, 40);
      ip_t = (kind < 2) ? P_IPV4 : (kind < 4) ? P_IPV6 : P_MPLS;
      l4o  = ipo + ((ip_t == P_IPV6) ? 40 + 8 * $urandom_range(0, 3) : 4 * $urandom_range(5, 12));
      l4k_sel = $urandom_range(0, 3);
      l4_t = (l4k_sel == 0) ? P_TCP : (l4k_sel == 1) ? P_UDP : (l4k_sel == 2) ? P_UNKNOWN : P_IP6EXT;
      if (ip_t == P_IPV4) begin
        e_src = {96'd0, pkt[ipo+12], pkt[ipo+13], pkt[ipo+14], pkt[ipo+15]};
        e_dst = {96'd0, pkt[ipo+16], pkt[ipo+17], pkt[ipo+18], pkt[ipo+19]};
        e_proto = pkt[ipo+9];
        ip_need = ipo + 19;
        n_v4++;
      end else begin
        for (int j = 0; j < 16; j++) begin
          e_src = {e_src[119:0], pkt[ipo+8+j]};
          e_dst = {e_dst[119:0], pkt[ipo+24+j]};
        end
        e_proto = (l4_t == P_TCP) ? 8'd6 : (l4_t == P_UDP) ? 8'd17 : pkt[ipo+6];
        ip_need = ipo + 39;
        if (ip_t == P_IPV6) n_v6++;
      end
      nw = (l4o + 24 + BPW - 1) / BPW;
      kf_ip = ($urandom_range(0, 1) != 0) ? 0 : ipo / BPW;
      kf_l4 = ($urandom_range(0, 1) != 0) ? kf_ip : l4o / BPW;
      for (int w = 0; w < nw; w++) begin
        bit ipk, l4k, e_valid, e_ports;
        if (w > 0 && $urandom_range(0, 3) == 0) begin
          valid = 0;
          @(negedge clk);
        end
        for (int i = 0; i < BPW; i++) data[8*i +: 8] = pkt[w*BPW + i];
        valid = 1; sop = (w == 0);
        ipk = (w >= kf_ip);
        l4k = (w >= kf_l4);
        ip_hdr = '{known: ipk, typ: ip_t, off: off_t'(ipo)};
        l4_hdr = '{known: l4k, typ: l4_t, off: off_t'(l4o)};
        #1;
        e_valid = (ip_t != P_MPLS) && ipk && l4k && ((w + 1) * BPW > ip_need);
        e_ports = l4k && (l4_t == P_TCP || l4_t == P_UDP) && ((w + 1) * BPW > l4o + 3);
        checks++;
        if (tuple.valid !== e_valid || tuple.ports_valid !== e_ports ||
            tuple.is_v6 !== (ipk && ip_t == P_IPV6))
          fail($sformatf("trial %0d word %0d: valid %0d/%0d ports_valid %0d/%0d", t, w,
                         tuple.valid, e_valid, tuple.ports_valid, e_ports));
        if (e_valid) begin
          checks++;
          if (tuple.src_ip !== e_src || tuple.dst_ip !== e_dst || tuple.protocol !== e_proto)
            fail($sformatf("trial %0d word %0d: addresses/protocol", t, w));
        end
        if (e_ports) begin
          checks++;
          n_ports++;
          if (tuple.src_port !== {pkt[l4o], pkt[l4o+1]} || tuple.dst_port !== {pkt[l4o+2], pkt[l4o+3]})
            fail($sformatf("trial %0d word %0d: ports", t, w));
        end
        @(negedge clk);
      end
      valid = 0;
      @(negedge clk);
    end
    checks++;
    if (n_v4 == 0 || n_v6 == 0 || n_ports == 0) failures++;
    $display("IPv4 %0d, IPv6 %0d, words with ports %0d", n_v4, n_v6, n_ports);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
