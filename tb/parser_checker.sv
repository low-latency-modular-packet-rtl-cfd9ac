// parser_checker: stimulus and scoreboard for packet_parser.
//
// Generates NPKT random packets with pkt_gen_pkg, sends them word by word
// (DW/8 bytes per word, byte 0 in the low bits) with random idle cycles and
// back-to-back packets, and checks every output word against the reference:
//   - the data word and its sop/eop flags come out exactly LAT clocks after
//     they went in, LAT = popcount(PIPE_MASK) + 1;
//   - out_next.known is high from exactly the word that carries the last
//     byte the final header depends on (lowest possible latency in words);
//   - in the last word: every stage's received header and hit flag, the
//     final header, and (EXTRACT = 1) the 5-tuple.
// cov reports which mechanisms the run exercised (see COV_* below).
module parser_checker
  import parser_pkg::*;
  import pkt_gen_pkg::*;
#(
  parameter int unsigned           DW        = 128,
  parameter logic [NUM_STAGES-2:0] PIPE_MASK = '0,
  parameter bit                    EXTRACT   = 1'b1,
  parameter int unsigned           NPKT      = 200
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output logic [DW-1:0]         in_data,
  output logic                  in_valid,
  output logic                  in_sop,
  output logic                  in_eop,
  input  logic [DW-1:0]         out_data,
  input  logic                  out_valid,
  input  logic                  out_sop,
  input  logic                  out_eop,
  input  rec_t [NUM_STAGES-1:0] out_hdrs,
  input  hdr_t                  out_next,
  input  tuple_t                out_tuple,
  output logic                  done,
  output int                    checks,
  output int                    failures,
  output logic [21:0]           cov
);
  localparam int BPW = DW / 8;
  localparam int LAT = $countones(PIPE_MASK) + 1;

  typedef struct {
    logic [DW-1:0] data;
    logic          sop, eop;
    longint        cyc;
  } word_t;

  word_t  sent[$];
  pkt_c   exp_q[$];
  longint cyc = 0;
  int     out_word = 0;
  int     npkt_done = 0;
  int     cov_cnt[22];

  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(string what);
    failures++;
    if (failures < 20) $display("FAIL [DW=%0d mask=%0h] %s at cycle %0d", DW, PIPE_MASK, what, cyc);
  endtask

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) fail(what);
  endtask

  // Stimulus
  initial begin
    pkt_c p;
    in_valid = 0; in_sop = 0; in_eop = 0; in_data = '0;
    checks = 0; failures = 0; done = 0;
    foreach (cov_cnt[i]) cov_cnt[i] = 0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    for (int n = 0; n < NPKT; n++) begin
      int nw;
      p = new();
      p.build();
      exp_q.push_back(p);
      cov_cnt[0]  += int'(p.nvlan >= 1);
      cov_cnt[1]  += int'(p.nvlan == 2);
      cov_cnt[2]  += int'(p.nmpls >= 1);
      cov_cnt[3]  += int'(p.nmpls == 2);
      cov_cnt[4]  += int'(p.nmpls == 3);
      cov_cnt[5]  += int'(p.st_typ[5] == P_IPV4);
      cov_cnt[6]  += int'(p.st_typ[5] == P_IPV4 && p.ihl > 5);
      cov_cnt[7]  += int'(p.st_typ[5] == P_IPV6);
      cov_cnt[8]  += int'(p.st_typ[5] == P_IPV6 && p.next_ext >= 1);
      cov_cnt[9]  += int'(p.st_typ[5] == P_IPV6 && p.next_ext == 2);
      cov_cnt[10] += int'(p.st_typ[5] == P_IPV6 && p.next_ext == 3);
      cov_cnt[11] += int'(p.st_typ[5] == P_IPV6 && p.has_frag);
      cov_cnt[12] += int'(p.st_typ[8] == P_TCP);
      cov_cnt[13] += int'(p.st_typ[8] == P_UDP);
      cov_cnt[14] += int'(p.l3 == 0);
      cov_cnt[15] += int'(p.l3 != 0 && p.l4 == 2);
      cov_cnt[16] += int'(p.final_hdr.need >= BPW);
      cov_cnt[19] += int'(LAT > 1);
      cov_cnt[20] += int'(EXTRACT && p.t_valid && !p.t_v6);
      cov_cnt[21] += int'(EXTRACT && p.t_valid && p.t_v6);
      nw = (p.b.size() + BPW - 1) / BPW;
      if ($urandom_range(0, 3) == 0) begin              // gap between packets
        in_valid <= 0;
        @(posedge clk);
      end
      else if (n > 0) cov_cnt[18]++;                      // back-to-back
      for (int w = 0; w < nw; w++) begin
        word_t s;
        if (w > 0 && $urandom_range(0, 4) == 0) begin     // idle cycle inside a packet
          in_valid <= 0;
          cov_cnt[17]++;
          @(posedge clk);
        end
        s.data = '0;
        for (int i = 0; i < BPW; i++)
          s.data[8*i +: 8] = (w * BPW + i < p.b.size()) ? p.b[w * BPW + i] : 8'h00;
        s.sop = (w == 0);
        s.eop = (w == nw - 1);
        s.cyc = cyc + 1;                                 // count of the edge that samples it
        sent.push_back(s);
        in_data  <= s.data;
        in_sop   <= s.sop;
        in_eop   <= s.eop;
        in_valid <= 1;
        @(posedge clk);
      end
    end
    in_valid <= 0;
    wait (npkt_done == NPKT);
    repeat (2) @(posedge clk);
    foreach (cov_cnt[i]) cov[i] = (cov_cnt[i] > 0);
    $display("parser_checker DW=%0d PIPE_MASK=%0h EXTRACT=%0d: %0d packets; coverage counts:", DW, PIPE_MASK, EXTRACT, NPKT);
    $display("  vlan1=%0d vlan2=%0d mpls1=%0d mpls2=%0d mpls3(beyond)=%0d ipv4=%0d ipv4opt=%0d ipv6=%0d",
             cov_cnt[0], cov_cnt[1], cov_cnt[2], cov_cnt[3], cov_cnt[4], cov_cnt[5], cov_cnt[6], cov_cnt[7]);
    $display("  ext1=%0d ext2=%0d ext3(beyond)=%0d frag=%0d tcp=%0d udp=%0d unkL3=%0d unkL4=%0d multiword=%0d",
             cov_cnt[8], cov_cnt[9], cov_cnt[10], cov_cnt[11], cov_cnt[12], cov_cnt[13], cov_cnt[14], cov_cnt[15], cov_cnt[16]);
    $display("  idle=%0d back2back=%0d pipelined=%0d tuple4=%0d tuple6=%0d",
             cov_cnt[17], cov_cnt[18], cov_cnt[19], cov_cnt[20], cov_cnt[21]);
    done = 1;
  end

  // Scoreboard, sampled just before each rising edge
  word_t sb_w;
  pkt_c  sb_p;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (sent.size() == 0) fail("output word with nothing sent");
      else begin
        sb_w = sent.pop_front();
        sb_p = exp_q[0];
        chk(out_data == sb_w.data && out_sop == sb_w.sop && out_eop == sb_w.eop, "data word or flags differ");
        chk(cyc - sb_w.cyc == longint'(LAT), $sformatf("latency %0d, expected %0d", cyc - sb_w.cyc, LAT));
        if (out_sop) out_word = 0;
        chk(out_next.known == ((out_word + 1) * BPW > sb_p.final_hdr.need),
            $sformatf("out_next.known=%0d in word %0d, need byte %0d", out_next.known, out_word, sb_p.final_hdr.need));
        if (out_eop) begin
          for (int k = 0; k < NUM_STAGES; k++) begin
            chk(out_hdrs[k].hdr.known && out_hdrs[k].hdr.typ == sb_p.st_typ[k] &&
                int'(out_hdrs[k].hdr.off) == sb_p.st_off[k] && out_hdrs[k].hit == sb_p.st_hit[k],
                $sformatf("stage %0d got %s@%0d hit %0d, expected %s@%0d hit %0d", k,
                          out_hdrs[k].hdr.typ.name(), out_hdrs[k].hdr.off, out_hdrs[k].hit,
                          sb_p.st_typ[k].name(), sb_p.st_off[k], sb_p.st_hit[k]));
          end
          chk(out_next.typ == sb_p.final_hdr.typ && int'(out_next.off) == sb_p.final_hdr.off,
              $sformatf("final %s@%0d, expected %s@%0d", out_next.typ.name(), out_next.off,
                        sb_p.final_hdr.typ.name(), sb_p.final_hdr.off));
          if (EXTRACT) begin
            chk(out_tuple.valid == sb_p.t_valid && out_tuple.ports_valid == sb_p.t_ports, "tuple valid flags");
            if (sb_p.t_valid)
              chk(out_tuple.is_v6 == sb_p.t_v6 && out_tuple.src_ip == sb_p.t_src && out_tuple.dst_ip == sb_p.t_dst &&
                  out_tuple.protocol == sb_p.t_proto, "tuple addresses/protocol");
            if (sb_p.t_ports)
              chk(out_tuple.src_port == sb_p.t_sport && out_tuple.dst_port == sb_p.t_dport, "tuple ports");
          end
          exp_q.delete(0);
          npkt_done++;
        end
        out_word++;
      end
    end
  end

endmodule
