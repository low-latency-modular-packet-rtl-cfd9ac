// tb_ipv6_ext_parser: self-checking test of the IPv6 extension header parser.
//
// Places a IPv6 extension header at a random offset (0-70) in a random packet,
// fills the fields the parser reads with interesting values, and sends the
// packet over a 128-bit bus with random idle cycles; the header offset is
// sometimes known from the first word, sometimes only from the word that
// holds the header start. In every word, nxt.known must be high exactly
// from the word that carries the last byte the result depends on, and then
// nxt must equal the value worked out by the model below.
module tb_ipv6_ext_parser;
  import parser_pkg::*;

  localparam int DW = 128;
  localparam int BPW = DW / 8;
  localparam int NTRIALS = 400;
  localparam logic [15:0] ETS [8] = '{16'h0800, 16'h86DD, 16'h8100, 16'h88A8,
                                      16'h8847, 16'h8848, 16'h0806, 16'h0000};
  localparam logic [3:0]  NIBS [4] = '{4'h4, 4'h6, 4'h0, 4'hF};
  localparam logic [7:0]  IPP [8] = '{8'd6, 8'd17, 8'd0, 8'd43, 8'd60, 8'd44, 8'd58, 8'd1};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [DW-1:0] data;
  logic          valid, sop;
  off_t          data_off;
  hdr_t          hdr_in, nxt;

  gppi_if #(.DW(DW)) gppi ();
  assign gppi.data     = data;
  assign gppi.valid    = valid;
  assign gppi.sop      = sop;
  assign gppi.data_off = data_off;
  assign gppi.hdr      = hdr_in;

  ipv6_ext_parser #(.DW(DW)) dut (.clk, .rst_n, .gppi, .nxt);

  logic [7:0] pkt [256];
  int     checks = 0, failures = 0;
  proto_e in_typ, e_typ;
  int     e_off, e_need;
  logic [15:0] etv;

  function automatic proto_e et_map(logic [15:0] e);
    if (e == 16'h0800) return P_IPV4;
    if (e == 16'h86DD) return P_IPV6;
    if (e == 16'h8100 || e == 16'h88A8) return P_VLAN;
    if (e == 16'h8847 || e == 16'h8848) return P_MPLS;
    return P_UNKNOWN;
  endfunction

  function automatic proto_e nh_map(logic [7:0] n);
    if (n == 6) return P_TCP;
    if (n == 17) return P_UDP;
    if (n == 0 || n == 43 || n == 60) return P_IP6EXT;
    if (n == 44) return P_IP6FRAG;
    return P_UNKNOWN;
  endfunction

  initial begin
    int po, nw, known_from;
    valid = 0; sop = 0; data = '0; data_off = '0; hdr_in = '0; in_typ = P_IP6EXT;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NTRIALS; t++) begin
      po = $urandom_range(0, 70);
      foreach (pkt[i]) pkt[i] = 8'($urandom);
      in_typ = ($urandom_range(0, 1) != 0) ? P_IP6EXT : P_IP6FRAG;
      pkt[po] = IPP[$urandom_range(0, 7)];
      e_typ = nh_map(pkt[po]);
      if (in_typ == P_IP6FRAG) begin e_need = po; e_off = po + 8; end
      else begin e_need = po + 1; e_off = po + 8 * (int'(pkt[po+1]) + 1); end
      nw = (po + 80 + BPW - 1) / BPW;
      known_from = ($urandom_range(0, 1) != 0) ? 0 : po / BPW;
      for (int w = 0; w < nw; w++) begin
        bit exp_known;
        if (w > 0 && $urandom_range(0, 3) == 0) begin
          valid = 0;
          @(negedge clk);
        end
        for (int i = 0; i < BPW; i++) data[8*i +: 8] = pkt[w*BPW + i];
        valid    = 1;
        sop      = (w == 0);
        data_off = off_t'(w * BPW);
        hdr_in   = '{known: (w >= known_from), typ: in_typ, off: off_t'(po)};
        #1;
        exp_known = (w >= known_from) && ((w + 1) * BPW > e_need);
        checks++;
        if (nxt.known !== exp_known || (exp_known && (nxt.typ != e_typ || int'(nxt.off) != e_off))) begin
          failures++;
          if (failures < 10)
            $display("FAIL trial %0d word %0d: got known=%0d %s@%0d, expected known=%0d %s@%0d",
                     t, w, nxt.known, nxt.typ.name(), nxt.off, exp_known, e_typ.name(), e_off);
        end
        @(negedge clk);
      end
      valid = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
