// tb_parser_stage: self-checking test of one parser stage.
//
// The stage under test is stage 5 (IPv4 and IPv6 parsers) with its pipeline
// register enabled, on a 128-bit bus. The incoming header type is drawn
// from all types, so the output multiplexer must sometimes select the IPv4
// parser, sometimes the IPv6 parser, and otherwise pass the incoming header
// on. Each output word is checked one clock after its input word: data and
// flags, next header (known timing included) and the header list, whose
// entry 5 must record the received header and whether it was parsed.
module tb_parser_stage;
  import parser_pkg::*;

  localparam int DW = 128, BPW = 16, IDX = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [DW-1:0] data_i, data_o;
  logic valid_i, sop_i, eop_i, valid_o, sop_o, eop_o;
  hdr_t hdr_i, hdr_o;
  rec_t [NUM_STAGES-1:0] list_i, list_o;

  parser_stage #(.DW(DW), .IDX(IDX), .PIPE(1'b1)) dut (.*);

  logic [7:0] pkt [256];
  int checks = 0, failures = 0, n_v4 = 0, n_v6 = 0, n_pass = 0;

  // expected outputs of the word driven in the previous cycle
  logic [DW-1:0] e_data;
  logic e_valid = 0, e_sop, e_eop;
  hdr_t e_hdr;
  rec_t [NUM_STAGES-1:0] e_list;

  task automatic compare();
    checks++;
    if (valid_o !== e_valid ||
        (e_valid && (data_o !== e_data || sop_o !== e_sop || eop_o !== e_eop ||
                     hdr_o !== e_hdr || list_o !== e_list))) begin
      failures++;
      if (failures < 10)
        $display("FAIL: valid %0d/%0d hdr_o %0d %s@%0d, expected %0d %s@%0d", valid_o, e_valid,
                 hdr_o.known, hdr_o.typ.name(), hdr_o.off, e_hdr.known, e_hdr.typ.name(), e_hdr.off);
    end
  endtask

  initial begin
    int po, nw, kf, need;
    proto_e t_in;
    hdr_t   parsed;
    valid_i = 0; sop_i = 0; eop_i = 0; data_i = '0; hdr_i = '0; list_i = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      po = $urandom_range(0, 60);
      t_in = proto_e'($urandom_range(0, 10));
      if ($urandom_range(0, 1) != 0) t_in = ($urandom_range(0, 1) != 0) ? P_IPV4 : P_IPV6;
      foreach (pkt[i]) pkt[i] = 8'($urandom);
      if (t_in == P_IPV4) begin
        pkt[po] = 8'h40 | 8'($urandom_range(5, 15));
        pkt[po+9] = ($urandom_range(0, 1) != 0) ? 8'd6 : 8'd17;
        parsed = '{known: 1'b1, typ: (pkt[po+9] == 6) ? P_TCP : P_UDP,
                   off: off_t'(po + 4 * int'(pkt[po][3:0]))};
        need = po + 9;
        n_v4++;
      end else if (t_in == P_IPV6) begin
        pkt[po+6] = ($urandom_range(0, 1) != 0) ? 8'd6 : 8'd43;
        parsed = '{known: 1'b1, typ: (pkt[po+6] == 6) ? P_TCP : P_IP6EXT, off: off_t'(po + 40)};
        need = po + 6;
        n_v6++;
      end else begin
        parsed = '{known: 1'b1, typ: t_in, off: off_t'(po)};
        need = -1;
        n_pass++;
      end
      nw = (po + 70 + BPW - 1) / BPW;
      kf = ($urandom_range(0, 1) != 0) ? 0 : po / BPW;
      for (int w = 0; w < nw; w++) begin
        bit idle;
        idle = (w > 0 && $urandom_range(0, 3) == 0);
        compare();
        if (idle) begin
          valid_i = 0;
          e_valid = 0;
          @(negedge clk);
          compare();
        end
        for (int i = 0; i < BPW; i++) data_i[8*i +: 8] = pkt[w*BPW + i];
        valid_i = 1; sop_i = (w == 0); eop_i = (w == nw - 1);
        hdr_i = '{known: (w >= kf), typ: t_in, off: off_t'(po)};
        for (int k = 0; k < NUM_STAGES; k++) list_i[k] = rec_t'($urandom);
        e_valid = 1; e_data = data_i; e_sop = sop_i; e_eop = eop_i;
        e_list = list_i;
        e_list[IDX] = '{hdr: hdr_i, hit: (w >= kf) && (t_in == P_IPV4 || t_in == P_IPV6)};
        if (w < kf)                                   e_hdr = hdr_i;
        else if (t_in != P_IPV4 && t_in != P_IPV6)   e_hdr = hdr_i;
        else if ((w + 1) * BPW > need)                e_hdr = parsed;
        else                                          e_hdr = '{known: 1'b0, typ: parsed.typ, off: parsed.off};
        @(negedge clk);
        // the not-yet-known value carries don't-care type/offset bits
        if (!hdr_o.known && !e_hdr.known) e_hdr = hdr_o;
      end
      compare();
      valid_i = 0;
      e_valid = 0;
      @(negedge clk);
    end
    checks++;
    if (n_v4 == 0 || n_v6 == 0 || n_pass == 0) failures++;
    $display("IPv4 %0d, IPv6 %0d, passed on %0d", n_v4, n_v6, n_pass);
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
