// tb_field_grab: self-checking test of the field-wait-and-capture block.
//
// A 6-byte field 5 bytes into a header is looked for on a 64-bit (8-byte)
// bus, so it usually straddles two words. The header offset is random
// (0-40) and becomes known either from the first word or only from the word
// holding the header start. In every word, ok must be high exactly from the
// word carrying the field's last byte, and then field must equal the six
// bytes in network order. Back-to-back packets check that sop clears what
// was captured before.
module tb_field_grab;
  import parser_pkg::*;

  localparam int DW = 64, BPW = 8, FO = 5, FL = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [DW-1:0]   data;
  logic            valid, sop, po_known, ok;
  off_t            data_off, po;
  logic [8*FL-1:0] field, exp_field;

  field_grab #(.DW(DW), .FO(FO), .FL(FL)) dut (.*);

  logic [7:0] pkt [128];
  int checks = 0, failures = 0;

  initial begin
    int p, nw, known_from;
    valid = 0; sop = 0; data = '0; data_off = '0; po = '0; po_known = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      p = $urandom_range(0, 40);
      foreach (pkt[i]) pkt[i] = 8'($urandom);
      for (int i = 0; i < FL; i++) exp_field[8*(FL-1-i) +: 8] = pkt[p + FO + i];
      nw = (p + FO + FL + 8 + BPW - 1) / BPW;
      known_from = ($urandom_range(0, 1) != 0) ? 0 : p / BPW;
      for (int w = 0; w < nw; w++) begin
        bit exp_ok;
        if (w > 0 && $urandom_range(0, 3) == 0) begin
          valid = 0;
          @(negedge clk);
        end
        for (int i = 0; i < BPW; i++) data[8*i +: 8] = pkt[w*BPW + i];
        valid = 1; sop = (w == 0); data_off = off_t'(w * BPW);
        po = off_t'(p); po_known = (w >= known_from);
        #1;
        exp_ok = (w + 1) * BPW > p + FO + FL - 1;
        checks++;
        if (ok !== exp_ok || (exp_ok && field !== exp_field)) begin
          failures++;
          if (failures < 10)
            $display("FAIL trial %0d word %0d po %0d: ok=%0d field=%h, expected ok=%0d field=%h",
                     t, w, p, ok, field, exp_ok, exp_field);
        end
        @(negedge clk);
      end
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
