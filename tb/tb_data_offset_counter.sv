// tb_data_offset_counter: self-checking test of the data offset counter at
// its default 2048-bit (256-byte) word.
//
// Sends packets of random length with random idle cycles and checks that
// every valid word reports 256 * (its index in the packet). One packet of
// 300 words runs past the 16-bit offset range and must stop at 65280, the
// last word-aligned offset, instead of wrapping.
module tb_data_offset_counter;
  import parser_pkg::*;

  localparam int BPW = 256;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic valid, sop;
  off_t data_off;

  data_offset_counter dut (.*);

  int checks = 0, failures = 0;

  task automatic send(int nw);
    for (int w = 0; w < nw; w++) begin
      int e;
      if ($urandom_range(0, 3) == 0) begin
        valid = 0;
        @(negedge clk);
      end
      valid = 1; sop = (w == 0);
      #1;
      e = (w * BPW > 65280) ? 65280 : w * BPW;
      checks++;
      if (int'(data_off) != e) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: data_off=%0d, expected %0d", w, data_off, e);
      end
      @(negedge clk);
    end
    valid = 0;
  endtask

  initial begin
    valid = 0; sop = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) send($urandom_range(1, 12));
    send(300);
    send(3);
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
