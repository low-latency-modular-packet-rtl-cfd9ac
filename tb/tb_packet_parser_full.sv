// tb_packet_parser_full: the packet parser with every parameter at its
// default (2048-bit bus, no inner pipeline register, extraction on),
// driven with random packets and checked by parser_checker. With a
// 256-byte word most header stacks fit in the first word, so the results
// must be known in that word and appear one clock after it went in.
module tb_packet_parser_full;
  import parser_pkg::*;

  localparam int DW = 2048;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [DW-1:0] in_data, out_data;
  logic in_valid, in_sop, in_eop, out_valid, out_sop, out_eop;
  rec_t [NUM_STAGES-1:0] out_hdrs;
  hdr_t   out_next;
  tuple_t out_tuple;
  logic   done;
  int     checks, failures;
  logic [21:0] cov;

  packet_parser dut (.*);

  parser_checker #(.DW(DW), .PIPE_MASK('0), .EXTRACT(1'b1), .NPKT(300)) chk (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
