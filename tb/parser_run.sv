// parser_run: one packet_parser configuration with its own parser_checker,
// for testbenches that run several configurations side by side.
module parser_run
  import parser_pkg::*;
#(
  parameter int unsigned           DW        = 128,
  parameter logic [NUM_STAGES-2:0] PIPE_MASK = '0,
  parameter bit                    EXTRACT   = 1'b1,
  parameter int unsigned           NPKT      = 200
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int          checks,
  output int          failures,
  output logic [21:0] cov
);
  logic [DW-1:0] in_data, out_data;
  logic in_valid, in_sop, in_eop, out_valid, out_sop, out_eop;
  rec_t [NUM_STAGES-1:0] out_hdrs;
  hdr_t   out_next;
  tuple_t out_tuple;

  packet_parser #(.DW(DW), .PIPE_MASK(PIPE_MASK), .EXTRACT(EXTRACT)) dut (.*);

  parser_checker #(.DW(DW), .PIPE_MASK(PIPE_MASK), .EXTRACT(EXTRACT), .NPKT(NPKT)) chk (.*);

endmodule
