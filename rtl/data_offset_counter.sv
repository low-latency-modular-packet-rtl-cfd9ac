// data_offset_counter: packet byte offset of the word on the data bus.
//
// Every pipeline stage keeps its own counter, next to its protocol header
// parsers. The first word of a packet (sop) is at offset 0; each further
// valid word is DW/8 bytes further on. data_off is combinational for the
// current word; the register holds the offset of the next word and
// saturates instead of wrapping, so a very long packet can never make a
// header field appear to be on the bus again.
module data_offset_counter
  import parser_pkg::*;
#(
  parameter int unsigned DW = 2048
) (
  input  logic clk,
  input  logic rst_n,
  input  logic valid,
  input  logic sop,
  output off_t data_off
);
  localparam int unsigned BPW = DW / 8;
  localparam off_t        MAX_OFF = off_t'(((2**OFF_W) - 1) / BPW * BPW);

  off_t next_off;

  assign data_off = sop ? '0 : next_off;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      next_off <= '0;
    else if (valid)
      next_off <= (data_off >= MAX_OFF) ? MAX_OFF : data_off + off_t'(BPW);
  end

endmodule
