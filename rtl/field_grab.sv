// field_grab: waits for a header field to appear on the data bus.
//
// This is the basic block of every protocol header parser. A field of FL
// bytes starts FO bytes into a protocol header that starts at packet offset
// po. Byte i of the field is on the bus when
//   po + FO + i  is in  [data_off, data_off + DW/8),
// where data_off is the packet offset of the current bus word. Each byte is
// taken from the bus in the word that carries it and is also kept in a
// register, so a field that straddles two words, or that was seen in an
// earlier word of the packet, is still available.
//
// Interface: `field` is the field in network byte order (first byte on the
// wire in the most significant bits). `ok` is high in every valid word,
// from the one that carries the last byte of the field up to the end of the
// packet. Both are combinational from the inputs of the current word; the
// registers are cleared by the first word of a packet (sop).
// Bus byte b of a word is data[8*b +: 8]; this lane order is this design's
// choice.
module field_grab
  import parser_pkg::*;
#(
  parameter int unsigned DW = 2048,   // data-bus width in bits
  parameter int unsigned FO = 0,      // field offset in the header, bytes
  parameter int unsigned FL = 1       // field length, bytes
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [DW-1:0]   data,
  input  logic            valid,
  input  logic            sop,
  input  off_t            data_off,
  input  logic            po_known,
  input  off_t            po,
  output logic [8*FL-1:0] field,
  output logic            ok
);
  localparam int unsigned BPW = DW / 8;
  localparam int unsigned IW  = (BPW > 1) ? $clog2(BPW) : 1;
  localparam int unsigned AW  = OFF_W + 2;   // room for po + FO + i and data_off + BPW

  logic [FL-1:0] in_word, have, have_eff;
  logic [7:0]    cur [FL];
  logic [7:0]    cap [FL];

  always_comb begin
    for (int i = 0; i < FL; i++) begin
      logic [AW-1:0] abs_off, rel;
      abs_off    = AW'(po) + AW'(FO) + AW'(i);
      rel        = abs_off - AW'(data_off);
      in_word[i] = valid && po_known && (abs_off >= AW'(data_off)) &&
                   (abs_off < AW'(data_off) + AW'(BPW));
      cur[i]     = data[8*rel[IW-1:0] +: 8];
    end
  end

  assign have_eff = sop ? '0 : have;

  always_comb begin
    for (int i = 0; i < FL; i++)
      field[8*(FL-1-i) +: 8] = in_word[i] ? cur[i] : cap[i];
    ok = valid && (&(have_eff | in_word));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have <= '0;
      for (int i = 0; i < FL; i++) cap[i] <= '0;
    end else if (valid) begin
      have <= have_eff | in_word;
      for (int i = 0; i < FL; i++)
        if (in_word[i]) cap[i] <= cur[i];
    end
  end

endmodule
