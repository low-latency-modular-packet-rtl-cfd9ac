// gppi_if: Generic Protocol Parser Interface, the input side.
//
// Every protocol header parser of a stage receives the same bundle: the
// current data-bus word with its valid and start-of-packet flags, the
// packet byte offset of that word (from the stage's data offset counter),
// and the type and byte offset of the header the stage is to parse. One
// instance per stage is shared by all its parsers, as the parsers share
// their inputs. The output side of the interface, the type and offset of
// the following header, is each parser's own hdr_t output port.
// The bundle's content follows the paper; its grouping into an interface
// with a `parser` modport is this design's choice.
interface gppi_if
  import parser_pkg::*;
#(
  parameter int unsigned DW = 2048
);
  logic [DW-1:0] data;       // current data-bus word
  logic          valid;      // word valid
  logic          sop;        // first word of a packet
  off_t          data_off;   // packet offset of this word
  hdr_t          hdr;        // type/offset of the header to parse

  modport parser (input data, valid, sop, data_off, hdr);
  modport source (output data, valid, sop, data_off, hdr);
endinterface
