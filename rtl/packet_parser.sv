// packet_parser: low-latency modular packet header parser (top level).
//
// A chain of NUM_STAGES parser stages reads a packet as it streams past on
// a DW-bit data bus and finds the type and byte offset of every protocol
// header: Ethernet, up to two VLAN tags, up to two MPLS labels, IPv4 or IPv6,
// up to two IPv6 extension headers, TCP or UDP, and where the payload starts.
// Stage 0 is told that an Ethernet header starts at offset 0; every stage
// hands the type/offset of the following header to the next one. Between
// stage i and stage i+1 sits an optional pipeline register, enabled by bit i
// of PIPE_MASK: more registers give a higher clock rate at the cost of
// latency and flip-flops. The optional field_extractor (EXTRACT = 1) picks
// the 5-tuple out of the stream. One output register follows, so the
// latency is popcount(PIPE_MASK) + 1 clocks from input word to output word.
//
// Input: one word per clock when in_valid is high; in_sop marks the first
// and in_eop the last word of a packet; byte b of a word (b = 0 first on the
// wire) is in_data[8*b +: 8]. There is no back-pressure. Output: the same
// words, and with each word the results known so far for its packet:
// out_hdrs[k] is the header stage k received and whether it parsed it,
// out_next the header after the last stage (P_PAYLOAD after TCP/UDP, or
// where parsing stopped), out_tuple the 5-tuple. A result's known/valid bit
// rises in the word that brought its last needed byte and stays high to the
// end of the packet.
//
// Stages, optional pipelines and optional extraction follow the paper;
// the default DW = 2048 with no inner pipeline is one of its evaluated
// settings. The single output register, the interface and the result format
// are this design's choices. Assertions check the input framing and that a
// resolved result is never lost within a packet.
module packet_parser
  import parser_pkg::*;
#(
  parameter int unsigned              DW        = 2048,
  parameter logic [NUM_STAGES-2:0]    PIPE_MASK = '0,
  parameter bit                       EXTRACT   = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [DW-1:0]         in_data,
  input  logic                  in_valid,
  input  logic                  in_sop,
  input  logic                  in_eop,
  output logic [DW-1:0]         out_data,
  output logic                  out_valid,
  output logic                  out_sop,
  output logic                  out_eop,
  output rec_t [NUM_STAGES-1:0] out_hdrs,
  output hdr_t                  out_next,
  output tuple_t                out_tuple
);
  logic [DW-1:0]         s_data  [NUM_STAGES+1];
  logic                  s_valid [NUM_STAGES+1];
  logic                  s_sop   [NUM_STAGES+1];
  logic                  s_eop   [NUM_STAGES+1];
  hdr_t                  s_hdr   [NUM_STAGES+1];
  rec_t [NUM_STAGES-1:0] s_list  [NUM_STAGES+1];
  tuple_t                tuple;
  // Pipeline enables per stage output; the last stage feeds the output register.
  localparam logic [NUM_STAGES-1:0] STAGE_PIPE = {1'b0, PIPE_MASK};

  assign s_data[0]  = in_data;
  assign s_valid[0] = in_valid;
  assign s_sop[0]   = in_sop;
  assign s_eop[0]   = in_eop;
  assign s_hdr[0]   = '{known: 1'b1, typ: P_ETH, off: '0};
  assign s_list[0]  = '0;

  for (genvar k = 0; k < NUM_STAGES; k++) begin : g_stage
    parser_stage #(.DW(DW), .IDX(k), .PIPE(STAGE_PIPE[k])) u_stage (
      .clk, .rst_n,
      .data_i(s_data[k]),   .valid_i(s_valid[k]),   .sop_i(s_sop[k]),   .eop_i(s_eop[k]),
      .hdr_i(s_hdr[k]),     .list_i(s_list[k]),
      .data_o(s_data[k+1]), .valid_o(s_valid[k+1]), .sop_o(s_sop[k+1]), .eop_o(s_eop[k+1]),
      .hdr_o(s_hdr[k+1]),   .list_o(s_list[k+1]));
  end

  if (EXTRACT) begin : g_extract
    field_extractor #(.DW(DW)) u_extract (
      .clk, .rst_n,
      .data(s_data[NUM_STAGES]), .valid(s_valid[NUM_STAGES]), .sop(s_sop[NUM_STAGES]),
      .ip_hdr(s_list[NUM_STAGES][IP_STAGE].hdr), .l4_hdr(s_list[NUM_STAGES][L4_STAGE].hdr),
      .tuple);
  end else begin : g_no_extract
    assign tuple = '0;
  end

  // Stream rules: sop and eop count only in a valid word; every packet
  // opens with sop and closes with eop; a resolved result stays resolved for
  // the rest of its packet.
  logic in_pkt, out_known_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt      <= 1'b0;
      out_known_q <= 1'b0;
    end else begin
      if (in_valid) in_pkt <= !in_eop;
      if (out_valid) out_known_q <= out_next.known && !out_eop;
    end
  end

  a_framing: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> (in_sop != in_pkt))
    else $error("packet word outside sop..eop framing");
  a_known_stays: assert property (@(posedge clk) disable iff (!rst_n)
                                  (out_valid && !out_sop && out_known_q) |-> out_next.known)
    else $error("a resolved header was lost within a packet");

  // Output register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_data  <= '0;
      out_hdrs  <= '0;
      out_next  <= '0;
      out_tuple <= '0;
    end else begin
      out_valid <= s_valid[NUM_STAGES];
      out_sop   <= s_sop[NUM_STAGES];
      out_eop   <= s_eop[NUM_STAGES];
      out_data  <= s_data[NUM_STAGES];
      out_hdrs  <= s_list[NUM_STAGES];
      out_next  <= s_hdr[NUM_STAGES];
      out_tuple <= tuple;
    end
  end

endmodule
