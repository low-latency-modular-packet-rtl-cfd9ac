// parser_stage: one stage of the parser pipeline.
//
// All protocol header parsers of the stage share the same inputs, bundled
// in one gppi_if instance: the data bus, the stage's own data offset
// counter and the incoming header type/offset. Each parser computes the type and offset of the header that
// follows its own; a multiplexer selected by the incoming header type picks
// one of them. A stage that has no parser for the incoming type passes the
// incoming type/offset on unchanged, so optional headers (VLAN, MPLS, IPv6
// extensions) simply skip stages. Which parsers a stage holds is set by
// parser_pkg::stage_protos(IDX).
//
// The stage also writes entry IDX of the parsed header list: the header it
// received and whether it parsed it. Everything the stage passes on (data
// word, flags, next header, list) goes through an optional pipeline
// register (PIPE = 1, one clock of latency) or straight through (PIPE = 0).
// Optional pipeline registers between the stages follow the paper; the
// list of received headers as output is this design's choice.
module parser_stage
  import parser_pkg::*;
#(
  parameter int unsigned DW   = 2048,
  parameter int unsigned IDX  = 0,     // stage index, selects the parsers
  parameter bit          PIPE = 1'b0   // register the stage's outputs
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [DW-1:0]         data_i,
  input  logic                  valid_i,
  input  logic                  sop_i,
  input  logic                  eop_i,
  input  hdr_t                  hdr_i,    // header this stage is to parse
  input  rec_t [NUM_STAGES-1:0] list_i,
  output logic [DW-1:0]         data_o,
  output logic                  valid_o,
  output logic                  sop_o,
  output logic                  eop_o,
  output hdr_t                  hdr_o,    // header the next stage is to parse
  output rec_t [NUM_STAGES-1:0] list_o
);
  localparam proto_mask_t PROTOS = stage_protos(IDX);

  off_t data_off;
  hdr_t par_nxt [NUM_PROTOS];
  hdr_t nxt;
  logic hit;
  rec_t [NUM_STAGES-1:0] list_n;

  data_offset_counter #(.DW(DW)) u_doc (
    .clk, .rst_n, .valid(valid_i), .sop(sop_i), .data_off);

  // Generic Protocol Parser Interface shared by all parsers of the stage.
  gppi_if #(.DW(DW)) bus ();
  assign bus.data     = data_i;
  assign bus.valid    = valid_i;
  assign bus.sop      = sop_i;
  assign bus.data_off = data_off;
  assign bus.hdr      = hdr_i;

  // Protocol header parsers present in this stage.
  for (genvar p = 0; p < NUM_PROTOS; p++) begin : g_par
    if (PROTOS[p] && p == P_ETH) begin : g_eth
      eth_parser #(.DW(DW)) u (.clk, .rst_n, .gppi(bus), .nxt(par_nxt[p]));
    end else if (PROTOS[p] && p == P_VLAN) begin : g_vlan
      vlan_parser #(.DW(DW)) u (.clk, .rst_n, .gppi(bus), .nxt(par_nxt[p]));
    end else if (PROTOS[p] && p == P_MPLS) begin : g_mpls
      mpls_parser #(.DW(DW)) u (.clk, .rst_n, .gppi(bus), .nxt(par_nxt[p]));
    end else if (PROTOS[p] && p == P_IPV4) begin : g_ipv4
      ipv4_parser #(.DW(DW)) u (.clk, .rst_n, .gppi(bus), .nxt(par_nxt[p]));
    end else if (PROTOS[p] && p == P_IPV6) begin : g_ipv6
      ipv6_parser #(.DW(DW)) u (.clk, .rst_n, .gppi(bus), .nxt(par_nxt[p]));
    end else if (PROTOS[p] && p == P_IP6EXT) begin : g_ext
      // One extension parser serves both extension types.
      ipv6_ext_parser #(.DW(DW)) u (.clk, .rst_n, .gppi(bus), .nxt(par_nxt[p]));
    end else if (PROTOS[p] && p == P_IP6FRAG && PROTOS[P_IP6EXT]) begin : g_frag
      assign par_nxt[p] = par_nxt[P_IP6EXT];
    end else if (PROTOS[p] && p == P_TCP) begin : g_tcp
      tcp_parser #(.DW(DW)) u (.clk, .rst_n, .gppi(bus), .nxt(par_nxt[p]));
    end else if (PROTOS[p] && p == P_UDP) begin : g_udp
      udp_parser #(.DW(DW)) u (.clk, .rst_n, .gppi(bus), .nxt(par_nxt[p]));
    end else begin : g_none
      assign par_nxt[p] = '0;
    end
  end

  // Output multiplexer, selected by the incoming header type.
  always_comb begin
    hit = hdr_i.known && PROTOS[hdr_i.typ];
    nxt = hit ? par_nxt[hdr_i.typ] : hdr_i;
    list_n = list_i;
    list_n[IDX] = '{hdr: hdr_i, hit: hit};
  end

  // Optional pipeline register.
  if (PIPE) begin : g_pipe
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        valid_o <= 1'b0;
        sop_o   <= 1'b0;
        eop_o   <= 1'b0;
        hdr_o   <= '0;
        list_o  <= '0;
        data_o  <= '0;
      end else begin
        valid_o <= valid_i;
        sop_o   <= sop_i;
        eop_o   <= eop_i;
        hdr_o   <= nxt;
        list_o  <= list_n;
        data_o  <= data_i;
      end
    end
  end else begin : g_comb
    assign data_o  = data_i;
    assign valid_o = valid_i;
    assign sop_o   = sop_i;
    assign eop_o   = eop_i;
    assign hdr_o   = nxt;
    assign list_o  = list_n;
  end

endmodule
