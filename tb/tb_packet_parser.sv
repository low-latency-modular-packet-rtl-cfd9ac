// tb_packet_parser: end-to-end test of the packet parser.
//
// Three parsers run side by side on independent random traffic, each with
// its own parser_checker: a 128-bit bus with every pipeline register
// enabled (headers spread over many words), a 256-bit bus with a mixed
// pipeline placement, and a 512-bit bus with no inner pipeline and no
// extraction module. A mechanism none of them exercised counts as a failure.
module tb_packet_parser;
  import parser_pkg::*;

  localparam int NCFG = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        done [NCFG];
  int          chks [NCFG];
  int          fails[NCFG];
  logic [21:0] cov  [NCFG];

  parser_run #(.DW(128), .PIPE_MASK(8'hFF),        .EXTRACT(1'b1), .NPKT(400)) run0 (
    .clk, .rst_n, .done(done[0]), .checks(chks[0]), .failures(fails[0]), .cov(cov[0]));
  parser_run #(.DW(256), .PIPE_MASK(8'b1010_0110), .EXTRACT(1'b1), .NPKT(400)) run1 (
    .clk, .rst_n, .done(done[1]), .checks(chks[1]), .failures(fails[1]), .cov(cov[1]));
  parser_run #(.DW(512), .PIPE_MASK(8'h00),        .EXTRACT(1'b0), .NPKT(400)) run2 (
    .clk, .rst_n, .done(done[2]), .checks(chks[2]), .failures(fails[2]), .cov(cov[2]));

  initial begin
    int checks, failures;
    logic [21:0] all_cov;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    checks = 0; failures = 0; all_cov = '0;
    for (int i = 0; i < NCFG; i++) begin
      checks += chks[i];
      failures += fails[i];
      all_cov |= cov[i];
    end
    for (int i = 0; i < 22; i++) begin
      checks++;
      if (!all_cov[i]) begin
        failures++;
        $display("FAIL: mechanism %0d never exercised", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chks[0] + chks[1] + chks[2], fails[0] + fails[1] + fails[2] + 1);
    $finish;
  end

endmodule
