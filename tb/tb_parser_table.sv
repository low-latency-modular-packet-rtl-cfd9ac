// tb_parser_table: the bus widths and pipe counts of the published results
// table, each run on random traffic.
//
// Rows: 256 bits and 512 bits without inner pipeline, and 2048 bits with
// 0, 1, 2, 4, 5, 7 and 8 pipeline registers. The published table does not
// say where the registers sat; here they are spread over the chain. For
// every row parser_checker verifies all results and that each word comes
// out exactly pipes + 1 clocks after it went in, the latency in clock
// periods that the table's latency and throughput figures imply.
module tb_parser_table;
  import parser_pkg::*;

  localparam int NROW = 9;
  localparam int unsigned           ROW_DW   [NROW] = '{256, 512, 2048, 2048, 2048, 2048, 2048, 2048, 2048};
  localparam logic [NUM_STAGES-2:0] ROW_MASK [NROW] = '{8'h00, 8'h00, 8'h00, 8'h10, 8'h44,
                                                        8'hAA, 8'hDA, 8'hFE, 8'hFF};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        done  [NROW];
  int          chks  [NROW];
  int          fails [NROW];
  logic [21:0] cov   [NROW];

  for (genvar r = 0; r < NROW; r++) begin : g_row
    parser_run #(.DW(ROW_DW[r]), .PIPE_MASK(ROW_MASK[r]), .EXTRACT(1'b1), .NPKT(150)) run (
      .clk, .rst_n, .done(done[r]), .checks(chks[r]), .failures(fails[r]), .cov(cov[r]));
  end

  initial begin
    int checks, failures;
    bit all_done;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all_done = 1;
      foreach (done[r]) all_done &= done[r];
    end while (!all_done);
    checks = 0; failures = 0;
    foreach (chks[r]) begin
      checks += chks[r];
      failures += fails[r];
      $display("row %0d: %0d-bit bus, %0d pipes, latency %0d clocks: %0d checks, %0d failures",
               r, ROW_DW[r], $countones(ROW_MASK[r]), $countones(ROW_MASK[r]) + 1, chks[r], fails[r]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    int checks, failures;
    repeat (100000) @(posedge clk);
    checks = 0; failures = 1;
    foreach (chks[r]) begin checks += chks[r]; failures += fails[r]; end
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
