// tb_rect_decoder_all: the rectangular decoder with all control data
// loaded at the start of the test session (LOAD_ALL = 1). 20 chains,
// K = 2, 4-bit widths, 84-slice cubes as in the default build, but with a
// 128-word RAM that holds the words of every cluster of the test set
// (about ten clusters here). The words are preloaded once; then each
// cluster's 1-3 cubes run with the flag cycle selecting the next cluster
// or repeating the current one. Every slice, the scan-chain contents and
// the cycle count of every cube (1 + SCAN_LEN valid cycles) are checked.
module tb_rect_decoder_all;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        ld_valid, preload;
  logic [19:0] ld_data, scan_in;
  logic        scan_en, new_cluster, cube_done, loading;
  logic        done;
  int          checks, failures;

  always #5 clk = ~clk;

  rect_decoder #(.RAM_DEPTH(128), .LOAD_ALL(1'b1)) dut (
    .clk, .rst_n, .ld_valid, .ld_data, .preload, .scan_en, .scan_in,
    .new_cluster, .cube_done, .loading
  );

  rect_dec_env #(.RAM_DEPTH(128), .LOAD_ALL(1'b1), .N_CLUSTERS(16)) env (
    .clk, .rst_n, .ld_valid, .ld_data, .preload, .scan_en, .scan_in,
    .new_cluster, .cube_done, .loading, .done, .checks, .failures
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
