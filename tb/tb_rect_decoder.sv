// tb_rect_decoder: end-to-end test of the rectangular decoder at its
// default size (20 chains, K = 2, 4-bit widths, 20 RAM words, 84-slice
// cubes, basic one-bit fill). rect_dec_env plays tester and linear
// decompressor for 40 random clusters of 1-3 cubes each and checks every
// scan slice, the scan-chain contents and the cycle count of every cube.
// Every mechanism of the basic scheme must occur: new-cluster load,
// cluster reuse, rectangle switch, narrow-rectangle bypass, fill 0 and
// fill 1, the widest rectangle, a last rectangle cut at the cube end and
// tester pauses while loading and while shifting.
module tb_rect_decoder;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                ld_valid, preload;
  logic [19:0]         ld_data;
  logic                scan_en, new_cluster, cube_done, loading;
  logic [19:0]         scan_in;
  logic                done;
  int                  checks, failures;

  always #5 clk = ~clk;

  rect_decoder dut (
    .clk, .rst_n, .ld_valid, .ld_data, .preload, .scan_en, .scan_in,
    .new_cluster, .cube_done, .loading
  );

  rect_dec_env #(.N_CLUSTERS(40)) env (
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
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
