// tb_rect_decoder_wl3: the decoder in the basic format (one-bit fill,
// one mask bit per two chains) at the chain counts and width fields of
// published basic-scheme results other than the default build, each with
// that result's word size and RAM size (RAM bits / word bits) and test
// sets of its shape with random rectangle contents:
//   s13207, 10 chains: 266 cubes, 8 clusters, 86 rectangles, 10-bit words, 13-word RAM, 70 slices per cube (700 scan cells)
//   s38584, 20 chains: 296 cubes, 8 clusters, 135 rectangles, 3-bit widths, 15-bit words, 20-word RAM, 74 slices per cube (1464 scan cells)
//   s38584, 30 chains: 296 cubes, 8 clusters, 108 rectangles, 3-bit widths, 20-bit words, 16-word RAM, 49 slices per cube
//   s38417, 40 chains: 376 cubes, 7 clusters, 64 rectangles, 25-bit words, 10-word RAM, 42 slices per cube (1664 scan cells)
// The cube lengths follow from the circuits' scan-cell counts. Every
// word fits in one decompressor cycle here. Every slice is checked, and
// each test set's total number of decompressor cycles must be
// cubes x (1 + slices) + rectangles.
module tb_rect_decoder_wl3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] done;
  int         checks [4];
  int         failures [4];

  // s13207, 10 chains
  logic        a_valid, a_pre, a_en, a_new, a_done, a_load;
  logic [9:0] a_data, a_scan;
  rect_decoder #(.N_CHAINS(10), .W_BITS(4), .RAM_DEPTH(13), .SCAN_LEN(70)) dut_a (
    .clk, .rst_n, .ld_valid(a_valid), .ld_data(a_data), .preload(a_pre), .scan_en(a_en),
    .scan_in(a_scan), .new_cluster(a_new), .cube_done(a_done), .loading(a_load)
  );
  rect_dec_env #(.N_CHAINS(10), .W_BITS(4), .RAM_DEPTH(13), .SCAN_LEN(70),
                 .N_CLUSTERS(8), .N_CUBES(266), .N_RECTS(86), .REQUIRE_ALL(1'b0)) env_a (
    .clk, .rst_n, .ld_valid(a_valid), .ld_data(a_data), .preload(a_pre), .scan_en(a_en),
    .scan_in(a_scan), .new_cluster(a_new), .cube_done(a_done), .loading(a_load),
    .done(done[0]), .checks(checks[0]), .failures(failures[0])
  );

  // s38584, 20 chains
  logic        b_valid, b_pre, b_en, b_new, b_done, b_load;
  logic [19:0] b_data, b_scan;
  rect_decoder #(.N_CHAINS(20), .W_BITS(3), .RAM_DEPTH(20), .SCAN_LEN(74)) dut_b (
    .clk, .rst_n, .ld_valid(b_valid), .ld_data(b_data), .preload(b_pre), .scan_en(b_en),
    .scan_in(b_scan), .new_cluster(b_new), .cube_done(b_done), .loading(b_load)
  );
  rect_dec_env #(.N_CHAINS(20), .W_BITS(3), .RAM_DEPTH(20), .SCAN_LEN(74),
                 .N_CLUSTERS(8), .N_CUBES(296), .N_RECTS(135), .REQUIRE_ALL(1'b0)) env_b (
    .clk, .rst_n, .ld_valid(b_valid), .ld_data(b_data), .preload(b_pre), .scan_en(b_en),
    .scan_in(b_scan), .new_cluster(b_new), .cube_done(b_done), .loading(b_load),
    .done(done[1]), .checks(checks[1]), .failures(failures[1])
  );

  // s38584, 30 chains
  logic        c_valid, c_pre, c_en, c_new, c_done, c_load;
  logic [29:0] c_data, c_scan;
  rect_decoder #(.N_CHAINS(30), .W_BITS(3), .RAM_DEPTH(16), .SCAN_LEN(49)) dut_c (
    .clk, .rst_n, .ld_valid(c_valid), .ld_data(c_data), .preload(c_pre), .scan_en(c_en),
    .scan_in(c_scan), .new_cluster(c_new), .cube_done(c_done), .loading(c_load)
  );
  rect_dec_env #(.N_CHAINS(30), .W_BITS(3), .RAM_DEPTH(16), .SCAN_LEN(49),
                 .N_CLUSTERS(8), .N_CUBES(296), .N_RECTS(108), .REQUIRE_ALL(1'b0)) env_c (
    .clk, .rst_n, .ld_valid(c_valid), .ld_data(c_data), .preload(c_pre), .scan_en(c_en),
    .scan_in(c_scan), .new_cluster(c_new), .cube_done(c_done), .loading(c_load),
    .done(done[2]), .checks(checks[2]), .failures(failures[2])
  );

  // s38417, 40 chains
  logic        d_valid, d_pre, d_en, d_new, d_done, d_load;
  logic [39:0] d_data, d_scan;
  rect_decoder #(.N_CHAINS(40), .W_BITS(4), .RAM_DEPTH(10), .SCAN_LEN(42)) dut_d (
    .clk, .rst_n, .ld_valid(d_valid), .ld_data(d_data), .preload(d_pre), .scan_en(d_en),
    .scan_in(d_scan), .new_cluster(d_new), .cube_done(d_done), .loading(d_load)
  );
  rect_dec_env #(.N_CHAINS(40), .W_BITS(4), .RAM_DEPTH(10), .SCAN_LEN(42),
                 .N_CLUSTERS(7), .N_CUBES(376), .N_RECTS(64), .REQUIRE_ALL(1'b0)) env_d (
    .clk, .rst_n, .ld_valid(d_valid), .ld_data(d_data), .preload(d_pre), .scan_en(d_en),
    .scan_in(d_scan), .new_cluster(d_new), .cube_done(d_done), .loading(d_load),
    .done(done[3]), .checks(checks[3]), .failures(failures[3])
  );

  function automatic int sum4(int v [4]);
    return v[0] + v[1] + v[2] + v[3];
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", sum4(checks), sum4(failures));
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum4(checks), sum4(failures) + 1);
    $finish;
  end

endmodule
