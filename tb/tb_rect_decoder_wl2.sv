// tb_rect_decoder_wl2: the decoder in its enhanced configuration
// (secondary 2-bit fill codes, one mask bit per chain) run on test sets
// shaped like three of the published enhanced-scheme results, each with
// the word size, width field and RAM size of that result and random
// rectangle contents:
//   s13207, 10 chains: 266 cubes, 14 clusters, 415 rectangles, 4-bit
//           widths, 16-bit words (two decompressor cycles each), 35-word
//           RAM, 70 slices per cube (700 scan cells)
//   s38417, 20 chains: 376 cubes, 38 clusters, 1645 rectangles, 4-bit
//           widths, 26-bit words (two cycles each), 58-word RAM,
//           84 slices per cube (1664 scan cells)
//   s38584, 40 chains: 296 cubes, 77 clusters, 2396 rectangles, 3-bit
//           widths, 45-bit words (two cycles each), 37-word RAM,
//           37 slices per cube (1464 scan cells)
// The cube lengths follow from the circuits' scan-cell counts; the RAM
// depth is the published RAM size divided by the word size. Every slice
// is checked, and each test set's total number of decompressor cycles
// must be cubes x (1 + slices) + rectangles x 2.
module tb_rect_decoder_wl2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] done;
  int         checks [3];
  int         failures [3];

  // s13207, 10 chains
  logic        a_valid, a_pre, a_en, a_new, a_done, a_load;
  logic [9:0]  a_data, a_scan;
  rect_decoder #(.N_CHAINS(10), .K(1), .W_BITS(4), .RAM_DEPTH(35), .SCAN_LEN(70),
                 .SECONDARY(1'b1)) dut_a (
    .clk, .rst_n, .ld_valid(a_valid), .ld_data(a_data), .preload(a_pre), .scan_en(a_en),
    .scan_in(a_scan), .new_cluster(a_new), .cube_done(a_done), .loading(a_load)
  );
  rect_dec_env #(.N_CHAINS(10), .K(1), .W_BITS(4), .RAM_DEPTH(35), .SCAN_LEN(70),
                 .SECONDARY(1'b1), .N_CLUSTERS(14), .N_CUBES(266), .N_RECTS(415),
                 .REQUIRE_ALL(1'b0)) env_a (
    .clk, .rst_n, .ld_valid(a_valid), .ld_data(a_data), .preload(a_pre), .scan_en(a_en),
    .scan_in(a_scan), .new_cluster(a_new), .cube_done(a_done), .loading(a_load),
    .done(done[0]), .checks(checks[0]), .failures(failures[0])
  );

  // s38417, 20 chains
  logic        b_valid, b_pre, b_en, b_new, b_done, b_load;
  logic [19:0] b_data, b_scan;
  rect_decoder #(.N_CHAINS(20), .K(1), .W_BITS(4), .RAM_DEPTH(58), .SCAN_LEN(84),
                 .SECONDARY(1'b1)) dut_b (
    .clk, .rst_n, .ld_valid(b_valid), .ld_data(b_data), .preload(b_pre), .scan_en(b_en),
    .scan_in(b_scan), .new_cluster(b_new), .cube_done(b_done), .loading(b_load)
  );
  rect_dec_env #(.N_CHAINS(20), .K(1), .W_BITS(4), .RAM_DEPTH(58), .SCAN_LEN(84),
                 .SECONDARY(1'b1), .N_CLUSTERS(38), .N_CUBES(376), .N_RECTS(1645),
                 .REQUIRE_ALL(1'b0)) env_b (
    .clk, .rst_n, .ld_valid(b_valid), .ld_data(b_data), .preload(b_pre), .scan_en(b_en),
    .scan_in(b_scan), .new_cluster(b_new), .cube_done(b_done), .loading(b_load),
    .done(done[1]), .checks(checks[1]), .failures(failures[1])
  );

  // s38584, 40 chains
  logic        c_valid, c_pre, c_en, c_new, c_done, c_load;
  logic [39:0] c_data, c_scan;
  rect_decoder #(.N_CHAINS(40), .K(1), .W_BITS(3), .RAM_DEPTH(37), .SCAN_LEN(37),
                 .SECONDARY(1'b1)) dut_c (
    .clk, .rst_n, .ld_valid(c_valid), .ld_data(c_data), .preload(c_pre), .scan_en(c_en),
    .scan_in(c_scan), .new_cluster(c_new), .cube_done(c_done), .loading(c_load)
  );
  rect_dec_env #(.N_CHAINS(40), .K(1), .W_BITS(3), .RAM_DEPTH(37), .SCAN_LEN(37),
                 .SECONDARY(1'b1), .N_CLUSTERS(77), .N_CUBES(296), .N_RECTS(2396),
                 .REQUIRE_ALL(1'b0)) env_c (
    .clk, .rst_n, .ld_valid(c_valid), .ld_data(c_data), .preload(c_pre), .scan_en(c_en),
    .scan_in(c_scan), .new_cluster(c_new), .cube_done(c_done), .loading(c_load),
    .done(done[2]), .checks(checks[2]), .failures(failures[2])
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2]);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end

endmodule
