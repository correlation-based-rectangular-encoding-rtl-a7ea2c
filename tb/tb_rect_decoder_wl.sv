// tb_rect_decoder_wl: the default decoder (20 chains, K = 2, 4-bit widths,
// 20-word RAM, 84-slice cubes) run on test sets shaped like the published
// 20-chain results of the basic scheme, with random rectangle contents:
//   s38417: 376 cubes, 7 clusters, 107 rectangles (84 slices per cube)
//   s13207: 266 cubes, 8 clusters, 75 rectangles plus 4 per cluster for
//           the 49 leading don't-care slices that pad its 35-slice cubes
//   s15850: 269 cubes, 9 clusters, 56 rectangles plus 4 per cluster for
//           53 padding slices (31-slice cubes)
// Every slice is checked, and the total number of decompressor cycles must
// be cubes x 85 + rectangles (one cycle per 15-bit word).
module tb_rect_decoder_wl;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NW = 3;
  localparam int CUBES [NW]    = '{376, 266, 269};
  localparam int CLUSTERS [NW] = '{7, 8, 9};
  localparam int RECTS [NW]    = '{107, 75 + 8 * 4, 56 + 9 * 4};

  logic [NW-1:0] done;
  int            checks [NW];
  int            failures [NW];

  for (genvar w = 0; w < NW; w++) begin : g_wl
    logic        ld_valid, preload, scan_en, new_cluster, cube_done, loading;
    logic [19:0] ld_data, scan_in;

    rect_decoder dut (
      .clk, .rst_n, .ld_valid, .ld_data, .preload, .scan_en, .scan_in,
      .new_cluster, .cube_done, .loading
    );

    rect_dec_env #(.N_CLUSTERS(CLUSTERS[w]), .N_CUBES(CUBES[w]), .N_RECTS(RECTS[w]),
                   .REQUIRE_ALL(1'b0)) env (
      .clk, .rst_n, .ld_valid, .ld_data, .preload, .scan_en, .scan_in,
      .new_cluster, .cube_done, .loading, .done(done[w]), .checks(checks[w]),
      .failures(failures[w])
    );
  end

  initial begin
    int c, f;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&done);
    c = 0; f = 0;
    for (int w = 0; w < NW; w++) begin c += checks[w]; f += failures[w]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    int c, f;
    repeat (300000) @(posedge clk);
    c = 0; f = 1;
    for (int w = 0; w < NW; w++) begin c += checks[w]; f += failures[w]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

endmodule
