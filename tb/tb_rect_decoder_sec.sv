// tb_rect_decoder_sec: the rectangular decoder on the small worked example
// (4 chains, K = 1, 2-bit widths, 7-slice cubes) in both formats, and the
// secondary encoding on random clusters.
//   u_basic: one-bit fill; the three-rectangle example cluster, then
//            random clusters.
//   u_sec:   two-bit encoded fill; the four-rectangle example cluster
//            (fill 0, fill 1, fill with conflict, per-chain fill), then
//            random clusters. Its 8-bit words need two cycles each on
//            four decompressor outputs.
// In both, every specified bit of the two example cubes must reach the
// scan chains, and every random slice is checked against the reference.
module tb_rect_decoder_sec;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       b_pre, b_valid, b_en, b_new, b_done, b_load, b_fin;
  logic [3:0] b_ld, b_scan;
  int         b_checks, b_fail;
  logic       s_pre, s_valid, s_en, s_new, s_done, s_load, s_fin;
  logic [3:0] s_ld, s_scan;
  int         s_checks, s_fail;

  rect_decoder #(.N_CHAINS(4), .K(1), .W_BITS(2), .MIN_WIDTH(2), .RAM_DEPTH(8),
                 .SCAN_LEN(7), .SECONDARY(1'b0)) u_basic (
    .clk, .rst_n, .ld_valid(b_valid), .ld_data(b_ld), .preload(b_pre), .scan_en(b_en), .scan_in(b_scan),
    .new_cluster(b_new), .cube_done(b_done), .loading(b_load)
  );
  rect_dec_env #(.N_CHAINS(4), .K(1), .W_BITS(2), .MIN_WIDTH(2), .RAM_DEPTH(8),
                 .SCAN_LEN(7), .SECONDARY(1'b0), .N_CLUSTERS(30), .EXAMPLE(1'b1)) e_basic (
    .clk, .rst_n, .ld_valid(b_valid), .ld_data(b_ld), .preload(b_pre), .scan_en(b_en), .scan_in(b_scan),
    .new_cluster(b_new), .cube_done(b_done), .loading(b_load), .done(b_fin),
    .checks(b_checks), .failures(b_fail)
  );

  rect_decoder #(.N_CHAINS(4), .K(1), .W_BITS(2), .MIN_WIDTH(2), .RAM_DEPTH(8),
                 .SCAN_LEN(7), .SECONDARY(1'b1)) u_sec (
    .clk, .rst_n, .ld_valid(s_valid), .ld_data(s_ld), .preload(s_pre), .scan_en(s_en), .scan_in(s_scan),
    .new_cluster(s_new), .cube_done(s_done), .loading(s_load)
  );
  rect_dec_env #(.N_CHAINS(4), .K(1), .W_BITS(2), .MIN_WIDTH(2), .RAM_DEPTH(8),
                 .SCAN_LEN(7), .SECONDARY(1'b1), .N_CLUSTERS(30), .EXAMPLE(1'b1)) e_sec (
    .clk, .rst_n, .ld_valid(s_valid), .ld_data(s_ld), .preload(s_pre), .scan_en(s_en), .scan_in(s_scan),
    .new_cluster(s_new), .cube_done(s_done), .loading(s_load), .done(s_fin),
    .checks(s_checks), .failures(s_fail)
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (b_fin && s_fin);
    $display("TB_RESULT checks=%0d failures=%0d", b_checks + s_checks, b_fail + s_fail);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", b_checks + s_checks, b_fail + s_fail + 1);
    $finish;
  end

endmodule
