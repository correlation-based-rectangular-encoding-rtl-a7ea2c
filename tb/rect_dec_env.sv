// rect_dec_env: stimulus and reference checker for rect_decoder.
//
// Connects to a rect_decoder instance built with the same parameters. It
// plays the part of tester plus linear decompressor: for each test-cube
// cluster it draws random rectangles (widths add up to at least SCAN_LEN,
// at most RAM_DEPTH of them), sends the new-cluster bit, sends the control
// words over ceil(WORD/N_CHAINS) cycles each, and then sends SCAN_LEN
// random decompressor words, with random pauses (ld_valid low). Every
// shift cycle the decoder's scan_in is compared with a value computed here
// from the rectangle list, independently of the RTL; the slices captured
// by the scan-chain model are compared again at the end of each cube, and
// the cycle on which cube_done rises is checked against the exact count
// 1 + R*BEATS + SCAN_LEN of valid cycles.
// With EXAMPLE = 1 (N_CHAINS = 4, K = 1, W_BITS = 2, SCAN_LEN = 7) it
// first decodes the two-cube worked example (seven slices, four chains)
// with its hand-written control words and checks that every specified
// bit of both cubes comes out right, the decompressor supplying only the
// bits left to it. With LOAD_ALL = 1 the control words of all clusters
// are sent once, with preload high, before the first cube, and the flag
// cycle of a new cluster is followed directly by its shift cycles. With
// N_CUBES > 0 the run has a fixed shape instead of random cluster sizes:
// N_CUBES cubes and N_RECTS rectangles spread as evenly as possible over
// N_CLUSTERS clusters, each cluster's widths a random split of SCAN_LEN
// (in the secondary format a one-slice rectangle takes any of the four
// fill codes, a wider one code 10 or 11),
// and the total number of valid cycles is checked. Each mechanism is
// counted; with REQUIRE_ALL = 1 one that never happened is a failure.
module rect_dec_env #(
  parameter int unsigned N_CHAINS    = 20,
  parameter int unsigned K           = 2,
  parameter int unsigned W_BITS      = 4,
  parameter int unsigned MIN_WIDTH   = 2,
  parameter int unsigned RAM_DEPTH   = 20,
  parameter int unsigned SCAN_LEN    = 84,
  parameter bit          SECONDARY   = 1'b0,
  parameter bit          LOAD_ALL    = 1'b0,
  parameter int unsigned N_CLUSTERS  = 20,
  parameter int unsigned N_CUBES     = 0,
  parameter int unsigned N_RECTS     = 0,
  parameter bit          EXAMPLE     = 1'b0,
  parameter bit          REQUIRE_ALL = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic                ld_valid,
  output logic [N_CHAINS-1:0] ld_data,
  output logic                preload,
  input  logic                scan_en,
  input  logic [N_CHAINS-1:0] scan_in,
  input  logic                new_cluster,
  input  logic                cube_done,
  input  logic                loading,
  output logic                done,
  output int                  checks,
  output int                  failures
);

  localparam int C_BITS = (N_CHAINS + K - 1) / K;
  localparam int F_BITS = SECONDARY ? 2 : 1;
  localparam int WORD   = W_BITS + C_BITS + F_BITS;
  localparam int BEATS  = (WORD + N_CHAINS - 1) / N_CHAINS;

  // current cluster: raw control words and their decoded fields
  logic [WORD-1:0] words [RAM_DEPTH];
  int              n_rects;
  // LOAD_ALL: the whole test set's words and where each cluster starts
  logic [WORD-1:0] all_words [RAM_DEPTH];
  int              cl_start [N_CLUSTERS];
  int              cl_len [N_CLUSTERS];
  int              n_used;

  // expected and captured slices of the current cube
  logic [N_CHAINS-1:0] exp_slice [SCAN_LEN];
  logic [N_CHAINS-1:0] cap_slice [SCAN_LEN];
  int                  cap_idx;

  // mechanism counters
  int n_new, n_reuse, n_switch, n_narrow, n_fill0, n_fill1, n_fill01, n_fillc;
  int n_full, n_trunc, n_pause_load, n_pause_shift, n_multibeat;
  int n_shape_cubes, n_shape_rects;
  int n_valid = 0;

  always @(posedge clk) if (rst_n && ld_valid) n_valid <= n_valid + 1;

  function automatic int wfield(logic [WORD-1:0] w);
    return int'(w[WORD-1 -: W_BITS]);
  endfunction
  function automatic int fcode(logic [WORD-1:0] w);
    return int'(w[F_BITS-1:0]);
  endfunction
  function automatic logic mbit(logic [WORD-1:0] w, int g);
    return w[F_BITS + C_BITS - 1 - g];
  endfunction

  // slices covered by a rectangle, worked out from the format
  function automatic int span_of(logic [WORD-1:0] w);
    if (SECONDARY && fcode(w) < 2) return 1;
    if (wfield(w) == 0) return 1 << W_BITS;
    return wfield(w);
  endfunction

  // expected scan-chain bit for chain i under rectangle w, given ld bit
  function automatic logic exp_bit(logic [WORD-1:0] w, int i, logic ld);
    int g = i / K;
    if (SECONDARY) begin
      case (fcode(w))
        3: return 1'b1;
        2: return 1'b0;
        1: return mbit(w, g);
        default: return mbit(w, g) ? w[WORD-1] : ld;
      endcase
    end else begin
      bit narrow = (wfield(w) != 0) && (wfield(w) < int'(MIN_WIDTH));
      return (!narrow && mbit(w, g)) ? w[0] : ld;
    end
  endfunction

  function automatic logic [WORD-1:0] rand_word();
    logic [WORD-1:0] w;
    for (int b = 0; b < WORD; b++) w[b] = 1'($urandom);
    if (!SECONDARY && ($urandom % 5 == 0)) w[WORD-1 -: W_BITS] = W_BITS'(1);
    return w;
  endfunction

  // fixed shape: exactly r rectangles whose spans add up to SCAN_LEN
  function automatic void new_shaped_cluster(int r);
    int part [RAM_DEPTH];
    int left;
    for (int i = 0; i < r; i++) part[i] = 1;
    left = int'(SCAN_LEN) - r;
    while (left > 0) begin
      int i = $urandom % r;
      if (part[i] < (1 << W_BITS)) begin part[i]++; left--; end
    end
    n_rects = r;
    for (int i = 0; i < r; i++) begin
      words[i] = rand_word();
      words[i][WORD-1 -: W_BITS] = W_BITS'(part[i]);   // 2**W_BITS wraps to 0
      // secondary format: a one-slice rectangle may also use code 01 or 00
      if (SECONDARY) words[i][1] = (part[i] == 1) ? 1'($urandom) : 1'b1;
    end
  endfunction

  function automatic void new_random_cluster();
    int sum;
    do begin
      sum = 0; n_rects = 0;
      while (sum < int'(SCAN_LEN) && n_rects < int'(RAM_DEPTH)) begin
        words[n_rects] = rand_word();
        sum += span_of(words[n_rects]);
        n_rects++;
      end
    end while (sum < int'(SCAN_LEN));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // one valid (or paused) cycle: drive at negedge, sample before posedge
  task automatic idle_cycle();
    @(negedge clk);
    ld_valid = 1'b0;
    for (int i = 0; i < int'(N_CHAINS); i++) ld_data[i] = 1'($urandom);
    #1;
    check(!scan_en && !cube_done, "no activity while paused");
  endtask

  task automatic maybe_pause(ref int counter);
    if ($urandom % 8 == 0) begin
      idle_cycle();
      counter++;
    end
  endtask

  // ld_fixed/ld_val: optional decompressor values for the example
  task automatic run_cube(bit is_new, bit use_fixed, logic [N_CHAINS-1:0] fixed [SCAN_LEN]);
    int r, in_r, valid_cycles, sp;
    // flag cycle
    @(negedge clk);
    ld_valid = 1'b1;
    for (int i = 0; i < int'(N_CHAINS); i++) ld_data[i] = 1'($urandom);
    ld_data[0] = is_new;
    #1;
    check(new_cluster == is_new, "new_cluster flag");
    check(!scan_en, "no shift in flag cycle");
    valid_cycles = 1;
    if (is_new) n_new++;
    if (is_new && !LOAD_ALL) begin
      if (BEATS > 1) n_multibeat++;
      for (int w = 0; w < n_rects; w++) begin
        for (int b = 0; b < BEATS; b++) begin
          maybe_pause(n_pause_load);
          @(negedge clk);
          ld_valid = 1'b1;
          for (int i = 0; i < int'(N_CHAINS); i++) begin
            int j = b * int'(N_CHAINS) + i;
            ld_data[i] = (j < WORD) ? words[w][WORD-1-j] : 1'($urandom);
          end
          #1;
          check(loading && !scan_en, "loading state");
          valid_cycles++;
        end
      end
    end else begin
      n_reuse++;
    end
    // shift
    r = 0; in_r = 0; cap_idx = 0;
    sp = span_of(words[0]);
    for (int s = 0; s < int'(SCAN_LEN); s++) begin
      maybe_pause(n_pause_shift);
      @(negedge clk);
      ld_valid = 1'b1;
      for (int i = 0; i < int'(N_CHAINS); i++)
        ld_data[i] = use_fixed ? fixed[s][i] : 1'($urandom);
      for (int i = 0; i < int'(N_CHAINS); i++)
        exp_slice[s][i] = exp_bit(words[r], i, ld_data[i]);
      #1;
      check(scan_en, "scan_en during shift");
      check(scan_in == exp_slice[s], $sformatf("scan slice %0d", s));
      check(cube_done == (s == int'(SCAN_LEN) - 1), "cube_done on last slice");
      valid_cycles++;
      // mechanism bookkeeping for this slice
      if (in_r == 0) begin
        if (r > 0) n_switch++;
        if (SECONDARY) begin
          case (fcode(words[r]))
            3: n_fill1++; 2: n_fill0++; 1: n_fill01++; default: n_fillc++;
          endcase
        end else begin
          if (wfield(words[r]) != 0 && wfield(words[r]) < int'(MIN_WIDTH)) n_narrow++;
          else if (words[r][0]) n_fill1++;
          else n_fill0++;
        end
        if (span_of(words[r]) == (1 << W_BITS)) n_full++;
      end
      in_r++;
      if (in_r == sp && s != int'(SCAN_LEN) - 1) begin
        r++; in_r = 0; sp = span_of(words[r]);
      end else if (s == int'(SCAN_LEN) - 1 && in_r != sp) begin
        n_trunc++;
      end
    end
    @(posedge clk);
    #1;
    check(cap_idx == int'(SCAN_LEN), $sformatf("slices captured %0d valid cycles %0d", cap_idx,
                                               valid_cycles));
    for (int s = 0; s < int'(SCAN_LEN); s++)
      check(cap_slice[s] == exp_slice[s], "scan chain content");
  endtask

  // scan-chain model: records every slice shifted in
  always @(posedge clk) begin
    if (rst_n && scan_en) begin
      if (cap_idx < int'(SCAN_LEN)) cap_slice[cap_idx] <= scan_in;
      cap_idx <= cap_idx + 1;
    end
  end

  // worked example: two cubes of one cluster, chains sc1..sc4, slices b1..b7
  localparam string T1 [4] = '{"0XX111X", "X00X11X", "0XXXX11", "XXXX110"};
  localparam string T2 [4] = '{"XX01X1X", "X00X10X", "0X0XXX1", "XXXX110"};

  task automatic run_example();
    logic [N_CHAINS-1:0] fixed [SCAN_LEN];
    for (int t = 0; t < 2; t++) begin
      for (int s = 0; s < int'(SCAN_LEN); s++)
        for (int c = 0; c < int'(N_CHAINS); c++) begin
          byte ch = (t == 0) ? T1[c][s] : T2[c][s];
          fixed[s][c] = (ch == "1") ? 1'b1 : (ch == "0") ? 1'b0 : 1'($urandom);
        end
      run_cube(t == 0, 1'b1, fixed);
      for (int s = 0; s < int'(SCAN_LEN); s++)
        for (int c = 0; c < int'(N_CHAINS); c++) begin
          byte ch = (t == 0) ? T1[c][s] : T2[c][s];
          if (ch == "1" || ch == "0")
            check(cap_slice[s][c] == (ch == "1"),
                  $sformatf("example cube t%0d sc%0d b%0d", t + 1, c + 1, s + 1));
        end
    end
  endtask

  // send every cluster's words with preload high
  task automatic run_preload();
    int total;
    total = 0; n_used = 0;
    for (int c = 0; c < int'(N_CLUSTERS); c++) begin
      new_random_cluster();
      if (total + n_rects > int'(RAM_DEPTH)) break;
      cl_start[c] = total; cl_len[c] = n_rects;
      for (int w = 0; w < n_rects; w++) all_words[total + w] = words[w];
      total += n_rects; n_used++;
    end
    preload = 1'b1;
    for (int w = 0; w < total; w++) begin
      if (BEATS > 1) n_multibeat++;
      for (int b = 0; b < BEATS; b++) begin
        maybe_pause(n_pause_load);
        @(negedge clk);
        ld_valid = 1'b1;
        for (int i = 0; i < int'(N_CHAINS); i++) begin
          int j = b * int'(N_CHAINS) + i;
          ld_data[i] = (j < WORD) ? all_words[w][WORD-1-j] : 1'($urandom);
        end
        #1;
        check(loading && !scan_en && !new_cluster, "preloading");
      end
    end
    @(negedge clk);
    preload = 1'b0; ld_valid = 1'b0;
  endtask

  initial begin
    logic [N_CHAINS-1:0] none [SCAN_LEN];
    checks = 0; failures = 0; done = 1'b0; cap_idx = 0;
    n_new = 0; n_reuse = 0; n_switch = 0; n_narrow = 0; n_fill0 = 0; n_fill1 = 0;
    n_fill01 = 0; n_fillc = 0; n_full = 0; n_trunc = 0;
    n_pause_load = 0; n_pause_shift = 0; n_multibeat = 0;
    n_shape_cubes = 0; n_shape_rects = 0;
    ld_valid = 1'b0; ld_data = '0; preload = 1'b0;
    for (int s = 0; s < int'(SCAN_LEN); s++) none[s] = '0;
    @(posedge rst_n);
    repeat (2) idle_cycle();
    if (EXAMPLE) begin
      n_rects = SECONDARY ? 4 : 3;
      if (SECONDARY) begin
        // width | mask sc1..sc4 | 2-bit fill code
        words[0] = WORD'({2'b11, 4'b0000, 2'b10});  // fill 0, 3 slices
        words[1] = WORD'({2'b10, 4'b0000, 2'b11});  // fill 1, 2 slices
        words[2] = WORD'({2'b10, 4'b1011, 2'b00});  // conflict, fill bit 1
        words[3] = WORD'({2'b00, 4'b0010, 2'b01});  // per-chain fill values
      end else begin
        // width | mask sc1..sc4 | fill
        words[0] = WORD'({2'b11, 4'b1111, 1'b0});
        words[1] = WORD'({2'b11, 4'b1011, 1'b1});
        words[2] = WORD'({2'b01, 4'b0000, 1'b0});
      end
      run_example();
    end
    if (LOAD_ALL) run_preload();
    for (int c = 0; c < (LOAD_ALL ? n_used : int'(N_CLUSTERS)); c++) begin
      int cubes;
      cubes = 1 + $urandom % 3;
      if (N_CUBES > 0) begin
        cubes = int'(N_CUBES / N_CLUSTERS) + ((c < int'(N_CUBES % N_CLUSTERS)) ? 1 : 0);
        new_shaped_cluster(int'(N_RECTS / N_CLUSTERS) + ((c < int'(N_RECTS % N_CLUSTERS)) ? 1 : 0));
        n_shape_cubes += cubes; n_shape_rects += n_rects;
      end else if (LOAD_ALL) begin
        n_rects = cl_len[c];
        for (int w = 0; w < n_rects; w++) words[w] = all_words[cl_start[c] + w];
      end else begin
        new_random_cluster();
      end
      for (int t = 0; t < cubes; t++) begin
        run_cube(t == 0, 1'b0, none);
        if ($urandom % 2 == 0) idle_cycle();
      end
    end
    $display("mechanisms: new_cluster=%0d reuse=%0d rect_switch=%0d narrow=%0d fill0=%0d fill1=%0d fill01=%0d fill_c=%0d max_width=%0d truncated=%0d pause_load=%0d pause_shift=%0d multi_beat_load=%0d",
             n_new, n_reuse, n_switch, n_narrow, n_fill0, n_fill1, n_fill01, n_fillc,
             n_full, n_trunc, n_pause_load, n_pause_shift, n_multibeat);
    if (N_CUBES > 0) begin
      $display("shape: %0d cubes, %0d rectangles in %0d clusters, %0d valid cycles",
               n_shape_cubes, n_shape_rects, N_CLUSTERS, n_valid);
      check(n_shape_cubes == int'(N_CUBES) && n_shape_rects == int'(N_RECTS), "workload shape");
      check(n_valid == int'(N_CUBES) * (1 + int'(SCAN_LEN)) + int'(N_RECTS) * BEATS,
            "valid cycles = cubes x (1 + SCAN_LEN) + rectangles x word cycles");
    end
    if (REQUIRE_ALL) begin
      check(n_new > 0 && n_reuse > 0 && n_switch > 0, "cluster load, reuse, rectangle switch seen");
      check(n_fill0 > 0 && n_fill1 > 0 && n_full > 0, "fill 0, fill 1, widest rectangle seen");
      check(n_pause_load > 0 && n_pause_shift > 0 && n_trunc > 0, "pauses and truncated rectangle seen");
      if (SECONDARY) check(n_fill01 > 0 && n_fillc > 0 && n_multibeat > 0,
                           "fill 0/1, fill with conflict, multi-cycle word load seen");
      else check(n_narrow > 0, "narrow rectangle seen");
    end
    done = 1'b1;
  end

endmodule
