// tb_rect_controller: drives the controller FSM alone (4 chains, 2-bit
// widths, 4 mask bits, 1 fill bit: 7-bit words sent in two cycles,
// 7-slice cubes). The testbench models the width counter and address
// pointer itself. For clusters of random rectangles it checks: the flag
// cycle (new_cluster, pointer back to 0 or first rectangle taken from
// RAM), one RAM write per word on its second cycle with the reassembled
// word, control-register load of word 0 only, load ending on the word
// whose widths reach 7 slices, pointer set to 1 after the load, one
// scan_en per shift cycle, control-register loads exactly on width-counter
// hits, cube_done on slice 7, and nothing at all in paused cycles.
module tb_rect_controller;
  import rect_pkg::*;

  int checks = 0, failures = 0;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       ld_valid, rect_hit;
  logic [3:0] ld_data;
  logic [3:0] ptr, rd_addr;
  logic       wcnt_clr, wcnt_inc, ptr_ld, ptr_inc, ram_we, ctrl_ld, ctrl_from_load;
  logic [3:0] ptr_ld_val;
  logic [6:0] load_word;
  logic       scan_en, new_cluster, cube_done;
  ctrl_state_e state;

  logic [6:0] words [8];
  int         n_words;

  always #5 clk = ~clk;

  rect_controller #(.N_CHAINS(4), .W_BITS(2), .C_BITS(4), .SECONDARY(1'b0), .DEPTH(8),
                    .SCAN_LEN(7)) u_dut (
    .clk, .rst_n, .ld_valid, .ld_data, .preload(1'b0), .rect_hit, .ptr, .wcnt_clr, .wcnt_inc,
    .ptr_ld, .ptr_ld_val, .ptr_inc, .ram_we, .rd_addr, .load_word, .ctrl_ld, .ctrl_from_load,
    .scan_en, .new_cluster, .cube_done, .state
  );

  // reference pointer follows the controller's commands
  always_ff @(posedge clk) begin
    if (!rst_n)       ptr <= '0;
    else if (ptr_ld)  ptr <= ptr_ld_val;
    else if (ptr_inc) ptr <= ptr + 4'd1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int span(logic [6:0] w);
    return (w[6:5] == 0) ? 4 : int'(w[6:5]);
  endfunction

  task automatic pause();
    @(negedge clk);
    ld_valid = 1'b0; ld_data = 4'($urandom); rect_hit = 1'b0;
    #1;
    check(!scan_en && !ram_we && !ctrl_ld && !ptr_ld && !ptr_inc && !cube_done,
          "idle while paused");
  endtask

  task automatic cube(bit is_new);
    int r, in_r;
    if ($urandom % 3 == 0) pause();
    @(negedge clk);
    ld_valid = 1'b1; ld_data = {3'($urandom), is_new}; rect_hit = 1'b0;
    #1;
    check(state == ST_FLAG, "flag state");
    check(new_cluster == is_new && !scan_en && !ram_we, "flag cycle outputs");
    if (is_new) check(ptr_ld && ptr_ld_val == 0 && !ctrl_ld, "new cluster: pointer to 0");
    else        check(ctrl_ld && !ctrl_from_load && ptr_ld && ptr_ld_val == 1 && rd_addr == 0,
                      "same cluster: first rectangle from RAM word 0");
    if (is_new) begin
      for (int w = 0; w < n_words; w++) begin
        for (int b = 0; b < 2; b++) begin
          if ($urandom % 4 == 0) pause();
          @(negedge clk);
          ld_valid = 1'b1;
          for (int i = 0; i < 4; i++) begin
            int j = b * 4 + i;
            ld_data[i] = (j < 7) ? words[w][6 - j] : 1'($urandom);
          end
          #1;
          check(state == ST_LOAD && !scan_en, "load state");
          if (b == 0) check(!ram_we && !ctrl_ld, "first beat writes nothing");
          else begin
            check(ram_we && load_word == words[w] && ptr == 4'(w), "word written");
            check(ctrl_ld == (w == 0) && ctrl_from_load, "word 0 to control register");
            if (w == n_words - 1) check(ptr_ld && ptr_ld_val == 1, "load ends, pointer to 1");
            else                  check(ptr_inc && !ptr_ld, "pointer steps");
          end
        end
      end
    end
    r = 0; in_r = 0;
    for (int s = 0; s < 7; s++) begin
      if ($urandom % 4 == 0) pause();
      @(negedge clk);
      ld_valid = 1'b1; ld_data = 4'($urandom);
      rect_hit = (in_r + 1 == span(words[r]));
      #1;
      check(state == ST_SHIFT && scan_en && wcnt_inc, "shift cycle");
      check(rd_addr == ptr, "RAM read at the pointer while shifting");
      check(ctrl_ld == rect_hit && (ctrl_ld -> !ctrl_from_load), "next rectangle on hit");
      check(cube_done == (s == 6), "cube_done on last slice");
      if (s == 6) check(ptr_ld && ptr_ld_val == 0 && wcnt_clr, "pointer back to 0");
      in_r++;
      if (rect_hit) begin r++; in_r = 0; end
    end
  endtask

  initial begin
    ld_valid = 1'b0; ld_data = '0; rect_hit = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 40; c++) begin
      int sum, ncubes;
      sum = 0; n_words = 0;
      while (sum < 7) begin
        words[n_words] = 7'($urandom);
        sum += span(words[n_words]);
        n_words++;
      end
      ncubes = 1 + $urandom % 3;
      for (int t = 0; t < ncubes; t++) cube(t == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
