// tb_rect_width_counter: for random widths (0 meaning 16 slices) and with
// random idle cycles, hit must rise on exactly the width-th counted slice
// and the count must restart there; clr must restart it mid-rectangle.
module tb_rect_width_counter;

  int checks = 0, failures = 0;
  logic       clk = 1'b0, rst_n = 1'b0, clr, inc, hit;
  logic [3:0] width;

  always #5 clk = ~clk;

  rect_width_counter u_dut (.clk, .rst_n, .clr, .inc, .width, .hit);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int span, n;
    clr = 1'b0; inc = 1'b0; width = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 200; r++) begin
      @(posedge clk);  // a new width arrives with the edge that ends the last rectangle
      #1 width = 4'($urandom);
      span = (width == 0) ? 16 : int'(width);
      n = 0;
      while (n < span) begin
        @(negedge clk);
        inc = ($urandom % 4 != 0);
        #1;
        if (inc) begin
          n++;
          check(hit == (n == span), $sformatf("hit after %0d of %0d slices", n, span));
        end else begin
          check(!hit, "no hit without a slice");
        end
      end
    end
    // clr in the middle of a rectangle
    @(posedge clk); #1 width = 4'd5;
    @(negedge clk); inc = 1'b1;
    @(negedge clk); @(negedge clk); inc = 1'b0; clr = 1'b1;
    @(negedge clk); clr = 1'b0;
    for (int s = 1; s <= 5; s++) begin
      @(negedge clk); inc = 1'b1; #1;
      check(hit == (s == 5), "count restarts after clr");
    end
    @(negedge clk); inc = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
