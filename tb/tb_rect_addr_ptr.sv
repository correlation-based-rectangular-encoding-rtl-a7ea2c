// tb_rect_addr_ptr: random load/increment sequences against a reference
// count; load has priority over increment.
module tb_rect_addr_ptr;

  int checks = 0, failures = 0;
  logic       clk = 1'b0, rst_n = 1'b0, ld, inc;
  logic [4:0] ld_val, ptr;
  int         model;

  always #5 clk = ~clk;

  rect_addr_ptr u_dut (.clk, .rst_n, .ld, .ld_val, .inc, .ptr);

  initial begin
    ld = 1'b0; inc = 1'b0; ld_val = '0; model = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++; if (ptr != 0) failures++;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      ld = ($urandom % 6 == 0); inc = ($urandom % 2 == 0); ld_val = 5'($urandom % 21);
      @(posedge clk);
      if (ld) model = int'(ld_val);
      else if (inc) model = (model + 1) % 32;
      #1;
      checks++;
      if (int'(ptr) != model) begin
        failures++; $display("FAIL ptr %0d expected %0d", ptr, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
