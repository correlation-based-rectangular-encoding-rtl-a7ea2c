// tb_rect_ctrl_reg: loads random words into a basic-format register
// (4-bit width, 10 mask bits, 1 fill bit) and a secondary-format one
// (2-bit fill code) and checks the fields, the narrow flag (width below 2,
// width 0 never narrow), the slice span given to the width counter, and
// that the register holds its value while ld is low.
module tb_rect_ctrl_reg;

  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b0, ld;
  logic [14:0] b_d;
  logic [3:0]  b_width, b_span;
  logic [9:0]  b_mask;
  logic [0:0]  b_fill;
  logic        b_narrow;
  logic [15:0] s_d;
  logic [3:0]  s_width, s_span;
  logic [9:0]  s_mask;
  logic [1:0]  s_fill;
  logic        s_narrow;
  logic [14:0] b_ref;
  logic [15:0] s_ref;

  always #5 clk = ~clk;

  rect_ctrl_reg u_basic (
    .clk, .rst_n, .ld, .d(b_d), .width(b_width), .mask(b_mask), .fill(b_fill),
    .span_w(b_span), .narrow(b_narrow)
  );
  rect_ctrl_reg #(.SECONDARY(1'b1)) u_sec (
    .clk, .rst_n, .ld, .d(s_d), .width(s_width), .mask(s_mask), .fill(s_fill),
    .span_w(s_span), .narrow(s_narrow)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    ld = 1'b0; b_d = '0; s_d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    b_ref = '0; s_ref = '0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      ld = ($urandom % 3 != 0);
      b_d = 15'($urandom); s_d = 16'($urandom);
      @(posedge clk);
      if (ld) begin b_ref = b_d; s_ref = s_d; end
      #1;
      check(b_width == b_ref[14:11] && b_mask == {<<{b_ref[10:1]}} && b_fill[0] == b_ref[0],
            "basic fields");
      check(b_narrow == (b_ref[14:11] == 4'd1), "basic narrow flag");
      check(b_span == b_ref[14:11], "basic span");
      check(s_width == s_ref[15:12] && s_mask == {<<{s_ref[11:2]}} && s_fill == s_ref[1:0],
            "secondary fields");
      check(!s_narrow, "no narrow flag in secondary format");
      check(s_span == (s_ref[1] ? s_ref[15:12] : 4'd1), "secondary span");
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
