// tb_rect_fill_mux: checks the per-chain multiplexers of the basic scheme.
// Small instance (4 chains, one mask bit per chain): the second rectangle
// of the worked example (mask 1011, fill 1) must fill chains 1, 3, 4 with
// 1 and pass chain 2 from the decompressor; a narrow rectangle must pass
// all four. Default instance (20 chains, K = 2): random masks, fill values
// and decompressor words against a reference computed here.
module tb_rect_fill_mux;

  int checks = 0, failures = 0;

  logic [3:0]  s_ld, s_out;
  logic [3:0]  s_mask;
  logic        s_fill, s_narrow;
  logic [19:0] d_ld, d_out, d_exp;
  logic [9:0]  d_mask;
  logic        d_fill, d_narrow;

  rect_fill_mux #(.N_CHAINS(4), .K(1)) u_small (
    .ld_data(s_ld), .mask(s_mask), .fill(s_fill), .narrow(s_narrow), .scan_in(s_out)
  );
  rect_fill_mux u_dflt (
    .ld_data(d_ld), .mask(d_mask), .fill(d_fill), .narrow(d_narrow), .scan_in(d_out)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 16; t++) begin
      s_ld = 4'(t); s_mask = 4'b1101; s_fill = 1'b1; s_narrow = 1'b0;  // sc1, sc3, sc4 filled
      #1 check(s_out == {1'b1, 1'b1, s_ld[1], 1'b1}, "example rect2");
      s_narrow = 1'b1;
      #1 check(s_out == s_ld, "narrow rectangle passes decompressor");
      s_narrow = 1'b0; s_mask = 4'b1111; s_fill = 1'b0;
      #1 check(s_out == 4'b0000, "full mask fill 0");
    end
    for (int t = 0; t < 500; t++) begin
      d_ld = 20'($urandom); d_mask = 10'($urandom); d_fill = 1'($urandom);
      d_narrow = ($urandom % 4 == 0);
      for (int i = 0; i < 20; i++)
        d_exp[i] = (!d_narrow && d_mask[i / 2]) ? d_fill : d_ld[i];
      #1 check(d_out == d_exp, "random 20-chain slice");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
