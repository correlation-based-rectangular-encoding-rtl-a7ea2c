// tb_rect_fill_mux2: checks the secondary-encoding multiplexers. Small
// instance (4 chains, K = 1) on the four example rectangles: fill 0,
// fill 1, fill with conflict (mask 1011, fill bit 1, chain 2 from the
// decompressor) and per-chain fill (mask xx10). Default instance
// (20 chains, K = 2): random codes, masks and data against a reference.
module tb_rect_fill_mux2;

  int checks = 0, failures = 0;

  logic [3:0]  s_ld, s_out, s_mask;
  logic [1:0]  s_code;
  logic        s_fbit;
  logic [19:0] d_ld, d_out, d_exp;
  logic [9:0]  d_mask;
  logic [1:0]  d_code;
  logic        d_fbit;

  rect_fill_mux2 #(.N_CHAINS(4), .K(1)) u_small (
    .ld_data(s_ld), .mask(s_mask), .fill_code(s_code), .fill_bit(s_fbit), .scan_in(s_out)
  );
  rect_fill_mux2 u_dflt (
    .ld_data(d_ld), .mask(d_mask), .fill_code(d_code), .fill_bit(d_fbit), .scan_in(d_out)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 16; t++) begin
      s_ld = 4'(t); s_fbit = 1'($urandom);
      s_mask = 4'($urandom); s_code = 2'b10;
      #1 check(s_out == 4'b0000, "fill 0");
      s_code = 2'b11;
      #1 check(s_out == 4'b1111, "fill 1");
      s_code = 2'b00; s_mask = 4'b1101; s_fbit = 1'b1;  // sc2 from the decompressor
      #1 check(s_out == {1'b1, 1'b1, s_ld[1], 1'b1}, "fill with conflict");
      s_code = 2'b01; s_mask = {2'b01, 2'($urandom)};  // sc3 = 1, sc4 = 0
      #1 check(s_out == s_mask, "per-chain fill values");
    end
    for (int t = 0; t < 500; t++) begin
      d_ld = 20'($urandom); d_mask = 10'($urandom); d_code = 2'($urandom);
      d_fbit = 1'($urandom);
      for (int i = 0; i < 20; i++)
        case (d_code)
          2'b11: d_exp[i] = 1'b1;
          2'b10: d_exp[i] = 1'b0;
          2'b01: d_exp[i] = d_mask[i / 2];
          default: d_exp[i] = d_mask[i / 2] ? d_fbit : d_ld[i];
        endcase
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
