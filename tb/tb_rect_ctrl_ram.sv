// tb_rect_ctrl_ram: random writes and reads of the 20 x 15-bit control
// RAM against a reference array; reads are combinational; addresses past
// the end read 0 and writes there change nothing.
module tb_rect_ctrl_ram;

  int checks = 0, failures = 0;
  logic        clk = 1'b0, we;
  logic [4:0]  waddr, raddr;
  logic [14:0] wdata, rdata;
  logic [14:0] model [20];
  bit          valid [20];

  always #5 clk = ~clk;

  rect_ctrl_ram u_dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < 20; a++) valid[a] = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = ($urandom % 2 == 0); waddr = 5'($urandom % 22); wdata = 15'($urandom);
      raddr = 5'($urandom % 22);
      #1;
      if (raddr >= 20) begin
        checks++; if (rdata != '0) failures++;
      end else if (valid[raddr]) begin
        checks++;
        if (rdata != model[raddr]) begin
          failures++; $display("FAIL read %0d", raddr);
        end
      end
      @(posedge clk);
      if (we && waddr < 20) begin model[waddr] = wdata; valid[waddr] = 1'b1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
