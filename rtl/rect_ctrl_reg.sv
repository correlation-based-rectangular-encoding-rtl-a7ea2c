// rect_ctrl_reg: rectangular control register with its field decoding.
//
// Holds the control word of the rectangle being decoded:
// { width, chain select mask, fill value } from MSB to LSB. The basic
// scheme has a one-bit fill value; with SECONDARY = 1 the fill value is
// the two-bit code of the secondary encoding (11 fill 1, 10 fill 0,
// 01 mask bits are the fill values, 00 fill with conflict), and codes 01
// and 00 always span one slice whatever the width field says.
// Outputs, all from the register:
//   span_w  width the width counter compares with (1 for codes 01/00)
//   narrow  basic scheme only: width below MIN_WIDTH, so every chain
//           takes the decompressor bit (the less-than comparator that
//           drives the extra MUX). A width of 0 means 2**W_BITS slices
//           and is never narrow.
// Loaded on ld at the clock edge; reset clears it.
module rect_ctrl_reg #(
  parameter int unsigned W_BITS    = 4,
  parameter int unsigned C_BITS    = 10,
  parameter bit          SECONDARY = 1'b0,
  parameter int unsigned MIN_WIDTH = 2,
  localparam int unsigned F_BITS   = SECONDARY ? 2 : 1,
  localparam int unsigned WORD     = W_BITS + C_BITS + F_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld,
  input  logic [WORD-1:0]   d,
  output logic [W_BITS-1:0] width,
  output logic [C_BITS-1:0] mask,
  output logic [F_BITS-1:0] fill,
  output logic [W_BITS-1:0] span_w,
  output logic              narrow
);

  logic [WORD-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end

  assign width = q[WORD-1 -: W_BITS];
  // the first group's bit sits next to the width field
  always_comb begin
    for (int g = 0; g < int'(C_BITS); g++) mask[g] = q[F_BITS + C_BITS - 1 - g];
  end
  assign fill  = q[F_BITS-1:0];

  always_comb begin
    span_w = width;
    narrow = 1'b0;
    if (SECONDARY) begin
      if (!fill[F_BITS-1]) span_w = W_BITS'(1);
    end else begin
      narrow = (width != '0) && (int'(width) < int'(MIN_WIDTH));
    end
  end

endmodule
