// rect_width_counter: width counter and equality comparator.
//
// Counts the scan slices already shifted in the current rectangle. In a
// cycle where a slice is shifted (inc), hit is raised when the count after
// this slice equals the rectangle width, i.e. this is the rectangle's last
// slice; the counter then returns to 0 on the same clock edge, as the
// controller loads the next rectangle. clr (start of a test cube) also
// returns it to 0. This is the published behaviour: reset to 0 on a
// new rectangle, increment per slice, next rectangle when equal to the
// width. Comparing the incremented value, so that the switch happens
// without a lost cycle, is this design's choice; it makes a width of 0
// mean 2**W_BITS slices. hit is combinational from inc and the count.
module rect_width_counter #(
  parameter int unsigned W_BITS = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              inc,
  input  logic [W_BITS-1:0] width,
  output logic              hit
);

  logic [W_BITS-1:0] cnt_q;
  logic [W_BITS-1:0] cnt_inc;

  assign cnt_inc = cnt_q + W_BITS'(1);
  assign hit     = inc && (cnt_inc == width);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cnt_q <= '0;
    else if (clr)   cnt_q <= '0;
    else if (inc)   cnt_q <= hit ? '0 : cnt_inc;
  end

endmodule
