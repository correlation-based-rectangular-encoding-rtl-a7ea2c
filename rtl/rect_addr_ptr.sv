// rect_addr_ptr: RAM address pointer of the rectangular decoder.
//
// Holds the address of the control word of the next rectangle. The
// controller can load it (back to the first rectangle of the cluster at
// the end of every test cube, to 1 once rectangle 0 sits in the control
// register) or step it by one (after each rectangle is taken from the RAM,
// and after each word written while a cluster is loaded). Load wins over
// increment. The pointer is one bit wider than the RAM address so that it
// can point one past the last word. Reset clears it to 0.
module rect_addr_ptr #(
  parameter int unsigned DEPTH = 20,
  localparam int unsigned AW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld,
  input  logic [AW-1:0] ld_val,
  input  logic          inc,
  output logic [AW-1:0] ptr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   ptr <= '0;
    else if (ld)  ptr <= ld_val;
    else if (inc) ptr <= ptr + AW'(1);
  end

endmodule
