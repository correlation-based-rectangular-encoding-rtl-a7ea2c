// rect_ctrl_ram: storage for the rectangle control words of one test-cube
// cluster (or of the whole test set when the decoder is built with
// LOAD_ALL = 1).
//
// The decoder loads a cluster's control words into this memory when the
// cluster starts and reads them back, one per rectangle, for every test
// cube of the cluster. One synchronous write port and one asynchronous
// read port: rdata always shows mem[raddr] in the same cycle, which lets
// the next rectangle enter the control register on the clock edge that
// ends the current one, with no bubble in the scan shift. The published
// scheme only asks for a RAM (a functional RAM may be reused, or plain registers
// used instead); the port arrangement is this design's choice. Contents
// are not reset: every word is written before it is read.
module rect_ctrl_ram #(
  parameter int unsigned WORD_BITS = 15,
  parameter int unsigned DEPTH     = 20,
  localparam int unsigned AW       = $clog2(DEPTH + 1),
  localparam int unsigned IW       = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic [WORD_BITS-1:0] wdata,
  input  logic [AW-1:0]        raddr,
  output logic [WORD_BITS-1:0] rdata
);

  logic [WORD_BITS-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && waddr < AW'(DEPTH)) mem[waddr[IW-1:0]] <= wdata;
  end

  // An address past the end (the pointer after the last rectangle) reads 0.
  always_comb begin
    rdata = '0;
    if (raddr < AW'(DEPTH)) rdata = mem[raddr[IW-1:0]];
  end

endmodule
