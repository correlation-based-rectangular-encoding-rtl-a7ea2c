// rect_fill_mux: the per-chain multiplexers of the rectangular decoder.
//
// One 2-to-1 MUX per scan chain. Chain i belongs to mask group i/K (one
// chain-select bit serves K neighbouring chains). When that bit is 1 the
// chain receives the fill value, when it is 0 it receives its own bit of
// the linear decompressor output. When narrow is set (the rectangle is
// narrower than the minimum width) a second MUX level passes every
// decompressor bit unchanged, whatever the mask says. All of this follows
// the published scheme; chain 0 is the first scan chain and mask bit 0 the first
// group. Purely combinational.
module rect_fill_mux #(
  parameter int unsigned N_CHAINS = 20,
  parameter int unsigned K        = 2,
  localparam int unsigned C_BITS  = (N_CHAINS + K - 1) / K
) (
  input  logic [N_CHAINS-1:0] ld_data,
  input  logic [C_BITS-1:0]   mask,
  input  logic                fill,
  input  logic                narrow,
  output logic [N_CHAINS-1:0] scan_in
);

  always_comb begin
    for (int i = 0; i < int'(N_CHAINS); i++) begin
      scan_in[i] = (!narrow && mask[i / int'(K)]) ? fill : ld_data[i];
    end
  end

endmodule
