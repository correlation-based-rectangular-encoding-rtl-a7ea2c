// rect_fill_mux2: chain multiplexers for the secondary (enhanced) encoding.
//
// The fill value is a two-bit code:
//   11  every chain is filled with 1
//   10  every chain is filled with 0
//   01  every chain is filled, chain i with mask bit i/K (the mask holds
//       the fill values themselves)
//   00  fill with conflict: the basic MUX array, chains whose mask bit is
//       1 take fill_bit (the width field's MSB), the others take the
//       decompressor bit
// The 00 case reuses rect_fill_mux; the other codes are the few extra
// MUXes the enhancement adds. The codes follow the published scheme; taking the
// conflict-mode fill bit from the width MSB follows its text. Purely
// combinational.
module rect_fill_mux2
  import rect_pkg::*;
#(
  parameter int unsigned N_CHAINS = 20,
  parameter int unsigned K        = 2,
  localparam int unsigned C_BITS  = (N_CHAINS + K - 1) / K
) (
  input  logic [N_CHAINS-1:0] ld_data,
  input  logic [C_BITS-1:0]   mask,
  input  logic [1:0]          fill_code,
  input  logic                fill_bit,
  output logic [N_CHAINS-1:0] scan_in
);

  logic [N_CHAINS-1:0] conflict_out;

  rect_fill_mux #(.N_CHAINS(N_CHAINS), .K(K)) u_conflict (
    .ld_data (ld_data),
    .mask    (mask),
    .fill    (fill_bit),
    .narrow  (1'b0),
    .scan_in (conflict_out)
  );

  always_comb begin
    for (int i = 0; i < int'(N_CHAINS); i++) begin
      unique case (fill_code)
        FILL_1:  scan_in[i] = 1'b1;
        FILL_0:  scan_in[i] = 1'b0;
        FILL_01: scan_in[i] = mask[i / int'(K)];
        default: scan_in[i] = conflict_out[i];
      endcase
    end
  end

endmodule
