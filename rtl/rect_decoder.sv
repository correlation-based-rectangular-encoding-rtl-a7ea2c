// rect_decoder: rectangular decoder between a linear decompressor and
// N_CHAINS scan chains (top of the design).
//
// A test-cube cluster's scan slices are cut into rectangles. Each
// rectangle is described by one control word { width, chain select mask,
// fill value }: for width slices, chains whose mask bit is 1 take the
// fill value and the others take the decompressor bit, so the linear
// decompressor no longer has to produce the specified bits that the fill
// covers. One mask bit serves K chains. The decoder holds the words of
// the current cluster in a small RAM, copies one at a time into the
// control register, counts its slices with the width counter and steers
// one MUX per chain. A controller FSM reads the new-cluster bit in an
// extra cycle before each cube and, for a new cluster, loads its words
// through the decompressor outputs.
//
// Interface: ld_valid/ld_data is the decompressor output, one N_CHAINS-bit
// word per valid cycle (ld_data[0] feeds chain 1). scan_in/scan_en go to
// the scan chains: when scan_en is high the chains shift scan_in in on
// the next rising edge. scan_in is combinational from ld_data, so the
// decoder adds no pipeline stage. Per test cube: 1 flag cycle, then (new
// cluster only) R * ceil(WORD/N_CHAINS) load cycles for R rectangles,
// then SCAN_LEN shift cycles. new_cluster, cube_done and loading are
// status outputs. SECONDARY = 1 selects the enhanced format with the
// two-bit encoded fill value. LOAD_ALL = 1 loads the control words of the
// whole test set once, while preload is high right after reset, instead
// of one cluster at a time; a cube then costs 1 + SCAN_LEN cycles and the
// RAM must hold every word. preload is ignored when LOAD_ALL = 0.
//
// The structure (control register, width counter with equality compare,
// controller, address pointer, RAM, one MUX per chain plus the narrow-
// rectangle bypass) and the control-word contents follow the published
// scheme. Defaults: 20 chains, K = 2, 4-bit width field, 20 RAM words of
// 15 bits (300 bits, the largest 20-chain RAM of the published basic-scheme
// results). The 84-slice cube length, the minimum width of 2, the word
// layout on the decompressor outputs and the ld_valid pause are this
// design's own choices (see the README).
module rect_decoder
  import rect_pkg::*;
#(
  parameter int unsigned N_CHAINS  = 20,
  parameter int unsigned K         = 2,
  parameter int unsigned W_BITS    = 4,
  parameter int unsigned MIN_WIDTH = 2,
  parameter int unsigned RAM_DEPTH = 20,
  parameter int unsigned SCAN_LEN  = 84,
  parameter bit          SECONDARY = 1'b0,
  parameter bit          LOAD_ALL  = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ld_valid,
  input  logic [N_CHAINS-1:0] ld_data,
  input  logic                preload,
  output logic                scan_en,
  output logic [N_CHAINS-1:0] scan_in,
  output logic                new_cluster,
  output logic                cube_done,
  output logic                loading
);

  localparam int unsigned C_BITS = (N_CHAINS + K - 1) / K;
  localparam int unsigned F_BITS = SECONDARY ? 2 : 1;
  localparam int unsigned WORD   = W_BITS + C_BITS + F_BITS;
  localparam int unsigned AW     = $clog2(RAM_DEPTH + 1);

  logic              rect_hit, wcnt_clr, wcnt_inc;
  logic              ptr_ld, ptr_inc;
  logic [AW-1:0]     ptr, ptr_ld_val, rd_addr;
  logic              ram_we, ctrl_ld, ctrl_from_load;
  logic [WORD-1:0]   load_word, ram_rdata, ctrl_d;
  logic [W_BITS-1:0] width, span_w;
  logic [C_BITS-1:0] mask;
  logic [F_BITS-1:0] fill;
  logic              narrow;
  ctrl_state_e       state;

  rect_controller #(
    .N_CHAINS (N_CHAINS), .W_BITS (W_BITS), .C_BITS (C_BITS),
    .SECONDARY(SECONDARY), .LOAD_ALL(LOAD_ALL), .DEPTH (RAM_DEPTH), .SCAN_LEN (SCAN_LEN)
  ) u_ctrl (
    .clk, .rst_n, .ld_valid, .ld_data, .preload,
    .rect_hit, .ptr, .wcnt_clr, .wcnt_inc, .ptr_ld, .ptr_ld_val, .ptr_inc,
    .ram_we, .rd_addr, .load_word, .ctrl_ld, .ctrl_from_load,
    .scan_en, .new_cluster, .cube_done, .state
  );

  assign loading = (state == ST_LOAD) || (LOAD_ALL && preload && state == ST_FLAG);

  rect_addr_ptr #(.DEPTH(RAM_DEPTH)) u_ptr (
    .clk, .rst_n, .ld(ptr_ld), .ld_val(ptr_ld_val), .inc(ptr_inc), .ptr
  );

  rect_ctrl_ram #(.WORD_BITS(WORD), .DEPTH(RAM_DEPTH)) u_ram (
    .clk, .we(ram_we), .waddr(ptr), .wdata(load_word), .raddr(rd_addr), .rdata(ram_rdata)
  );

  assign ctrl_d = ctrl_from_load ? load_word : ram_rdata;

  rect_ctrl_reg #(
    .W_BITS(W_BITS), .C_BITS(C_BITS), .SECONDARY(SECONDARY), .MIN_WIDTH(MIN_WIDTH)
  ) u_creg (
    .clk, .rst_n, .ld(ctrl_ld), .d(ctrl_d),
    .width, .mask, .fill, .span_w, .narrow
  );

  rect_width_counter #(.W_BITS(W_BITS)) u_wcnt (
    .clk, .rst_n, .clr(wcnt_clr), .inc(wcnt_inc), .width(span_w), .hit(rect_hit)
  );

  if (SECONDARY) begin : g_secondary
    rect_fill_mux2 #(.N_CHAINS(N_CHAINS), .K(K)) u_mux (
      .ld_data, .mask, .fill_code(fill), .fill_bit(width[W_BITS-1]), .scan_in
    );
  end else begin : g_basic
    rect_fill_mux #(.N_CHAINS(N_CHAINS), .K(K)) u_mux (
      .ld_data, .mask, .fill(fill[0]), .narrow, .scan_in
    );
  end

endmodule
