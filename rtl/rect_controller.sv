// rect_controller: the finite-state machine of the rectangular decoder.
//
// Every test cube starts with one extra cycle (ST_FLAG) in which the
// linear decompressor delivers the new-cluster bit on its first output,
// ld_data[0]. Control words arrive through the decompressor as well: a
// word of WORD bits takes ceil(WORD / N_CHAINS) valid cycles, the first
// cycle carrying the MSBs on ld_data[0], ld_data[1], ...
//
// Incremental loading (LOAD_ALL = 0): the RAM holds one cluster. A flag
// of 0 reuses it: the first rectangle is taken from RAM word 0 (the
// address pointer was sent back there at the end of the previous cube)
// and shifting starts on the next cycle. A flag of 1 loads the new
// cluster's words (ST_LOAD) from word 0 on; loading stops once the
// rectangle spans received add up to at least SCAN_LEN slices, so no
// word count is sent. Word 0 also goes straight into the control
// register.
//
// Loading at the start (LOAD_ALL = 1): while the preload input is high
// (only right after reset), every received word is written to the next
// RAM address, for all clusters of the test set in order. Afterwards a
// flag of 1 starts the cluster that follows the one just used and a flag
// of 0 goes back to the first word of the current one; both begin
// shifting on the next cycle. The end of a cluster is known from where
// the pointer stood at the last slice of its cubes.
//
// In ST_SHIFT one scan slice is shifted per valid cycle; when the width
// counter reports the last slice of a rectangle the next word is copied
// from RAM into the control register and the pointer steps on. After
// SCAN_LEN slices the controller returns to ST_FLAG. Nothing moves in a
// cycle with ld_valid low (the tester may pause).
//
// Follows the published scheme: the extra flag cycle, the two ways of loading,
// pointer reset for a cube of the same cluster and increment for a new
// one, the rectangle sequencing. This design's own choices: the flag on
// ld_data[0], the word layout over the decompressor outputs, ending an
// incremental load by adding up widths, the preload input, the ld_valid
// pause. rd_addr is the RAM read address, ptr the write address.
//
// At the default size (a 15-bit word over 20 outputs, incremental
// loading) load_word is simply ld_data[14:0] in reverse order, ptr_ld_val is
// only ever 0 or 1, so those output bits reduce to wires and constants
// after synthesis; they carry real logic when a word spans several
// cycles or with LOAD_ALL = 1.
module rect_controller
  import rect_pkg::*;
#(
  parameter int unsigned N_CHAINS  = 20,
  parameter int unsigned W_BITS    = 4,
  parameter int unsigned C_BITS    = 10,
  parameter bit          SECONDARY = 1'b0,
  parameter bit          LOAD_ALL  = 1'b0,
  parameter int unsigned DEPTH     = 20,
  parameter int unsigned SCAN_LEN  = 84,
  localparam int unsigned F_BITS   = SECONDARY ? 2 : 1,
  localparam int unsigned WORD     = W_BITS + C_BITS + F_BITS,
  localparam int unsigned AW       = $clog2(DEPTH + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // linear decompressor side
  input  logic                ld_valid,
  input  logic [N_CHAINS-1:0] ld_data,
  input  logic                preload,
  // width counter and address pointer
  input  logic                rect_hit,
  input  logic [AW-1:0]       ptr,
  output logic                wcnt_clr,
  output logic                wcnt_inc,
  output logic                ptr_ld,
  output logic [AW-1:0]       ptr_ld_val,
  output logic                ptr_inc,
  // RAM ports and control register load
  output logic                ram_we,
  output logic [AW-1:0]       rd_addr,
  output logic [WORD-1:0]     load_word,
  output logic                ctrl_ld,
  output logic                ctrl_from_load,
  // status
  output logic                scan_en,
  output logic                new_cluster,
  output logic                cube_done,
  output ctrl_state_e         state
);

  localparam int unsigned BEATS  = (WORD + N_CHAINS - 1) / N_CHAINS;
  localparam int unsigned SBITS  = BEATS * N_CHAINS;
  localparam int unsigned BC_W   = (BEATS > 1) ? $clog2(BEATS) : 1;
  localparam int unsigned SL_W   = $clog2(SCAN_LEN + 1);
  localparam int unsigned SUM_W  = $clog2(SCAN_LEN + (1 << W_BITS) + 1);

  ctrl_state_e         state_q, state_d;
  logic [BC_W-1:0]     beat_q;
  logic [SL_W-1:0]     slice_q;
  logic [SUM_W-1:0]    sum_q;
  logic [AW-1:0]       base_q, next_q;   // LOAD_ALL: current and next cluster start
  logic [AW-1:0]       start;
  logic [SBITS-1:0]    stream;
  logic [N_CHAINS-1:0] ld_rev;
  logic                preloading;
  logic                collecting;
  logic                word_done;
  logic                last_word;
  logic                last_slice;
  int unsigned         span;

  assign state      = state_q;
  assign preloading = LOAD_ALL && preload && (state_q == ST_FLAG);
  assign collecting = ((state_q == ST_LOAD) || preloading) && ld_valid;

  // Assemble a control word from BEATS decompressor cycles. Output 0 of
  // the first cycle is the word's MSB, so each cycle's bits enter reversed.
  always_comb begin
    for (int i = 0; i < int'(N_CHAINS); i++) ld_rev[N_CHAINS-1-i] = ld_data[i];
  end

  if (BEATS > 1) begin : g_multi_beat
    logic [(BEATS-1)*N_CHAINS-1:0] held_q;
    assign stream = {held_q, ld_rev};
    always_ff @(posedge clk) begin
      if (collecting) held_q <= stream[(BEATS-1)*N_CHAINS-1:0];
    end
    assign word_done = collecting && (beat_q == BC_W'(BEATS - 1));
  end else begin : g_single_beat
    assign stream    = ld_rev;
    assign word_done = collecting;
  end

  assign load_word  = stream[SBITS-1 -: WORD];
  assign span       = rect_span(int'(load_word[WORD-1 -: W_BITS]), W_BITS, SECONDARY,
                                load_word[1]);
  assign last_word  = (int'(sum_q) + span) >= int'(SCAN_LEN);
  assign last_slice = (slice_q == SL_W'(SCAN_LEN - 1));

  // first word of the cluster the flag cycle selects
  assign start   = !LOAD_ALL ? '0 : (ld_data[0] ? next_q : base_q);
  assign rd_addr = (state_q == ST_FLAG) ? start : ptr;

  always_comb begin
    state_d        = state_q;
    wcnt_clr       = 1'b0;
    wcnt_inc       = 1'b0;
    ptr_ld         = 1'b0;
    ptr_ld_val     = '0;
    ptr_inc        = 1'b0;
    ram_we         = 1'b0;
    ctrl_ld        = 1'b0;
    ctrl_from_load = 1'b0;
    scan_en        = 1'b0;
    new_cluster    = 1'b0;
    cube_done      = 1'b0;
    unique case (state_q)
      ST_FLAG: if (preloading) begin
        if (word_done) begin             // whole test set, word after word
          ram_we  = 1'b1;
          ptr_inc = 1'b1;
        end
      end else if (ld_valid) begin
        wcnt_clr    = 1'b1;
        new_cluster = ld_data[0];
        if (ld_data[0] && !LOAD_ALL) begin
          ptr_ld      = 1'b1;            // write the new cluster from word 0
          ptr_ld_val  = '0;
          state_d     = ST_LOAD;
        end else begin
          ctrl_ld     = 1'b1;            // first rectangle of the cluster
          ptr_ld      = 1'b1;
          ptr_ld_val  = start + AW'(1);
          state_d     = ST_SHIFT;
        end
      end
      ST_LOAD: if (word_done) begin
        ram_we         = 1'b1;
        ctrl_from_load = 1'b1;
        ctrl_ld        = (ptr == '0);
        if (last_word) begin
          ptr_ld     = 1'b1;
          ptr_ld_val = AW'(1);
          state_d    = ST_SHIFT;
        end else begin
          ptr_inc    = 1'b1;
        end
      end
      ST_SHIFT: if (ld_valid) begin
        scan_en  = 1'b1;
        wcnt_inc = 1'b1;
        if (rect_hit) begin
          ctrl_ld = 1'b1;
          ptr_inc = 1'b1;
        end
        if (last_slice) begin
          cube_done  = 1'b1;
          wcnt_clr   = 1'b1;
          ptr_ld     = 1'b1;             // back to the first rectangle
          ptr_ld_val = '0;
          state_d    = ST_FLAG;
        end
      end
      default: state_d = ST_FLAG;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_FLAG;
      beat_q  <= '0;
      slice_q <= '0;
      sum_q   <= '0;
      base_q  <= '0;
      next_q  <= '0;
    end else begin
      state_q <= state_d;
      if (state_q == ST_FLAG && !preloading) begin
        beat_q  <= '0;
        slice_q <= '0;
        sum_q   <= '0;
        if (ld_valid) base_q <= start;
      end
      if (collecting) begin
        beat_q <= word_done ? '0 : beat_q + BC_W'(1);
        if (word_done) sum_q <= SUM_W'(int'(sum_q) + span);
      end
      // where the pointer stands at the last slice is the next cluster's start
      if (scan_en && last_slice) next_q <= ptr;
      if (scan_en) slice_q <= last_slice ? '0 : slice_q + SL_W'(1);
    end
  end

  // A cluster (or, loading at the start, the test set) must fit in the RAM.
  a_ram_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (word_done && state_q == ST_LOAD) |-> (last_word || ptr < AW'(DEPTH - 1)))
    else $error("cluster needs more than %0d control words", DEPTH);
  a_preload_fits: assert property (@(posedge clk) disable iff (!rst_n)
    (word_done && preloading) |-> ptr < AW'(DEPTH))
    else $error("test set needs more than %0d control words", DEPTH);

endmodule
