// rect_pkg: types and helper functions shared by the rectangular decoder.
//
// A rectangle control word is laid out, from MSB to LSB, as
//   { width (W_BITS), chain select mask (C_BITS), fill (F_BITS) }
// i.e. width first, then one chain-select bit per group of k scan chains
// (the first group's bit next to the width field), then the fill value.
// Inside the decoder, bit g of a mask vector and bit i of a chain vector
// stand for group g and scan chain i + 1. The basic scheme uses a
// one-bit fill value (F_BITS = 1); the secondary encoding uses a two-bit
// encoded fill (F_BITS = 2) whose four codes are given by fill_mode_e.
// The width field counts scan slices; the value 0 is this design's choice
// for "2**W_BITS slices" (it falls out of the equality counter wrapping).
package rect_pkg;

  // Controller states: the extra per-cube cycle that carries the
  // new-cluster bit, incremental loading of a cluster's control data, and
  // shifting of scan slices.
  typedef enum logic [1:0] {
    ST_FLAG  = 2'd0,
    ST_LOAD  = 2'd1,
    ST_SHIFT = 2'd2
  } ctrl_state_e;

  // Two-bit encoded fill value of the secondary encoding.
  typedef enum logic [1:0] {
    FILL_C  = 2'b00,  // fill with conflict: mask 1 -> width MSB, mask 0 -> decompressor
    FILL_01 = 2'b01,  // mask bits are the fill values themselves
    FILL_0  = 2'b10,  // whole rectangle filled with 0
    FILL_1  = 2'b11   // whole rectangle filled with 1
  } fill_mode_e;

  // Number of scan slices a rectangle spans, from its width field and, in
  // the secondary encoding, the MSB of its fill code (codes 01 and 00 are always one
  // slice wide). A zero width field stands for 2**w_bits slices.
  function automatic int unsigned rect_span(int unsigned width_field,
                                            int unsigned w_bits,
                                            bit          secondary,
                                            logic        fill_msb);
    if (secondary && !fill_msb) return 1;
    if (width_field == 0) return 1 << w_bits;
    return width_field;
  endfunction

endpackage
