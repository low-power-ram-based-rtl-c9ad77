// tcam_pkg: sizes shared by the RAM-based hierarchical TCAM.
//
// A W-bit ternary search key is cut into sub-keys of w bits. Each sub-key
// addresses its own RAM of 2^w words; bit n of the word read out says whether
// entry n accepts that sub-key value. ANDing the words of all sub-key RAMs gives
// the match vector of the entries held in one unit, and the RAM word width is
// the number of entries a unit holds.
//
// Two memory organisations are provided:
//   block RAM  : 512 x 72 simple dual-port RAMs, w = 9, 20 RAMs per unit,
//                72 entries per unit, 7 units (140 block RAMs) -- the main one.
//   LUT RAM    : 32 x 6 distributed RAMs, w = 5, 36 sub-keys per unit, each
//                sub-key RAM built from 12 primitives side by side to reach
//                72 entries, 9 units.
// The numbers are those of a 180-bit key on a mid-size FPGA with 156 block RAMs
// and 16,720 LUTs usable as RAM.
package tcam_pkg;

  // search key width
  localparam int unsigned CAM_KEY_W = 180;
  // entries held by one unit (= RAM word width of a sub-key RAM)
  localparam int unsigned UNIT_ENTRIES = 72;

  // block RAM organisation
  localparam int unsigned BRAM_SUB_W  = 9;    // 512-deep RAM
  localparam int unsigned BRAM_PRIM_W = 72;   // 512 x 72 primitive
  localparam int unsigned BRAM_STAGES = 7;

  // distributed (LUT) RAM organisation
  localparam int unsigned LUT_SUB_W  = 5;     // 32-deep RAM
  localparam int unsigned LUT_PRIM_W = 6;     // 32 x 6 primitive
  localparam int unsigned LUT_STAGES = 9;

  // number of sub-key RAMs for a key of kw bits cut into sw-bit pieces
  function automatic int unsigned num_sub(int unsigned kw, int unsigned sw);
    return (kw + sw - 1) / sw;
  endfunction

  // kind of RAM a unit is built from
  typedef enum logic {
    RAM_LUT  = 1'b0,
    RAM_BLOCK = 1'b1
  } ram_kind_e;

endpackage
