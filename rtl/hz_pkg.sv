// Shared configuration of the two-level hierarchical Z-buffer (HZ-buffer).
//
// The defaults describe the configuration the design is built around:
// a 1280 x 1024 screen, 8x8-pixel low-level (level-1) blocks grouped 2x2
// into 16x16-pixel high-level (level-2) blocks, 8-bit HZ depths, a 64-block
// bit-mask cache and the dynamic bi-level compressed entry format. The
// pipeline depth width ZW (16 bits) is this design's own choice. Depth
// convention throughout: a larger value is farther, all ones is the far
// plane (1.0).
//
// The sub-block numbering inside a level-2 block is 0 = top-left,
// 1 = top-right, 2 = bottom-left, 3 = bottom-right (blocks 1..4 of the
// entry format figures), i.e. k = {y_odd, x_odd}.
package hz_pkg;
  localparam int unsigned DEF_WIDTH        = 1280;
  localparam int unsigned DEF_HEIGHT       = 1024;
  localparam int unsigned DEF_L1_SHIFT     = 3;    // 8x8 level-1 blocks
  localparam int unsigned DEF_DW           = 8;    // HZ depth accuracy
  localparam int unsigned DEF_ZW           = 16;   // pipeline depth width
  localparam int unsigned DEF_CACHE_BLOCKS = 64;
  localparam bit          DEF_COMPRESS     = 1'b1;

  // Width of one HZ-buffer entry (one level-2 block).
  //   uncompressed: 2-bit index + four level-1 depths   (34 bits at DW=8)
  //   compressed  : HHZ + LHZ + 4-bit group index        (20 bits at DW=8)
  function automatic int unsigned entry_width(bit compress, int unsigned dw);
    return compress ? 2 * dw + 4 : 4 * dw + 2;
  endfunction
endpackage
