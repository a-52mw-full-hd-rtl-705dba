// Shared constants and types of the visual vocabulary processor (VVP).
// A 128-dimension feature descriptor is streamed into the VVP as 8 segments of
// 16 dimensions, one segment per cycle; the six-level binary vocabulary tree
// (2+4+...+64 = 126 centroid words) maps it to one of 64 visual words.
// The dimension count, segment width, stage count and word counts follow the
// document; the 8-bit element width and the distance widths are this design's choice.
package vvp_pkg;
  localparam int unsigned DIM      = 128;  // descriptor dimensions
  localparam int unsigned DIMS     = 16;   // dimensions per cycle (PEs per distance processor)
  localparam int unsigned SEGS     = DIM / DIMS;  // cycles per vector
  localparam int unsigned SEG_W    = $clog2(SEGS);
  localparam int unsigned STAGES   = 6;    // tree levels / memory banks
  localparam int unsigned WORDS    = 1 << STAGES;  // leaf words
  localparam int unsigned WORD_W   = STAGES;
  localparam int unsigned ELEM_W   = 8;    // bits per descriptor element
  localparam int unsigned PSUM_W   = 2 * ELEM_W + $clog2(DIMS);   // 16 squared differences
  localparam int unsigned DIST_W   = PSUM_W + SEG_W;              // full 128-dim distance
  localparam int unsigned BIN_W    = 8;    // histogram bin width
  localparam int unsigned XY_W     = 11;   // pixel coordinate width (1920x1080)

  typedef logic [ELEM_W-1:0]             elem_t;
  typedef elem_t [DIMS-1:0]              seg_t;     // one 16-dimension slice
  typedef logic [BIN_W-1:0]              bin_t;
  typedef bin_t [WORDS-1:0]              hist_t;    // 64-bin histogram vector
  typedef logic [XY_W-1:0]               coord_t;

  // Position carried alongside a descriptor through the classifier.
  typedef struct packed {
    coord_t x;
    coord_t y;
  } pos_t;

  // Rectangular attention window, inclusive bounds.
  typedef struct packed {
    coord_t x0;
    coord_t y0;
    coord_t x1;
    coord_t y1;
  } window_t;
endpackage
