// grlc_pkg: constants and types of grid-based run-length compression.
// A feature map is cut into tiles of TILE_ROWS x TILE_COLS values. Each
// non-zero tile is coded as a header byte {run, mask} followed by its
// non-zero values: `run` (RUN_W bits) counts the zero tiles before it,
// `mask` has one bit per tile element (bit i = element i, row-major).
// The header {run = 3, mask = 0} stands for four zero tiles, and the header
// 0 ends a packet.
// Tile size, run width, mask and an end-of-packet code follow the published
// scheme; the bit order of the mask, the four-zero-tile header and the
// value 0 for end-of-packet are this design's choices.
package grlc_pkg;
  localparam int TILE_ROWS = 2;
  localparam int TILE_COLS = 3;
  localparam int TILE_N    = TILE_ROWS * TILE_COLS;
  localparam int RUN_W     = 2;
  localparam int DATA_W    = 8;
  localparam int RUN_MAX   = (1 << RUN_W) - 1;

  typedef logic [TILE_N-1:0][DATA_W-1:0] tile_t;
  typedef struct packed {
    logic [RUN_W-1:0]  run;
    logic [TILE_N-1:0] mask;
  } header_t;

  // index of the lowest set bit of a mask (0 when the mask is empty)
  function automatic logic [2:0] first_one(input logic [TILE_N-1:0] m);
    for (int i = TILE_N - 1; i >= 0; i--)
      if (m[i]) first_one = 3'(i);
    if (m == '0) first_one = '0;
  endfunction
endpackage
