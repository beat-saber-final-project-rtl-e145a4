// beat_saber_pkg: types and constants shared by the Beat Saber game blocks.
//
// A note block carries the fields the game keeps for every block of a song:
// X and Y position, the time it must be hit (in 10 ms game ticks), its colour
// and the direction it must be cut in, plus an ID (its index in the song).
// Coordinates are 12 bits wide, the width used for camera coordinates. The
// time and ID widths, and the bit order of the packed record (which is also
// the word format of the beat map .mem file), are this design's choices.
//
// Lint note: Verilator reports NUM_BLOCKS, BLOCK_BITS and END_OF_MAP unused
// when it lints the package on its own; the modules that import the package
// use them.
package beat_saber_pkg;

  localparam int COORD_W    = 12;  // camera / world coordinate width
  localparam int TIME_W     = 16;  // game time in 10 ms ticks
  localparam int ID_W       = 8;   // block index in the song
  localparam int NUM_BLOCKS = 12;  // blocks held by the block loader

  // Cut directions, in the order they are listed for a block.
  typedef enum logic [1:0] {
    DIR_UP    = 2'd0,
    DIR_LEFT  = 2'd1,
    DIR_RIGHT = 2'd2,
    DIR_DOWN  = 2'd3
  } dir_t;

  typedef enum logic {
    COLOR_RED  = 1'b0,
    COLOR_BLUE = 1'b1
  } color_t;

  // One block of the beat map: 51 bits, {x, y, t_hit, color, dir, id}.
  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
    logic [TIME_W-1:0]  t_hit;
    color_t             color;
    dir_t               dir;
    logic [ID_W-1:0]    id;
  } block_t;

  localparam int BLOCK_BITS = $bits(block_t);

  // A beat map word with this hit time marks the end of the song.
  localparam logic [TIME_W-1:0] END_OF_MAP = '1;

  // A block augmented with its depth and visibility.
  typedef struct packed {
    block_t             blk;
    logic [COORD_W-1:0] z;
    logic               visible;
  } block_pos_t;

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
    logic [COORD_W-1:0] z;
  } vec3_t;

endpackage
