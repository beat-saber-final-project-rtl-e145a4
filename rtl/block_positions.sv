// block_positions: gives every cached block its depth and visibility.
//
// Blocks fly toward the player at a constant speed, so a block's distance
// follows from the time left until it must be hit: with dt = t_hit - now
// (in 10 ms ticks), z = dt * Z_PER_TICK, and z = 0 is the player's plane.
// Of the blocks in the window only those within VIS_TICKS of their hit time
// are visible; a block whose hit time has passed is no longer visible. The
// outputs are registered (one clock). The speed and the visibility window
// are this design's choices.
module block_positions
  import beat_saber_pkg::*;
#(
  parameter int NUM        = NUM_BLOCKS,
  parameter int VIS_TICKS  = 200,
  parameter int Z_PER_TICK = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [TIME_W-1:0] curr_time,
  input  block_t            blocks [NUM],
  input  logic [NUM-1:0]    valid,
  output block_pos_t        pos [NUM]
);
  always_ff @(posedge clk) begin
    if (rst) begin
      pos <= '{default: block_pos_t'('0)};
    end else begin
      for (int i = 0; i < NUM; i++) begin
        logic [TIME_W-1:0] dt;
        logic [TIME_W+7:0] zfull;
        dt    = blocks[i].t_hit - curr_time;
        zfull = (TIME_W+8)'(dt) * (TIME_W+8)'(Z_PER_TICK);
        pos[i].blk     <= blocks[i];
        pos[i].visible <= valid[i] && (blocks[i].t_hit >= curr_time) &&
                          (dt < TIME_W'(VIS_TICKS));
        pos[i].z       <= (zfull > (TIME_W+8)'({COORD_W{1'b1}})) ? '1 : zfull[COORD_W-1:0];
      end
    end
  end
endmodule
