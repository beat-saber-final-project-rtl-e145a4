// state_processor: decides whether the closest block has been sliced.
//
// Only the block closest to the player (entry 0 of the window) can be cut,
// so only it is checked. It counts as sliced when, in the same clock,
//   * it is in the window and within HIT_TICKS of its hit time,
//   * the saber is within HIT_RADIUS of the block in both X and Y, and
//   * the saber moved at least MIN_SPEED, in the block's direction, since
//     the position saber_history kept (up = Y falling, down = Y rising,
//     left = X falling, right = X rising, as Y grows downward).
// `block_sliced` then pulses once with the block's ID; the same block is
// not reported twice. All thresholds and the axis sense are this design's
// choices; colour is not checked since only one saber is tracked.
//
// Lint note: the Z coordinates of the saber positions and the block colour
// bit are not part of the slice test (unused-bits warnings).
module state_processor
  import beat_saber_pkg::*;
#(
  parameter int HIT_TICKS  = 10,
  parameter int HIT_RADIUS = 64,
  parameter int MIN_SPEED  = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [TIME_W-1:0] curr_time,
  input  block_t            head_block,
  input  logic              head_valid,
  input  vec3_t             saber_pos,
  input  vec3_t             prev_saber_pos,
  output logic              block_sliced,
  output logic [ID_W-1:0]   sliced_id
);
  logic signed [COORD_W+1:0] dx, dy, vx, vy;
  logic signed [TIME_W+1:0]  dt;
  logic                      near_time, near_pos, dir_ok, hit;
  logic                      have_last;
  logic [ID_W-1:0]           last_id;

  function automatic logic signed [COORD_W+1:0] sdiff(input logic [COORD_W-1:0] p,
                                                      input logic [COORD_W-1:0] q);
    return $signed({2'b00, p}) - $signed({2'b00, q});
  endfunction

  function automatic logic signed [COORD_W+1:0] sabs(input logic signed [COORD_W+1:0] v);
    return (v < 0) ? -v : v;
  endfunction

  always_comb begin
    dx = sdiff(saber_pos.x, head_block.x);
    dy = sdiff(saber_pos.y, head_block.y);
    vx = sdiff(saber_pos.x, prev_saber_pos.x);
    vy = sdiff(saber_pos.y, prev_saber_pos.y);
    dt = $signed({2'b00, head_block.t_hit}) - $signed({2'b00, curr_time});
    near_time = (dt <= (TIME_W+2)'(HIT_TICKS)) && (dt >= -(TIME_W+2)'(HIT_TICKS));
    near_pos  = (sabs(dx) <= (COORD_W+2)'(HIT_RADIUS)) && (sabs(dy) <= (COORD_W+2)'(HIT_RADIUS));
    unique case (head_block.dir)
      DIR_UP:    dir_ok = vy <= -(COORD_W+2)'(MIN_SPEED);
      DIR_DOWN:  dir_ok = vy >=  (COORD_W+2)'(MIN_SPEED);
      DIR_LEFT:  dir_ok = vx <= -(COORD_W+2)'(MIN_SPEED);
      DIR_RIGHT: dir_ok = vx >=  (COORD_W+2)'(MIN_SPEED);
      default:   dir_ok = 1'b0;
    endcase
    hit = head_valid && near_time && near_pos && dir_ok &&
          !(have_last && last_id == head_block.id);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      block_sliced <= 1'b0;
      sliced_id    <= '0;
      have_last    <= 1'b0;
      last_id      <= '0;
    end else begin
      block_sliced <= hit;
      if (hit) begin
        sliced_id <= head_block.id;
        have_last <= 1'b1;
        last_id   <= head_block.id;
      end
    end
  end
endmodule
