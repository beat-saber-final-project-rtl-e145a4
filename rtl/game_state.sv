// game_state: game clock, score and health.
//
// After `start_game` the game time `curr_time` advances by one every
// TICK_CYCLES clocks; 650000 at 65 MHz makes one tick 10 ms. `tick` pulses
// on every advance and drives the blocks that work in game time. Each
// `block_sliced` pulse adds one to `score` (shown on the board LEDs) and
// records the block's ID in `last_sliced_id` (with a one-clock
// `slice_event` strobe, which tells the block loader to drop it); each `block_missed` pulse
// takes one from `health`, which starts at MAX_HEALTH and stops at zero.
// The health rule and the one-point-per-block score are this design's
// choices: the game only names these outputs.
module game_state #(
  parameter int           TICK_CYCLES = 650_000,
  parameter logic [7:0]   MAX_HEALTH  = 8'd10
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start_game,
  input  logic        block_sliced,
  input  logic [7:0]  sliced_id,
  input  logic        block_missed,
  output logic        playing,
  output logic        tick,
  output logic [15:0] curr_time,
  output logic [15:0] score,
  output logic [7:0]  health,
  output logic [7:0]  last_sliced_id,
  output logic        slice_event
);
  logic [$clog2(TICK_CYCLES+1)-1:0] div;

  always_ff @(posedge clk) begin
    if (rst) begin
      playing        <= 1'b0;
      tick           <= 1'b0;
      div            <= '0;
      curr_time      <= '0;
      score          <= '0;
      health         <= MAX_HEALTH;
      last_sliced_id <= '0;
      slice_event    <= 1'b0;
    end else begin
      tick        <= 1'b0;
      slice_event <= block_sliced;
      if (start_game) playing <= 1'b1;
      if (playing) begin
        if (div == $bits(div)'(TICK_CYCLES - 1)) begin
          div       <= '0;
          tick      <= 1'b1;
          curr_time <= curr_time + 16'd1;
        end else begin
          div <= div + 1'b1;
        end
      end
      if (block_sliced) begin
        score          <= score + 16'd1;
        last_sliced_id <= sliced_id;
      end
      if (block_missed && health != 0) health <= health - 8'd1;
    end
  end
endmodule
