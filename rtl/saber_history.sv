// saber_history: the saber position a fixed time ago.
//
// On every game tick (10 ms) the current saber position is pushed into a
// DELAY_TICKS deep shift register; its oldest entry is `prev_pos`, the
// position DELAY_TICKS ticks earlier. The difference between the current
// and the previous position is the saber's velocity over that interval,
// which the state processor uses to check the cut direction. The delay
// length (50 ms) is this design's choice.
module saber_history
  import beat_saber_pkg::*;
#(
  parameter int DELAY_TICKS = 5
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  tick,
  input  vec3_t pos,
  output vec3_t prev_pos
);
  vec3_t hist [DELAY_TICKS];

  always_ff @(posedge clk) begin
    if (rst) begin
      hist <= '{default: '0};
    end else if (tick) begin
      hist[0] <= pos;
      for (int i = 1; i < DELAY_TICKS; i++) hist[i] <= hist[i-1];
    end
  end

  assign prev_pos = hist[DELAY_TICKS-1];
endmodule
