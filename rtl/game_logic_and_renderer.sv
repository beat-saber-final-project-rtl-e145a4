// game_logic_and_renderer: the game board's game logic and framebuffer.
//
// Wiring of the game logic (all in the 65 MHz pixel clock):
//   game_state    -> curr_time / tick, score, health, last sliced block
//   block_loader  -> the next 12 blocks from the beat map, closest first
//   block_positions -> each of them with depth z and a visible flag
//   saber_history -> saber position DELAY ticks ago
//   state_processor -> `block_sliced` when block 0 is cut correctly
// The slice goes back to game_state (score) and, through game_state's
// `slice_event`, to the block loader, which drops the block; a block that
// runs past its time is dropped as missed and costs health.
// The positioned blocks (`block_arr`) are the input of the raycaster, which
// is outside this module: it writes finished pixels through the `rc_*`
// port into the three_dim_renderer framebuffer, which the VGA side reads
// with hcount/vcount; r/g/b lag hcount/vcount by two clocks.
//
// From the source description: the modules of Fig. 7 and their order: game state, block loader, block positions, saber history, state processor, renderer.
// My own choices: a pixel write port in place of the raycaster, and checking only while playing.
module game_logic_and_renderer
  import beat_saber_pkg::*;
#(
  parameter int    TICK_CYCLES = 650_000,
  parameter int    MAP_DEPTH   = 256,
  parameter string MAP_FILE    = "rtl/beat_map.mem"
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start_game,
  input  vec3_t             saber_pos,
  // raycaster result port
  input  logic [8:0]        rc_x,
  input  logic [8:0]        rc_y,
  input  logic [11:0]       rc_rgb,
  input  logic              rc_valid,
  // VGA side
  input  logic [10:0]       hcount,
  input  logic [9:0]        vcount,
  output logic [3:0]        r,
  output logic [3:0]        g,
  output logic [3:0]        b,
  // game outputs
  output block_pos_t        block_arr [NUM_BLOCKS],
  output logic              block_sliced,
  output logic              block_missed,
  output logic [ID_W-1:0]   missed_id,
  output logic              playing,
  output logic              song_done,
  output logic [TIME_W-1:0] curr_time,
  output logic [15:0]       score,
  output logic [7:0]        health
);
  block_t                blocks [NUM_BLOCKS];
  logic [NUM_BLOCKS-1:0] valid;
  logic                  tick, slice_event;
  logic [ID_W-1:0]       sliced_id, last_sliced_id;
  vec3_t                 prev_saber;

  game_state #(.TICK_CYCLES(TICK_CYCLES)) u_state (
    .clk(clk), .rst(rst), .start_game(start_game),
    .block_sliced(block_sliced), .sliced_id(sliced_id), .block_missed(block_missed),
    .playing(playing), .tick(tick), .curr_time(curr_time), .score(score),
    .health(health), .last_sliced_id(last_sliced_id), .slice_event(slice_event)
  );

  block_loader #(.MAP_DEPTH(MAP_DEPTH), .MAP_FILE(MAP_FILE)) u_loader (
    .clk(clk), .rst(rst), .curr_time(curr_time),
    .slice_event(slice_event), .sliced_id(last_sliced_id),
    .blocks(blocks), .valid(valid),
    .block_missed(block_missed), .missed_id(missed_id), .song_done(song_done)
  );

  block_positions u_pos (
    .clk(clk), .rst(rst), .curr_time(curr_time),
    .blocks(blocks), .valid(valid), .pos(block_arr)
  );

  saber_history u_hist (
    .clk(clk), .rst(rst), .tick(tick), .pos(saber_pos), .prev_pos(prev_saber)
  );

  state_processor u_proc (
    .clk(clk), .rst(rst), .curr_time(curr_time),
    .head_block(blocks[0]), .head_valid(valid[0] && playing),
    .saber_pos(saber_pos), .prev_saber_pos(prev_saber),
    .block_sliced(block_sliced), .sliced_id(sliced_id)
  );

  three_dim_renderer u_render (
    .clk(clk), .rst(rst),
    .wr_x(rc_x), .wr_y(rc_y), .wr_rgb(rc_rgb), .wr_en(rc_valid),
    .hcount(hcount), .vcount(vcount), .r(r), .g(g), .b(b)
  );
endmodule
