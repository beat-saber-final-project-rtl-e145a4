// beat_saber_top: augmented-reality Beat Saber on FPGA boards.
//
// The player holds an LED saber and wears an LED hat in front of two
// cameras. The system has three parts, joined by 115200 baud serial wires:
//   * camera_interface: both cameras' LED centroids, merged into 3D saber
//     and head positions (camera 2's data crosses a serial wire).
//   * game_logic_and_renderer: game time, the next 12 blocks of the song
//     with depth and visibility, slice detection, score and health, and the
//     512x384 framebuffer shown 2x scaled on a 1024x768 VGA screen.
//   * music_interface (the music board): waits for the start command,
//     streams the song from the SD card at 44 kHz and plays a 740 Hz note
//     when a hit command arrives. The game side's music_link_tx sends those
//     commands over the `music_tx` wire.
// Clocks: clk_65 (cameras, game, VGA, serial), clk_100 and clk_25 (music
// board). `start_game` is a one-clock pulse in clk_65.
// Parts outside this RTL connect through ports: the camera capture (pixel
// streams in), the raycaster that draws blocks into the framebuffer (block
// list out, pixel write port in) and the SD card controller (byte
// interface). The speaker sample is brought out as audio_data and also
// drives audio_pwm, whose one-bit output is speaker_pwm.
// The serial wires between boards are brought out (`cam_link`, `music_tx`)
// and fed back in by the board wiring (`cam_link_in`, `music_rx`).
//
// From the source description: the split into camera, game/render and music parts, the three clocks and the serial wires between boards.
// My own choices: one RTL top for all three boards, the ports standing in for the raycaster, SD controller and camera capture, and the two-clock sync delay.
//
// Lint note: pos_valid, playing, blank, frame_start, missed_id,
// song_end_music, fifo_count and link_busy are status outputs of the sub-
// blocks that no top port needs; they stay unconnected on purpose and are
// removed in synthesis (unused-signal warnings).
module beat_saber_top
  import beat_saber_pkg::*;
#(
  parameter int    TICK_CYCLES = 650_000,
  parameter int    MAP_DEPTH   = 256,
  parameter string MAP_FILE    = "rtl/beat_map.mem",
  parameter int    START_REPEAT = 100,
  parameter int    FIFO_DEPTH  = 16384,
  parameter int    HALT_LEVEL  = 1536,
  parameter int    SAMPLE_DIV  = 568,
  parameter int    HALF_PERIOD = 67_568,
  parameter int    NOTE_CYCLES = 10_000_000
) (
  input  logic        clk_65,
  input  logic        clk_100,
  input  logic        clk_25,
  input  logic        rst,
  input  logic        start_game,
  // cameras
  input  logic [15:0] cam1_pixel,
  input  logic [11:0] cam1_hcount,
  input  logic [11:0] cam1_vcount,
  input  logic        cam1_valid,
  input  logic        cam1_frame_done,
  input  logic [15:0] cam2_pixel,
  input  logic [11:0] cam2_hcount,
  input  logic [11:0] cam2_vcount,
  input  logic        cam2_valid,
  input  logic        cam2_frame_done,
  output logic        cam_link,
  input  logic        cam_link_in,
  // raycaster
  output block_pos_t  block_arr [NUM_BLOCKS],
  output vec3_t       saber_pos,
  output vec3_t       head_pos,
  input  logic [8:0]  rc_x,
  input  logic [8:0]  rc_y,
  input  logic [11:0] rc_rgb,
  input  logic        rc_valid,
  // VGA
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  // game status
  output logic [15:0] score,
  output logic [7:0]  health,
  output logic [TIME_W-1:0] curr_time,
  output logic        block_sliced,
  output logic        block_missed,
  output logic        song_done,
  // serial wire to the music board
  output logic        music_tx,
  input  logic        music_rx,
  // music board: SD card controller and speaker
  input  logic        sd_ready,
  input  logic        sd_byte_available,
  input  logic [7:0]  sd_dout,
  output logic        sd_rd,
  output logic [31:0] sd_address,
  output logic [7:0]  audio_data,
  output logic        speaker_pwm,
  output logic        hit_active,
  output logic        music_started,
  output logic        music_streaming,
  output logic        sd_halted
);
  logic        pos_valid, playing;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hs, vs, blank, frame_start;
  logic [1:0]  hs_d, vs_d;
  logic [ID_W-1:0] missed_id;
  logic        song_end_music;
  logic [$clog2(FIFO_DEPTH)-1:0] fifo_count;
  logic        link_busy;

  camera_interface u_cams (
    .clk(clk_65), .rst(rst),
    .cam1_pixel(cam1_pixel), .cam1_hcount(cam1_hcount), .cam1_vcount(cam1_vcount),
    .cam1_valid(cam1_valid), .cam1_frame_done(cam1_frame_done),
    .cam2_pixel(cam2_pixel), .cam2_hcount(cam2_hcount), .cam2_vcount(cam2_vcount),
    .cam2_valid(cam2_valid), .cam2_frame_done(cam2_frame_done),
    .link_tx(cam_link), .link_rx(cam_link_in),
    .saber_pos(saber_pos), .head_pos(head_pos), .pos_valid(pos_valid)
  );

  vga u_vga (
    .clk(clk_65), .rst(rst), .hcount(hcount), .vcount(vcount),
    .hsync(hs), .vsync(vs), .blank(blank), .frame_start(frame_start)
  );

  game_logic_and_renderer #(
    .TICK_CYCLES(TICK_CYCLES), .MAP_DEPTH(MAP_DEPTH), .MAP_FILE(MAP_FILE)
  ) u_game (
    .clk(clk_65), .rst(rst), .start_game(start_game), .saber_pos(saber_pos),
    .rc_x(rc_x), .rc_y(rc_y), .rc_rgb(rc_rgb), .rc_valid(rc_valid),
    .hcount(hcount), .vcount(vcount), .r(vga_r), .g(vga_g), .b(vga_b),
    .block_arr(block_arr), .block_sliced(block_sliced), .block_missed(block_missed),
    .missed_id(missed_id), .playing(playing), .song_done(song_done),
    .curr_time(curr_time), .score(score), .health(health)
  );

  // The framebuffer output lags hcount/vcount by two clocks; so do the syncs.
  always_ff @(posedge clk_65) begin
    if (rst) begin
      hs_d <= '1;
      vs_d <= '1;
    end else begin
      hs_d <= {hs_d[0], hs};
      vs_d <= {vs_d[0], vs};
    end
  end
  assign vga_hs = hs_d[1];
  assign vga_vs = vs_d[1];

  music_link_tx #(.START_REPEAT(START_REPEAT)) u_link (
    .clk(clk_65), .rst(rst), .start_game(start_game), .block_sliced(block_sliced),
    .txd(music_tx), .busy(link_busy)
  );

  music_interface #(
    .FIFO_DEPTH(FIFO_DEPTH), .HALT_LEVEL(HALT_LEVEL), .SAMPLE_DIV(SAMPLE_DIV),
    .HALF_PERIOD(HALF_PERIOD), .NOTE_CYCLES(NOTE_CYCLES)
  ) u_music (
    .clk_65(clk_65), .clk_100(clk_100), .clk_25(clk_25), .rst(rst), .rxd(music_rx),
    .sd_ready(sd_ready), .sd_byte_available(sd_byte_available), .sd_dout(sd_dout),
    .sd_rd(sd_rd), .sd_address(sd_address),
    .audio_data(audio_data), .hit_active(hit_active),
    .game_start(music_started), .streaming(music_streaming), .song_done(song_end_music),
    .sd_halted(sd_halted), .fifo_count(fifo_count)
  );

  audio_pwm u_pwm (.clk(clk_100), .rst(rst), .level(audio_data), .pwm(speaker_pwm));
endmodule
