// tb_beat_saber_top: end-to-end run of the whole system with a 1 ms game
// tick (the design uses 10 ms) and a two-block test song (tb_top_map.mem).
// Board wiring is closed in the testbench: the camera serial wire and the
// game-to-music serial wire are looped back, an SD card model serves a WAV
// file on clk_25, and the raycaster port writes a 4x4 red square.
// The testbench animates camera 1's blue LED so that the saber sweeps up
// through block 0 just before its hit time; block 1 is out of reach and is
// missed. Each mechanism below is counted and must happen at least once:
//   camera -> serial -> 3D position update, slice, miss, score/health,
//   start command reaching the music board, SD streaming, SD halt on a full
//   FIFO, audio samples changing, hit note from the slice, song end,
//   speaker PWM pulses, VGA frames with the framebuffer square scanned out 2x scaled (64 pixels).
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_beat_saber_top;
  import beat_saber_pkg::*;
  logic clk_65 = 0, clk_100 = 0, clk_25 = 0, rst = 1, start = 0;
  logic [15:0] p1, p2;
  logic [11:0] hc = 0, vc = 0;
  logic pv = 0, fd = 0;
  logic cam_link;
  block_pos_t arr [NUM_BLOCKS];
  vec3_t saber, head;
  logic [8:0] rcx = 0, rcy = 0;
  logic [11:0] rcrgb = 0;
  logic rcv = 0;
  logic [3:0] r, g, b;
  logic hs, vs;
  logic [15:0] score, t;
  logic [7:0] health;
  logic sl, ms, done, music_tx;
  logic sd_ready, sd_bav, sd_rd;
  logic [7:0] sd_dout, audio;
  logic [31:0] sd_addr;
  logic hit, mstart, mstream, halted, spk;
  int checks = 0, failures = 0;

  beat_saber_top #(
    .TICK_CYCLES(65_000), .MAP_FILE("tb/tb_top_map.mem"), .NOTE_CYCLES(200_000)
  ) dut (
    .clk_65(clk_65), .clk_100(clk_100), .clk_25(clk_25), .rst(rst), .start_game(start),
    .cam1_pixel(p1), .cam1_hcount(hc), .cam1_vcount(vc), .cam1_valid(pv), .cam1_frame_done(fd),
    .cam2_pixel(p2), .cam2_hcount(hc), .cam2_vcount(vc), .cam2_valid(pv), .cam2_frame_done(fd),
    .cam_link(cam_link), .cam_link_in(cam_link),
    .block_arr(arr), .saber_pos(saber), .head_pos(head),
    .rc_x(rcx), .rc_y(rcy), .rc_rgb(rcrgb), .rc_valid(rcv),
    .vga_r(r), .vga_g(g), .vga_b(b), .vga_hs(hs), .vga_vs(vs),
    .score(score), .health(health), .curr_time(t), .block_sliced(sl), .block_missed(ms),
    .song_done(done), .music_tx(music_tx), .music_rx(music_tx),
    .sd_ready(sd_ready), .sd_byte_available(sd_bav), .sd_dout(sd_dout),
    .sd_rd(sd_rd), .sd_address(sd_addr), .audio_data(audio), .speaker_pwm(spk), .hit_active(hit),
    .music_started(mstart), .music_streaming(mstream), .sd_halted(halted)
  );

  tb_sd_card_model #(.BYTE_GAP(20), .DATA_LEN(3000)) sd (
    .clk(clk_25), .rst(rst), .rd(sd_rd), .address(sd_addr),
    .ready(sd_ready), .byte_available(sd_bav), .dout(sd_dout)
  );

  always #7.692 clk_65 = ~clk_65;
  always #5     clk_100 = ~clk_100;
  always #20    clk_25 = ~clk_25;

  // mechanism counters
  int n_cam = 0, n_slice = 0, n_miss = 0, n_start = 0, n_stream = 0, n_halt = 0;
  int n_audio = 0, n_hit = 0, n_frames = 0, n_square_ok = 0, n_done = 0;
  int n_pwm = 0, red_px = 0, cam_bad = 0;
  vec3_t saber_q;
  logic halted_q, hit_q, mstart_q, mstream_q, vs_q, spk_q;
  logic [7:0] audio_q;

  always @(posedge clk_65) if (!rst) begin
    saber_q <= saber;
    vs_q <= vs;
    if (saber != saber_q) begin
      n_cam++;
      $display("%t saber %0d %0d %0d t=%0d", $time, saber.x, saber.y, saber.z, t);
    end
    if (sl) n_slice++;
    if (ms) n_miss++;
    if (done) n_done = 1;
    if ({r, g, b} == 12'hF00) red_px++;
    if (vs_q && !vs) begin           // start of vsync pulse: one frame scanned
      n_frames++;
      if (red_px == 64) n_square_ok++;
      red_px = 0;
    end
  end
  always @(posedge clk_100) if (!rst) begin
    mstart_q <= mstart; hit_q <= hit; audio_q <= audio; spk_q <= spk;
    if (spk && !spk_q) n_pwm++;
    if (mstart && !mstart_q) n_start++;
    if (hit && !hit_q) n_hit++;
    if (mstream && audio != audio_q) n_audio++;
  end
  always @(posedge clk_25) if (!rst) begin
    halted_q <= halted; mstream_q <= mstream;
    if (halted && !halted_q) n_halt++;
    if (mstream && !mstream_q) n_stream++;
  end

  // camera frames: 160x120 at one pixel per clock, back to back
  int blue_h, blue_v;
  function automatic logic [15:0] px(input int h, v, bx, by, rx, ry);
    if (h >= bx && h < bx + 4 && v >= by && v < by + 4) return 16'h001F;
    if (h >= rx && h < rx + 4 && v >= ry && v < ry + 4) return 16'hF800;
    return 16'h0000;
  endfunction
  initial begin
    p1 = 0; p2 = 0; blue_h = 100; blue_v = 48;
    wait (!rst);
    forever begin
      for (int v = 0; v < 120; v++)
        for (int h = 0; h < 160; h++) begin
          @(negedge clk_65);
          hc = 12'(h); vc = 12'(v); pv = 1;
          p1 = px(h, v, blue_h, blue_v, 100, 10);
          p2 = px(h, v, 60, 70, 140, 90);
        end
      @(negedge clk_65); pv = 0; fd = 1;
      @(negedge clk_65); fd = 0;
      repeat (200) @(negedge clk_65);
    end
  end

  // saber script: hold the blue LED low in camera 1 (saber y = 101), then
  // move it up to y = 59 at game time 15, five ticks before block 0's hit.
  initial begin
    wait (!rst && t == 15);
    blue_h = 58;
  end

  // head position check after the first camera updates
  initial begin
    wait (!rst);
    #4ms;
    checks++;
    if (head.x != 11 || head.y != 101 || head.z != 141) begin
      failures++; $display("head %0d %0d %0d", head.x, head.y, head.z);
    end
    checks++;
    if (saber.x != 49 || saber.y != 101 || saber.z != 61) begin
      failures++; $display("saber %0d %0d %0d", saber.x, saber.y, saber.z);
    end
  end

  initial begin
    #80ms;
    failures++;
    $display("watchdog: t=%0d", t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk_65);
    @(negedge clk_65) rst = 0;
    // raycaster writes a 4x4 red square at framebuffer (100..103, 50..53)
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        @(negedge clk_65);
        rcx = 9'(100 + x); rcy = 9'(50 + y); rcrgb = 12'hF00; rcv = 1;
      end
    @(negedge clk_65) rcv = 0;
    #1ms;
    @(negedge clk_65) start = 1;
    @(negedge clk_65) start = 0;
    wait (done);
    #3ms;
    checks++; if (score != 1) begin failures++; $display("score %0d", score); end
    checks++; if (health != 9) begin failures++; $display("health %0d", health); end
    $display("mechanisms: cam %0d slice %0d miss %0d start %0d stream %0d halt %0d audio %0d hit %0d frames %0d square %0d done %0d",
             n_cam, n_slice, n_miss, n_start, n_stream, n_halt, n_audio, n_hit, n_frames, n_square_ok, n_done);
    checks++; if (n_cam == 0)       begin failures++; $display("no camera update"); end
    checks++; if (n_slice != 1)     begin failures++; $display("slices %0d", n_slice); end
    checks++; if (n_miss != 1)      begin failures++; $display("misses %0d", n_miss); end
    checks++; if (n_start == 0)     begin failures++; $display("start never reached music board"); end
    checks++; if (n_stream == 0)    begin failures++; $display("never streamed"); end
    checks++; if (n_halt == 0)      begin failures++; $display("SD never halted"); end
    checks++; if (n_audio == 0)     begin failures++; $display("no audio samples"); end
    checks++; if (n_hit != 1)       begin failures++; $display("hit notes %0d", n_hit); end
    checks++; if (n_pwm == 0)       begin failures++; $display("speaker PWM never pulsed"); end
    checks++; if (n_frames == 0)    begin failures++; $display("no VGA frames"); end
    checks++; if (n_square_ok == 0 || n_square_ok != n_frames)
                                    begin failures++; $display("square seen in %0d of %0d frames", n_square_ok, n_frames); end
    checks++; if (n_done == 0)      begin failures++; $display("song never ended"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
