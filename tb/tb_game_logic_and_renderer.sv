// tb_game_logic_and_renderer: plays the 32-block demo song with a 20-clock
// game tick. The testbench swings the saber correctly through every even
// block (it starts 40 units before the block, against its direction, and
// reaches the block centre 3 ticks before its hit time) and ignores every
// odd block. Expected: 16 slices, 16 misses, score 16, health down to 0,
// song_done at the end; block 0 of block_arr must carry the depth
// 8*(t_hit - now). The framebuffer port is exercised by writing a pixel and
// reading it back through hcount/vcount.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_game_logic_and_renderer;
  import beat_saber_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  vec3_t saber;
  logic [8:0] rcx = 0, rcy = 0;
  logic [11:0] rcrgb = 0;
  logic rcv = 0;
  logic [10:0] hc = 0;
  logic [9:0] vc = 0;
  logic [3:0] r, g, b;
  block_pos_t arr [NUM_BLOCKS];
  logic sl, ms, playing, done;
  logic [7:0] mid, health;
  logic [15:0] t, score;
  int nsl = 0, nms = 0, zbad = 0, zchk = 0;
  int checks = 0, failures = 0;

  game_logic_and_renderer #(.TICK_CYCLES(20)) dut (
    .clk(clk), .rst(rst), .start_game(start), .saber_pos(saber),
    .rc_x(rcx), .rc_y(rcy), .rc_rgb(rcrgb), .rc_valid(rcv), .hcount(hc), .vcount(vc),
    .r(r), .g(g), .b(b), .block_arr(arr), .block_sliced(sl), .block_missed(ms), .missed_id(mid),
    .playing(playing), .song_done(done), .curr_time(t), .score(score), .health(health));
  always #7.692 clk = ~clk;

  function automatic int bx(input int i); return 120 + 80 * (i % 4); endfunction
  function automatic int by(input int i); return 160 + 96 * ((i / 4) % 3); endfunction

  // saber script
  always @(posedge clk) begin
    int T, i, ti, cx, cy, dx, dy;
    T = int'(t);
    i = (T - 100 + 25) / 50;
    if (T < 75) i = -1;
    saber.z <= 0;
    if (i >= 0 && i < 32 && i % 2 == 0) begin
      ti = 100 + 50 * i;
      cx = bx(i); cy = by(i);
      dx = 0; dy = 0;
      case (i % 4)
        0: dy = -1; 1: dx = -1; 2: dx = 1; default: dy = 1;
      endcase
      if (T < ti - 3) begin saber.x <= 12'(cx - 40 * dx); saber.y <= 12'(cy - 40 * dy); end
      else            begin saber.x <= 12'(cx);           saber.y <= 12'(cy); end
    end else begin
      saber.x <= 12'd2000; saber.y <= 12'd2000;
    end
    if (!rst) begin
      if (sl) nsl++;
      if (ms) nms++;
      if (arr[0].visible) begin
        zchk++;
        if (int'(arr[0].blk.t_hit) >= T &&
            int'(arr[0].z) != 8 * (int'(arr[0].blk.t_hit) - T) &&
            int'(arr[0].z) != 8 * (int'(arr[0].blk.t_hit) - T + 1)) zbad++;
      end
    end
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // framebuffer: pixel (10,20) = 0xABC, read at screen (21,41)
    @(negedge clk) rcx = 9'd10; rcy = 9'd20; rcrgb = 12'hABC; rcv = 1;
    @(negedge clk) rcv = 0; hc = 11'd21; vc = 10'd41;
    @(negedge clk); @(negedge clk);
    checks++; if ({r, g, b} != 12'hABC) begin failures++; $display("framebuffer read %h", {r, g, b}); end
    hc = 11'd1100;
    @(negedge clk); @(negedge clk);
    checks++; if ({r, g, b} != 12'h000) begin failures++; $display("blanking %h", {r, g, b}); end
    repeat (100) @(negedge clk);
    checks++; if (t != 0) begin failures++; $display("time ran before start"); end
    start = 1; @(negedge clk); start = 0;
    wait (done);
    repeat (10) @(negedge clk);
    checks++; if (nsl != 16) begin failures++; $display("slices %0d", nsl); end
    checks++; if (nms != 16) begin failures++; $display("misses %0d", nms); end
    checks++; if (score != 16) begin failures++; $display("score %0d", score); end
    checks++; if (health != 0) begin failures++; $display("health %0d", health); end
    checks++; if (zchk == 0 || zbad != 0) begin failures++; $display("depth: %0d checked %0d bad", zchk, zbad); end
    $display("slices %0d misses %0d score %0d end time %0d", nsl, nms, score, t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
