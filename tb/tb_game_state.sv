// tb_game_state: with TICK_CYCLES = 50 the game time must advance once every
// 50 clocks after start (and not before), score must count slices, health
// must count down on misses and stop at zero.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_game_state;
  logic clk = 0, rst = 1, start = 0, sl = 0, ms = 0;
  logic [7:0] sid = 0;
  logic playing, tick, sev;
  logic [15:0] t, score;
  logic [7:0] health, last_id;
  int checks = 0, failures = 0;

  game_state #(.TICK_CYCLES(50), .MAX_HEALTH(8'd3)) dut (
    .clk(clk), .rst(rst), .start_game(start), .block_sliced(sl), .sliced_id(sid),
    .block_missed(ms), .playing(playing), .tick(tick), .curr_time(t), .score(score),
    .health(health), .last_sliced_id(last_id), .slice_event(sev));
  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    int c, t0, ticks;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (200) @(negedge clk);
    chk(t == 0 && !playing, "time moved before start");
    start = 1; @(negedge clk); start = 0;
    c = 0; ticks = 0; t0 = -1;
    while (ticks < 10) begin
      @(posedge clk); #1; c++;
      if (tick) begin
        if (t0 >= 0) chk(c - t0 == 50, $sformatf("tick period %0d", c - t0));
        t0 = c; ticks++;
      end
    end
    chk(t == 10, $sformatf("curr_time %0d after 10 ticks", t));
    @(negedge clk); sl = 1; sid = 8'd7;
    @(negedge clk); sl = 1; sid = 8'd9;
    @(negedge clk); sl = 0;
    #1;
    chk(score == 2 && last_id == 9, $sformatf("score %0d last %0d", score, last_id));
    chk(sev, "slice_event not seen after slice");
    for (int i = 0; i < 5; i++) begin @(negedge clk); ms = 1; end
    @(negedge clk); ms = 0;
    chk(health == 0, $sformatf("health %0d", health));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
