// tb_state_processor: a saber sweeping through the block in its direction
// at the right time slices it (once); the wrong direction, too slow a
// swing, too far away or too early does not.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_state_processor;
  import beat_saber_pkg::*;
  logic clk = 0, rst = 1, hv = 1, sl;
  logic [15:0] t;
  block_t blk;
  vec3_t sp, pp;
  logic [7:0] sid;
  int nsl = 0;
  int checks = 0, failures = 0;

  state_processor dut (.clk(clk), .rst(rst), .curr_time(t), .head_block(blk), .head_valid(hv),
                       .saber_pos(sp), .prev_saber_pos(pp), .block_sliced(sl), .sliced_id(sid));
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && sl) nsl++;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // set up a case, hold it 5 clocks, return the number of slices seen
  task automatic trial(input dir_t d, input int id, input int dtime, input int ox, input int oy,
                       input int vx, input int vy, input int exp, input string nm);
    int nb = nsl;
    @(negedge clk);
    blk.x = 12'd300; blk.y = 12'd200; blk.dir = d; blk.id = 8'(id); blk.color = COLOR_BLUE;
    t = 16'd1000; blk.t_hit = 16'(1000 + dtime);
    sp.x = 12'(300 + ox); sp.y = 12'(200 + oy); sp.z = 0;
    pp.x = 12'(300 + ox - vx); pp.y = 12'(200 + oy - vy); pp.z = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (nsl - nb != exp) begin failures++; $display("%s: %0d slices", nm, nsl - nb); end
    if (exp == 1) begin
      checks++; if (sid != 8'(id)) begin failures++; $display("%s: id %0d", nm, sid); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    trial(DIR_UP,    1,  0,  10, -5,   0, -40, 1, "up ok");
    trial(DIR_UP,    1,  0,  10, -5,   0, -40, 0, "same block again");
    trial(DIR_DOWN,  2,  3,  -8, 20,   0,  40, 1, "down ok");
    trial(DIR_LEFT,  3, -5,  30, 0,  -50,   0, 1, "left ok");
    trial(DIR_RIGHT, 4,  0,   0, 0,   50,   0, 1, "right ok");
    trial(DIR_RIGHT, 5,  0,   0, 0,  -50,   0, 0, "right swung left");
    trial(DIR_UP,    6,  0,   0, 0,    0,  40, 0, "up swung down");
    trial(DIR_UP,    7,  0,   0, 0,    0,  -8, 0, "too slow");
    trial(DIR_UP,    8,  0, 100, 0,    0, -40, 0, "too far");
    trial(DIR_UP,    9, 50,   0, 0,    0, -40, 0, "too early");
    trial(DIR_UP,   10, -20,  0, 0,    0, -40, 0, "too late");
    hv = 0;
    trial(DIR_UP,   11,  0,   0, 0,    0, -40, 0, "no block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
