// tb_camera_top_level: draws a blue rectangle (saber LEDs) and a red one
// (head LEDs) on a grey background in a 640x480 RGB565 frame; the hand and
// head outputs must be the rectangles' centres (floor of the mean).
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_camera_top_level;
  logic clk = 0, rst = 1;
  logic [15:0] pix;
  logic [11:0] hc, vc, hx, hy, dx, dy;
  logic pv = 0, fd = 0, hv, dv;
  int checks = 0, failures = 0;

  camera_top_level dut (.clk(clk), .rst(rst), .pixel(pix), .hcount(hc), .vcount(vc),
                        .pixel_valid(pv), .frame_done(fd), .hand_x(hx), .hand_y(hy),
                        .head_x(dx), .head_y(dy), .hand_valid(hv), .head_valid(dv));
  always #7.692 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input int bx0, by0, bw, bh, rx0, ry0, rw, rh);
    for (int v = 0; v < 480; v++)
      for (int h = 0; h < 640; h++) begin
        @(negedge clk);
        hc = 12'(h); vc = 12'(v); pv = 1;
        if (h >= bx0 && h < bx0 + bw && v >= by0 && v < by0 + bh) pix = 16'h001F;
        else if (h >= rx0 && h < rx0 + rw && v >= ry0 && v < ry0 + rh) pix = 16'hF800;
        else pix = 16'h8410;
      end
    @(negedge clk); pv = 0; fd = 1;
    @(negedge clk); fd = 0;
    repeat (60) @(negedge clk);
  endtask

  task automatic expect4(input int ehx, ehy, edx, edy);
    checks++;
    if (hx != ehx || hy != ehy) begin failures++; $display("hand %0d,%0d expected %0d,%0d", hx, hy, ehx, ehy); end
    checks++;
    if (dx != edx || dy != edy) begin failures++; $display("head %0d,%0d expected %0d,%0d", dx, dy, edx, edy); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    frame(100, 200, 40, 30, 400, 50, 20, 20);
    expect4(119, 214, 409, 59);
    frame(500, 10, 21, 11, 20, 400, 9, 5);
    expect4(510, 15, 24, 402);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
