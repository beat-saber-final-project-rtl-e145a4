// tb_camera_interface: both cameras see a blue and a red rectangle in
// 160x120 frames; camera 2's centroids travel over the serial wire. The 3D
// outputs must be saber = (y1, x1, x2) and head likewise, per the axis
// arrangement of the two cameras.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_camera_interface;
  import beat_saber_pkg::*;
  logic clk = 0, rst = 1, link, pv = 0, fd = 0;
  logic [15:0] p1, p2;
  logic [11:0] hc, vc;
  vec3_t saber, head;
  logic pos_v;
  int checks = 0, failures = 0;

  camera_interface dut (
    .clk(clk), .rst(rst),
    .cam1_pixel(p1), .cam1_hcount(hc), .cam1_vcount(vc), .cam1_valid(pv), .cam1_frame_done(fd),
    .cam2_pixel(p2), .cam2_hcount(hc), .cam2_vcount(vc), .cam2_valid(pv), .cam2_frame_done(fd),
    .link_tx(link), .link_rx(link), .saber_pos(saber), .head_pos(head), .pos_valid(pos_v)
  );
  always #7.692 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] px(input int h, v, bx, by, rx, ry);
    if (h >= bx && h < bx + 4 && v >= by && v < by + 4) return 16'h001F;
    if (h >= rx && h < rx + 4 && v >= ry && v < ry + 4) return 16'hF800;
    return 16'h0000;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    // camera 1: blue at (20,30), red at (100,10); camera 2: blue at (60,70), red at (140,90)
    for (int v = 0; v < 120; v++)
      for (int h = 0; h < 160; h++) begin
        @(negedge clk);
        hc = 12'(h); vc = 12'(v); pv = 1;
        p1 = px(h, v, 20, 30, 100, 10);
        p2 = px(h, v, 60, 70, 140, 90);
      end
    @(negedge clk); pv = 0; fd = 1;
    @(negedge clk); fd = 0;
    // two serial frames (~0.8 ms each) so a whole frame after the update arrives
    #2.0ms;
    checks++;
    if (saber.x != 31 || saber.y != 21 || saber.z != 61) begin
      failures++; $display("saber %0d %0d %0d", saber.x, saber.y, saber.z);
    end
    checks++;
    if (head.x != 11 || head.y != 101 || head.z != 141) begin
      failures++; $display("head %0d %0d %0d", head.x, head.y, head.z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
