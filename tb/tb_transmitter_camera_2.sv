// tb_transmitter_camera_2: decodes the serial line independently and checks
// the 9-byte frame format: FF FF FF, hand_x[11:4], hand_y[7:0],
// {hand_x[3:0],hand_y[11:8]}, head_x[11:4], head_y[7:0], {head_x[3:0],head_y[11:8]}.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_transmitter_camera_2;
  logic clk = 0, rst = 1, txd;
  logic [11:0] hx, hy, dx, dy;
  int checks = 0, failures = 0;

  transmitter_camera_2 dut (.clk(clk), .rst(rst), .hand_x(hx), .hand_y(hy),
                            .head_x(dx), .head_y(dy), .txd(txd));
  tb_serial_sink sink (.line(txd));

  always #7.692 clk = ~clk;

  initial begin
    #40ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_b [9];
    hx = 12'h274; hy = 12'h1FF; dx = 12'h123; dy = 12'h0DF;
    repeat (3) @(posedge clk);
    rst = 0;
    // two frames with constant data (9 bytes ~ 0.78 ms each)
    #1.8ms;
    exp_b = '{8'hFF, 8'hFF, 8'hFF, hx[11:4], hy[7:0], {hx[3:0], hy[11:8]},
              dx[11:4], dy[7:0], {dx[3:0], dy[11:8]}};
    checks++;
    if (sink.bytes.size() < 18) begin failures++; $display("only %0d bytes", sink.bytes.size()); end
    for (int i = 0; i < 18 && i < sink.bytes.size(); i++) begin
      checks++;
      if (sink.bytes[i] !== exp_b[i % 9]) begin
        failures++; $display("byte %0d: %h expected %h", i, sink.bytes[i], exp_b[i % 9]);
      end
    end
    // back-to-back: gap between frames must be small (no idle time beyond
    // one bit), checked as byte count over a longer window
    checks++;
    if (sink.bytes.size() > 21) begin failures++; $display("too many bytes %0d", sink.bytes.size()); end
    checks++; if (sink.bad_frames != 0) begin failures++; $display("bad frames"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
