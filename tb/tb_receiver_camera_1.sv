// tb_receiver_camera_1: frames sent by an independent serial source, after
// some junk bytes including single and double FF, must yield the encoded
// coordinates; junk alone must not.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_receiver_camera_1;
  logic clk = 0, rst = 1, line, cv;
  logic [11:0] hx, hy, dx, dy;
  int nvalid = 0;
  int checks = 0, failures = 0;

  tb_serial_source src (.line(line));
  receiver_camera_1 dut (.clk(clk), .rst(rst), .rxd(line), .hand_x(hx), .hand_y(hy),
                         .head_x(dx), .head_y(dy), .coords_valid(cv));

  always #7.692 clk = ~clk;
  always @(posedge clk) if (!rst && cv) nvalid++;

  initial begin
    #60ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_frame(input logic [11:0] ax, ay, bx, by);
    src.send(8'hFF); src.send(8'hFF); src.send(8'hFF);
    src.send(ax[11:4]); src.send(ay[7:0]); src.send({ax[3:0], ay[11:8]});
    src.send(bx[11:4]); src.send(by[7:0]); src.send({bx[3:0], by[11:8]});
  endtask

  initial begin
    logic [11:0] ax, ay, bx, by;
    #500; rst = 0; #1000;
    src.send(8'h12); src.send(8'hFF); src.send(8'h00); src.send(8'hFF); src.send(8'hFF);
    src.send(8'h27);
    #20000;
    checks++; if (nvalid != 0) begin failures++; $display("junk gave coordinates"); end
    for (int n = 0; n < 6; n++) begin
      ax = 12'($urandom_range(0, 'h274)); ay = 12'($urandom_range(0, 'h1DF));
      bx = 12'($urandom_range(0, 'h274)); by = 12'($urandom_range(0, 'h1DF));
      if (n == 0) begin ax = 12'h274; ay = 12'h0FF; bx = 0; by = 12'h1DF; end
      send_frame(ax, ay, bx, by);
      #20000;
      checks++;
      if (nvalid != n + 1) begin failures++; $display("frame %0d: valid count %0d", n, nvalid); end
      checks++;
      if (hx !== ax || hy !== ay || dx !== bx || dy !== by) begin
        failures++;
        $display("frame %0d: got %h %h %h %h expected %h %h %h %h", n, hx, hy, dx, dy, ax, ay, bx, by);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
