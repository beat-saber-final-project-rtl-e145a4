// tb_serial_source: behavioural 8N1 serial line driver for testbenches.
// send(byte) puts one frame on `line` with a bit time of BIT_NS (115200
// baud by default), independent of any clock in the design under test.
// send_bad_stop(byte) sends a frame whose stop bit is low; glitch(ns) pulls
// the line low briefly.
//
// From the source description: the interface behaviour it imitates (byte rate, framing).
// My own choices: all timing details, data contents and the task interface.
`timescale 1ns/1ps
module tb_serial_source #(
  parameter real BIT_NS = 1.0e9 / 115200.0
) (
  output logic line
);
  initial line = 1'b1;

  task automatic send(input logic [7:0] b);
    line = 1'b0;
    #(BIT_NS);
    for (int i = 0; i < 8; i++) begin
      line = b[i];
      #(BIT_NS);
    end
    line = 1'b1;
    #(BIT_NS);
  endtask

  task automatic send_bad_stop(input logic [7:0] b);
    line = 1'b0;
    #(BIT_NS);
    for (int i = 0; i < 8; i++) begin
      line = b[i];
      #(BIT_NS);
    end
    line = 1'b0;
    #(BIT_NS);
    line = 1'b1;
    #(BIT_NS * 2);
  endtask

  task automatic glitch(input real width_ns);
    line = 1'b0;
    #(width_ns);
    line = 1'b1;
    #(BIT_NS * 2);
  endtask
endmodule
