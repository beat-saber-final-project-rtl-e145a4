// tb_serial_sink: behavioural 8N1 serial decoder for testbenches.
// Waits for a falling edge, samples each bit at its centre using a bit
// time of BIT_NS and appends good frames to `bytes`; frames with a low
// stop bit count in `bad_frames`.
//
// From the source description: the interface behaviour it imitates (byte rate, framing).
// My own choices: all timing details, data contents and the task interface.
`timescale 1ns/1ps
module tb_serial_sink #(
  parameter real BIT_NS = 1.0e9 / 115200.0
) (
  input logic line
);
  logic [7:0] bytes[$];
  int         bad_frames = 0;

  initial begin
    logic [7:0] b;
    forever begin
      @(negedge line);
      #(BIT_NS * 1.5);
      for (int i = 0; i < 8; i++) begin
        b[i] = line;
        #(BIT_NS);
      end
      if (line) bytes.push_back(b);
      else      bad_frames++;
    end
  end
endmodule
