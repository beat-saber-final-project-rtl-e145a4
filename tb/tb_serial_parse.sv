// tb_serial_parse: bytes presented with a ready level lasting 1-3 clocks;
// FF must set game_start (sticky), 01 must give exactly one hit pulse per
// byte, other bytes nothing.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_serial_parse;
  logic clk = 0, rst = 1, rdy = 0, gs, hit;
  logic [7:0] d = 0;
  int nhit = 0;
  int checks = 0, failures = 0;

  serial_parse dut (.clk(clk), .rst(rst), .rx_data(d), .rx_ready(rdy), .game_start(gs), .hit_received(hit));
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && hit) nhit++;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input logic [7:0] b);
    @(negedge clk); d = b; rdy = 1;
    repeat ($urandom_range(0, 2)) @(negedge clk);
    @(negedge clk); rdy = 0;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    put(8'h12); put(8'h00); put(8'hFE);
    checks++; if (gs || nhit != 0) begin failures++; $display("other bytes acted"); end
    put(8'h01); put(8'h01);
    checks++; if (nhit != 2) begin failures++; $display("hits %0d", nhit); end
    checks++; if (gs) begin failures++; $display("start without FF"); end
    put(8'hFF);
    checks++; if (!gs) begin failures++; $display("no start"); end
    put(8'h01); put(8'h33);
    checks++; if (!gs || nhit != 3) begin failures++; $display("after start: gs %b hits %0d", gs, nhit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
