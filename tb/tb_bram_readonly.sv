// tb_bram_readonly: reads the demo beat map and compares each word with the
// map's generating formula; the read must take one clock.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_bram_readonly;
  logic clk = 0;
  logic [7:0] addr;
  logic [50:0] dout;
  int checks = 0, failures = 0;

  bram_readonly #(.WIDTH(51), .DEPTH(256), .INIT_FILE("rtl/beat_map.mem")) dut (
    .clk(clk), .addr(addr), .dout(dout));
  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // demo map: x = 120+80*(i%4), y = 160+96*((i/4)%3), t = 100+50*i,
  // colour = i%2, dir = i%4, id = i, for i < 32, then an all-ones word
  function automatic logic [50:0] expected(input int i);
    if (i < 32)
      return {12'(120 + 80 * (i % 4)), 12'(160 + 96 * ((i / 4) % 3)), 16'(100 + 50 * i),
              1'(i % 2), 2'(i % 4), 8'(i)};
    return '1;
  endfunction

  initial begin
    for (int i = 0; i < 40; i++) begin
      @(negedge clk) addr = 8'(i);
      @(posedge clk); #1;
      checks++;
      if (dout !== expected(i)) begin failures++; $display("word %0d: %h", i, dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
