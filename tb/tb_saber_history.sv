// tb_saber_history: prev_pos must be the position sampled five ticks earlier.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_saber_history;
  import beat_saber_pkg::*;
  logic clk = 0, rst = 1, tick = 0;
  vec3_t pos, prev;
  vec3_t model[$];
  int checks = 0, failures = 0;

  saber_history dut (.clk(clk), .rst(rst), .tick(tick), .pos(pos), .prev_pos(prev));
  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 5; i++) model.push_back('0);
    for (int n = 0; n < 50; n++) begin
      @(negedge clk);
      pos = vec3_t'(36'($urandom) ^ {$urandom, 4'h0});
      tick = 1;
      model.push_back(pos);
      void'(model.pop_front());
      @(negedge clk);
      tick = 0;
      pos = '1;   // changes between ticks must not matter
      repeat (3) @(negedge clk);
      checks++;
      if (prev !== model[0]) begin failures++; $display("tick %0d: prev wrong", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
