// tb_audio_pwm: for several levels, counts high clocks over 256-clock
// windows; the duty cycle must equal the level exactly.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_audio_pwm;
  logic clk = 0, rst = 1, pwm;
  logic [7:0] level = 0;
  int checks = 0, failures = 0;

  audio_pwm dut (.clk(clk), .rst(rst), .level(level), .pwm(pwm));
  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lv [5] = '{0, 1, 64, 128, 255};
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    foreach (lv[k]) begin
      int highs;
      @(negedge clk) level = 8'(lv[k]);
      repeat (300) @(negedge clk);
      highs = 0;
      repeat (256) begin @(negedge clk); if (pwm) highs++; end
      checks++;
      if (highs != lv[k]) begin failures++; $display("level %0d: %0d high clocks", lv[k], highs); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
