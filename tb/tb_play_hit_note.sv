// tb_play_hit_note: at the default parameters a hit gives a note lasting
// 10,000,000 clocks (0.1 s at 100 MHz) with level changes every 67,568
// clocks (740 Hz); a second hit restarts it.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_play_hit_note;
  logic clk = 0, rst = 1, hit = 0, act;
  logic [7:0] pd;
  int checks = 0, failures = 0;

  play_hit_note dut (.clk(clk), .rst(rst), .hit(hit), .pwm_data(pd), .hit_active(act));
  always #5 clk = ~clk;

  initial begin
    #300ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c = 0, last_edge = -1, edges = 0, bad = 0;
    logic [7:0] prev;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    checks++; if (act || pd != 8'h80) begin failures++; $display("active at idle"); end
    @(negedge clk) hit = 1;
    @(negedge clk) hit = 0;
    prev = pd;
    checks++; if (!act || pd != 8'hC0) begin failures++; $display("not started"); end
    c = 1;
    while (act) begin
      @(negedge clk); c++;
      if (act && pd != prev) begin
        if (last_edge >= 0 && c - last_edge != 67568) bad++;
        if (last_edge < 0 && c != 67569) bad++;
        last_edge = c; edges++;
      end
      prev = pd;
    end
    checks++; if (c != 10_000_001) begin failures++; $display("note lasted %0d", c); end
    checks++; if (bad != 0 || edges != 147) begin failures++; $display("edges %0d bad %0d", edges, bad); end
    checks++; if (pd != 8'h80) begin failures++; $display("idle level %h", pd); end
    // restart in the middle
    @(negedge clk) hit = 1; @(negedge clk) hit = 0;
    repeat (5_000_000) @(negedge clk);
    @(negedge clk) hit = 1; @(negedge clk) hit = 0;
    repeat (9_000_000) @(negedge clk);
    checks++; if (!act) begin failures++; $display("restart did not extend note"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
