// tb_baud_gen: ticks must come every 564 or 565 clocks, exactly 29 ticks in
// 16384 clocks (65 MHz * 29 / 2^14 = 115.05 kHz), and `clear` must restart
// the period.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_baud_gen;
  logic clk = 0, rst = 1, clear = 0, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last = -1, nticks = 0, first = -1;

  baud_gen dut (.clk(clk), .rst(rst), .clear(clear), .tick(tick));

  always #7.692 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    while (nticks < 59) begin
      @(posedge clk);
      cyc++;
      if (tick) begin
        if (last >= 0) check((cyc - last == 564) || (cyc - last == 565),
                             $sformatf("tick interval %0d", cyc - last));
        if (first < 0) first = cyc;
        last = cyc;
        nticks++;
      end
    end
    // 58 intervals after the first tick: two full accumulator cycles
    check(last - first == 2 * 16384, $sformatf("58 intervals took %0d clocks", last - first));
    // clear in the middle of a period: next tick a full period later
    repeat (100) @(posedge clk);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!tick);
    // the clearing edge is followed by 565 additions; the tick is seen at the
    // edge after the one that produced it
    check(cyc == 566, $sformatf("tick after clear took %0d clocks", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
