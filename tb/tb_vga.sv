// tb_vga: counts one full frame: 1344 clocks per line, 806 lines, 1024x768
// visible pixels, hsync low for 136 clocks starting at 1048, vsync low for
// 6 lines starting at line 771.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_vga;
  logic clk = 0, rst = 1, hs, vs, blank, fs;
  logic [10:0] hc;
  logic [9:0] vc;
  int checks = 0, failures = 0;

  vga dut (.clk(clk), .rst(rst), .hcount(hc), .vcount(vc), .hsync(hs), .vsync(vs),
           .blank(blank), .frame_start(fs));
  always #7.692 clk = ~clk;

  initial begin
    #40ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    longint total = 0, vis = 0, hs_low = 0, vs_low_lines = 0, first_hs = -1;
    int max_h = 0, max_v = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    chk(fs, "frame_start at reset exit");
    do begin
      if (!blank) vis++;
      if (vc == 0 && !hs) begin hs_low++; if (first_hs < 0) first_hs = hc; end
      if (hc == 0 && !vs) vs_low_lines++;
      if (hc == 0 && !vs && vs_low_lines == 1) chk(vc == 771, $sformatf("vsync starts at %0d", vc));
      if (hc > max_h) max_h = hc;
      if (vc > max_v) max_v = vc;
      total++;
      @(negedge clk);
    end while (!fs);
    chk(total == 1344 * 806, $sformatf("frame %0d clocks", total));
    chk(vis == 1024 * 768, $sformatf("visible %0d", vis));
    chk(max_h == 1343 && max_v == 805, "counter range");
    chk(hs_low == 136 && first_hs == 1048, $sformatf("hsync %0d from %0d", hs_low, first_hs));
    chk(vs_low_lines == 6, $sformatf("vsync lines %0d", vs_low_lines));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
