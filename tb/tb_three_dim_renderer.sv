// tb_three_dim_renderer: writes a pattern into the 512x384 framebuffer, then
// scans screen positions: pixel (h,v) must show framebuffer pixel (h/2,v/2)
// two clocks later, and black outside 1024x768.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_three_dim_renderer;
  logic clk = 0, rst = 1, we = 0;
  logic [8:0] wx, wy;
  logic [11:0] wrgb;
  logic [10:0] hc;
  logic [9:0] vc;
  logic [3:0] r, g, b;
  int checks = 0, failures = 0;

  three_dim_renderer dut (.clk(clk), .rst(rst), .wr_x(wx), .wr_y(wy), .wr_rgb(wrgb), .wr_en(we),
                          .hcount(hc), .vcount(vc), .r(r), .g(g), .b(b));
  always #7.692 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] pat(input int x, y);
    return 12'((x * 7 + y * 13) ^ (y << 4));
  endfunction

  initial begin
    int hs [$], vs [$];
    logic [11:0] exp;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // write rows 0..7 and 380..383 fully, plus some scattered pixels
    for (int y = 0; y < 384; y++) begin
      if (y >= 8 && y < 380) continue;
      for (int x = 0; x < 512; x++) begin
        @(negedge clk); we = 1; wx = 9'(x); wy = 9'(y); wrgb = pat(x, y);
      end
    end
    @(negedge clk); we = 0;
    // random reads in the written rows, screen rows 0..15 and 760..767
    for (int n = 0; n < 3000; n++) begin
      int h, v;
      h = $urandom_range(0, 1100);
      v = (n % 2) ? $urandom_range(0, 15) : $urandom_range(760, 800);
      @(negedge clk); hc = 11'(h); vc = 10'(v);
      @(negedge clk); hc = 0; vc = 0;
      @(posedge clk); #1;
      exp = (h < 1024 && v < 768) ? pat(h / 2, v / 2) : 12'h000;
      checks++;
      if ({r, g, b} !== exp) begin failures++; $display("(%0d,%0d): %h expected %h", h, v, {r, g, b}, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
