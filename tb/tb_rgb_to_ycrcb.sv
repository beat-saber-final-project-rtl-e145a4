// tb_rgb_to_ycrcb: compares with the BT.601 full-range equations computed in
// real arithmetic (Y = .299R+.587G+.114B, Cb = 128-.1687R-.3313G+.5B,
// Cr = 128+.5R-.4187G-.0813B), allowing 2 LSB of rounding difference.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_rgb_to_ycrcb;
  logic clk = 0;
  logic [7:0] r, g, b, y, cr, cb;
  int checks = 0, failures = 0;

  rgb_to_ycrcb dut (.clk(clk), .r(r), .g(g), .b(b), .y(y), .cr(cr), .cb(cb));
  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(input real v);
    int i = int'(v);
    return (i < 0) ? 0 : (i > 255) ? 255 : i;
  endfunction

  task automatic chk(input int got, input int exp, input string nm);
    checks++;
    if (got - exp > 2 || exp - got > 2) begin
      failures++; $display("%s: got %0d expected %0d (rgb %0d %0d %0d)", nm, got, exp, r, g, b);
    end
  endtask

  initial begin
    real ry, rcb, rcr;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (n == 0) {r, g, b} = 24'h0000FF;
      else if (n == 1) {r, g, b} = 24'hFF0000;
      else if (n == 2) {r, g, b} = 24'hFFFFFF;
      else {r, g, b} = 24'($urandom);
      ry  = 0.299 * r + 0.587 * g + 0.114 * b;
      rcb = 128.0 - 0.168736 * r - 0.331264 * g + 0.5 * b;
      rcr = 128.0 + 0.5 * r - 0.418688 * g - 0.081312 * b;
      @(posedge clk); #1;
      chk(y, clip(ry), "Y"); chk(cb, clip(rcb), "Cb"); chk(cr, clip(rcr), "Cr");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
