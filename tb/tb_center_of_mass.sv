// tb_center_of_mass: random masked pixels over several frames; the result
// must be floor(sum/count) of the masked coordinates, ready within 40
// clocks of `tabulate`; an empty frame keeps the old result.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_center_of_mass;
  logic clk = 0, rst = 1, valid = 0, mask = 0, tab = 0, ov;
  logic [11:0] x, y, xo, yo;
  int checks = 0, failures = 0;

  center_of_mass dut (.clk(clk), .rst(rst), .x_in(x), .y_in(y), .valid(valid), .mask(mask),
                      .tabulate(tab), .x_out(xo), .y_out(yo), .out_valid(ov));
  always #5 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sx, sy, n;
    int wait_c;
    logic [11:0] ex, ey;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 6; f++) begin
      sx = 0; sy = 0; n = 0;
      for (int p = 0; p < 2000; p++) begin
        @(negedge clk);
        x = 12'($urandom_range(0, 639)); y = 12'($urandom_range(0, 479));
        valid = ($urandom_range(0, 9) != 0);
        mask  = (f == 3) ? 1'b0 : ($urandom_range(0, 3) == 0);
        if (valid && mask) begin sx += x; sy += y; n++; end
      end
      @(negedge clk); valid = 0; tab = 1;
      @(negedge clk); tab = 0;
      if (n == 0) begin
        repeat (60) @(negedge clk);
        checks++;
        if (xo !== ex || yo !== ey) begin failures++; $display("empty frame changed output"); end
      end else begin
        ex = 12'(sx / n); ey = 12'(sy / n);
        wait_c = 0;
        while (!ov && wait_c < 100) begin @(posedge clk); #1; wait_c++; end
        checks++;
        if (wait_c > 40) begin failures++; $display("frame %0d: took %0d clocks", f, wait_c); end
        checks++;
        if (xo !== ex || yo !== ey) begin
          failures++; $display("frame %0d: got %0d,%0d expected %0d,%0d", f, xo, yo, ex, ey);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
