// tb_color_threshold: random chroma values and windows against the
// inclusive window test, one clock later.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_color_threshold;
  logic clk = 0, mask;
  logic [7:0] cr, cb, crl, crh, cbl, cbh;
  int checks = 0, failures = 0;

  color_threshold dut (.clk(clk), .cr(cr), .cb(cb), .cr_lo(crl), .cr_hi(crh),
                       .cb_lo(cbl), .cb_hi(cbh), .mask(mask));
  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    int nin = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      crl = 8'($urandom_range(0, 128)); crh = 8'($urandom_range(128, 255));
      cbl = 8'($urandom_range(0, 128)); cbh = 8'($urandom_range(128, 255));
      cr = 8'($urandom); cb = 8'($urandom);
      if (n % 5 == 0) cr = crl;          // edges are inside
      if (n % 7 == 0) cb = cbh;
      exp = (cr >= crl && cr <= crh && cb >= cbl && cb <= cbh);
      if (exp) nin++;
      @(posedge clk); #1;
      checks++;
      if (mask !== exp) begin failures++; $display("cr %0d cb %0d: mask %b", cr, cb, mask); end
    end
    checks++; if (nin < 50) begin failures++; $display("too few in-window cases"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
