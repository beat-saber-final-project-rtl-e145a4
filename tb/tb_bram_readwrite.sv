// tb_bram_readwrite: random writes and reads against an associative-array
// model; a read returns the word one clock later, the old word when the same
// address is written in the same clock, zero for a never-written word.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_bram_readwrite;
  logic clk = 0, we = 0;
  logic [9:0] aa, ab;
  logic [11:0] din, dout;
  logic [11:0] model [int];
  int checks = 0, failures = 0;

  bram_readwrite #(.WIDTH(12), .DEPTH(1024)) dut (.clk(clk), .we_a(we), .addr_a(aa), .din_a(din),
                                                 .addr_b(ab), .dout_b(dout));
  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] exp;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1);
      aa = 10'($urandom_range(0, 63)); din = 12'($urandom);
      ab = (n % 4 == 0) ? aa : 10'($urandom_range(0, 63));
      exp = model.exists(int'(ab)) ? model[int'(ab)] : 12'h000;
      @(posedge clk); #1;
      if (we) model[int'(aa)] = din;
      checks++;
      if (dout !== exp) begin failures++; $display("n%0d addr %0d: %h expected %h", n, ab, dout, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
