// tb_sync_2ff: random data through the synchroniser must come out exactly
// two clocks later.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_sync_2ff;
  logic clk = 0, rst = 1;
  logic [7:0] d, q;
  logic [7:0] hist [3];
  int checks = 0, failures = 0;

  sync_2ff #(.WIDTH(8)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    hist = '{default: 0};
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      if (i >= 3) begin
        checks++;
        if (q !== hist[1]) begin
          failures++;
          $display("mismatch at %0d: q=%h expected %h", i, q, hist[1]);
        end
      end
      hist[2] = hist[1]; hist[1] = hist[0];
      d = 8'($urandom);
      hist[0] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
