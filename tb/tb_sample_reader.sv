// tb_sample_reader: against a FIFO preloaded with a ramp, pops must be
// exactly 568 clocks apart (44 kHz at 25 MHz), samples must follow the ramp,
// and nothing is popped while disabled or empty.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_sample_reader;
  logic clk = 0, rst = 1, en = 0, wr = 0, rd, full, empty, strobe;
  logic [7:0] din, dout, sample;
  logic [13:0] cnt;
  int checks = 0, failures = 0;

  audio_fifo #(.DEPTH(256)) u_fifo (.clk(clk), .rst(rst), .wr_en(wr), .din(din), .rd_en(rd),
    .dout(dout), .full(full), .empty(empty), .data_count(cnt[7:0]));
  sample_reader dut (.clk(clk), .rst(rst), .enable(en), .fifo_empty(empty), .fifo_dout(dout),
                     .fifo_rd_en(rd), .sample(sample), .sample_strobe(strobe));
  always #20 clk = ~clk;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c = 0, last = -1, nread = 0;
    assign cnt[13:8] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 40; i++) begin @(negedge clk); wr = 1; din = 8'(i + 10); end
    @(negedge clk); wr = 0;
    repeat (2000) begin @(posedge clk); #1; if (rd) nread++; end
    checks++; if (nread != 0) begin failures++; $display("read while disabled"); end
    @(negedge clk) en = 1;
    while (nread < 45) begin
      @(posedge clk); #1; c++;
      if (rd) begin
        if (last >= 0) begin
          checks++; if (c - last != 568) begin failures++; $display("interval %0d", c - last); end
        end
        last = c; nread++;
      end
      if (strobe) begin
        checks++;
        if (sample != 8'(nread - 1 + 10)) begin failures++; $display("sample %0d after %0d reads", sample, nread); end
      end
      if (c > 40 * 568 + 2000) break;
    end
    checks++; if (nread != 40) begin failures++; $display("%0d reads from 40 entries", nread); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
