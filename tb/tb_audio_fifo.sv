// tb_audio_fifo: random pushes and pops against a queue model with the
// default 16384 depth; fills the FIFO to check full at 16383 entries and
// that data_count tracks occupancy.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_audio_fifo;
  logic clk = 0, rst = 1, wr = 0, rd = 0, full, empty;
  logic [7:0] din, dout;
  logic [13:0] cnt;
  logic [7:0] model[$];
  int checks = 0, failures = 0;

  audio_fifo dut (.clk(clk), .rst(rst), .wr_en(wr), .din(din), .rd_en(rd), .dout(dout),
                  .full(full), .empty(empty), .data_count(cnt));
  always #20 clk = ~clk;

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp;
    bit did_rd;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    checks++; if (!empty || cnt != 0) begin failures++; $display("not empty after reset"); end
    for (int n = 0; n < 40000; n++) begin
      @(negedge clk);
      if (n < 20000) begin wr = ($urandom_range(0, 9) < 9); rd = ($urandom_range(0, 9) < 2); end
      else            begin wr = ($urandom_range(0, 9) < 2); rd = ($urandom_range(0, 9) < 9); end
      din = 8'($urandom);
      did_rd = rd && model.size() > 0;
      if (did_rd) exp = model[0];
      @(posedge clk); #1;
      if (did_rd) begin
        void'(model.pop_front());
        checks++;
        if (dout !== exp) begin failures++; $display("n%0d: dout %h expected %h", n, dout, exp); end
      end
      if (wr && model.size() < 16383) model.push_back(din);
      if (n % 97 == 0) begin
        checks++;
        if (cnt != 14'(model.size()) || full != (model.size() == 16383) || empty != (model.size() == 0)) begin
          failures++; $display("n%0d: count %0d model %0d full %b", n, cnt, model.size(), full);
        end
      end
    end
    // drain what is left
    while (model.size() > 0) begin
      @(negedge clk); wr = 0; rd = 1; exp = model[0];
      @(posedge clk); #1;
      void'(model.pop_front());
      checks++;
      if (dout !== exp) begin failures++; $display("drain: dout %h expected %h", dout, exp); end
    end
    @(negedge clk); rd = 0;
    #1;
    checks++; if (model.size() != 0 || !empty) begin failures++; $display("did not drain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
