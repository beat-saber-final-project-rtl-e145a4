// tb_uart_tx: random bytes sent by uart_tx (with baud_gen) are decoded by an
// independent serial sink; busy must last ten bit times.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_uart_tx;
  logic clk = 0, rst = 1, tick, start = 0, txd, busy;
  logic [7:0] data;
  logic [7:0] sent[$];
  int checks = 0, failures = 0;

  baud_gen u_b (.clk(clk), .rst(rst), .clear(1'b0), .tick(tick));
  uart_tx dut (.clk(clk), .rst(rst), .baud_tick(tick), .start(start), .data(data),
               .txd(txd), .busy(busy));
  tb_serial_sink sink (.line(txd));

  always #7.692 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int busy_cycles;
    repeat (3) @(posedge clk);
    rst = 0;
    checks++; if (txd !== 1'b1) begin failures++; $display("line not idle high"); end
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      data = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : 8'($urandom);
      sent.push_back(data);
      start = 1;
      @(negedge clk);
      start = 0;
      busy_cycles = 1;
      while (busy) begin @(negedge clk); busy_cycles++; end
      // up to one bit of lead time plus ten bits
      checks++;
      if (busy_cycles < 10 * 564 || busy_cycles > 11 * 565 + 2) begin
        failures++; $display("busy lasted %0d clocks", busy_cycles);
      end
      repeat ($urandom_range(0, 50)) @(negedge clk);
    end
    #(20us);
    checks++;
    if (sink.bytes.size() != sent.size()) begin
      failures++; $display("got %0d bytes, sent %0d", sink.bytes.size(), sent.size());
    end
    for (int i = 0; i < sent.size() && i < sink.bytes.size(); i++) begin
      checks++;
      if (sink.bytes[i] !== sent[i]) begin
        failures++; $display("byte %0d: got %h sent %h", i, sink.bytes[i], sent[i]);
      end
    end
    checks++; if (sink.bad_frames != 0) begin failures++; $display("bad frames"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
