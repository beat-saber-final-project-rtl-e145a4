// tb_uart_rx: bytes from an independent serial source (115200 baud exactly,
// unrelated phase) must be received; a short glitch must be ignored; a frame
// with a low stop bit must raise frame_error and not valid.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_uart_rx;
  logic clk = 0, rst = 1, line, valid, ferr;
  logic [7:0] data;
  logic [7:0] got[$];
  int nerr = 0;
  int checks = 0, failures = 0;

  tb_serial_source src (.line(line));
  uart_rx dut (.clk(clk), .rst(rst), .rxd(line), .data(data), .valid(valid), .frame_error(ferr));

  always #7.692 clk = ~clk;
  always @(posedge clk) begin
    if (!rst && valid) got.push_back(data);
    if (!rst && ferr) nerr++;
  end

  initial begin
    #30ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sent[$];
    logic [7:0] b;
    #333.3;
    rst = 0;
    #1000;
    for (int n = 0; n < 16; n++) begin
      b = (n == 0) ? 8'h55 : (n == 1) ? 8'hFF : (n == 2) ? 8'h00 : 8'($urandom);
      sent.push_back(b);
      src.send(b);
      #($urandom_range(0, 3000));
    end
    #20000;
    checks++;
    if (got.size() != sent.size()) begin failures++; $display("got %0d of %0d", got.size(), sent.size()); end
    foreach (sent[i]) begin
      checks++;
      if (i >= got.size() || got[i] !== sent[i]) begin failures++; $display("byte %0d wrong: got %h sent %h", i, got[i], sent[i]); end
    end
    // glitch of 1 us (< half bit): nothing received
    got.delete();
    src.glitch(1000);
    #20000;
    checks++; if (got.size() != 0) begin failures++; $display("glitch produced a byte"); end
    // bad stop bit
    src.send_bad_stop(8'hA5);
    #20000;
    checks++; if (got.size() != 0) begin failures++; $display("bad frame accepted"); end
    checks++; if (nerr != 1) begin failures++; $display("frame_error count %0d", nerr); end
    // a good byte afterwards still works
    src.send(8'h3C);
    #20000;
    checks++; if (got.size() != 1 || got[0] !== 8'h3C) begin failures++; $display("recovery failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
