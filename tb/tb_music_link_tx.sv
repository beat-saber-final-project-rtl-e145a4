// tb_music_link_tx: a start request must put 100 FF bytes on the line, and
// hits requested during and after them must follow as 01 bytes, one each.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_music_link_tx;
  logic clk = 0, rst = 1, start = 0, sl = 0, txd, busy;
  int checks = 0, failures = 0;

  music_link_tx dut (.clk(clk), .rst(rst), .start_game(start), .block_sliced(sl), .txd(txd), .busy(busy));
  tb_serial_sink sink (.line(txd));
  always #7.692 clk = ~clk;

  initial begin
    #30ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nff = 0, n01 = 0, other = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    #1ms;
    @(negedge clk) sl = 1; @(negedge clk) sl = 0;
    @(negedge clk) sl = 1; @(negedge clk) sl = 0;
    wait (!busy);
    @(negedge clk) sl = 1; @(negedge clk) sl = 0;
    wait (!busy);
    #100us;
    foreach (sink.bytes[i]) begin
      if (sink.bytes[i] == 8'hFF && n01 == 0) nff++;
      else if (sink.bytes[i] == 8'h01) n01++;
      else other++;
    end
    checks++; if (nff != 100) begin failures++; $display("%0d start bytes", nff); end
    checks++; if (n01 != 3) begin failures++; $display("%0d hit bytes", n01); end
    checks++; if (other != 0) begin failures++; $display("%0d other bytes", other); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
