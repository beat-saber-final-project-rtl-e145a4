// tb_sd_read_state_control: with a behavioural SD card holding a 3000-byte
// song, the controller must wait for game_start, read the header sector,
// find the length, then write exactly the 3000 song bytes (from byte 512
// on, in order) to the FIFO. The FIFO is drained slowly (one byte per 100
// clocks), so reading must halt while the FIFO holds more than 1536 bytes,
// and the FIFO must never hold more than 1536+512.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_sd_read_state_control;
  logic clk = 0, rst = 1, gs = 0;
  logic ready, bav, rd, fwr, frd = 0, full, empty, streaming, done, halted;
  logic [7:0] sdo, fdin, fdout;
  logic [31:0] addr, wlen;
  logic [13:0] cnt;
  int nwr = 0, wrong = 0, max_cnt = 0, halt_cycles = 0;
  int checks = 0, failures = 0;

  tb_sd_card_model #(.DATA_LEN(3000)) card (.clk(clk), .rst(rst), .rd(rd), .address(addr),
    .ready(ready), .byte_available(bav), .dout(sdo));
  sd_read_state_control dut (.clk(clk), .rst(rst), .game_start(gs), .sd_ready(ready),
    .sd_byte_available(bav), .sd_dout(sdo), .sd_rd(rd), .sd_address(addr), .fifo_count(cnt),
    .fifo_wr_en(fwr), .fifo_din(fdin), .streaming(streaming), .song_done(done), .halted(halted),
    .wav_len(wlen));
  audio_fifo u_fifo (.clk(clk), .rst(rst), .wr_en(fwr), .din(fdin), .rd_en(frd), .dout(fdout),
    .full(full), .empty(empty), .data_count(cnt));

  always #20 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    if (fwr) begin
      if (fdin != card.content(512 + nwr)) wrong++;
      nwr++;
    end
    if (int'(cnt) > max_cnt) max_cnt = int'(cnt);
    if (halted) halt_cycles++;
  end

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    forever begin
      repeat (99) @(negedge clk);
      frd = !empty; @(negedge clk); frd = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (2000) @(negedge clk);
    checks++; if (card.reads != 0 || rd) begin failures++; $display("read before start"); end
    gs = 1;
    wait (done);
    repeat (10) @(negedge clk);
    checks++; if (wlen != 3000) begin failures++; $display("wav_len %0d", wlen); end
    checks++; if (nwr != 3000) begin failures++; $display("%0d bytes written", nwr); end
    checks++; if (wrong != 0) begin failures++; $display("%0d wrong bytes", wrong); end
    // header + ceil(3000/512) = 6 sectors
    checks++; if (card.reads != 7) begin failures++; $display("%0d sector reads", card.reads); end
    checks++; if (halt_cycles == 0) begin failures++; $display("never halted"); end
    checks++; if (max_cnt > 1536 + 512) begin failures++; $display("FIFO reached %0d", max_cnt); end
    $display("halted for %0d cycles, FIFO peak %0d", halt_cycles, max_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
