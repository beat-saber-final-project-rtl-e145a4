// tb_music_interface: the music board end to end with its three clocks.
// Start bytes (FF) arrive over serial from an independent source; the SD
// card model holds a 1500-byte song. The speaker samples must be the song
// bytes in order at 44 kHz (22.72 us apart); a hit byte (01) must switch
// the output to the hit note, then back to the song. The note is shortened
// to 200,000 clocks here to keep the run short.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_music_interface;
  logic c65 = 0, c100 = 0, c25 = 0, rst = 1, line;
  logic ready, bav, rd, hit_act, gs, streaming, sdone, halted;
  logic [7:0] sdo, audio;
  logic [31:0] addr;
  logic [13:0] cnt;
  int checks = 0, failures = 0;

  tb_serial_source src (.line(line));
  tb_sd_card_model #(.DATA_LEN(1500)) card (.clk(c25), .rst(rst), .rd(rd), .address(addr),
    .ready(ready), .byte_available(bav), .dout(sdo));
  music_interface #(.NOTE_CYCLES(200_000)) dut (
    .clk_65(c65), .clk_100(c100), .clk_25(c25), .rst(rst), .rxd(line),
    .sd_ready(ready), .sd_byte_available(bav), .sd_dout(sdo), .sd_rd(rd), .sd_address(addr),
    .audio_data(audio), .hit_active(hit_act), .game_start(gs), .streaming(streaming),
    .song_done(sdone), .sd_halted(halted), .fifo_count(cnt));

  always #7.692 c65 = ~c65;
  always #5     c100 = ~c100;
  always #20    c25 = ~c25;

  // song samples seen at the speaker while no note plays
  int k = 0, nsamp = 0, wrongs = 0, nnote = 0, bad_gap = 0;
  realtime last_t = 0;
  logic [7:0] prev_audio = 8'h80;
  bit prev_hit = 0, prev_hit2 = 0;
  always @(posedge c100) if (!rst) begin
    if (hit_act) nnote++;
    if (!hit_act && !prev_hit && audio != prev_audio && gs) begin
      // find the next matching song byte (samples may be skipped during a note)
      int start_k;
      start_k = k;
      while (k < 1500 && card.content(512 + k) != audio) k++;
      if (k >= 1500) begin wrongs++; k = start_k; end
      else begin
        if (k == start_k && last_t > 0 && ($realtime - last_t < 22000 || $realtime - last_t > 23500)) begin
          bad_gap++; $display("gap %0t ns at sample %0d", $realtime - last_t, k);
        end
        k++; nsamp++;
      end
      // the first change after a note is not on the 44 kHz grid: no gap reference
      last_t = prev_hit2 ? 0 : $realtime;
    end
    if (hit_act) last_t = 0;
    prev_audio = audio;
    prev_hit2 = prev_hit;
    prev_hit = hit_act;
  end

  initial begin
    #80ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200; rst = 0; #1000;
    checks++; if (gs || card.reads != 0) begin failures++; $display("started early"); end
    repeat (3) src.send(8'hFF);
    #5000;
    checks++; if (!gs) begin failures++; $display("start not seen"); end
    #10ms;
    checks++; if (nsamp < 300) begin failures++; $display("samples %0d", nsamp); end
    src.send(8'h01);
    #20us;
    checks++; if (!hit_act) begin failures++; $display("hit note not playing"); end
    checks++; if (audio != 8'hC0 && audio != 8'h40) begin failures++; $display("note level %h", audio); end
    wait (sdone && cnt == 0);
    #200us;
    checks++; if (nnote < 199_000 || nnote > 200_100) begin failures++; $display("note lasted %0d clocks", nnote); end
    checks++; if (wrongs != 0) begin failures++; $display("%0d samples not from the song", wrongs); end
    checks++; if (bad_gap != 0) begin failures++; $display("%0d sample gaps off 44 kHz", bad_gap); end
    checks++; if (nsamp < 1300) begin failures++; $display("only %0d song samples", nsamp); end
    checks++; if (halted || !sdone) begin failures++; $display("end state"); end
    $display("samples %0d, note clocks %0d", nsamp, nnote);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
