// tb_block_loader: with the demo map the window must fill with blocks 0..11
// in time order; a slice of block 0 must shift the window and load block 12;
// letting the time pass a block must report it missed; at the end of the map
// song_done must rise once all blocks are gone.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_block_loader;
  import beat_saber_pkg::*;
  logic clk = 0, rst = 1, sev = 0, missed, done;
  logic [15:0] t = 0;
  logic [7:0] sid = 0, mid;
  block_t blocks [12];
  logic [11:0] valid;
  int nmiss = 0;
  int checks = 0, failures = 0;

  block_loader dut (.clk(clk), .rst(rst), .curr_time(t), .slice_event(sev), .sliced_id(sid),
                    .blocks(blocks), .valid(valid), .block_missed(missed), .missed_id(mid),
                    .song_done(done));
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && missed) nmiss++;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic window_is(input int first);
    for (int i = 0; i < 12; i++) begin
      int id = first + i;
      if (id < 32) chk(valid[i] && blocks[i].id == 8'(id) && blocks[i].t_hit == 16'(100 + 50 * id),
                       $sformatf("entry %0d: v=%b id=%0d (want %0d)", i, valid[i], blocks[i].id, id));
      else chk(!valid[i], $sformatf("entry %0d should be empty", i));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (60) @(negedge clk);
    window_is(0);
    // slice block 0
    sid = 0; sev = 1; @(negedge clk); sev = 0;
    repeat (10) @(negedge clk);
    window_is(1);
    chk(nmiss == 0, "slice counted as miss");
    // a slice event for another ID does nothing
    sid = 5; sev = 1; @(negedge clk); sev = 0;
    repeat (10) @(negedge clk);
    window_is(1);
    // time passes block 1 (t_hit 150) by more than 10 ticks
    t = 161;
    repeat (10) @(negedge clk);
    chk(nmiss == 1, $sformatf("misses %0d", nmiss));
    window_is(2);
    // run to the end of the song
    t = 16'd3000;
    repeat (400) @(negedge clk);
    chk(valid == 0, "window not empty at end");
    chk(nmiss == 31, $sformatf("total misses %0d", nmiss));
    chk(done, "song_done not set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
