// tb_block_positions: random blocks and times; z must be 8 units per tick
// of remaining time (clipped to 4095) and visibility must hold exactly for
// valid blocks due within the next 200 ticks.
//
// From the source description: the expected behaviour and the numbers checked
// where the paper gives them. My own choices: the stimulus, the reference
// model, the tolerances and the shortened sizes where a parameter is overridden.
`timescale 1ns/1ps
module tb_block_positions;
  import beat_saber_pkg::*;
  logic clk = 0, rst = 1;
  logic [15:0] t;
  block_t blocks [12];
  logic [11:0] valid;
  block_pos_t pos [12];
  int checks = 0, failures = 0;

  block_positions dut (.clk(clk), .rst(rst), .curr_time(t), .blocks(blocks), .valid(valid), .pos(pos));
  always #5 clk = ~clk;

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dt, ez, nvis = 0;
    bit ev;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      t = 16'($urandom_range(1000, 2000));
      valid = 12'($urandom);
      for (int i = 0; i < 12; i++) begin
        blocks[i] = block_t'({$urandom, $urandom});
        blocks[i].t_hit = 16'(int'(t) + $urandom_range(0, 800) - 100);
      end
      @(posedge clk); #1;
      for (int i = 0; i < 12; i++) begin
        dt = int'(blocks[i].t_hit) - int'(t);
        ev = valid[i] && dt >= 0 && dt < 200;
        ez = (dt * 8) & 32'h3FFFF;
        if (dt < 0) ez = ((dt + 65536) * 8);
        if (ez > 4095) ez = 4095;
        if (ev) nvis++;
        checks++;
        if (pos[i].visible !== ev || (dt >= 0 && pos[i].z != 12'(ez)) || pos[i].blk !== blocks[i]) begin
          failures++; $display("n%0d i%0d dt %0d: vis %b z %0d", n, i, dt, pos[i].visible, pos[i].z);
        end
      end
    end
    checks++; if (nvis < 50) begin failures++; $display("few visible"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
