// serial_parse: turns bytes from the game board into music commands.
//
// `rx_data`/`rx_ready` come from the UART receiver in the 65 MHz domain
// through a two flip-flop synchroniser; this block runs at 100 MHz and
// acts on the rising edge of the synchronised `rx_ready`. The byte
// START_BYTE (all ones) sets `game_start`, which then stays high: the game
// board sends it many times, so losing some is harmless, and a level can
// safely be synchronised into the 25 MHz SD domain. The byte HIT_BYTE
// pulses `hit_received` for one clock. Other bytes are ignored. The value
// of HIT_BYTE is this design's choice.
module serial_parse #(
  parameter logic [7:0] START_BYTE = 8'hFF,
  parameter logic [7:0] HIT_BYTE   = 8'h01
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] rx_data,
  input  logic       rx_ready,
  output logic       game_start,
  output logic       hit_received
);
  logic ready_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      ready_q      <= 1'b0;
      game_start   <= 1'b0;
      hit_received <= 1'b0;
    end else begin
      ready_q      <= rx_ready;
      hit_received <= 1'b0;
      if (rx_ready && !ready_q) begin
        if (rx_data == START_BYTE) game_start <= 1'b1;
        if (rx_data == HIT_BYTE)   hit_received <= 1'b1;
      end
    end
  end
endmodule
