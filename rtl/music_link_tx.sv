// music_link_tx: game-board side of the serial link to the music board.
//
// On `start_game` it sends START_BYTE (FF) START_REPEAT (100) times in a
// row, so the music board, whose 25 MHz SD logic samples the command
// through synchronisers, cannot miss it. Each `block_sliced` pulse queues
// one HIT_BYTE; queued hits are sent one byte each as soon as the line is
// free (up to 15 can wait). Start bytes go first. 115200 baud 8N1 from the
// 65 MHz clock. The hit byte value and the queue are this design's choices.
module music_link_tx #(
  parameter int         ACC_W        = 14,
  parameter int         INC          = 29,
  parameter int         START_REPEAT = 100,
  parameter logic [7:0] START_BYTE   = 8'hFF,
  parameter logic [7:0] HIT_BYTE     = 8'h01
) (
  input  logic clk,
  input  logic rst,
  input  logic start_game,
  input  logic block_sliced,
  output logic txd,
  output logic busy
);
  logic [$clog2(START_REPEAT+1)-1:0] starts_left;
  logic [3:0]                         hits_left;
  logic                               tick, tx_busy, tx_start, busy_q;
  logic [7:0]                         tx_byte;

  baud_gen #(.ACC_W(ACC_W), .INC(INC)) u_baud (
    .clk(clk), .rst(rst), .clear(1'b0), .tick(tick)
  );

  uart_tx u_tx (
    .clk(clk), .rst(rst), .baud_tick(tick), .start(tx_start),
    .data(tx_byte), .txd(txd), .busy(tx_busy)
  );

  assign tx_start = !tx_busy && !busy_q && ((starts_left != 0) || (hits_left != 0));
  assign tx_byte  = (starts_left != 0) ? START_BYTE : HIT_BYTE;
  assign busy     = tx_busy || (starts_left != 0) || (hits_left != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      starts_left <= '0;
      hits_left   <= '0;
      busy_q      <= 1'b0;
    end else begin
      busy_q <= tx_start;
      if (start_game) begin
        starts_left <= $bits(starts_left)'(START_REPEAT);
      end else if (tx_start && starts_left != 0) begin
        starts_left <= starts_left - 1'b1;
      end
      unique case ({block_sliced, tx_start && starts_left == 0})
        2'b10:   if (hits_left != 4'hF) hits_left <= hits_left + 4'd1;
        2'b01:   hits_left <= hits_left - 4'd1;
        default: ;
      endcase
    end
  end
endmodule
