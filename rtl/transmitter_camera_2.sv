// transmitter_camera_2: streams the second camera's coordinates over serial.
//
// The hand and head centres of mass (12-bit X and Y each) are sent as an
// endless train of 9-byte frames on a 115200 baud 8N1 line:
//   1-3: FF FF FF                    (frame marker)
//   4:   hand_x[11:4]   5: hand_y[7:0]   6: {hand_x[3:0], hand_y[11:8]}
//   7:   head_x[11:4]   8: head_y[7:0]   9: {head_x[3:0], head_y[11:8]}
// X never exceeds 0x274 and Y never exceeds 0x1DF, so bytes 4, 6, 7 and 9
// can never be FF and camera data can never imitate three FF bytes in a
// row. As soon as the UART is no longer busy the next byte is started.
// The four coordinates are sampled once, when byte 1 is started, so every
// frame carries one consistent set (this sampling point is this design's
// choice). Output `txd` is the serial line.
module transmitter_camera_2 #(
  parameter int ACC_W = 14,
  parameter int INC   = 29
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [11:0] hand_x,
  input  logic [11:0] hand_y,
  input  logic [11:0] head_x,
  input  logic [11:0] head_y,
  output logic        txd
);
  logic [3:0]  byte_idx;
  logic [47:0] frame;   // {hand_x, hand_y, head_x, head_y} latched at byte 1
  logic [7:0]  tx_byte;
  logic        tx_start, busy, busy_q, tick;

  baud_gen #(.ACC_W(ACC_W), .INC(INC)) u_baud (
    .clk(clk), .rst(rst), .clear(1'b0), .tick(tick)
  );

  uart_tx u_tx (
    .clk(clk), .rst(rst), .baud_tick(tick), .start(tx_start),
    .data(tx_byte), .txd(txd), .busy(busy)
  );

  always_comb begin
    unique case (byte_idx)
      4'd3:    tx_byte = frame[47:40];
      4'd4:    tx_byte = frame[31:24];
      4'd5:    tx_byte = {frame[39:36], frame[35:32]};
      4'd6:    tx_byte = frame[23:16];
      4'd7:    tx_byte = frame[7:0];
      4'd8:    tx_byte = {frame[15:12], frame[11:8]};
      default: tx_byte = 8'hFF;
    endcase
  end

  // Start a byte whenever the UART is idle and the previous start has been
  // taken (busy_q guards the cycle in which busy rises).
  assign tx_start = !busy && !busy_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      byte_idx <= '0;
      frame    <= '0;
      busy_q   <= 1'b0;
    end else begin
      busy_q <= tx_start;
      if (tx_start) begin
        if (byte_idx == 4'd0) frame <= {hand_x, hand_y, head_x, head_y};
      end
      if (busy_q) byte_idx <= (byte_idx == 4'd8) ? 4'd0 : byte_idx + 4'd1;
    end
  end
endmodule
