// receiver_camera_1: recovers the second camera's coordinates from serial.
//
// Every byte from the UART receiver is shifted into a 9-byte (72-bit)
// buffer: older bytes move up and the new byte enters the low 8 bits. One
// clock after a byte arrives, the buffer is inspected; when its top three
// bytes are FF FF FF it holds one whole frame (see transmitter_camera_2) and
// the four 12-bit coordinates are latched and `coords_valid` pulses. Because
// no data byte sequence can produce three FF bytes in a row, this only
// matches when the buffer is aligned to a frame. The outputs keep their
// values until the next complete frame.
//
// From the source description: a 9-byte shift buffer, FF FF FF header check, latching the coordinates on the next clock.
// My own choices: the coordinate-valid pulse and the receiver's parameters.
//
// Lint note: the UART's frame-error pulse is not needed here, as a bad byte
// only delays the next header match (unused-signal warning).
module receiver_camera_1 #(
  parameter int ACC_W       = 14,
  parameter int INC         = 29,
  parameter int HALF_CYCLES = 282
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        rxd,
  output logic [11:0] hand_x,
  output logic [11:0] hand_y,
  output logic [11:0] head_x,
  output logic [11:0] head_y,
  output logic        coords_valid
);
  logic [71:0] buffer;
  logic [7:0]  rx_data;
  logic        rx_valid, rx_err, check;

  uart_rx #(.ACC_W(ACC_W), .INC(INC), .HALF_CYCLES(HALF_CYCLES)) u_rx (
    .clk(clk), .rst(rst), .rxd(rxd),
    .data(rx_data), .valid(rx_valid), .frame_error(rx_err)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      buffer       <= '0;
      check        <= 1'b0;
      hand_x       <= '0;
      hand_y       <= '0;
      head_x       <= '0;
      head_y       <= '0;
      coords_valid <= 1'b0;
    end else begin
      check        <= rx_valid;
      coords_valid <= 1'b0;
      if (rx_valid) buffer <= {buffer[63:0], rx_data};
      if (check && buffer[71:48] == 24'hFF_FFFF) begin
        // bytes 4..9 sit at [47:40] .. [7:0]
        hand_x       <= {buffer[47:40], buffer[31:28]};
        hand_y       <= {buffer[27:24], buffer[39:32]};
        head_x       <= {buffer[23:16], buffer[7:4]};
        head_y       <= {buffer[3:0],   buffer[15:8]};
        coords_valid <= 1'b1;
      end
    end
  end
endmodule
