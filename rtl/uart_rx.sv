// uart_rx: 8N1 serial receiver for a link between two boards.
//
// The two boards run from unrelated clocks, so the receiver re-phases its
// own baud generator to every frame. The line first passes a two flip-flop
// synchroniser. In IDLE a falling edge starts a count of HALF_CYCLES clocks
// (282 at 65 MHz, half of one 115200 baud bit). If the line is still low
// then, the start bit is real and the baud accumulator is cleared, so each
// following tick lands in the middle of a bit; otherwise it was a glitch.
// Eight bits are shifted in LSB first, then the stop bit is checked. A good
// stop bit updates `data` and pulses `valid` for one clock; a bad one
// clears the buffer and `frame_error` pulses instead. `data` holds its value
// until the next good frame.
//
// From the source description: start-bit detection, a 282-cycle half-bit glitch check, baud re-phasing, 8 data bits and a stop check that clears the buffer.
// My own choices: the input synchroniser and the frame_error pulse.
module uart_rx #(
  parameter int ACC_W       = 14,
  parameter int INC         = 29,
  parameter int HALF_CYCLES = 282
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_error
);
  typedef enum logic [1:0] {S_IDLE, S_HALF, S_DATA, S_STOP} state_t;

  state_t      state;
  logic        rx_s, rx_prev;
  logic [15:0] half_cnt;
  logic [2:0]  bit_idx;
  logic [7:0]  buffer;
  logic        tick, clear;

  sync_2ff #(.WIDTH(1)) u_sync (.clk(clk), .rst(1'b0), .d(rxd), .q(rx_s));

  baud_gen #(.ACC_W(ACC_W), .INC(INC)) u_baud (
    .clk(clk), .rst(rst), .clear(clear), .tick(tick)
  );

  assign clear = (state == S_HALF) && (half_cnt == 16'(HALF_CYCLES - 1)) && !rx_s;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      rx_prev     <= 1'b1;
      half_cnt    <= '0;
      bit_idx     <= '0;
      buffer      <= '0;
      data        <= '0;
      valid       <= 1'b0;
      frame_error <= 1'b0;
    end else begin
      rx_prev     <= rx_s;
      valid       <= 1'b0;
      frame_error <= 1'b0;
      unique case (state)
        S_IDLE: begin
          half_cnt <= '0;
          if (rx_prev && !rx_s) state <= S_HALF;
        end
        S_HALF: begin
          half_cnt <= half_cnt + 16'd1;
          if (half_cnt == 16'(HALF_CYCLES - 1)) begin
            bit_idx <= '0;
            state   <= rx_s ? S_IDLE : S_DATA;
          end
        end
        S_DATA: begin
          if (tick) begin
            buffer  <= {rx_s, buffer[7:1]};
            bit_idx <= bit_idx + 3'd1;
            if (bit_idx == 3'd7) state <= S_STOP;
          end
        end
        S_STOP: begin
          if (tick) begin
            if (rx_s) begin
              data  <= buffer;
              valid <= 1'b1;
            end else begin
              buffer      <= '0;
              frame_error <= 1'b1;
            end
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
