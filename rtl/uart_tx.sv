// uart_tx: 8N1 serial transmitter.
//
// A byte offered with `start` while idle is framed as a low start bit, the
// eight data bits LSB first and a high stop bit, one bit per baud tick. The
// line idles high. `busy` is high from the accepted `start` until the stop
// bit has been on the line for a full baud period. The first baud tick after
// `start` begins the start bit, so there is up to one baud period of lead
// time; that alignment to the shared tick is this design's choice.
module uart_tx (
  input  logic       clk,
  input  logic       rst,
  input  logic       baud_tick,
  input  logic       start,
  input  logic [7:0] data,
  output logic       txd,
  output logic       busy
);
  logic [9:0] shreg;     // {stop, data[7:0], start}
  logic [3:0] bits_left; // bits on or still to go on the line
  logic       pending;   // accepted, waiting for the first tick

  assign busy = pending || (bits_left != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      bits_left <= '0;
      pending   <= 1'b0;
      txd       <= 1'b1;
    end else begin
      if (start && !busy) begin
        shreg   <= {1'b1, data, 1'b0};
        pending <= 1'b1;
      end else if (baud_tick) begin
        if (pending) begin
          pending   <= 1'b0;
          txd       <= shreg[0];
          shreg     <= {1'b1, shreg[9:1]};
          bits_left <= 4'd10;
        end else if (bits_left > 4'd1) begin
          txd       <= shreg[0];
          shreg     <= {1'b1, shreg[9:1]};
          bits_left <= bits_left - 4'd1;
        end else begin
          txd       <= 1'b1;
          bits_left <= '0;
        end
      end
    end
  end
endmodule
