// sample_reader: paces audio samples out of the FIFO at 44 kHz.
//
// Every SAMPLE_DIV clocks (568 at 25 MHz, i.e. 25e6/568 = 44.0 kHz) it pops
// one byte from the FIFO, if the FIFO is not empty and `enable` is high.
// The byte appears on `dout` of the FIFO a clock later and is held in
// `sample` until the next one; `sample_strobe` pulses when it changes. An
// empty FIFO makes the sample repeat (this design's choice).
module sample_reader #(
  parameter int SAMPLE_DIV = 568
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       enable,
  input  logic       fifo_empty,
  input  logic [7:0] fifo_dout,
  output logic       fifo_rd_en,
  output logic [7:0] sample,
  output logic       sample_strobe
);
  logic [$clog2(SAMPLE_DIV)-1:0] div;
  logic                          rd_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      div           <= '0;
      fifo_rd_en    <= 1'b0;
      rd_q          <= 1'b0;
      sample        <= 8'h80;
      sample_strobe <= 1'b0;
    end else begin
      fifo_rd_en    <= 1'b0;
      sample_strobe <= 1'b0;
      rd_q          <= fifo_rd_en;
      if (div == $bits(div)'(SAMPLE_DIV - 1)) begin
        div        <= '0;
        fifo_rd_en <= enable && !fifo_empty;
      end else begin
        div <= div + 1'b1;
      end
      if (rd_q) begin
        sample        <= fifo_dout;
        sample_strobe <= 1'b1;
      end
    end
  end
endmodule
