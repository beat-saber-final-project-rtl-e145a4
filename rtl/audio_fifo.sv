// audio_fifo: single-clock byte FIFO between SD card and speaker.
//
// DEPTH (16384) byte slots; as in a standard-mode FPGA FIFO core the usable
// capacity is DEPTH-1 entries, so the occupancy fits the 14-bit
// `data_count`. A write with `wr_en` is dropped while `full`. `rd_en`
// pops one byte, which appears on `dout` one clock later; a read while
// `empty` is ignored and leaves `dout` unchanged.
//
// From the source description: a 1-byte FIFO of 16384 entries on the 25 MHz clock that stops accepting writes when full.
// My own choices: my own FIFO in place of the vendor IP, pointer-difference data count, 16383 usable entries, one-clock read latency.
module audio_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 16384
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         din,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         dout,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH)-1:0] data_count
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign data_count = wptr - rptr;
  assign full       = (data_count == AW'(DEPTH - 1));
  assign empty      = (data_count == '0);
  assign do_wr      = wr_en && !full;
  assign do_rd      = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= din;
    if (do_rd) dout <= mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end
endmodule
