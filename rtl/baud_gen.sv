// baud_gen: fractional baud-rate tick generator.
//
// A 14-bit phase accumulator gains INC every clock; each carry out of the
// accumulator is one baud tick. With INC = 29 and a 65 MHz clock the tick
// rate is 65e6 * 29 / 2^14 = 115.05 kHz, i.e. 115200 baud within 0.2 %.
// A tick therefore comes every 564 or 565 clocks. `clear` zeroes the
// accumulator, so the next tick comes one full baud period later; the UART
// receiver uses it to re-phase its ticks to the middle of the bits.
//
// From the source description: a 2^14 accumulator incremented by 29 per 65 MHz clock for 115200 baud; a baud reset used by the receiver.
// My own choices: taking the carry-out as the tick, and the clear input's exact timing.
module baud_gen #(
  parameter int ACC_W = 14,
  parameter int INC   = 29
) (
  input  logic clk,
  input  logic rst,
  input  logic clear,
  output logic tick
);
  logic [ACC_W:0] acc;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      acc <= '0;
    end else begin
      acc <= {1'b0, acc[ACC_W-1:0]} + (ACC_W+1)'(INC);
    end
  end

  assign tick = acc[ACC_W];
endmodule
