// sync_2ff: two flip-flop synchroniser.
//
// Brings a signal (or a bus) from a slower clock domain into the clock of
// this module through two back-to-back registers, so a metastable first
// stage has a whole cycle to settle. Output follows the input two clocks
// later. As in the audio pipeline it is also used for a slowly changing
// data bus; that is only safe because the bus is held stable for many
// destination cycles around the moment it is sampled.
//
// From the source description: two back-to-back registers for slow-to-fast crossings.
// My own choices: the width parameter and reset value.
module sync_2ff #(
  parameter int WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
