// bram_readwrite: simple dual-port block RAM (one write port, one read port).
//
// Port A writes `din_a` to `addr_a` when `we_a` is high. Port B reads
// `addr_b` synchronously: `dout_b` holds the word one clock later. Both
// ports share one clock. Reading an address in the same clock it is written
// returns the old word. Contents start at zero (a black screen).
//
// From the source description: a read-write BRAM holding the framebuffer.
// My own choices: one write port, one registered read port, old data on read-during-write.
module bram_readwrite #(
  parameter int WIDTH = 12,
  parameter int DEPTH = 512 * 384
) (
  input  logic                     clk,
  input  logic                     we_a,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  logic [WIDTH-1:0]         din_a,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  output logic [WIDTH-1:0]         dout_b
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= din_a;
    dout_b <= mem[addr_b];
  end
endmodule
