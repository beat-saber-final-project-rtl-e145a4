// bram_readonly: single-port read-only block RAM.
//
// DEPTH words of WIDTH bits, loaded from INIT_FILE (hex, one word per line)
// at configuration. The read is synchronous: `dout` shows the word at
// `addr` one clock after it is applied, as in an FPGA block RAM.
//
// From the source description: a read-only BRAM loaded from a .mem file.
// My own choices: one-clock read latency and unlisted words reading as all ones.
module bram_readonly #(
  parameter int    WIDTH     = 51,
  parameter int    DEPTH     = 256,
  parameter string INIT_FILE = "rtl/beat_map.mem"
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [WIDTH-1:0]         dout
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '1;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) dout <= mem[addr];
endmodule
