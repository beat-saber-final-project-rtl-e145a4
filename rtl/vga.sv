// vga: video timing generator for 1024x768 at 60 Hz from a 65 MHz clock.
//
// `hcount` runs 0..H_TOTAL-1 along a line and `vcount` 0..V_TOTAL-1 down
// the frame. Pixels with hcount < H_ACTIVE and vcount < V_ACTIVE are
// visible (`blank` low there). Sync pulses follow the front porch and are
// active low, per the VESA XGA timing (24/136/160 clocks horizontally,
// 3/6/29 lines vertically). `frame_start` pulses at (0,0). The display mode
// is this design's reading of the 65 MHz clock and the 2x-scaled 512x384
// framebuffer.
//
// From the source description: the VGA module of Fig. 6 and a 2x scaled 512x384 picture, so 1024x768.
// My own choices: standard XGA 60 Hz porches and sync polarity on the 65 MHz clock.
module vga #(
  parameter int H_ACTIVE = 1024,
  parameter int H_FP     = 24,
  parameter int H_SYNC   = 136,
  parameter int H_BP     = 160,
  parameter int V_ACTIVE = 768,
  parameter int V_FP     = 3,
  parameter int V_SYNC   = 6,
  parameter int V_BP     = 29
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank,
  output logic        frame_start
);
  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == 11'(H_TOTAL - 1)) begin
      hcount <= '0;
      vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 10'd1;
    end else begin
      hcount <= hcount + 11'd1;
    end
  end

  always_comb begin
    blank       = (hcount >= 11'(H_ACTIVE)) || (vcount >= 10'(V_ACTIVE));
    hsync       = !((hcount >= 11'(H_ACTIVE + H_FP)) && (hcount < 11'(H_ACTIVE + H_FP + H_SYNC)));
    vsync       = !((vcount >= 10'(V_ACTIVE + V_FP)) && (vcount < 10'(V_ACTIVE + V_FP + V_SYNC)));
    frame_start = (hcount == '0) && (vcount == '0);
  end
endmodule
