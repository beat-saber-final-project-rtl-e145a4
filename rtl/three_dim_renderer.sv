// three_dim_renderer: framebuffer between the raycaster and the VGA output.
//
// Raycasting a pixel takes hundreds of clocks, while the VGA needs one pixel
// every clock, so the two are decoupled by a FB_W x FB_H (512x384) 12-bit
// framebuffer in a dual-port block RAM. The raycaster writes a pixel
// (`wr_x`, `wr_y`, `wr_rgb`, `wr_en`) whenever it has finished one. The VGA
// side always reads: screen pixel (hcount, vcount) of the 1024x768 screen
// shows framebuffer pixel (hcount/2, vcount/2), i.e. the image is scaled up
// two times. The colour appears on `r`,`g`,`b` (4 bits each) two clocks
// after hcount/vcount (RAM read, output register) and is black outside the
// visible area; syncs must be delayed by the same two clocks.
//
// From the source description: a 512x384 framebuffer written by the raycaster and read 2x scaled for the VGA.
// My own choices: 12-bit pixels, black outside the active area, two-clock latency.
module three_dim_renderer #(
  parameter int FB_W = 512,
  parameter int FB_H = 384
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [$clog2(FB_W)-1:0]   wr_x,
  input  logic [$clog2(FB_H)-1:0]   wr_y,
  input  logic [11:0]               wr_rgb,
  input  logic                      wr_en,
  input  logic [10:0]               hcount,
  input  logic [9:0]                vcount,
  output logic [3:0]                r,
  output logic [3:0]                g,
  output logic [3:0]                b
);
  localparam int DEPTH = FB_W * FB_H;
  localparam int AW    = $clog2(DEPTH);

  logic [AW-1:0] wr_addr, rd_addr;
  logic [11:0]   rd_rgb;
  logic          active, active_q;

  assign wr_addr = AW'(wr_y) * AW'(FB_W) + AW'(wr_x);
  assign active  = (32'(hcount) < 2 * FB_W) && (32'(vcount) < 2 * FB_H);
  assign rd_addr = active ? AW'(vcount >> 1) * AW'(FB_W) + AW'(hcount >> 1) : '0;

  bram_readwrite #(.WIDTH(12), .DEPTH(DEPTH)) u_fb (
    .clk(clk), .we_a(wr_en && (32'(wr_x) < FB_W) && (32'(wr_y) < FB_H)),
    .addr_a(wr_addr), .din_a(wr_rgb), .addr_b(rd_addr), .dout_b(rd_rgb)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      active_q      <= 1'b0;
      {r, g, b}     <= '0;
    end else begin
      active_q  <= active;
      {r, g, b} <= active_q ? rd_rgb : 12'h000;
    end
  end
endmodule
