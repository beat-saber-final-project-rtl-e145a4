// camera_top_level: finds the saber and head LEDs in one camera's frames.
//
// Pixels arrive as 16-bit RGB565 with their column (hcount) and row (vcount)
// and a `pixel_valid` strobe; `frame_done` pulses after the last pixel of a
// frame. Each pixel is converted to YCrCb, then tested against two chroma
// windows: one for the blue saber LEDs and one for the red head LEDs. The
// two masks feed two centre-of-mass units, whose results are the hand and
// head image coordinates (12 bits each). Pixel coordinates are delayed to
// line up with the two registered stages (conversion, threshold), so the
// centroid sees the mask of the same pixel. frame_done is delayed the same
// amount. Outputs hold until the next frame with the colour in view;
// `hand_valid` / `head_valid` pulse when they change.
// The window bounds are parameters; their defaults are this design's choice.
//
// Lint note: the luma output y8 of rgb_to_ycrcb is not used, as only Cr and
// Cb are thresholded (unused-signal warning).
module camera_top_level #(
  parameter logic [7:0] SABER_CR_LO = 8'd0,
  parameter logic [7:0] SABER_CR_HI = 8'd120,
  parameter logic [7:0] SABER_CB_LO = 8'd160,
  parameter logic [7:0] SABER_CB_HI = 8'd255,
  parameter logic [7:0] HEAD_CR_LO  = 8'd160,
  parameter logic [7:0] HEAD_CR_HI  = 8'd255,
  parameter logic [7:0] HEAD_CB_LO  = 8'd0,
  parameter logic [7:0] HEAD_CB_HI  = 8'd120
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] pixel,        // RGB565
  input  logic [11:0] hcount,
  input  logic [11:0] vcount,
  input  logic        pixel_valid,
  input  logic        frame_done,
  output logic [11:0] hand_x,
  output logic [11:0] hand_y,
  output logic [11:0] head_x,
  output logic [11:0] head_y,
  output logic        hand_valid,
  output logic        head_valid
);
  logic [7:0]  r8, g8, b8, y8, cr8, cb8;
  logic        saber_mask, head_mask;
  logic [11:0] h_d[2], v_d[2];
  logic        valid_d[2], done_d[2];

  // RGB565 to 8 bits per channel by bit replication.
  assign r8 = {pixel[15:11], pixel[15:13]};
  assign g8 = {pixel[10:5],  pixel[10:9]};
  assign b8 = {pixel[4:0],   pixel[4:2]};

  rgb_to_ycrcb u_cs (.clk(clk), .r(r8), .g(g8), .b(b8), .y(y8), .cr(cr8), .cb(cb8));

  color_threshold u_saber_th (
    .clk(clk), .cr(cr8), .cb(cb8),
    .cr_lo(SABER_CR_LO), .cr_hi(SABER_CR_HI), .cb_lo(SABER_CB_LO), .cb_hi(SABER_CB_HI),
    .mask(saber_mask)
  );
  color_threshold u_head_th (
    .clk(clk), .cr(cr8), .cb(cb8),
    .cr_lo(HEAD_CR_LO), .cr_hi(HEAD_CR_HI), .cb_lo(HEAD_CB_LO), .cb_hi(HEAD_CB_HI),
    .mask(head_mask)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_d <= '{default: 1'b0};
      done_d  <= '{default: 1'b0};
      h_d     <= '{default: '0};
      v_d     <= '{default: '0};
    end else begin
      h_d[0]     <= hcount;       h_d[1]     <= h_d[0];
      v_d[0]     <= vcount;       v_d[1]     <= v_d[0];
      valid_d[0] <= pixel_valid;  valid_d[1] <= valid_d[0];
      done_d[0]  <= frame_done;   done_d[1]  <= done_d[0];
    end
  end

  center_of_mass u_com_hand (
    .clk(clk), .rst(rst), .x_in(h_d[1]), .y_in(v_d[1]), .valid(valid_d[1]),
    .mask(saber_mask), .tabulate(done_d[1]),
    .x_out(hand_x), .y_out(hand_y), .out_valid(hand_valid)
  );
  center_of_mass u_com_head (
    .clk(clk), .rst(rst), .x_in(h_d[1]), .y_in(v_d[1]), .valid(valid_d[1]),
    .mask(head_mask), .tabulate(done_d[1]),
    .x_out(head_x), .y_out(head_y), .out_valid(head_valid)
  );

endmodule
