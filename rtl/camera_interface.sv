// camera_interface: two-camera 3D tracking of the saber and the head.
//
// Camera 1 faces the player and camera 2 looks down from above; both are
// turned 90 degrees so their wide axis spans the player's arms. Each camera
// has its own camera_top_level giving 2D hand and head centroids. Camera 2
// sits on another board: its transmitter_camera_2 sends its centroids over a
// 115200 baud serial wire (`link_tx` out, `link_rx` in; the top ties them
// together) to receiver_camera_1 next to camera 1.
// The two views share one axis, and the 3D point is built as
//   x3D = y1 (camera 1 row), y3D = x1 (camera 1 column), z3D = x2
// (camera 2 column, received over serial). Each component register only
// changes when its source has a complete new value: x/y on a camera 1
// centroid, z on a complete serial frame, so only finished numbers are
// passed on. `pos_valid` pulses when any component changes.
//
// From the source description: the camera arrangement, the (y1, x1, x2) axis mapping, camera 2's serial link and updating only on complete values.
// My own choices: both cameras on one 65 MHz clock and the pos_valid pulse.
module camera_interface (
  input  logic        clk,
  input  logic        rst,
  // camera 1 pixel stream
  input  logic [15:0] cam1_pixel,
  input  logic [11:0] cam1_hcount,
  input  logic [11:0] cam1_vcount,
  input  logic        cam1_valid,
  input  logic        cam1_frame_done,
  // camera 2 pixel stream (on the second board)
  input  logic [15:0] cam2_pixel,
  input  logic [11:0] cam2_hcount,
  input  logic [11:0] cam2_vcount,
  input  logic        cam2_valid,
  input  logic        cam2_frame_done,
  // serial wire between the boards
  output logic        link_tx,
  input  logic        link_rx,
  // 3D results
  output beat_saber_pkg::vec3_t saber_pos,
  output beat_saber_pkg::vec3_t head_pos,
  output logic        pos_valid
);
  logic [11:0] c1_hand_x, c1_hand_y, c1_head_x, c1_head_y;
  logic [11:0] c2_hand_x, c2_hand_y, c2_head_x, c2_head_y;
  logic [11:0] r_hand_x, r_hand_y, r_head_x, r_head_y;
  logic        c1_hand_v, c1_head_v, c2_hand_v, c2_head_v, r_valid;

  camera_top_level u_cam1 (
    .clk(clk), .rst(rst), .pixel(cam1_pixel), .hcount(cam1_hcount),
    .vcount(cam1_vcount), .pixel_valid(cam1_valid), .frame_done(cam1_frame_done),
    .hand_x(c1_hand_x), .hand_y(c1_hand_y), .head_x(c1_head_x), .head_y(c1_head_y),
    .hand_valid(c1_hand_v), .head_valid(c1_head_v)
  );

  camera_top_level u_cam2 (
    .clk(clk), .rst(rst), .pixel(cam2_pixel), .hcount(cam2_hcount),
    .vcount(cam2_vcount), .pixel_valid(cam2_valid), .frame_done(cam2_frame_done),
    .hand_x(c2_hand_x), .hand_y(c2_hand_y), .head_x(c2_head_x), .head_y(c2_head_y),
    .hand_valid(c2_hand_v), .head_valid(c2_head_v)
  );

  transmitter_camera_2 u_tx (
    .clk(clk), .rst(rst), .hand_x(c2_hand_x), .hand_y(c2_hand_y),
    .head_x(c2_head_x), .head_y(c2_head_y), .txd(link_tx)
  );

  receiver_camera_1 u_rx (
    .clk(clk), .rst(rst), .rxd(link_rx),
    .hand_x(r_hand_x), .hand_y(r_hand_y), .head_x(r_head_x), .head_y(r_head_y),
    .coords_valid(r_valid)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      saber_pos <= '0;
      head_pos  <= '0;
      pos_valid <= 1'b0;
    end else begin
      pos_valid <= c1_hand_v || c1_head_v || r_valid;
      if (c1_hand_v) begin
        saber_pos.x <= c1_hand_y;
        saber_pos.y <= c1_hand_x;
      end
      if (c1_head_v) begin
        head_pos.x <= c1_head_y;
        head_pos.y <= c1_head_x;
      end
      if (r_valid) begin
        saber_pos.z <= r_hand_x;
        head_pos.z  <= r_head_x;
      end
    end
  end

  // Camera 2's Y coordinates travel over the link for flexibility but only
  // its X coordinates are needed for depth.
  logic unused;
  assign unused = c2_hand_v ^ c2_head_v ^ (^r_hand_y) ^ (^r_head_y);
endmodule
