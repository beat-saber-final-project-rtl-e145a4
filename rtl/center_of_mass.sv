// center_of_mass: centroid of the masked pixels of one camera frame.
//
// While a frame streams in, every pixel with `valid` and `mask` high adds its
// x and y to running sums and increments a pixel count. A `tabulate` pulse
// at the end of the frame divides both sums by the count with two iterative
// dividers (32 clocks) and clears the sums for the next frame. When the
// quotients are ready x_out/y_out update and `out_valid` pulses. A frame
// without any masked pixel leaves the previous result in place and gives no
// `out_valid`. Pixels arriving during the division are counted toward the
// next frame.
//
// From the source description: a centre of mass over the masked pixels of a frame, as in the course lab.
// My own choices: 32-bit sums, iterative dividers, holding the last result on an empty frame.
//
// Lint note: the divider remainders and quotient bits above the 12-bit
// coordinate width are not needed, since a mean never exceeds the largest
// coordinate (unused-signal warnings).
module center_of_mass #(
  parameter int COORD_W = 12,
  parameter int SUM_W   = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [COORD_W-1:0] x_in,
  input  logic [COORD_W-1:0] y_in,
  input  logic               valid,
  input  logic               mask,
  input  logic               tabulate,
  output logic [COORD_W-1:0] x_out,
  output logic [COORD_W-1:0] y_out,
  output logic               out_valid
);
  logic [SUM_W-1:0] sum_x, sum_y, count;
  logic [SUM_W-1:0] qx, qy, rx, ry;
  logic             start_div, busy_x, busy_y, done_x, done_y;
  logic             got_x, got_y;

  assign start_div = tabulate && (count != 0) && !busy_x && !busy_y;

  divider #(.WIDTH(SUM_W)) u_div_x (
    .clk(clk), .rst(rst), .start(start_div), .dividend(sum_x), .divisor(count),
    .quotient(qx), .remainder(rx), .busy(busy_x), .done(done_x)
  );
  divider #(.WIDTH(SUM_W)) u_div_y (
    .clk(clk), .rst(rst), .start(start_div), .dividend(sum_y), .divisor(count),
    .quotient(qy), .remainder(ry), .busy(busy_y), .done(done_y)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      sum_x     <= '0;
      sum_y     <= '0;
      count     <= '0;
      x_out     <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
      got_x     <= 1'b0;
      got_y     <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (tabulate) begin
        sum_x <= '0;
        sum_y <= '0;
        count <= '0;
      end else if (valid && mask) begin
        sum_x <= sum_x + SUM_W'(x_in);
        sum_y <= sum_y + SUM_W'(y_in);
        count <= count + 1'b1;
      end
      if (done_x) begin
        x_out <= qx[COORD_W-1:0];
        got_x <= 1'b1;
      end
      if (done_y) begin
        y_out <= qy[COORD_W-1:0];
        got_y <= 1'b1;
      end
      if ((got_x || done_x) && (got_y || done_y)) begin
        out_valid <= 1'b1;
        got_x     <= 1'b0;
        got_y     <= 1'b0;
      end
    end
  end
endmodule
