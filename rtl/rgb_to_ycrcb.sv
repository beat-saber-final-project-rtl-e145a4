// rgb_to_ycrcb: one-cycle RGB to YCbCr colour space converter.
//
// Converts an 8-bit-per-channel RGB pixel with the full-range ITU-R BT.601
// equations in 8-bit fixed point:
//   Y  = ( 77 R + 150 G +  29 B) / 256
//   Cb = (-43 R -  85 G + 128 B) / 256 + 128
//   Cr = (128 R - 107 G -  21 B) / 256 + 128
// each clipped to 0..255. The result is registered, so it appears one clock
// after the input. The coefficients are the standard ones, not taken from
// the game's own description, which only names this conversion.
//
// From the source description: converting camera RGB to YCrCb before thresholding.
// My own choices: BT.601 integer coefficients, clipping and one-clock latency.
module rgb_to_ycrcb (
  input  logic       clk,
  input  logic [7:0] r,
  input  logic [7:0] g,
  input  logic [7:0] b,
  output logic [7:0] y,
  output logic [7:0] cr,
  output logic [7:0] cb
);
  logic signed [18:0] y_s, cb_s, cr_s;

  function automatic logic [7:0] clip8(input logic signed [18:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  always_comb begin
    y_s  = (19'sd77  * $signed({11'd0, r}) + 19'sd150 * $signed({11'd0, g})
          + 19'sd29  * $signed({11'd0, b})) >>> 8;
    cb_s = ((-19'sd43 * $signed({11'd0, r}) - 19'sd85  * $signed({11'd0, g})
          + 19'sd128 * $signed({11'd0, b})) >>> 8) + 19'sd128;
    cr_s = ((19'sd128 * $signed({11'd0, r}) - 19'sd107 * $signed({11'd0, g})
          - 19'sd21  * $signed({11'd0, b})) >>> 8) + 19'sd128;
  end

  always_ff @(posedge clk) begin
    y  <= clip8(y_s);
    cb <= clip8(cb_s);
    cr <= clip8(cr_s);
  end
endmodule
