// color_threshold: chroma window mask for LED detection.
//
// A pixel is masked in when both chroma components fall inside their
// windows: CR_LO <= Cr <= CR_HI and CB_LO <= Cb <= CB_HI. Luma is ignored,
// so the test is insensitive to brightness. The mask is registered (one
// clock latency). Window bounds are run-time inputs so they can be tuned
// from switches; the defaults used elsewhere are this design's choice.
module color_threshold (
  input  logic       clk,
  input  logic [7:0] cr,
  input  logic [7:0] cb,
  input  logic [7:0] cr_lo,
  input  logic [7:0] cr_hi,
  input  logic [7:0] cb_lo,
  input  logic [7:0] cb_hi,
  output logic       mask
);
  always_ff @(posedge clk) begin
    mask <= (cr >= cr_lo) && (cr <= cr_hi) && (cb >= cb_lo) && (cb <= cb_hi);
  end
endmodule
