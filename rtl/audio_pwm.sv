// audio_pwm: 8-bit sample to a one-bit pulse-width-modulated speaker output.
//
// The source only names this module (a course-provided block fed at 100 MHz
// with 8-bit samples). Its insides here are this design's choice: a free
// running 8-bit counter, and the output is high while the counter is below
// the sample, so the duty cycle is sample/256 over a 256-clock period.
module audio_pwm (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] level,
  output logic       pwm
);
  logic [7:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      pwm   <= 1'b0;
    end else begin
      count <= count + 8'd1;
      pwm   <= (count < level);
    end
  end
endmodule
