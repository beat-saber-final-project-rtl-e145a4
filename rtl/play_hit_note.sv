// play_hit_note: the "hit" sound, a 740 Hz square wave lasting 0.1 s.
//
// A `hit` pulse (100 MHz domain) starts, or restarts, the note. For
// NOTE_CYCLES clocks (0.1 s at 100 MHz) `hit_active` is high and
// `pwm_data` toggles between NOTE_HI and NOTE_LO every HALF_PERIOD clocks
// (100e6 / (2 * 740) = 67568, giving 740 Hz). While `hit_active` is high
// the music output plays this note instead of the song. The two sample
// levels are this design's choice.
module play_hit_note #(
  parameter int         HALF_PERIOD = 67_568,
  parameter int         NOTE_CYCLES = 10_000_000,
  parameter logic [7:0] NOTE_HI     = 8'hC0,
  parameter logic [7:0] NOTE_LO     = 8'h40
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       hit,
  output logic [7:0] pwm_data,
  output logic       hit_active
);
  logic [$clog2(NOTE_CYCLES+1)-1:0]  remaining;
  logic [$clog2(HALF_PERIOD+1)-1:0]  phase;
  logic                              level;

  assign hit_active = (remaining != 0);
  assign pwm_data   = hit_active ? (level ? NOTE_HI : NOTE_LO) : 8'h80;

  always_ff @(posedge clk) begin
    if (rst) begin
      remaining <= '0;
      phase     <= '0;
      level     <= 1'b0;
    end else if (hit) begin
      remaining <= $bits(remaining)'(NOTE_CYCLES);
      phase     <= '0;
      level     <= 1'b1;
    end else if (hit_active) begin
      remaining <= remaining - 1'b1;
      if (phase == $bits(phase)'(HALF_PERIOD - 1)) begin
        phase <= '0;
        level <= !level;
      end else begin
        phase <= phase + 1'b1;
      end
    end
  end
endmodule
