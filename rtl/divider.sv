// divider: iterative unsigned restoring divider.
//
// On `start` it latches dividend and divisor and produces one quotient bit
// per clock, MSB first; WIDTH clocks later `done` pulses with quotient and
// remainder valid. A zero divisor gives an all-ones quotient. `busy` is high
// while a division is in progress; a `start` while busy is ignored.
//
// From the source description: nothing; the centre-of-mass unit needs a divide.
// My own choices: a 32-bit restoring divider, one quotient bit per clock.
//
// Lint note: the top bit of the partial remainder is only a borrow flag
// inside the step (unused-bits warning).
module divider #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] dividend,
  input  logic [WIDTH-1:0] divisor,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder,
  output logic             busy,
  output logic             done
);
  logic [WIDTH-1:0]         dvs;
  logic [WIDTH-1:0]         quo;
  logic [WIDTH:0]           rem;
  logic [$clog2(WIDTH):0]   count;
  logic [WIDTH:0]           trial;

  assign trial = {rem[WIDTH-1:0], quo[WIDTH-1]} - {1'b0, dvs};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      count     <= '0;
      dvs       <= '0;
      quo       <= '0;
      rem       <= '0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          dvs   <= divisor;
          quo   <= dividend;
          rem   <= '0;
          count <= '0;
        end
      end else begin
        if (!trial[WIDTH]) begin
          rem <= trial;
          quo <= {quo[WIDTH-2:0], 1'b1};
        end else begin
          rem <= {rem[WIDTH-1:0], quo[WIDTH-1]};
          quo <= {quo[WIDTH-2:0], 1'b0};
        end
        count <= count + 1'b1;
        if (count == ($clog2(WIDTH)+1)'(WIDTH-1)) begin
          busy      <= 1'b0;
          done      <= 1'b1;
          quotient  <= !trial[WIDTH] ? {quo[WIDTH-2:0], 1'b1} : {quo[WIDTH-2:0], 1'b0};
          remainder <= !trial[WIDTH] ? trial[WIDTH-1:0] : {rem[WIDTH-2:0], quo[WIDTH-1]};
        end
      end
    end
  end
endmodule
