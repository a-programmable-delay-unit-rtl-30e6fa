// ecac_channel: one of the eight delay channels of the ECAC.
//
// A 20-bit register holds the time, in clock periods after the fiducial, at
// which the channel's pulse starts. It is compared with the shared counter in
// two stages, as in the original chip: the 3 low bits are compared for
// equality, which is true once every eight clocks, and at each such time the
// result of the 17-bit equality compare of the upper bits is captured in the
// output flip-flop. The flip-flop therefore turns on when the counter equals
// the stored time and turns off at the next 3-bit match eight clocks later,
// giving a pulse exactly eight clock periods long. The flip-flop output is
// ANDed with the common output enable and driven as a true/complement pair.
//
// In the original the 3-bit match, ANDed with the inverted clock, clocks the
// output flip-flop; here the flip-flop is clocked on the falling clock edge
// with the 3-bit match as its enable, which samples at the same instant.
// The stored time is a clock-enabled register loaded while `latch_en` is high
// at a rising edge; the original uses a transparent latch.
//
// Timing: if the counter shows value V from rising edge t, and the stored time
// is V, `out` rises at the falling edge half a period after t and falls at the
// falling edge eight periods later. `reset` (synchronous, active high) clears
// the output flip-flop at the next falling edge.
module ecac_channel #(
  parameter int unsigned WIDTH = 20,
  parameter int unsigned LOW_W = 3
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             latch_en,
  input  logic [WIDTH-1:0] d,
  input  logic [WIDTH-1:0] count,
  input  logic             out_en,
  output logic             out,
  output logic             out_n
);

  logic [WIDTH-1:0] stored;
  logic             eq_low, eq_high, pulse_q;

  always_ff @(posedge clk)
    if (latch_en) stored <= d;

  assign eq_low  = (count[LOW_W-1:0]     == stored[LOW_W-1:0]);
  assign eq_high = (count[WIDTH-1:LOW_W] == stored[WIDTH-1:LOW_W]);

  always_ff @(negedge clk) begin
    if (reset)       pulse_q <= 1'b0;
    else if (eq_low) pulse_q <= eq_high;
  end

  assign out   = pulse_q && out_en;
  assign out_n = !out;

endmodule
