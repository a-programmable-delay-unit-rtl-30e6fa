// ecac_counter: the 20-bit time-since-fiducial counter of the Eight Channel
// Alarm Clock (ECAC).
//
// The counter is built, as in the original gate array, from five 4-bit
// sections. Section 0 advances on every clock; section k (k = 1..4) advances
// when every section below it has reached its terminal count of 15, so the
// whole is a plain binary counter of clock periods since the last reset.
// In the original part the carry into each upper section is a flip-flop whose
// output clocks a 4-bit ripple counter; here the same terminal-count terms
// are used as synchronous count enables on one clock, which gives the same
// count at every clock edge.
//
// Test inputs (from the original part):
//   candh   - single step. While high, ordinary clock counting stops; the
//             clock edge that first sees it high adds one to the counter.
//   test[i] - TEST(i+1). The clock edge that first sees it high adds one to
//             section i+1 alone (no carry out), for preloading.
// In the original these inputs act as asynchronous clock edges; sampling them
// with the clock is this design's choice.
//
// Timing: reset is synchronous and active high; the counter reads 0 after the
// clock edge that sees reset, then 1, 2, ... on the following edges.
module ecac_counter #(
  parameter int unsigned SECTIONS  = 5,   // 4-bit sections
  localparam int unsigned WIDTH    = 4 * SECTIONS
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               candh,
  input  logic [SECTIONS-2:0] test,      // TEST1..TEST(SECTIONS-1)
  output logic [WIDTH-1:0]   count
);

  logic                candh_q;
  logic [SECTIONS-2:0] test_q;
  logic                count_en;
  logic [SECTIONS-1:0] tc;      // section at terminal count 15
  logic [SECTIONS-1:0] carry;   // every lower section at 15 while counting
  logic [SECTIONS-1:0] tstep;   // test edge on this section
  logic [SECTIONS-1:0] step;    // section advances on this edge

  always_ff @(posedge clk) begin
    candh_q <= candh;
    test_q  <= test;
  end

  // Ordinary counting while CANDH is low; one step on its rising edge.
  assign count_en = !candh || !candh_q;

  always_comb begin
    logic run;
    run = count_en;
    for (int s = 0; s < SECTIONS; s++) begin
      tc[s]    = (count[4*s +: 4] == 4'hF);
      carry[s] = run;
      run      = run && tc[s];
      tstep[s] = (s > 0) ? (test[s-1] && !test_q[s-1]) : 1'b0;
    end
    step = carry | tstep;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      count <= '0;
    end else begin
      for (int s = 0; s < SECTIONS; s++)
        if (step[s]) count[4*s +: 4] <= count[4*s +: 4] + 4'd1;
    end
  end

endmodule
