// fiducial_detect: finds the fiducial, a missing pulse, in the 119 MHz FIDO
// pulse train.
//
// A single flip-flop samples the FIDO line (D) on the rising edge of a copy
// of FIDO that has been inverted and delayed by about 7 ns, i.e. 7 ns after
// each falling edge of FIDO. With the 8.4 ns period, the next pulse has
// already begun at that instant, so the flip-flop normally stores 1. When a
// pulse is missing the line is still low and the flip-flop stores 0; its
// inverted output, `fid_det`, then goes high until the next sample that sees
// a pulse again.
//
// The flip-flop and its connections follow the published circuit. The 7 ns
// delay is an analog part outside this module: its output enters as
// `fido_dly_n`. `fid_det` is asynchronous to any system clock and must be
// synchronised by its user.
module fiducial_detect (
  input  logic fido,        // FIDO pulse train with missing-pulse fiducials
  input  logic fido_dly_n,  // FIDO, inverted and delayed about 7 ns
  output logic fid_det      // high after a missing pulse
);

  logic q;

  always_ff @(posedge fido_dly_n)
    q <= fido;

  assign fid_det = !q;

endmodule
