// ecac: the Eight Channel Alarm Clock, a gate array that generates eight
// delayed timing pulses.
//
// One 20-bit counter, cleared by RESET at each fiducial and advanced by the
// 119 MHz clock, is shared by eight channels. Each channel stores a 20-bit
// time and emits an eight-clock pulse when the counter reaches it
// (see ecac_channel). Sharing the counter, much like the match lines of a
// content addressable memory, keeps the per-channel logic small.
//
// Interface, after the original chip:
//   clk              119 MHz clock (or the module's internal clock)
//   reset            fiducial reset: clears counter and output flip-flops
//   d                20-bit delay data bus, common to all channels
//   latch            one load line per channel (no address decoding on chip)
//   out_en           common output enable
//   candh, test      counter test inputs (see ecac_counter)
//   oclk/oclk_n      buffered copy of the clock for the backplane
//   timeout/_n       counter bits 18 AND 17: about 3.3 ms without a fiducial
//   outn/outn_n      channel pulses, true and complement
// The true/complement pairs stand for the chip's differential ECL outputs.
//
// Timing: as ecac_channel; reset is synchronous to clk in this design.
module ecac #(
  parameter int unsigned CHANNELS = 8,
  parameter int unsigned WIDTH    = 20
) (
  input  logic                clk,
  input  logic                reset,
  input  logic [WIDTH-1:0]    d,
  input  logic [CHANNELS-1:0] latch,
  input  logic                out_en,
  input  logic                candh,
  input  logic [WIDTH/4-2:0]  test,
  output logic                oclk,
  output logic                oclk_n,
  output logic                timeout,
  output logic                timeout_n,
  output logic [CHANNELS-1:0] outn,
  output logic [CHANNELS-1:0] outn_n
);

  logic [WIDTH-1:0] count;

  ecac_counter #(.SECTIONS(WIDTH / 4)) u_counter (
    .clk   (clk),
    .reset (reset),
    .candh (candh),
    .test  (test),
    .count (count)
  );

  for (genvar ch = 0; ch < CHANNELS; ch++) begin : g_chan
    ecac_channel #(.WIDTH(WIDTH)) u_chan (
      .clk      (clk),
      .reset    (reset),
      .latch_en (latch[ch]),
      .d        (d),
      .count    (count),
      .out_en   (out_en),
      .out      (outn[ch]),
      .out_n    (outn_n[ch])
    );
  end

  // Clock buffer to the backplane.
  assign oclk   = clk;
  assign oclk_n = !clk;

  // Second and third most significant counter bits.
  assign timeout   = count[WIDTH-2] && count[WIDTH-3];
  assign timeout_n = !timeout;

endmodule
