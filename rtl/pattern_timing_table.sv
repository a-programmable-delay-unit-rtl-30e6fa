// pattern_timing_table: the 4K x 20 Pattern Timing Table of the PDU.
//
// Each word is a delay, in clock periods after the fiducial, for one channel
// in one beam pattern. The 12-bit address is {row index (8 bits), channel
// (4 bits)}: 256 rows of 16 channel delays. Row FF is the standby row.
//
// After reset (power-up or CAMAC Z) the table fills itself with all ones, one
// word per clock, and `init_busy` stays high until the last word is written
// (2**ADDR_W clocks); accesses are ignored meanwhile. An all-ones delay lies
// beyond the counter's timeout, so an unprogrammed channel never fires.
//
// Size and reset initialisation follow the published design; the sequential
// fill and the registered read (data one clock after the address) are this
// design's choices.
module pattern_timing_table #(
  parameter int unsigned ADDR_W = 12,
  parameter int unsigned WIDTH  = 20
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata,
  output logic              init_busy
);

  logic [WIDTH-1:0]  mem [2**ADDR_W];
  logic [ADDR_W-1:0] init_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      init_busy <= 1'b1;
      init_addr <= '0;
    end else if (init_busy) begin
      init_addr <= init_addr + 1'b1;
      if (init_addr == '1) init_busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst && init_busy)  mem[init_addr] <= '1;
    else if (!rst && we)    mem[addr]      <= wdata;
    rdata <= mem[addr];
  end

endmodule
