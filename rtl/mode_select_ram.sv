// mode_select_ram: the 16 x 3 Mode Select Register of the PDU.
//
// One 3-bit entry per output channel says where that channel's row index into
// the Pattern Timing Table comes from: the entry is used directly as the
// address of the 7 x 8 pattern RAM (see pdu_pkg::pram_word_e), selecting one
// of the three Pattern Input Registers, the Time Slot Counter or the standby
// row FF. The RAM is addressed by the channel pointer for both CAMAC access
// and the programming cycle.
//
// Size and role follow the published design. Write is synchronous; read is
// asynchronous (a small register file). Contents are not reset.
module mode_select_ram #(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned WIDTH  = 3,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  input  logic             we,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];

endmodule
