// pattern_ram: the 7 x 8 RAM holding the Pattern Input Registers, the
// modulo-36 Time Slot Counter, the standby index and the upper byte of the
// Pattern Timing Table Pointer.
//
// Each word is an 8-bit row index into the Pattern Timing Table. A channel's
// 3-bit mode addresses this RAM, so the mode picks which of these indexes the
// channel uses (word layout in pdu_pkg::pram_word_e):
//   0  upper byte of the table pointer (used for CAMAC table access)
//   1-3 Pattern Input Registers, describing the next three linac cycles
//   4  Time Slot Counter, counting 0..35
//   5  standby index FF (constant)
//   6  spare, reads FF (constant)
// `end_cycle`, pulsed once at the end of each programming cycle, overwrites
// the three Pattern Input Registers with FF and advances the Time Slot
// Counter modulo 36. A direct write has priority over `end_cycle` for the
// word it writes.
//
// The contents and the end-of-cycle update follow the published design; the
// word order, the spare word and the reset values (pointer 0, PIRs FF, slot
// counter 0) are this design's choices. Writes and reset are synchronous;
// the read port is asynchronous.
module pattern_ram
  import pdu_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  pram_word_e         raddr,
  output logic [INDEX_W-1:0] rdata,
  input  logic               we,
  input  pram_word_e         waddr,
  input  logic [INDEX_W-1:0] wdata,
  input  logic               end_cycle
);

  logic [INDEX_W-1:0] ptr_hi, tsc;
  logic [INDEX_W-1:0] pir [3];

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr_hi <= '0;
      tsc    <= '0;
      for (int i = 0; i < 3; i++) pir[i] <= STANDBY_INDEX;
    end else begin
      if (end_cycle) begin
        for (int i = 0; i < 3; i++) pir[i] <= STANDBY_INDEX;
        tsc <= (tsc >= INDEX_W'(TSC_MODULUS - 1)) ? '0 : tsc + 1'b1;
      end
      if (we) begin
        unique case (waddr)
          W_PTR_HI: ptr_hi <= wdata;
          W_PIR1:   pir[0] <= wdata;
          W_PIR2:   pir[1] <= wdata;
          W_PIR3:   pir[2] <= wdata;
          W_TSC:    tsc    <= wdata;
          default:  ;  // standby and spare words are constant
        endcase
      end
    end
  end

  always_comb begin
    unique case (raddr)
      W_PTR_HI: rdata = ptr_hi;
      W_PIR1:   rdata = pir[0];
      W_PIR2:   rdata = pir[1];
      W_PIR3:   rdata = pir[2];
      W_TSC:    rdata = tsc;
      default:  rdata = STANDBY_INDEX;
    endcase
  end

endmodule
