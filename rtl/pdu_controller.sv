// pdu_controller: CAMAC access and the per-fiducial programming cycle of the
// Programmable Delay Unit.
//
// Programming cycle. On every fiducial, detected in the FIDO train or
// requested by CAMAC F(25), the controller pulses `ecac_reset` (which zeroes
// the ECAC counters and outputs), drops the common output enable and then
// loads the sixteen ECAC channels one by one. For channel c the channel
// pointer is set to c; the pointer addresses the mode RAM, whose 3-bit mode
// addresses the pattern RAM, whose 8-bit index together with c addresses the
// Pattern Timing Table, whose 20-bit word is loaded into ECAC channel c with
// its own latch line. This takes two clocks per channel. Afterwards the
// Pattern Input Registers are set to FF and the Time Slot Counter advanced
// (`pram_end_cycle`), the channel pointer gets back the value it had before
// the fiducial, and the outputs are enabled. The sequence itself takes
// PROG_CYCLES = 2*16 + 2 clocks; with synchronisation, the outputs are enabled
// 37 clocks after the missing pulse: 0.31 us at 119 MHz, 4.6 us at 8 MHz,
// both inside the 12 us the published module allows.
//
// Table pointer. The 12-bit Pattern Timing Table Pointer is {upper byte,
// channel pointer}; the upper byte is word 0 of the pattern RAM, which the
// controller reads whenever no channel is being programmed. CAMAC reads and
// writes of the table advance the pointer by one.
//
// CAMAC. One command per `cmd_valid` pulse; the reply (`rsp_valid`, read
// data, Q, X) follows one clock later, two for a table read. A command that
// arrives while the table is initialising or a programming cycle is running
// is not executed and answers Q = 0. Commands:
//   F(0)  A(0)     read table word at pointer, pointer + 1
//   F(16) A(0)     write table word at pointer, pointer + 1
//   F(1)  A(0)     read pointer            F(17) A(0)  write pointer
//   F(1)  A(1)     read mode of channel at pointer
//   F(17) A(1)     write mode of channel at pointer
//   F(1)  A(8-11)  read PIR1-3, slot counter
//   F(19) A(8-11)  write PIR1-3, slot counter
//   F(1)  A(2)     read status: {int clock, outputs enabled, busy,
//                  fiducial missing, fiducial seen}
//   F(9)  A(2)     clear the two latched status bits
//   F(25) A(0)     generate a fiducial
//   F(26)/F(24) A(0)  select / deselect the internal 8 MHz clock
// The table commands F(0)/F(16)/F(1)/F(17) A(0), F(17) A(1) and F(19)
// A(8-11) are those of the published module; the rest of the code
// assignment, the reply timing and the busy rule are this design's choices.
//
// Status. `fid_seen` latches every fiducial; `fid_missing` latches the ECAC
// timeout (about 3.3 ms with no fiducial). Both clear on F(9) A(2) or reset.
//
// `rst` is synchronous, active high: power-up or CAMAC Z.
module pdu_controller
  import pdu_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  // CAMAC dataway, one command per pulse
  input  logic                    cmd_valid,
  input  camac_cmd_t              cmd,
  output logic                    rsp_valid,
  output camac_rsp_t              rsp,
  // fiducial from the detector (asynchronous level) and ECAC timeout
  input  logic                    fid_det,
  input  logic                    timeout,
  // mode select RAM
  output logic [CHAN_W-1:0]       msr_addr,
  output logic                    msr_we,
  output logic [MODE_W-1:0]       msr_wdata,
  input  logic [MODE_W-1:0]       msr_rdata,
  // pattern RAM
  output pram_word_e              pram_raddr,
  input  logic [INDEX_W-1:0]      pram_rdata,
  output logic                    pram_we,
  output pram_word_e              pram_waddr,
  output logic [INDEX_W-1:0]      pram_wdata,
  output logic                    pram_end_cycle,
  // pattern timing table
  output logic [PTT_ADDR_W-1:0]   ptt_addr,
  output logic                    ptt_we,
  output logic [DELAY_W-1:0]      ptt_wdata,
  input  logic [DELAY_W-1:0]      ptt_rdata,
  input  logic                    ptt_busy,
  // ECACs (data bus is the table's read data)
  output logic                    ecac_reset,
  output logic [NUM_CHANNELS-1:0] ecac_latch,
  output logic                    out_en,
  // board controls and status
  output logic                    int_clk_sel,
  output logic                    fid_seen,
  output logic                    fid_missing,
  output logic                    busy
);

  localparam int unsigned PROG_CYCLES = 2 * NUM_CHANNELS + 2;

  typedef enum logic [2:0] {
    S_IDLE,      // accept CAMAC commands, wait for fiducial
    S_PTT_RD,    // table read data arrives for F(0)
    S_START,     // save pointer, begin at channel 0
    S_ADDR,      // present table address for channel
    S_LATCH,     // load table word into the channel
    S_END        // update pattern RAM, restore pointer, enable outputs
  } state_e;

  state_e            state;
  logic [CHAN_W-1:0] chptr, saved_chptr;
  logic [2:0]        fid_sync;
  logic              fid_pulse, fid_pending;
  logic              sw_fid;
  logic              accept;
  logic              is_a0, is_a1, is_a2, is_pir;

  // Synchronise the detector output and take its rising edge.
  always_ff @(posedge clk) begin
    if (rst) fid_sync <= '0;
    else     fid_sync <= {fid_sync[1:0], fid_det};
  end
  assign fid_pulse = (fid_sync[1] && !fid_sync[2]) || sw_fid;

  assign is_a0  = (cmd.a == 4'd0);
  assign is_a1  = (cmd.a == 4'd1);
  assign is_a2  = (cmd.a == 4'd2);
  assign is_pir = (cmd.a >= 4'd8) && (cmd.a <= 4'd11);

  // A command is executed only when idle, initialised and no fiducial waits.
  assign accept = cmd_valid && (state == S_IDLE) && !ptt_busy && !fid_pending;
  assign busy   = (state != S_IDLE) || ptt_busy || fid_pending;

  // Software fiducial: F(25) A(0), accepted like any command.
  assign sw_fid = accept && (cmd.f == F_FIDUCIAL) && is_a0;

  // Address paths of the data flow: pointer -> mode RAM -> pattern RAM ->
  // table. Outside the programming cycle the pattern RAM shows the pointer's
  // upper byte, or a PIR/slot-counter word for F(1) A(8-11).
  always_comb begin
    msr_addr = chptr;
    if (state == S_ADDR)
      pram_raddr = pram_word_e'(msr_rdata);
    else if (cmd_valid && cmd.f == F_READ_REG && is_pir)
      pram_raddr = pram_word_e'(cmd.a - 4'd7);
    else
      pram_raddr = W_PTR_HI;
    ptt_addr = {pram_rdata, chptr};
  end

  // Write ports and replies.
  always_comb begin
    msr_we     = 1'b0;
    msr_wdata  = cmd.w[MODE_W-1:0];
    pram_we    = 1'b0;
    pram_waddr = W_PTR_HI;
    pram_wdata = cmd.w[PTT_ADDR_W-1:CHAN_W];
    ptt_we     = 1'b0;
    ptt_wdata  = cmd.w[DELAY_W-1:0];
    if (accept) begin
      unique case (cmd.f)
        F_WRITE_PTT: ptt_we = is_a0;
        F_WRITE_REG: msr_we = is_a1;
        F_WRITE_PIR: begin
          pram_we    = is_pir;
          pram_waddr = pram_word_e'(cmd.a - 4'd7);
          pram_wdata = cmd.w[INDEX_W-1:0];
        end
        default: ;
      endcase
      if (cmd.f == F_WRITE_REG && is_a0) pram_we = 1'b1;
      // Pointer increment after a table write carries into the upper byte.
      if (cmd.f == F_WRITE_PTT && is_a0 && chptr == '1) begin
        pram_we    = 1'b1;
        pram_wdata = pram_rdata + 1'b1;
      end
    end
    if (state == S_PTT_RD && chptr == '1) begin
      pram_we    = 1'b1;
      pram_wdata = pram_rdata + 1'b1;
    end
  end

  assign ecac_latch     = (state == S_LATCH) ? NUM_CHANNELS'(1) << chptr : '0;
  assign pram_end_cycle = (state == S_END);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_IDLE;
      chptr       <= '0;
      saved_chptr <= '0;
      fid_pending <= 1'b0;
      ecac_reset  <= 1'b1;
      out_en      <= 1'b0;
      int_clk_sel <= 1'b0;
      fid_seen    <= 1'b0;
      fid_missing <= 1'b0;
      rsp_valid   <= 1'b0;
      rsp         <= '0;
    end else begin
      ecac_reset <= fid_pulse;
      rsp_valid  <= 1'b0;
      if (timeout) fid_missing <= 1'b1;

      // Reply to every command; only accepted ones take effect.
      if (cmd_valid) begin
        rsp_valid <= !(accept && cmd.f == F_READ_PTT && is_a0);
        rsp.r     <= '0;
        rsp.q     <= accept;
        rsp.x     <= 1'b1;
        unique case (cmd.f)
          F_READ_PTT:  rsp.x <= is_a0;
          F_WRITE_PTT: begin
            rsp.x <= is_a0;
            if (accept && is_a0) chptr <= chptr + 1'b1;
          end
          F_READ_REG: begin
            rsp.x <= is_a0 || is_a1 || is_a2 || is_pir;
            if (is_a0)  rsp.r <= 24'({pram_rdata, chptr});
            if (is_a1)  rsp.r <= 24'(msr_rdata);
            if (is_pir) rsp.r <= 24'(pram_rdata);
            if (is_a2)  rsp.r <= 24'({int_clk_sel, out_en, busy,
                                      fid_missing, fid_seen});
          end
          F_WRITE_REG: begin
            rsp.x <= is_a0 || is_a1;
            if (accept && is_a0) chptr <= cmd.w[CHAN_W-1:0];
          end
          F_WRITE_PIR:  rsp.x <= is_pir;
          F_CLR_STATUS: begin
            rsp.x <= is_a2;
            if (accept && is_a2) begin
              fid_seen    <= 1'b0;
              fid_missing <= 1'b0;
            end
          end
          F_FIDUCIAL:   rsp.x <= is_a0;
          F_INT_CLK_ON: begin
            rsp.x <= is_a0;
            if (accept && is_a0) int_clk_sel <= 1'b1;
          end
          F_INT_CLK_OFF: begin
            rsp.x <= is_a0;
            if (accept && is_a0) int_clk_sel <= 1'b0;
          end
          default: begin
            rsp.x <= 1'b0;
            rsp.q <= 1'b0;
          end
        endcase
      end

      unique case (state)
        S_IDLE: begin
          if (accept && cmd.f == F_READ_PTT && is_a0)
            state <= S_PTT_RD;
          else if (fid_pending && !ptt_busy) begin
            state       <= S_START;
            fid_pending <= 1'b0;
          end
        end
        S_PTT_RD: begin
          // table data for the F(0) accepted last clock
          rsp_valid <= 1'b1;
          rsp.r     <= 24'(ptt_rdata);
          rsp.q     <= 1'b1;
          rsp.x     <= 1'b1;
          chptr     <= chptr + 1'b1;
          state     <= S_IDLE;
        end
        S_START: begin
          saved_chptr <= chptr;
          chptr       <= '0;
          state       <= S_ADDR;
        end
        S_ADDR:  state <= S_LATCH;
        S_LATCH: begin
          if (chptr == CHAN_W'(NUM_CHANNELS - 1)) begin
            state <= S_END;
          end else begin
            chptr <= chptr + 1'b1;
            state <= S_ADDR;
          end
        end
        S_END: begin
          chptr  <= saved_chptr;
          out_en <= !fid_pending && !fid_pulse;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase

      if (fid_pulse) begin
        fid_pending <= 1'b1;
        fid_seen    <= 1'b1;
        out_en      <= 1'b0;
      end
    end
  end

  // The dataway issues a new command only after the reply to the last one.
  property p_one_outstanding;
    @(posedge clk) disable iff (rst) (state == S_PTT_RD) |-> !cmd_valid;
  endproperty
  a_one_outstanding: assert property (p_one_outstanding);

  // The whole programming cycle fits the 12 us budget even at 8 MHz.
  initial assert (PROG_CYCLES < 96)
    else $error("programming cycle exceeds 12 us at 8 MHz");

endmodule
