// pdu_top: the Programmable Delay Unit, a CAMAC module that sends 16
// independently delayed timing pulses to the other modules of its crate.
//
// The FIDO timing system sends a 119 MHz pulse train in which a missing pulse
// marks the fiducial. The fiducial detector finds it; the controller then
// zeroes the counters of the two Eight Channel Alarm Clocks (ECACs) and, for
// each of the 16 channels, looks up the channel's delay in the 4K x 20
// Pattern Timing Table and loads it into the ECAC. The row of the table a
// channel uses is chosen by its 3-bit mode: one of three Pattern Input
// Registers (the beam pattern of the coming linac cycles), the modulo-36
// Time Slot Counter, or the standby row FF. When all channels are loaded the
// outputs are enabled, and each channel emits an eight-clock pulse when its
// ECAC counter reaches its delay, so delays are set in 8.4 ns steps.
//
// Data flow (after the published block diagram): channel pointer (4 bits)
// -> mode RAM (16 x 3) -> pattern RAM (7 x 8) -> table address {index 8,
// channel 4} -> table (4K x 20) -> ECAC data bus; channel pointer bit 3
// chooses the ECAC and bits 2:0 its latch line.
//
// Ports:
//   clk          ECAC and control clock: the 119 MHz clock from FIDO, or the
//                internal 8 MHz clock when `int_clk_sel` is set (the clock
//                selector and oscillator are board parts outside this RTL)
//   rst          synchronous power-up / CAMAC Z reset; starts the table fill
//   fido         FIDO pulse train; fido_dly_n its inverted copy delayed ~7 ns
//                by an external delay line
//   cmd_valid, cmd, rsp_valid, rsp   CAMAC dataway, see pdu_controller
//   candh, test  ECAC counter test inputs, per chip
//   oclk, oclk_n buffered clock for the backplane (from ECAC 0 and 1)
//   out, out_n   the 16 delayed pulses, true and complement
//   fid_seen, fid_missing  latched status (also readable over CAMAC)
module pdu_top
  import pdu_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    fido,
  input  logic                    fido_dly_n,
  input  logic                    cmd_valid,
  input  camac_cmd_t              cmd,
  output logic                    rsp_valid,
  output camac_rsp_t              rsp,
  input  logic [1:0]              candh,
  input  logic [1:0][3:0]         test,
  output logic [1:0]              oclk,
  output logic [1:0]              oclk_n,
  output logic [NUM_CHANNELS-1:0] out,
  output logic [NUM_CHANNELS-1:0] out_n,
  output logic                    int_clk_sel,
  output logic                    fid_seen,
  output logic                    fid_missing,
  output logic                    busy
);

  logic                    fid_det;
  logic [CHAN_W-1:0]       msr_addr;
  logic                    msr_we;
  logic [MODE_W-1:0]       msr_wdata, msr_rdata;
  pram_word_e              pram_raddr, pram_waddr;
  logic [INDEX_W-1:0]      pram_rdata, pram_wdata;
  logic                    pram_we, pram_end_cycle;
  logic [PTT_ADDR_W-1:0]   ptt_addr;
  logic                    ptt_we, ptt_busy;
  logic [DELAY_W-1:0]      ptt_wdata, ptt_rdata;
  logic                    ecac_reset, out_en;
  logic [NUM_CHANNELS-1:0] ecac_latch;
  logic [1:0]              timeout;

  fiducial_detect u_fid (
    .fido       (fido),
    .fido_dly_n (fido_dly_n),
    .fid_det    (fid_det)
  );

  pdu_controller u_ctrl (
    .clk            (clk),
    .rst            (rst),
    .cmd_valid      (cmd_valid),
    .cmd            (cmd),
    .rsp_valid      (rsp_valid),
    .rsp            (rsp),
    .fid_det        (fid_det),
    .timeout        (|timeout),
    .msr_addr       (msr_addr),
    .msr_we         (msr_we),
    .msr_wdata      (msr_wdata),
    .msr_rdata      (msr_rdata),
    .pram_raddr     (pram_raddr),
    .pram_rdata     (pram_rdata),
    .pram_we        (pram_we),
    .pram_waddr     (pram_waddr),
    .pram_wdata     (pram_wdata),
    .pram_end_cycle (pram_end_cycle),
    .ptt_addr       (ptt_addr),
    .ptt_we         (ptt_we),
    .ptt_wdata      (ptt_wdata),
    .ptt_rdata      (ptt_rdata),
    .ptt_busy       (ptt_busy),
    .ecac_reset     (ecac_reset),
    .ecac_latch     (ecac_latch),
    .out_en         (out_en),
    .int_clk_sel    (int_clk_sel),
    .fid_seen       (fid_seen),
    .fid_missing    (fid_missing),
    .busy           (busy)
  );

  mode_select_ram #(.DEPTH(NUM_CHANNELS), .WIDTH(MODE_W)) u_msr (
    .clk   (clk),
    .addr  (msr_addr),
    .we    (msr_we),
    .wdata (msr_wdata),
    .rdata (msr_rdata)
  );

  pattern_ram u_pram (
    .clk       (clk),
    .rst       (rst),
    .raddr     (pram_raddr),
    .rdata     (pram_rdata),
    .we        (pram_we),
    .waddr     (pram_waddr),
    .wdata     (pram_wdata),
    .end_cycle (pram_end_cycle)
  );

  pattern_timing_table #(.ADDR_W(PTT_ADDR_W), .WIDTH(DELAY_W)) u_ptt (
    .clk       (clk),
    .rst       (rst),
    .addr      (ptt_addr),
    .we        (ptt_we),
    .wdata     (ptt_wdata),
    .rdata     (ptt_rdata),
    .init_busy (ptt_busy)
  );

  for (genvar e = 0; e < 2; e++) begin : g_ecac
    ecac #(.CHANNELS(ECAC_CHANNELS), .WIDTH(DELAY_W)) u_ecac (
      .clk       (clk),
      .reset     (ecac_reset),
      .d         (ptt_rdata),
      .latch     (ecac_latch[e*ECAC_CHANNELS +: ECAC_CHANNELS]),
      .out_en    (out_en),
      .candh     (candh[e]),
      .test      (test[e]),
      .oclk      (oclk[e]),
      .oclk_n    (oclk_n[e]),
      .timeout   (timeout[e]),
      .timeout_n (),
      .outn      (out[e*ECAC_CHANNELS +: ECAC_CHANNELS]),
      .outn_n    (out_n[e*ECAC_CHANNELS +: ECAC_CHANNELS])
    );
  end

endmodule
