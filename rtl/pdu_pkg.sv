// pdu_pkg: constants and types shared by the Programmable Delay Unit.
//
// The PDU produces 16 channels of timing pulses, each delayed by a
// programmable number of 119 MHz clock periods (8.4 ns) after the fiducial
// found in the FIDO pulse train. This package holds the sizes of the
// module's memories, the layout of the small pattern RAM, the channel modes
// and the CAMAC function and sub-address codes the module answers.
//
// Sizes (16 channels, 20-bit delays, 4K x 20 timing table, 16 x 3 mode RAM,
// 7 x 8 pattern RAM, modulo-36 slot counter, standby pointer FF) follow the
// published design. The word layout of the pattern RAM and the CAMAC codes
// for status, clock select and software fiducial are this design's choice.
package pdu_pkg;

  localparam int unsigned NUM_CHANNELS   = 16;   // two ECACs of eight channels
  localparam int unsigned ECAC_CHANNELS  = 8;
  localparam int unsigned DELAY_W        = 20;   // delay word, in clock periods
  localparam int unsigned CHAN_W         = 4;    // channel pointer width
  localparam int unsigned INDEX_W        = 8;    // pattern index (table row)
  localparam int unsigned PTT_ADDR_W     = INDEX_W + CHAN_W;  // 12 -> 4K words
  localparam int unsigned MODE_W         = 3;
  localparam int unsigned PRAM_WORDS     = 7;
  localparam int unsigned TSC_MODULUS    = 36;
  localparam logic [INDEX_W-1:0] STANDBY_INDEX = 8'hFF;
  localparam logic [DELAY_W-1:0] PTT_INIT_VALUE = '1;

  // Words of the 7 x 8 pattern RAM. The 3-bit channel mode is the address.
  typedef enum logic [MODE_W-1:0] {
    W_PTR_HI  = 3'd0,  // upper 8 bits of the Pattern Timing Table Pointer
    W_PIR1    = 3'd1,  // Pattern Input Register 1 (next linac cycle)
    W_PIR2    = 3'd2,
    W_PIR3    = 3'd3,
    W_TSC     = 3'd4,  // modulo-36 Time Slot Counter
    W_STANDBY = 3'd5,  // constant FF: reuse/standby row
    W_SPARE   = 3'd6   // spare word, reset to FF, not writable
  } pram_word_e;

  // CAMAC function codes used by the module.
  localparam logic [4:0] F_READ_PTT   = 5'd0;   // F(0)  A(0)
  localparam logic [4:0] F_READ_REG   = 5'd1;   // F(1)  A(0) pointer, A(1) mode, A(2) status
  localparam logic [4:0] F_CLR_STATUS = 5'd9;   // F(9)  A(2)
  localparam logic [4:0] F_WRITE_PTT  = 5'd16;  // F(16) A(0)
  localparam logic [4:0] F_WRITE_REG  = 5'd17;  // F(17) A(0) pointer, A(1) mode
  localparam logic [4:0] F_WRITE_PIR  = 5'd19;  // F(19) A(8..11) PIR1..3, TSC
  localparam logic [4:0] F_INT_CLK_OFF= 5'd24;  // F(24) A(0)
  localparam logic [4:0] F_FIDUCIAL   = 5'd25;  // F(25) A(0) software fiducial
  localparam logic [4:0] F_INT_CLK_ON = 5'd26;  // F(26) A(0)

  // A CAMAC command as presented to the controller for one dataway cycle.
  typedef struct packed {
    logic [4:0]  f;
    logic [3:0]  a;
    logic [23:0] w;
  } camac_cmd_t;

  // Reply to one command: read data, Q (accepted) and X (recognised).
  typedef struct packed {
    logic [23:0] r;
    logic        q;
    logic        x;
  } camac_rsp_t;

endpackage
