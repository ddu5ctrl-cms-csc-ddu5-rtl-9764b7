// ddu_pkg: constants and types shared by the DDU central-control RTL.
// Holds the CCB command codes (as seen after the command bus is un-inverted),
// the bunch-crossing limits, the DDU header/trailer constants, the timeout
// lengths and the per-word control bits. Values marked "chosen" are this
// design's own; all others are the documented numbers.
package ddu_pkg;

  // CCB command codes after un-inversion of the 6-bit command bus.
  localparam logic [5:0] CMD_BC0        = 6'h01;
  localparam logic [5:0] CMD_SYNC_RST   = 6'h03;
  localparam logic [5:0] CMD_START_DT   = 6'h06;
  localparam logic [5:0] CMD_STOP_DT    = 6'h07;
  localparam logic [5:0] CMD_CFEB_CAL2  = 6'h14;
  localparam logic [5:0] CMD_CFEB_CAL1  = 6'h15;
  localparam logic [5:0] CMD_CFEB_CAL0  = 6'h16;
  localparam logic [5:0] CMD_SOFT_RST   = 6'h1C;

  // Bunch-crossing counter limits: the counter wraps to 0 one cycle after the limit.
  localparam logic [11:0] BX_LIM_LHC = 12'd3563;
  localparam logic [11:0] BX_LIM_SPS = 12'd923;

  // L1A proximity window in bunch crossings (450 ns / 25 ns).
  localparam int unsigned CLOSE_L1A_BX = 18;

  // FMM/TTS status bits.
  localparam int unsigned FMM_BUSY  = 0;  // not ready
  localparam int unsigned FMM_WARN  = 1;  // warning / near full
  localparam int unsigned FMM_SYNC  = 2;  // lost sync, needs sync reset
  localparam int unsigned FMM_ERROR = 3;  // error, needs hard reset

  // DDU event header and trailer constants.
  localparam logic [3:0]  BOE_MARK   = 4'h5;
  localparam logic [3:0]  EOE_MARK   = 4'hA;
  localparam logic [3:0]  DDU_FOV    = 4'h5;
  localparam logic [47:0] H2_CONST   = 48'h8000_0001_8000;
  localparam logic [63:0] T2_CONST   = 64'h8000_FFFF_8000_8000;
  localparam logic [11:0] TF_SRC_ID  = 12'h2F8;   // 760
  localparam int unsigned HDR_WORDS  = 3;
  localparam int unsigned TRL_WORDS  = 3;

  // Timeouts in 25 ns clock cycles.
  localparam int unsigned START_TO_CYC     = 128;    // 3.2 us
  localparam int unsigned CAL_START_TO_CYC = 288;    // 7.2 us
  localparam int unsigned DONE_TO_CYC      = 38914;  // 972 us

  // Kill register: bit positions.
  localparam int unsigned KILL_CHKDIS_EN = 15;
  localparam int unsigned KILL_ALCT      = 16;
  localparam int unsigned KILL_TMB       = 17;
  localparam int unsigned KILL_CFEB      = 18;
  localparam int unsigned KILL_DMB       = 19;

  // Per-word control bits (the control bit list, bit 0 first).
  typedef struct packed {
    logic       eoe;         // 8: end of event (DONE -> OETrail)
    logic       wc_en;       // 7: word count enable
    logic       do_hdr;      // 6: header to output
    logic [3:0] sp_voted;    // 5..2: latched voted special bits 15..12
    logic       first_word;  // 1: DMB first-word mode
    logic       gold;        // 0: good data on the data bus
  } ctrl_t;

  // 8b/10b code-groups in 9-bit form {K flag, byte}.
  localparam logic [8:0] K28_5 = 9'h1BC;
  localparam logic [8:0] D16_2 = 9'h050;
  localparam logic [8:0] D21_5 = 9'h0B5;
  localparam logic [8:0] D2_2  = 9'h042;
  localparam logic [8:0] K27_7 = 9'h1FB;  // start of packet (chosen)
  localparam logic [8:0] K29_7 = 9'h1FD;  // end of packet (chosen)
  localparam logic [8:0] K23_7 = 9'h1F7;  // carrier extend (chosen)

endpackage
