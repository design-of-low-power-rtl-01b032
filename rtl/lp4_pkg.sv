// lp4_pkg: constants and types shared by the LPDDR4 controller digital core.
//
// Holds the channel geometry (16 DQ + 2 DMI lanes, 6 CA pins, 2 DQS bytes),
// the code ranges of the training axes (256 time steps, 72 reference-voltage
// steps), the five command-bus training patterns, the controller's command
// set and the states of the link-training sequencer.
//
// The lane counts, the training axis sizes and the CA training patterns follow
// the source design. The command encoding on CA[5:0] is this design's own
// compact single-cycle code, not the JEDEC multi-cycle LPDDR4 encoding.
package lp4_pkg;

  // Channel geometry: one LPDDR4 channel.
  localparam int unsigned NUM_DQ   = 16;
  localparam int unsigned NUM_DMI  = 2;
  localparam int unsigned NUM_LANE = NUM_DQ + NUM_DMI;  // data lanes (DQ + DMI)
  localparam int unsigned NUM_BYTE = 2;                 // DQS strobes
  localparam int unsigned CA_W     = 6;

  // Training axes.
  localparam int unsigned T_STEPS  = 256;  // sampling-time steps (x axis)
  localparam int unsigned V_STEPS  = 72;   // reference-voltage steps (y axis)
  localparam int unsigned CODE_W   = 9;    // wide enough for 0..T_STEPS

  // Width of a parallel data word per lane: 16 bits per SYS_CLK cycle.
  localparam int unsigned WORD_W   = 16;

  // Command-bus training patterns, CA[5:0] printed MSB first.
  localparam logic [CA_W-1:0] CA_PAT_A = 6'b111001;
  localparam logic [CA_W-1:0] CA_PAT_B = 6'b000110;
  localparam logic [CA_W-1:0] CA_PAT_C = 6'b010001;
  localparam logic [CA_W-1:0] CA_PAT_D = 6'b101110;
  localparam logic [CA_W-1:0] CA_PAT_E = 6'b101101;

  // Commands, one CA word qualified by CS (this design's own encoding).
  typedef enum logic [CA_W-1:0] {
    CMD_NOP     = 6'h00,
    CMD_RD      = 6'h02,
    CMD_WR      = 6'h04,
    CMD_MRW     = 6'h08,
    CMD_ZQ_STRT = 6'h0A,
    CMD_ZQ_LAT  = 6'h0B,
    CMD_CBT_ENT = 6'h0C,
    CMD_CBT_EXT = 6'h0D,
    CMD_WL_ENT  = 6'h0E,
    CMD_WL_EXT  = 6'h0F
  } cmd_t;

  // Link-training sequencer states, in the order the sequence visits them.
  typedef enum logic [4:0] {
    ST_POWER_UP,
    ST_RESET,
    ST_DRAM_INIT,
    ST_MRW,
    ST_ZQ_START,
    ST_ZQ_LATCH,
    ST_CBT,
    ST_WLVL,
    ST_RD_EYE,
    ST_RD_LAT,
    ST_RD_CAL,
    ST_WR_DQS2DQ,
    ST_WR_EYE,
    ST_WR_CAL,
    ST_NORMAL
  } lt_state_t;

  // Kind of test point the sequencer is running.
  typedef enum logic [1:0] {TM_NONE, TM_CBT, TM_RD, TM_WR} trn_mode_t;

  // The i-th of the five non-zero training patterns (i = 0..4).
  function automatic logic [CA_W-1:0] ca_pat(input logic [2:0] i);
    unique case (i)
      3'd0:    return CA_PAT_A;
      3'd1:    return CA_PAT_B;
      3'd2:    return CA_PAT_C;
      3'd3:    return CA_PAT_D;
      default: return CA_PAT_E;
    endcase
  endfunction

  // Expected 16-bit DQ training word for a lane, built from a 6-bit pattern:
  // the pattern is repeated and lanes alternate between true and inverted data.
  function automatic logic [WORD_W-1:0] dq_word(input logic [CA_W-1:0] pat,
                                                input int unsigned lane);
    logic [WORD_W-1:0] w;
    w = {pat[3:0], pat, pat};
    if (lane[0]) w = ~w;
    return w;
  endfunction

endpackage
