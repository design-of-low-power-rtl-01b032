// lp4_mcu: digital core of a low-power LPDDR4 memory controller PHY.
//
// One LPDDR4 channel: CK, CS + CA[5:0], 16 DQ + 2 DMI data lanes, 2 DQS
// strobes. This module holds everything of the controller that is logic:
//  - clocking: the ADPLL's two-stage divider (PHY_CLK, SYS_CLK = PHY_CLK/8,
//    feedback clock), its loop filter and delta-sigma modulator, and a
//    glitch-free gate that stops the transmit clock tree while idle;
//  - link training: the training sequencer with the adaptive 1x2y3x eye
//    detector, CA pattern generator, ZQ calibration logic, write leveling and
//    tDQS2DQ deskew;
//  - the data path: per lane a 16:1 serializer and de-emphasis pre-driver
//    control on transmit; per strobe a CTLE with asynchronous offset feedback
//    (behavioural model), and per lane a 1:4 strobe-domain deserializer
//    and 4:16 PHY_CLK-domain deserializer on receive, with the receiver
//    enabled only for reads.
// The analog parts are outside: DCO and phase detector (tdc_d in, fcw out),
// phase interpolators and delay lines (the *_time_code / tx_dcdl outputs),
// VREF generators (*_vref_code), LVSTL drivers (dq_main/dq_tap, zq codes),
// the ZQ comparator (zq_comp) and the receiver front end after the strobe
// CTLE (ydq: received data bits already delayed by their delay lines; strobe
// pin voltages dqs_p_mv/dqs_n_mv in millivolts).
// CS/CA are driven straight from SYS_CLK registers (a low-speed CA path);
// the read-enable delay rd_dly is a configuration input in PHY_CLK cycles.
// Data lane i belongs to strobe byte 0 for DQ0-7 and DMI0 (lanes 0-7, 16),
// to byte 1 otherwise.
// The only latches are the two strobe receivers' SR latches inside af_ctle,
// one per strobe, which are intended. All lanes' deserializers run in
// lockstep, so only lane 0's word_valid is looked at.
// The block partition and its connections follow the source design's
// architecture; port-level details are this design's own.
module lp4_mcu
  import lp4_pkg::*;
#(
  parameter int unsigned NLANE   = NUM_LANE,
  parameter int unsigned N_TIME  = T_STEPS,   // sampling-time codes
  parameter int unsigned N_VOLT  = V_STEPS,   // reference-voltage codes
  localparam int unsigned PW     = CODE_W
) (
  input  logic                       clk_dco,
  input  logic                       rst_n,
  input  logic [1:0]                 div1_sel,
  input  logic [1:0]                 div2_sel,
  // ADPLL loop
  input  logic signed [5:0]          tdc_d,
  output logic [9:0]                 fcw,
  output logic                       pll_lock,
  output logic                       phy_clk,
  output logic                       sys_clk,
  output logic                       fb_clk,
  // command bus
  output logic                       dram_reset_n,
  output logic                       cs,
  output logic [CA_W-1:0]            ca,
  input  logic [CA_W-1:0]            cbt_fb,
  // transmit data lanes (to the LVSTL drivers)
  input  logic                       deemph_en,
  output logic [NLANE-1:0]           dq_main_rise,
  output logic [NLANE-1:0]           dq_main_fall,
  output logic [NLANE-1:0]           dq_tap_rise,
  output logic [NLANE-1:0]           dq_tap_fall,
  output logic [NLANE-1:0]           dq_oe,
  output logic                       tx_gclk,
  // receive
  input  logic [5:0]                 rd_dly,
  input  logic [NLANE-1:0]           ydq,
  input  logic signed [NUM_BYTE-1:0][11:0] dqs_p_mv,
  input  logic signed [NUM_BYTE-1:0][11:0] dqs_n_mv,
  output logic [NUM_BYTE-1:0]        ydqs,
  output logic                       rx_on,
  // ZQ calibration
  input  logic                       zq_comp,
  output logic                       zq_pu_phase,
  output logic [5:0]                 zq_pd_code,
  output logic [5:0]                 zq_pu_code,
  // write leveling
  input  logic [NUM_BYTE-1:0]        wl_fb,
  output logic [6:0]                 wl_sweep_code,
  output logic                       wl_dqs_pulse,
  output logic [NUM_BYTE-1:0][6:0]   dqs_code,
  // codes for the analog delay lines and references
  output logic [PW-1:0]              ca_time_code,
  output logic [PW-1:0]              ca_vref_code,
  output logic [PW-1:0]              rx_time_code,
  output logic [PW-1:0]              rx_vref_code,
  output logic [NLANE-1:0][PW-1:0]   tx_dcdl,
  output logic [PW-1:0]              tx_vref_code,
  output logic [3:0]                 rx_lat,
  // status and events
  output lt_state_t                  state,
  output logic                       train_done,
  output logic                       train_fail,
  output logic [15:0]                eye_tests,
  output logic                       evt_gain_up,
  output logic                       evt_bsearch,
  output logic                       evt_retry
);

  // ------------------------------------------------------------------
  // Clocking
  // ------------------------------------------------------------------
  logic [2:0] phy_phase;
  logic [15:0] dlf_code;
  logic lock_fb, lock_s1;

  mmdiv u_mmdiv (
    .clk_dco, .rst_n, .div1_sel, .div2_sel,
    .phy_clk, .sys_clk, .fb_clk, .phy_phase
  );

  adpll_dlf u_dlf (.clk(fb_clk), .rst_n, .d(tdc_d), .code(dlf_code), .lock(lock_fb));
  adpll_dsm u_dsm (.clk(fb_clk), .rst_n, .code(dlf_code), .fcw);

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) {pll_lock, lock_s1} <= '0;
    else        {pll_lock, lock_s1} <= {lock_s1, lock_fb};
  end

  // ------------------------------------------------------------------
  // Link training
  // ------------------------------------------------------------------
  trn_mode_t trn_mode;
  logic [PW-1:0] cur_time, cur_volt, ca_time, ca_volt, rd_time, rd_volt, wr_time, wr_volt;
  logic tx_valid, tx_clk_en;
  logic [CA_W-1:0] tx_pat;
  logic [NLANE-1:0][WORD_W-1:0] rx_word;
  logic zq_start, zq_done, zq_busy, zq_err;
  logic wl_start, wl_done, wl_busy;
  logic [NUM_BYTE-1:0] wl_found;
  logic eye_start, eye_x_only, eye_test_req, eye_test_ack, eye_test_pass;
  logic eye_done, eye_busy, eye_fail;
  logic [PW-1:0] eye_time, eye_volt, eye_xs, eye_xe, eye_ys, eye_ye, eye_tcen, eye_vcen;
  logic pg_restart, pg_next, pg_zero;
  logic [CA_W-1:0] pg_pat;
  logic [3:0] pg_idx;
  logic [NLANE-1:0][PW-1:0] lane_edge, lane_skew;
  logic [PW-1:0] skew_min;
  logic desk_start, desk_done;

  ltfsm #(.NLANE(NLANE), .PW(PW)) u_ltfsm (
    .clk(sys_clk), .rst_n, .pll_lock, .state, .dram_reset_n, .cs, .ca,
    .trn_mode, .cur_time, .cur_volt,
    .ca_time, .ca_volt, .rd_time, .rd_volt, .wr_time, .wr_volt,
    .rx_lat, .tx_valid, .tx_pat, .tx_clk_en, .rx_word, .cbt_fb,
    .zq_start, .zq_done, .wl_start, .wl_done,
    .eye_start, .eye_x_only, .eye_test_req, .eye_time, .eye_volt,
    .eye_test_ack, .eye_test_pass, .eye_done, .eye_fail,
    .eye_x_start(eye_xs), .eye_tcen, .eye_vcen,
    .pg_restart, .pg_next, .pg_pat,
    .lane_edge, .desk_start, .desk_done, .train_done, .train_fail
  );

  eye_detect_3step #(.T_STEPS(N_TIME), .V_STEPS(N_VOLT)) u_eye (
    .clk(sys_clk), .rst_n, .start(eye_start), .agc_en(1'b1), .x_only(eye_x_only),
    .test_req(eye_test_req), .time_code(eye_time), .volt_code(eye_volt),
    .test_ack(eye_test_ack), .test_pass(eye_test_pass),
    .done(eye_done), .busy(eye_busy), .fail(eye_fail),
    .x_start(eye_xs), .x_end(eye_xe), .y_start(eye_ys), .y_end(eye_ye),
    .time_center(eye_tcen), .volt_center(eye_vcen), .n_tests(eye_tests),
    .gain_up(evt_gain_up), .bsearch(evt_bsearch), .retry(evt_retry)
  );

  ca_pattern_gen u_pg (
    .clk(sys_clk), .rst_n, .restart(pg_restart), .next(pg_next),
    .pat(pg_pat), .idx(pg_idx), .is_zero(pg_zero)
  );

  zq_cal u_zq (
    .clk(sys_clk), .rst_n, .start(zq_start), .comp(zq_comp),
    .pu_phase(zq_pu_phase), .pd_code(zq_pd_code), .pu_code(zq_pu_code),
    .busy(zq_busy), .done(zq_done), .err(zq_err)
  );

  wr_leveling #(.NBYTE(NUM_BYTE)) u_wl (
    .clk(sys_clk), .rst_n, .start(wl_start), .fb(wl_fb),
    .sweep_code(wl_sweep_code), .dqs_pulse(wl_dqs_pulse),
    .code(dqs_code), .found(wl_found), .busy(wl_busy), .done(wl_done)
  );

  wr_deskew #(.NLANE(NLANE), .W(PW)) u_desk (
    .clk(sys_clk), .rst_n, .start(desk_start), .in_code(lane_edge),
    .out_code(lane_skew), .min_code(skew_min), .done(desk_done)
  );

  // Codes for the analog timing and reference circuits: the code under test
  // while a step sweeps it, the trained value otherwise.
  assign ca_time_code = (trn_mode == TM_CBT) ? cur_time : ca_time;
  assign ca_vref_code = (trn_mode == TM_CBT) ? cur_volt : ca_volt;
  assign rx_time_code = (trn_mode == TM_RD)  ? cur_time : rd_time;
  assign rx_vref_code = (trn_mode == TM_RD)  ? cur_volt : rd_volt;
  assign tx_vref_code = (trn_mode == TM_WR)  ? cur_volt : wr_volt;

  always_comb begin
    for (int i = 0; i < NLANE; i++) begin
      logic [PW:0] s;
      s = (PW+1)'((trn_mode == TM_WR) ? cur_time : wr_time) + (PW+1)'(lane_skew[i]);
      tx_dcdl[i] = s[PW] ? '1 : s[PW-1:0];
    end
  end

  // ------------------------------------------------------------------
  // Transmit lanes
  // ------------------------------------------------------------------
  clk_gate u_tx_cg (.clk(phy_clk), .rst_n, .en(tx_clk_en), .gclk(tx_gclk));

  logic tx_sync;
  assign tx_sync = (phy_phase == 3'd0);

  for (genvar i = 0; i < NLANE; i++) begin : g_tx
    logic d_r, d_f, oe_s;
    tx_ser16 u_ser (
      .clk(tx_gclk), .rst_n, .sync(tx_sync), .word(dq_word(tx_pat, i)),
      .valid(tx_valid), .lat(4'd0), .d_rise(d_r), .d_fall(d_f), .oe(oe_s)
    );
    tx_deemph u_de (
      .clk(tx_gclk), .rst_n, .en(deemph_en), .d_rise(d_r), .d_fall(d_f),
      .main_rise(dq_main_rise[i]), .main_fall(dq_main_fall[i]),
      .tap_rise(dq_tap_rise[i]), .tap_fall(dq_tap_fall[i])
    );
    always_ff @(posedge tx_gclk or negedge rst_n) begin
      if (!rst_n) dq_oe[i] <= 1'b0;
      else        dq_oe[i] <= oe_s;
    end
  end

  // ------------------------------------------------------------------
  // Receive
  // ------------------------------------------------------------------
  logic fifo_en;
  logic [NUM_BYTE-1:0] ydqsn, fbp;

  rx_enable_ctrl u_rxen (
    .clk(phy_clk), .rst_n, .cmd_valid(cs), .cmd(ca), .rd_dly, .rx_on, .fifo_en
  );

  for (genvar b = 0; b < NUM_BYTE; b++) begin : g_dqs
    af_ctle u_ctle (
      .rx_en(rx_on), .dqsp_mv(dqs_p_mv[b]), .dqsn_mv(dqs_n_mv[b]),
      .ydqsp(ydqs[b]), .ydqsn(ydqsn[b]), .fbp(fbp[b])
    );
  end

  for (genvar i = 0; i < NLANE; i++) begin : g_rx
    localparam int unsigned BYTE = (i < 8 || i == 16) ? 0 : 1;
    logic [3:0] dqb;
    logic wv;
    rx_des4 u_des4 (.ydqs(ydqs[BYTE]), .rst_n, .ydq(ydq[i]), .dqb);
    rx_des16 u_des16 (
      .clk(phy_clk), .rst_n, .fifo_en, .lat(rx_lat), .dqb,
      .word(rx_word[i]), .word_valid(wv)
    );
  end

  wire unused_ok = ^{g_rx[0].wv, zq_busy, zq_err, wl_busy, wl_found, eye_busy, eye_xe, eye_ys, eye_ye,
                     pg_idx, pg_zero, skew_min, ydqsn, fbp};

endmodule
