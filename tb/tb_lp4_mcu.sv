// tb_lp4_mcu: end-to-end test of the LPDDR4 controller core at full size.
//
// The controller (default parameters: 16 DQ + 2 DMI lanes, 256 x 72 training
// grid) is connected to a channel-and-DRAM model and runs the complete
// bring-up from power-up to normal operation. The model provides:
//  - a DCO clock (PHY_CLK period 8 time units) and a phase detector that
//    integrates the frequency error of the FCW, so the ADPLL loop must lock;
//  - a ZQ pad: 240 ohm reference against pull-down legs of 6000 ohm and
//    pull-up legs of 5000 ohm, giving expected codes 25 and 21;
//  - CA training: in CBT mode the DRAM returns the latched CA word, inverted
//    when the CA timing/VREF codes are outside a rectangular CA eye;
//  - write leveling: byte feedback turns to 1 from DQS codes 10 and 6;
//  - writes: every lane's DDR bits are collected from the serializer outputs
//    and stored, inverted when the lane's delay-line code or the transmit VREF
//    code is outside that lane's write eye; lanes have individual skews;
//  - reads: a fixed read latency later the DRAM drives both DQS strobes
//    (10 rising edges: 8 data beats and 2 postamble beats, +/-200 mV, idle
//    strobe at 0 mV with +/-20 mV noise) and the stored bits, inverted when
//    the receive codes are outside the read eye. The read eye does not
//    contain the initial VREF code, so the eye search must retry.
// Checks: training ends without failure, every state is visited, every
// trained code equals the center of the model's eyes, ZQ and leveling codes,
// deskew codes, clock ratios (SYS_CLK = PHY_CLK / 8, feedback = DCO / 20),
// test counts (<= 307 per 2-D search, <= 133 per time-only search), exactly
// 10 strobe edges per read burst, glitch-free gated clock pulses and a
// stopped transmit clock in normal operation. Each mechanism is counted and
// a mechanism that never happens is a failure.
module tb_lp4_mcu;
  import lp4_pkg::*;

  localparam int HALF = 4;          // DCO half period; PHY_CLK = DCO
  localparam int NL   = NUM_LANE;
  // channel model
  localparam int CA_T0 = 60,  CA_T1 = 200, CA_V0 = 20, CA_V1 = 50;
  localparam int RD_T0 = 70,  RD_T1 = 190, RD_V0 = 38, RD_V1 = 62;
  localparam int WR_L  = 100, WR_W  = 60,  WR_V0 = 22, WR_V1 = 48;
  localparam int TB_RL = 8;         // RD command to first strobe, PHY_CLK cycles
  localparam int FCW_T = 520;       // frequency control word the loop must find
  localparam int WL_THR0 = 10, WL_THR1 = 6;
  localparam int ZQ_PD_EXP = 25, ZQ_PU_EXP = 21;
  localparam int SKEW [NL] = '{5, 9, 2, 14, 7, 11, 3, 18, 6, 4, 12, 8, 15, 10, 2, 13, 9, 16};
  localparam int SKEW_MIN = 2;

  logic clk_dco = 0, rst_n = 1;
  logic signed [5:0] tdc_d = '0;
  logic [9:0] fcw;
  logic pll_lock, phy_clk, sys_clk, fb_clk;
  logic dram_reset_n, cs;
  logic [CA_W-1:0] ca, cbt_fb = '0;
  logic deemph_en = 1'b1;
  logic [NL-1:0] dq_main_rise, dq_main_fall, dq_tap_rise, dq_tap_fall, dq_oe;
  logic tx_gclk;
  logic [5:0] rd_dly = 6'd5;
  logic [NL-1:0] ydq = '0;
  logic signed [NUM_BYTE-1:0][11:0] dqs_p_mv, dqs_n_mv;
  logic [NUM_BYTE-1:0] ydqs;
  logic rx_on;
  logic zq_comp, zq_pu_phase;
  logic [5:0] zq_pd_code, zq_pu_code;
  logic [NUM_BYTE-1:0] wl_fb = '0;
  logic [6:0] wl_sweep_code;
  logic wl_dqs_pulse;
  logic [NUM_BYTE-1:0][6:0] dqs_code;
  logic [CODE_W-1:0] ca_time_code, ca_vref_code, rx_time_code, rx_vref_code, tx_vref_code;
  logic [NL-1:0][CODE_W-1:0] tx_dcdl;
  logic [3:0] rx_lat;
  lt_state_t state;
  logic train_done, train_fail;
  logic [15:0] eye_tests;
  logic evt_gain_up, evt_bsearch, evt_retry;

  int checks = 0, failures = 0;

  always #HALF clk_dco = ~clk_dco;

  lp4_mcu dut (
    .clk_dco, .rst_n, .div1_sel(2'd0), .div2_sel(2'd0),
    .tdc_d, .fcw, .pll_lock, .phy_clk, .sys_clk, .fb_clk,
    .dram_reset_n, .cs, .ca, .cbt_fb,
    .deemph_en, .dq_main_rise, .dq_main_fall, .dq_tap_rise, .dq_tap_fall, .dq_oe, .tx_gclk,
    .rd_dly, .ydq, .dqs_p_mv, .dqs_n_mv, .ydqs, .rx_on,
    .zq_comp, .zq_pu_phase, .zq_pd_code, .zq_pu_code,
    .wl_fb, .wl_sweep_code, .wl_dqs_pulse, .dqs_code,
    .ca_time_code, .ca_vref_code, .rx_time_code, .rx_vref_code, .tx_dcdl, .tx_vref_code,
    .rx_lat, .state, .train_done, .train_fail, .eye_tests,
    .evt_gain_up, .evt_bsearch, .evt_retry
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------------
  // ADPLL phase detector: integrates FCW_T - fcw, scaled by 1/4.
  // ------------------------------------------------------------------
  int ph = 0;
  always @(posedge fb_clk) begin
    int q;
    ph += FCW_T - int'(fcw);
    q = ph / 4;
    if (q > 31) q = 31;
    if (q < -31) q = -31;
    tdc_d <= 6'(q);
  end

  // ------------------------------------------------------------------
  // ZQ pad: comparator against VDDQ/2 of the two resistor dividers.
  // ------------------------------------------------------------------
  always_comb begin
    if (!zq_pu_phase) zq_comp = 6000 > 240 * int'(zq_pd_code);       // Rpd > 240
    else              zq_comp = 5000 * int'(zq_pd_code) <= 6000 * int'(zq_pu_code);  // Rpu <= Rpd
  end

  // ------------------------------------------------------------------
  // DRAM command decoder, CBT and write leveling
  // ------------------------------------------------------------------
  typedef enum {M_NORMAL, M_CBT, M_WL} dmode_t;
  dmode_t dmode = M_NORMAL;
  bit mrw_arg = 0;
  int n_mrw = 0, n_zq = 0, n_zqlat = 0, n_cbt_bad = 0, n_cbt_good = 0, n_rd = 0, n_wr = 0;

  function automatic bit in_box(int t, int v, int t0, int t1, int v0, int v1);
    return t >= t0 && t <= t1 && v >= v0 && v <= v1;
  endfunction

  always @(posedge sys_clk) begin
    if (cs) begin
      if (dmode == M_CBT) begin
        if (ca == CMD_CBT_EXT) dmode <= M_NORMAL;
        else if (in_box(int'(ca_time_code), int'(ca_vref_code), CA_T0, CA_T1, CA_V0, CA_V1)) begin
          cbt_fb <= ca; n_cbt_good++;
        end else begin
          cbt_fb <= ~ca; n_cbt_bad++;
        end
      end else if (mrw_arg) begin
        mrw_arg <= 0;
      end else begin
        unique case (ca)
          CMD_MRW:     begin mrw_arg <= 1; n_mrw++; end
          CMD_ZQ_STRT: n_zq++;
          CMD_ZQ_LAT:  n_zqlat++;
          CMD_CBT_ENT: dmode <= M_CBT;
          CMD_WL_ENT:  dmode <= M_WL;
          CMD_WL_EXT:  dmode <= M_NORMAL;
          CMD_RD:      n_rd++;
          CMD_WR:      n_wr++;
          default: ;
        endcase
      end
    end
    if (dmode == M_WL && wl_dqs_pulse) begin
      wl_fb[0] <= int'(wl_sweep_code) >= WL_THR0;
      wl_fb[1] <= int'(wl_sweep_code) >= WL_THR1;
    end
  end

  // ------------------------------------------------------------------
  // Write capture: DDR bits of each lane while its output is enabled.
  // ------------------------------------------------------------------
  logic [WORD_W-1:0] mem [NL];
  logic [WORD_W-1:0] wbuf [NL];
  int wcnt [NL];
  bit wbad [NL];
  int n_deemph = 0, n_tx_words = 0;

  initial for (int i = 0; i < NL; i++) begin
    mem[i] = '0; wbuf[i] = '0; wcnt[i] = 0; wbad[i] = 0;
  end

  always @(negedge phy_clk) begin
    for (int i = 0; i < NL; i++) begin
      if (dq_oe[i]) begin
        if (!in_box(int'(tx_dcdl[i]), int'(tx_vref_code), WR_L + SKEW[i],
                    WR_L + SKEW[i] + WR_W, WR_V0, WR_V1)) wbad[i] = 1;
        if (wcnt[i] < WORD_W - 1) begin
          wbuf[i][wcnt[i]]     = dq_main_rise[i];
          wbuf[i][wcnt[i] + 1] = dq_main_fall[i];
        end
        wcnt[i] += 2;
        if (dq_tap_rise[i] != dq_main_rise[i] || dq_tap_fall[i] != dq_main_fall[i]) n_deemph++;
      end else if (wcnt[i] != 0) begin
        if (wcnt[i] != WORD_W) begin
          failures++; checks++;
          $display("FAIL lane %0d burst of %0d bits", i, wcnt[i]);
        end
        mem[i] = wbad[i] ? ~wbuf[i] : wbuf[i];
        if (i == 0) n_tx_words++;
        wcnt[i] = 0; wbad[i] = 0;
      end
    end
  end

  // ------------------------------------------------------------------
  // Read bursts
  // ------------------------------------------------------------------
  int dqs_st = 0;   // 0 idle, 1 high, 2 low
  bit rd_prev = 0;

  always #1 begin
    for (int b = 0; b < NUM_BYTE; b++) begin
      int nz;
      nz = $urandom_range(0, 40) - 20;
      unique case (dqs_st)
        1:       begin dqs_p_mv[b] = 12'(200 + nz); dqs_n_mv[b] = -12'sd200; end
        2:       begin dqs_p_mv[b] = -12'sd200;     dqs_n_mv[b] = 12'(200 + nz); end
        default: begin dqs_p_mv[b] = 12'(nz);       dqs_n_mv[b] = '0; end
      endcase
    end
  end

  task automatic rd_burst();
    logic [WORD_W-1:0] w [NL];
    bit ok;
    ok = in_box(int'(rx_time_code), int'(rx_vref_code), RD_T0, RD_T1, RD_V0, RD_V1);
    for (int i = 0; i < NL; i++) w[i] = ok ? mem[i] : ~mem[i];
    repeat (TB_RL) @(posedge phy_clk);
    #1;
    for (int e = 0; e < 10; e++) begin
      for (int i = 0; i < NL; i++) ydq[i] = (e < 8) ? w[i][2*e] : 1'b0;
      #2 dqs_st = 1;
      #2 for (int i = 0; i < NL; i++) ydq[i] = (e < 8) ? w[i][2*e+1] : 1'b0;
      #2 dqs_st = 2;
      #2;
    end
    #2 dqs_st = 0;
  endtask

  always @(posedge phy_clk) begin
    bit r;
    r = cs && ca == CMD_RD && dmode == M_NORMAL && !mrw_arg;
    if (r && !rd_prev) fork rd_burst(); join_none
    rd_prev <= r;
  end

  // Strobe edges per receive window.
  int ydqs_edges = 0, n_bursts = 0, n_bad_bursts = 0;
  always @(posedge ydqs[0]) ydqs_edges++;
  always @(negedge rx_on) begin
    n_bursts++;
    if (ydqs_edges != 10) begin
      n_bad_bursts++;
      if (n_bad_bursts < 5) $display("burst with %0d strobe edges", ydqs_edges);
    end
    ydqs_edges = 0;
  end

  // ------------------------------------------------------------------
  // Gated transmit clock: pulse widths and start/stop count.
  // ------------------------------------------------------------------
  int n_gclk = 0, n_gate_on = 0, n_bad_pulse = 0;
  time t_rise = 0, t_last = 0;
  always @(posedge tx_gclk) begin
    if ($time - t_last > 2 * 2 * HALF) n_gate_on++;
    t_rise = $time;
    n_gclk++;
  end
  always @(negedge tx_gclk) begin
    if (t_rise != 0 && $time - t_rise != HALF) begin
      n_bad_pulse++;
      $display("%0t gated clock pulse of %0t", $time, $time - t_rise);
    end
    t_last = $time;
  end

  // ------------------------------------------------------------------
  // Events, states, clock ratios
  // ------------------------------------------------------------------
  int n_gain = 0, n_bs = 0, n_retry = 0;
  always @(posedge sys_clk) begin
    if (evt_gain_up) n_gain++;
    if (evt_bsearch) n_bs++;
    if (evt_retry)   n_retry++;
  end

  logic [15:0] seen = '0;
  lt_state_t prev_state = ST_POWER_UP;
  always @(posedge sys_clk) begin
    seen[state] <= 1'b1;
    prev_state <= state;
    if (prev_state != state) begin
      $display("%0t state %s tests=%0d", $time, prev_state.name(), eye_tests);
      if (prev_state == ST_CBT || prev_state == ST_WR_EYE)
        check(int'(eye_tests) <= 307, $sformatf("%s test count %0d", prev_state.name(), eye_tests));
      if (prev_state == ST_WR_DQS2DQ)
        check(int'(eye_tests) <= 133, $sformatf("tDQS2DQ test count %0d", eye_tests));
    end
  end

  time tp0, tp1, ts0, ts1, tf0, tf1;
  initial begin
    @(posedge rst_n);
    repeat (4) @(posedge phy_clk);
    @(posedge phy_clk) tp0 = $time;
    @(posedge phy_clk) tp1 = $time;
    @(posedge sys_clk) ts0 = $time;
    @(posedge sys_clk) ts1 = $time;
    @(posedge fb_clk) tf0 = $time;
    @(posedge fb_clk) tf1 = $time;
    check(tp1 - tp0 == 2 * HALF, "PHY_CLK period");
    check(ts1 - ts0 == 8 * (tp1 - tp0), $sformatf("SYS_CLK period %0t", ts1 - ts0));
    check(tf1 - tf0 == 20 * 2 * HALF, $sformatf("feedback period %0t", tf1 - tf0));
  end

  // ------------------------------------------------------------------
  // Main sequence
  // ------------------------------------------------------------------
  initial begin
    int n_g;
    #1 rst_n = 0;
    repeat (5) @(posedge clk_dco);
    rst_n = 1;
    wait (pll_lock);
    $display("%0t PLL locked, fcw=%0d", $time, fcw);
    wait (train_done || train_fail);
    repeat (4) @(posedge sys_clk);
    check(train_done && !train_fail, $sformatf("training done=%0d fail=%0d", train_done, train_fail));
    check(state == ST_NORMAL, "final state");
    check(seen[14:0] == '1, $sformatf("states visited %b", seen[14:0]));
    // ZQ and leveling
    check(int'(zq_pd_code) == ZQ_PD_EXP && int'(zq_pu_code) == ZQ_PU_EXP,
          $sformatf("ZQ codes pd=%0d pu=%0d", zq_pd_code, zq_pu_code));
    check(int'(dqs_code[0]) == WL_THR0 && int'(dqs_code[1]) == WL_THR1,
          $sformatf("DQS codes %0d %0d", dqs_code[0], dqs_code[1]));
    // trained codes
    check(int'(ca_time_code) == (CA_T0 + CA_T1) / 2 && int'(ca_vref_code) == (CA_V0 + CA_V1) / 2,
          $sformatf("CA codes %0d %0d", ca_time_code, ca_vref_code));
    check(int'(rx_time_code) == (RD_T0 + RD_T1) / 2 && int'(rx_vref_code) == (RD_V0 + RD_V1) / 2,
          $sformatf("RX codes %0d %0d", rx_time_code, rx_vref_code));
    check(int'(tx_vref_code) == (WR_V0 + WR_V1) / 2, $sformatf("TX VREF %0d", tx_vref_code));
    for (int i = 0; i < NL; i++)
      check(int'(tx_dcdl[i]) == (2 * (WR_L + SKEW_MIN) + WR_W) / 2 + SKEW[i] - SKEW_MIN,
            $sformatf("lane %0d delay code %0d", i, tx_dcdl[i]));
    check(rx_lat == 4'd3, $sformatf("read latency code %0d", rx_lat));
    check(n_mrw == 4 && n_zq == 1 && n_zqlat == 1, "boot command counts");
    // transmit clock stays stopped in normal operation
    n_g = n_gclk;
    repeat (200) @(posedge phy_clk);
    check(n_gclk == n_g, "transmit clock stopped when idle");
    // mechanisms
    $display("mechanisms: gain_up=%0d bisect=%0d retry=%0d cbt_bad=%0d cbt_good=%0d",
             n_gain, n_bs, n_retry, n_cbt_bad, n_cbt_good);
    $display("            reads=%0d writes=%0d bursts=%0d gate_starts=%0d deemph=%0d tx_words=%0d",
             n_rd, n_wr, n_bursts, n_gate_on, n_deemph, n_tx_words);
    check(n_gain > 0, "adaptive gain increase");
    check(n_bs > 0, "boundary bisection");
    check(n_retry > 0, "eye search retry");
    check(n_cbt_bad > 0 && n_cbt_good > 0, "CBT pass and fail points");
    check(n_bursts > 0 && n_bad_bursts == 0, $sformatf("read bursts %0d, %0d with wrong edge count",
                                                        n_bursts, n_bad_bursts));
    check(n_gate_on > 1 && n_bad_pulse == 0, $sformatf("gated clock starts %0d, bad pulses %0d",
                                                        n_gate_on, n_bad_pulse));
    check(n_deemph > 0, "de-emphasis tap active");
    check(n_tx_words > 0 && n_wr == n_tx_words, $sformatf("write bursts %0d for %0d WRITEs",
                                                           n_tx_words, n_wr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40_000_000;
    failures++;
    $display("watchdog expired in state %s", state.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
