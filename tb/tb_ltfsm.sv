// tb_ltfsm: self-checking test of the link-training sequencer.
//
// The sequencer runs with the real adaptive eye-detection engine and CA
// pattern generator against a word-level channel model:
//  - CBT: CS-qualified CA words are returned on cbt_fb, inverted when the
//    CA codes are outside a rectangular CA eye;
//  - writes store each lane's expected training word, inverted when that
//    lane's transmit code (time code plus the deskew result) or the transmit
//    VREF is outside the lane's write eye; lanes have individual skews;
//  - reads return the stored words, inverted when the receive codes are
//    outside the read eye or the latency code is not 3 or 4;
//  - ZQ calibration, write leveling and the deskew calculation answer after
//    fixed delays (the deskew result is computed here from lane_edge).
// Checks: the states are visited in the documented order, the boot commands
// (4 MRW with operands, ZQ start/latch, CBT and write-leveling entry/exit)
// are sent once each, the DRAM reset is held T_RESET cycles, each eye search
// needs at most 307 tests (133 for the per-lane time-only search), all
// trained codes equal the eye centers, lane_edge equals each lane's write-eye
// start, the read latency is the middle of the passing range, the transmit
// clock runs for write bursts only, and training ends without failure.
module tb_ltfsm;
  import lp4_pkg::*;
  localparam int NL = NUM_LANE, PW = CODE_W, T_RESET = 16;
  localparam int CA_T0 = 40,  CA_T1 = 220, CA_V0 = 25, CA_V1 = 45;
  localparam int RD_T0 = 90,  RD_T1 = 170, RD_V0 = 40, RD_V1 = 65;
  localparam int WR_L  = 96,  WR_W  = 70,  WR_V0 = 30, WR_V1 = 60;
  localparam int SKEW [NL] = '{3, 7, 1, 12, 9, 4, 6, 2, 10, 5, 8, 11, 13, 3, 7, 1, 4, 9};
  localparam int SKEW_MIN = 1;

  logic clk = 0, rst_n = 1, pll_lock = 0;
  lt_state_t state;
  logic dram_reset_n, cs;
  logic [CA_W-1:0] ca, cbt_fb = '0;
  trn_mode_t trn_mode;
  logic [PW-1:0] cur_time, cur_volt, ca_time, ca_volt, rd_time, rd_volt, wr_time, wr_volt;
  logic [3:0] rx_lat;
  logic tx_valid, tx_clk_en;
  logic [CA_W-1:0] tx_pat;
  logic [NL-1:0][WORD_W-1:0] rx_word = '0;
  logic zq_start, zq_done = 0, wl_start, wl_done = 0;
  logic eye_start, eye_x_only, eye_test_req, eye_test_ack, eye_test_pass, eye_done, eye_fail;
  logic eye_busy, gain_up, bsearch, retry;
  logic [PW-1:0] eye_time, eye_volt, xs, xe, ys, ye, tcen, vcen;
  logic [15:0] n_tests;
  logic pg_restart, pg_next, pg_zero;
  logic [CA_W-1:0] pg_pat;
  logic [3:0] pg_idx;
  logic [NL-1:0][PW-1:0] lane_edge;
  logic desk_start, desk_done = 0;
  logic train_done, train_fail;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ltfsm #(.T_RESET(T_RESET)) dut (
    .clk, .rst_n, .pll_lock, .state, .dram_reset_n, .cs, .ca, .trn_mode, .cur_time, .cur_volt,
    .ca_time, .ca_volt, .rd_time, .rd_volt, .wr_time, .wr_volt, .rx_lat, .tx_valid, .tx_pat,
    .tx_clk_en, .rx_word, .cbt_fb, .zq_start, .zq_done, .wl_start, .wl_done,
    .eye_start, .eye_x_only, .eye_test_req, .eye_time, .eye_volt, .eye_test_ack, .eye_test_pass,
    .eye_done, .eye_fail, .eye_x_start(xs), .eye_tcen(tcen), .eye_vcen(vcen),
    .pg_restart, .pg_next, .pg_pat, .lane_edge, .desk_start, .desk_done, .train_done, .train_fail
  );

  eye_detect_3step u_eye (
    .clk, .rst_n, .start(eye_start), .agc_en(1'b1), .x_only(eye_x_only),
    .test_req(eye_test_req), .time_code(eye_time), .volt_code(eye_volt),
    .test_ack(eye_test_ack), .test_pass(eye_test_pass), .done(eye_done), .busy(eye_busy),
    .fail(eye_fail), .x_start(xs), .x_end(xe), .y_start(ys), .y_end(ye),
    .time_center(tcen), .volt_center(vcen), .n_tests, .gain_up, .bsearch, .retry
  );

  ca_pattern_gen u_pg (.clk, .rst_n, .restart(pg_restart), .next(pg_next), .pat(pg_pat),
                       .idx(pg_idx), .is_zero(pg_zero));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit in_box(int t, int v, int t0, int t1, int v0, int v1);
    return t >= t0 && t <= t1 && v >= v0 && v <= v1;
  endfunction

  // ---------------- channel model ----------------
  bit cbt_mode = 0, mrw_arg = 0;
  int n_cmd [64];
  int mrw_ops [$];
  int skew_res [NL];
  logic [WORD_W-1:0] mem [NL];
  initial for (int i = 0; i < NL; i++) begin skew_res[i] = 0; mem[i] = '0; end
  initial for (int c = 0; c < 64; c++) n_cmd[c] = 0;

  always @(posedge clk) begin
    int t, v;
    if (cs) begin
      if (cbt_mode) begin
        if (ca == CMD_CBT_EXT) begin cbt_mode <= 0; n_cmd[ca]++; end
        else cbt_fb <= in_box(int'(trn_mode == TM_CBT ? cur_time : ca_time),
                              int'(trn_mode == TM_CBT ? cur_volt : ca_volt),
                              CA_T0, CA_T1, CA_V0, CA_V1) ? ca : ~ca;
      end else if (mrw_arg) begin
        mrw_arg <= 0; mrw_ops.push_back(int'(ca));
      end else begin
        n_cmd[ca]++;
        if (ca == CMD_MRW) mrw_arg <= 1;
        if (ca == CMD_CBT_ENT) cbt_mode <= 1;
        if (ca == CMD_RD) begin
          t = int'(trn_mode == TM_RD ? cur_time : rd_time);
          v = int'(trn_mode == TM_RD ? cur_volt : rd_volt);
          for (int i = 0; i < NL; i++)
            rx_word[i] <= (in_box(t, v, RD_T0, RD_T1, RD_V0, RD_V1) &&
                           (rx_lat == 4'd3 || rx_lat == 4'd4)) ? mem[i] : ~mem[i];
        end
      end
    end
    if (tx_valid) begin
      check(tx_clk_en, "transmit clock running during write data");
      t = int'(trn_mode == TM_WR ? cur_time : wr_time);
      v = int'(trn_mode == TM_WR ? cur_volt : wr_volt);
      for (int i = 0; i < NL; i++)
        mem[i] = in_box(t + skew_res[i], v, WR_L + SKEW[i], WR_L + SKEW[i] + WR_W, WR_V0, WR_V1)
                 ? dq_word(tx_pat, i) : ~dq_word(tx_pat, i);
    end
  end

  initial forever begin
    @(posedge clk);
    if (zq_start) begin repeat (20) @(posedge clk); zq_done <= 1; @(posedge clk); zq_done <= 0; end
    if (wl_start) begin repeat (30) @(posedge clk); wl_done <= 1; @(posedge clk); wl_done <= 0; end
    if (desk_start) begin
      int mn;
      mn = 1 << PW;
      for (int i = 0; i < NL; i++) if (int'(lane_edge[i]) < mn) mn = int'(lane_edge[i]);
      repeat (NL) @(posedge clk);
      for (int i = 0; i < NL; i++) skew_res[i] = int'(lane_edge[i]) - mn;
      desk_done <= 1; @(posedge clk); desk_done <= 0;
    end
  end

  // ---------------- monitors ----------------
  lt_state_t order [$];
  int rst_low = 0, n_gate_on = 0, max_tests_2d = 0, max_tests_x = 0, n_gain = 0, n_bs = 0, n_retry = 0;
  logic en_q = 0;
  always @(posedge clk) begin
    if (order.size() == 0 || order[$] != state) order.push_back(state);
    if (!dram_reset_n && state == ST_RESET) rst_low++;
    en_q <= tx_clk_en;
    if (tx_clk_en && !en_q) n_gate_on++;
    if (eye_done) begin
      if (eye_x_only) begin if (int'(n_tests) > max_tests_x) max_tests_x = int'(n_tests); end
      else if (!retry && int'(n_tests) > max_tests_2d && state != ST_RD_EYE) max_tests_2d = int'(n_tests);
    end
    if (gain_up) n_gain++;
    if (bsearch) n_bs++;
    if (retry) n_retry++;
  end

  initial begin
    lt_state_t exp_order [15];
    int wt0, wt1;
    exp_order = '{ST_POWER_UP, ST_RESET, ST_DRAM_INIT, ST_MRW, ST_ZQ_START, ST_ZQ_LATCH, ST_CBT,
                  ST_WLVL, ST_RD_EYE, ST_RD_LAT, ST_RD_CAL, ST_WR_DQS2DQ, ST_WR_EYE, ST_WR_CAL,
                  ST_NORMAL};
    #1 rst_n = 0;
    #20 rst_n = 1;
    repeat (10) @(posedge clk);
    check(state == ST_POWER_UP, "waits for PLL lock");
    pll_lock = 1;
    wait (train_done || train_fail);
    repeat (5) @(posedge clk);
    check(train_done && !train_fail, "training completes");
    check(order.size() == 15, $sformatf("%0d states visited", order.size()));
    for (int i = 0; i < 15 && i < order.size(); i++)
      check(order[i] == exp_order[i], $sformatf("state %0d is %s", i, order[i].name()));
    check(rst_low >= T_RESET, $sformatf("DRAM reset low %0d cycles", rst_low));
    check(n_cmd[CMD_MRW] == 4 && mrw_ops.size() == 4, "four MRW commands");
    for (int i = 0; i < mrw_ops.size(); i++) check(mrw_ops[i] == 'h20 + i, "MRW operand");
    check(n_cmd[CMD_ZQ_STRT] == 1 && n_cmd[CMD_ZQ_LAT] == 1, "ZQ commands");
    check(n_cmd[CMD_CBT_ENT] == 1 && n_cmd[CMD_CBT_EXT] == 1, "CBT entry/exit");
    check(n_cmd[CMD_WL_ENT] == 1 && n_cmd[CMD_WL_EXT] == 1, "write-leveling entry/exit");
    check(int'(ca_time) == (CA_T0 + CA_T1) / 2 && int'(ca_volt) == (CA_V0 + CA_V1) / 2,
          $sformatf("CA codes %0d %0d", ca_time, ca_volt));
    check(int'(rd_time) == (RD_T0 + RD_T1) / 2 && int'(rd_volt) == (RD_V0 + RD_V1) / 2,
          $sformatf("read codes %0d %0d", rd_time, rd_volt));
    check(int'(wr_time) == WR_L + SKEW_MIN + WR_W / 2 && int'(wr_volt) == (WR_V0 + WR_V1) / 2,
          $sformatf("write codes %0d %0d", wr_time, wr_volt));
    for (int i = 0; i < NL; i++)
      check(int'(lane_edge[i]) == WR_L + SKEW[i], $sformatf("lane %0d edge %0d", i, lane_edge[i]));
    check(rx_lat == 4'd3, $sformatf("read latency %0d", rx_lat));
    check(max_tests_2d > 0 && max_tests_2d <= 307, $sformatf("2-D tests %0d", max_tests_2d));
    check(max_tests_x > 0 && max_tests_x <= 133, $sformatf("time-only tests %0d", max_tests_x));
    check(n_gate_on > 100, $sformatf("transmit clock started %0d times", n_gate_on));
    check(n_gain > 0 && n_bs > 0 && n_retry > 0,
          $sformatf("gain %0d bisect %0d retry %0d", n_gain, n_bs, n_retry));
    wt0 = n_gate_on;
    repeat (100) @(posedge clk);
    check(!tx_clk_en && n_gate_on == wt0, "transmit clock off in normal operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired in %s", state.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
