// ltfsm: link-training finite-state machine of the LPDDR4 controller.
//
// Runs the whole bring-up of one LPDDR4 channel in SYS_CLK (PHY_CLK / 8):
//   power-up (wait for PLL lock) -> DRAM reset -> DRAM init wait ->
//   mode-register writes -> ZQ calibration start -> ZQ latch ->
//   command-bus training (CBT) -> write leveling ->
//   read training: eye centering -> read latency -> calibration ->
//   write training: tDQS2DQ -> eye centering -> calibration -> normal operation.
//
// Eye centering in CBT, read and write training is done by the adaptive
// 1x2y3x engine (eye_detect_3step); this FSM turns each of its test requests
// into a test on the link and answers pass or fail:
//   CBT  : each of the ten patterns 0-A-0-B-0-C-0-D-0-E is sent on CA with a
//          CS pulse; the DRAM returns the latched CA on DQ (cbt_fb). The point
//          passes when all ten come back unchanged.
//   RD/WR: a WRITE command, then a 16-bit pattern word on every data lane,
//          then a READ command; RD_WAIT cycles later the deserialised words
//          are compared with the expected ones (lanes in lane_mask only).
// In read training the point under test moves the receive timing/VREF codes,
// in write training the transmit ones (trn_mode tells which). cur_time and
// cur_volt are the codes under test; after each step they return to the
// trained values.
// Read latency: the 4:16 deserializer latency code is swept 0..15 at the
// trained read point and set to the middle of the passing range.
// tDQS2DQ: the time axis is swept once per data lane (x-only sweep, one lane
// checked) to find where each lane's write eye begins; wr_deskew then removes
// the common minimum. "Calibration" steps commit the trained codes.
// Commands are single CA words qualified by CS, one SYS_CLK cycle each; an
// MRW is followed by its operand word 0x20 + register index.
// Before training, all timing codes sit at T_NOM (mid range) and all VREF
// codes at V_NOM, so the write half of a read-training test point works at
// low speed with untrained transmit codes.
// tx_clk_en opens the transmit clock gate only from the WRITE command until
// the burst has left the serializers, so the transmit clock tree is stopped
// during CA training, reads and in normal operation while idle.
//
// The order of steps follows the source design's training flow; the test
// procedures, command encoding, waiting times and the MRW list are this
// design's own. Waiting times are in SYS_CLK cycles and are parameters.
module ltfsm
  import lp4_pkg::*;
#(
  parameter int unsigned NLANE    = NUM_LANE,
  parameter int unsigned PW       = CODE_W,
  parameter int unsigned T_RESET  = 16,   // DRAM reset low time
  parameter int unsigned T_INIT   = 32,   // wait after reset release
  parameter int unsigned N_MRW    = 4,    // mode registers written at boot
  parameter int unsigned T_MRW    = 4,
  parameter int unsigned T_ZQ     = 32,   // DRAM ZQ calibration time
  parameter int unsigned T_ZQLAT  = 4,
  parameter int unsigned T_MODE   = 4,    // wait after a mode entry/exit
  parameter int unsigned CBT_WAIT = 3,    // CA-to-feedback wait in CBT
  parameter int unsigned WL_CYC   = 1,    // WRITE command to write data
  parameter int unsigned RD_WAIT  = 8,    // READ command to word compare
  parameter int unsigned RL_INIT  = 4,    // latency code before training
  parameter int unsigned T_NOM    = T_STEPS / 2,  // untrained time code
  parameter int unsigned V_NOM    = 33            // untrained VREF code
) (
  input  logic                        clk,       // SYS_CLK
  input  logic                        rst_n,
  input  logic                        pll_lock,
  output lt_state_t                   state,
  output logic                        dram_reset_n,
  output logic                        cs,
  output logic [CA_W-1:0]             ca,
  output trn_mode_t                   trn_mode,
  output logic [PW-1:0]               cur_time,
  output logic [PW-1:0]               cur_volt,
  output logic [PW-1:0]               ca_time, ca_volt,
  output logic [PW-1:0]               rd_time, rd_volt,
  output logic [PW-1:0]               wr_time, wr_volt,
  output logic [3:0]                  rx_lat,
  output logic                        tx_valid,
  output logic [CA_W-1:0]             tx_pat,
  output logic                        tx_clk_en,
  input  logic [NLANE-1:0][WORD_W-1:0] rx_word,
  input  logic [CA_W-1:0]             cbt_fb,
  // ZQ calibration logic
  output logic                        zq_start,
  input  logic                        zq_done,
  // write leveling
  output logic                        wl_start,
  input  logic                        wl_done,
  // eye detection engine
  output logic                        eye_start,
  output logic                        eye_x_only,
  input  logic                        eye_test_req,
  input  logic [PW-1:0]               eye_time,
  input  logic [PW-1:0]               eye_volt,
  output logic                        eye_test_ack,
  output logic                        eye_test_pass,
  input  logic                        eye_done,
  input  logic                        eye_fail,
  input  logic [PW-1:0]               eye_x_start,
  input  logic [PW-1:0]               eye_tcen,
  input  logic [PW-1:0]               eye_vcen,
  // CA training patterns
  output logic                        pg_restart,
  output logic                        pg_next,
  input  logic [CA_W-1:0]             pg_pat,
  // tDQS2DQ deskew
  output logic [NLANE-1:0][PW-1:0]    lane_edge,
  output logic                        desk_start,
  input  logic                        desk_done,
  output logic                        train_done,
  output logic                        train_fail
);

  typedef enum logic [3:0] {
    P_IDLE, P_CBT_SEND, P_CBT_WAIT, P_WR_CMD, P_WR_WAIT, P_WR_DATA,
    P_RD_CMD, P_RD_WAIT, P_DONE
  } pst_t;

  typedef enum logic [2:0] {
    Q_ENTER, Q_RUN, Q_WAIT, Q_EXIT, Q_END
  } sub_t;

  pst_t        pst;
  sub_t        sub;
  logic [15:0] tmr;
  logic [3:0]  k;              // loop counter (MRW index, CBT entry, ...)
  logic        probe_go, probe_done, probe_pass, probe_ok;
  logic [2:0]  pat_idx;
  logic [4:0]  lane_idx;
  logic        per_lane;
  logic [3:0]  lat_try;
  logic        lat_found;
  logic [3:0]  lat_lo, lat_hi;

  // ---------------------------------------------------------------------
  // Test-point procedure (probe)
  // ---------------------------------------------------------------------
  function automatic logic words_ok(input logic [NLANE-1:0][WORD_W-1:0] w,
                                    input logic [CA_W-1:0] p, input logic one,
                                    input logic [4:0] sel);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < NLANE; i++)
      if ((!one || sel == 5'(i)) && w[i] != dq_word(p, i)) ok = 1'b0;
    return ok;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst        <= P_IDLE;
      probe_done <= 1'b0;
      probe_pass <= 1'b0;
      probe_ok   <= 1'b1;
      pat_idx    <= '0;
      tx_valid   <= 1'b0;
      tx_pat     <= '0;
    end else begin
      probe_done <= 1'b0;
      tx_valid   <= 1'b0;
      unique case (pst)
        P_IDLE: if (probe_go) begin
          probe_ok <= 1'b1;
          if (trn_mode == TM_CBT) begin
            pst        <= P_CBT_SEND;
          end else begin
            pst <= P_WR_CMD;
          end
        end
        P_CBT_SEND: pst <= P_CBT_WAIT;
        P_CBT_WAIT: if (tmr == 16'(CBT_WAIT)) begin
          if (cbt_fb != pg_pat) probe_ok <= 1'b0;
          if (k == 4'd9) pst <= P_DONE;
          else           pst <= P_CBT_SEND;
        end
        P_WR_CMD:  pst <= P_WR_WAIT;
        P_WR_WAIT: if (tmr == 16'(WL_CYC)) begin
          tx_valid <= 1'b1;
          tx_pat   <= ca_pat(pat_idx);
          pst      <= P_WR_DATA;
        end
        P_WR_DATA: if (tmr == 16'd2) pst <= P_RD_CMD;
        P_RD_CMD:  pst <= P_RD_WAIT;
        P_RD_WAIT: if (tmr == 16'(RD_WAIT)) begin
          probe_ok <= words_ok(rx_word, tx_pat, per_lane, lane_idx);
          pat_idx  <= (pat_idx == 3'd4) ? 3'd0 : pat_idx + 3'd1;
          pst      <= P_DONE;
        end
        P_DONE: begin
          probe_done <= 1'b1;
          probe_pass <= probe_ok;
          pst        <= P_IDLE;
        end
        default: pst <= P_IDLE;
      endcase
    end
  end

  // The pattern generator steps in the same cycle the probe moves on, so the
  // next CS pulse already carries the next pattern.
  assign pg_restart = (pst == P_IDLE) && probe_go && (trn_mode == TM_CBT);
  assign pg_next    = (pst == P_CBT_WAIT) && (tmr == 16'(CBT_WAIT));

  // Transmit clock gate control: the transmit clock tree runs only from the
  // WRITE command until the burst has left the serializers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tx_clk_en <= 1'b0;
    else        tx_clk_en <= (pst == P_WR_CMD) || (pst == P_WR_WAIT) || (pst == P_WR_DATA);
  end

  // Probe-local timer and CBT entry counter.
  logic [15:0] ptmr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptmr <= '0;
      k    <= '0;
    end else begin
      if (pst == P_IDLE) k <= '0;
      else if (pst == P_CBT_WAIT && ptmr == 16'(CBT_WAIT)) k <= k + 4'd1;
      if (pst == P_CBT_WAIT || pst == P_WR_WAIT || pst == P_WR_DATA || pst == P_RD_WAIT)
        ptmr <= ptmr + 16'd1;
      else
        ptmr <= '0;
    end
  end
  assign tmr = ptmr;

  // Command bus: one-cycle commands from the main FSM and the probe.
  logic            mcmd_v;
  logic [CA_W-1:0] mcmd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs <= 1'b0;
      ca <= '0;
    end else begin
      cs <= 1'b0;
      ca <= '0;
      if (mcmd_v) begin
        cs <= 1'b1; ca <= mcmd;
      end else if (pst == P_CBT_SEND) begin
        cs <= 1'b1; ca <= pg_pat;
      end else if (pst == P_WR_CMD) begin
        cs <= 1'b1; ca <= CMD_WR;
      end else if (pst == P_RD_CMD) begin
        cs <= 1'b1; ca <= CMD_RD;
      end
    end
  end

  // ---------------------------------------------------------------------
  // Main sequence
  // ---------------------------------------------------------------------
  logic [15:0] wt;   // main-sequence wait timer


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= ST_POWER_UP;
      sub           <= Q_ENTER;
      wt            <= '0;
      dram_reset_n  <= 1'b0;
      mcmd_v        <= 1'b0;
      mcmd          <= CMD_NOP;
      trn_mode      <= TM_NONE;
      cur_time      <= '0;
      cur_volt      <= '0;
      ca_time       <= PW'(T_NOM);
      ca_volt       <= PW'(V_NOM);
      rd_time       <= PW'(T_NOM);
      rd_volt       <= PW'(V_NOM);
      wr_time       <= PW'(T_NOM);
      wr_volt       <= PW'(V_NOM);
      rx_lat        <= 4'(RL_INIT);
      zq_start      <= 1'b0;
      wl_start      <= 1'b0;
      eye_start     <= 1'b0;
      eye_x_only    <= 1'b0;
      eye_test_ack  <= 1'b0;
      eye_test_pass <= 1'b0;
      probe_go      <= 1'b0;
      lane_idx      <= '0;
      per_lane      <= 1'b0;
      lane_edge     <= '0;
      desk_start    <= 1'b0;
      lat_try       <= '0;
      lat_found     <= 1'b0;
      lat_lo        <= '0;
      lat_hi        <= '0;
      train_done    <= 1'b0;
      train_fail    <= 1'b0;
    end else begin
      mcmd_v       <= 1'b0;
      zq_start     <= 1'b0;
      wl_start     <= 1'b0;
      eye_start    <= 1'b0;
      eye_test_ack <= 1'b0;
      probe_go     <= 1'b0;
      desk_start   <= 1'b0;
      wt           <= wt + 16'd1;

      // Eye-engine test requests become probes at the requested point.
      if (eye_test_req && pst == P_IDLE && !probe_go && !eye_test_ack && !probe_done) begin
        cur_time <= eye_time;
        cur_volt <= eye_volt;
        probe_go <= 1'b1;
      end
      if (probe_done && (state == ST_CBT || state == ST_RD_EYE || state == ST_WR_DQS2DQ ||
                         state == ST_WR_EYE)) begin
        eye_test_ack  <= 1'b1;
        eye_test_pass <= probe_pass;
      end

      unique case (state)
        ST_POWER_UP: if (pll_lock) begin
          state <= ST_RESET; wt <= '0;
        end
        ST_RESET: begin
          dram_reset_n <= 1'b0;
          if (wt == 16'(T_RESET)) begin
            dram_reset_n <= 1'b1; state <= ST_DRAM_INIT; wt <= '0;
          end
        end
        ST_DRAM_INIT: if (wt == 16'(T_INIT)) begin
          state <= ST_MRW; wt <= '0; lat_try <= '0;
        end
        ST_MRW: begin
          // MRW command, then the register index on CA (0x20 + index, outside the
          // command codes), then T_MRW wait.
          if (wt == 16'd0) begin
            mcmd_v <= 1'b1; mcmd <= CMD_MRW;
          end else if (wt == 16'd1) begin
            mcmd_v <= 1'b1; mcmd <= CA_W'(6'h20) | CA_W'(lat_try);
          end else if (wt == 16'(T_MRW + 1)) begin
            wt <= '0;
            if (lat_try == 4'(N_MRW - 1)) begin
              lat_try <= '0; state <= ST_ZQ_START;
            end else lat_try <= lat_try + 4'd1;
          end
        end
        ST_ZQ_START: begin
          if (wt == 16'd0) begin
            mcmd_v <= 1'b1; mcmd <= CMD_ZQ_STRT; zq_start <= 1'b1;
            sub <= Q_WAIT;
          end else if (zq_done) begin
            sub <= Q_END;
          end
          if (wt >= 16'(T_ZQ) && (sub == Q_END || zq_done)) begin
            state <= ST_ZQ_LATCH; wt <= '0; sub <= Q_ENTER;
          end
        end
        ST_ZQ_LATCH: begin
          if (wt == 16'd0) begin
            mcmd_v <= 1'b1; mcmd <= CMD_ZQ_LAT;
          end else if (wt == 16'(T_ZQLAT)) begin
            state <= ST_CBT; wt <= '0; sub <= Q_ENTER;
          end
        end

        // Eye-centering steps share one flow: enter mode, run, exit mode.
        ST_CBT, ST_RD_EYE, ST_WR_EYE: begin
          unique case (sub)
            Q_ENTER: begin
              if (state == ST_CBT) begin
                trn_mode <= TM_CBT;
                if (wt == 16'd0) begin mcmd_v <= 1'b1; mcmd <= CMD_CBT_ENT; end
              end else begin
                trn_mode <= (state == ST_RD_EYE) ? TM_RD : TM_WR;
              end
              if (wt == 16'(T_MODE)) begin
                per_lane   <= 1'b0;
                eye_x_only <= 1'b0;
                eye_start  <= 1'b1;
                sub        <= Q_RUN;
              end
            end
            Q_RUN: if (eye_done) begin
              if (eye_fail) train_fail <= 1'b1;
              cur_time <= eye_tcen;
              cur_volt <= eye_vcen;
              if (state == ST_CBT) begin
                ca_time <= eye_tcen; ca_volt <= eye_vcen;
              end else if (state == ST_RD_EYE) begin
                rd_time <= eye_tcen; rd_volt <= eye_vcen;
              end else begin
                wr_time <= eye_tcen; wr_volt <= eye_vcen;
              end
              sub <= Q_EXIT; wt <= '0;
            end
            Q_EXIT: begin
              if (state == ST_CBT && wt == 16'd0) begin
                mcmd_v <= 1'b1; mcmd <= CMD_CBT_EXT;
              end
              if (wt == 16'(T_MODE)) begin
                sub <= Q_ENTER; wt <= '0;
                unique case (state)
                  ST_CBT:    state <= ST_WLVL;
                  ST_RD_EYE: begin state <= ST_RD_LAT; lat_try <= '0; lat_found <= 1'b0; end
                  default:   state <= ST_WR_CAL;
                endcase
              end
            end
            default: sub <= Q_ENTER;
          endcase
        end

        ST_WLVL: begin
          trn_mode <= TM_NONE;
          unique case (sub)
            Q_ENTER: begin
              if (wt == 16'd0) begin mcmd_v <= 1'b1; mcmd <= CMD_WL_ENT; end
              if (wt == 16'(T_MODE)) begin wl_start <= 1'b1; sub <= Q_RUN; end
            end
            Q_RUN: if (wl_done) begin sub <= Q_EXIT; wt <= '0; end
            default: begin
              if (wt == 16'd0) begin mcmd_v <= 1'b1; mcmd <= CMD_WL_EXT; end
              if (wt == 16'(T_MODE)) begin
                state <= ST_RD_EYE; sub <= Q_ENTER; wt <= '0;
              end
            end
          endcase
        end

        ST_RD_LAT: begin
          // Sweep the deserializer latency at the trained read point.
          trn_mode <= TM_RD;
          cur_time <= rd_time;
          cur_volt <= rd_volt;
          unique case (sub)
            Q_ENTER: begin
              rx_lat   <= lat_try;
              sub      <= Q_RUN;
              probe_go <= 1'b1;
            end
            Q_RUN: if (probe_done) begin
              if (probe_pass) begin
                if (!lat_found) lat_lo <= lat_try;
                lat_hi    <= lat_try;
                lat_found <= 1'b1;
              end
              if (lat_try == 4'd15) sub <= Q_END;
              else begin lat_try <= lat_try + 4'd1; sub <= Q_ENTER; end
            end
            default: begin
              if (lat_found) rx_lat <= 4'((5'(lat_lo) + 5'(lat_hi)) >> 1);
              else begin rx_lat <= 4'(RL_INIT); train_fail <= 1'b1; end
              state <= ST_RD_CAL; sub <= Q_ENTER; wt <= '0;
            end
          endcase
        end

        ST_RD_CAL: begin
          // Commit the trained read codes.
          cur_time <= rd_time;
          cur_volt <= rd_volt;
          state    <= ST_WR_DQS2DQ;
          sub      <= Q_ENTER;
          lane_idx <= '0;
          wt       <= '0;
        end

        ST_WR_DQS2DQ: begin
          trn_mode <= TM_WR;
          unique case (sub)
            Q_ENTER: begin
              per_lane   <= 1'b1;
              eye_x_only <= 1'b1;
              eye_start  <= 1'b1;
              sub        <= Q_RUN;
            end
            Q_RUN: if (eye_done) begin
              if (eye_fail) train_fail <= 1'b1;
              lane_edge[lane_idx] <= eye_x_start;
              if (lane_idx == 5'(NLANE - 1)) begin
                per_lane   <= 1'b0;
                desk_start <= 1'b1;
                sub        <= Q_WAIT;
              end else begin
                lane_idx <= lane_idx + 5'd1;
                sub      <= Q_ENTER;
              end
            end
            default: if (desk_done) begin
              state <= ST_WR_EYE; sub <= Q_ENTER; wt <= '0;
            end
          endcase
        end

        ST_WR_CAL: begin
          // Commit the trained write codes.
          cur_time   <= wr_time;
          cur_volt   <= wr_volt;
          trn_mode   <= TM_NONE;
          state      <= ST_NORMAL;
        end

        ST_NORMAL: begin
          train_done <= 1'b1;
        end

        default: state <= ST_POWER_UP;
      endcase
    end
  end

endmodule
