// zq_cal: ZQ calibration logic for the LVSTL driver.
//
// Calibrates the number of enabled pull-down legs, then pull-up legs, against
// an external 240 ohm resistor on the ZQ pad. A comparator reports whether the
// pad is above VOH (comp = 1).
//  1. Pull-down: the resistor pulls the pad up, a pull-down replica with
//     pd_code legs pulls it down. From code 0 the code is raised while the pad
//     stays above VOH; the first code that brings it to or below VOH is kept.
//  2. Pull-up: pu_phase switches the resistor path to a pull-up replica
//     working against a pull-down replica at the calibrated code. From code 0
//     the pull-up code is raised until the pad reaches VOH.
// After every code change the comparator is given SETTLE cycles. done pulses
// at the end; pd_code and pu_code then hold the results that are shared with
// every transmitter.
// The two-phase pull-down-then-pull-up sequence, the 240 ohm reference and the
// counter-based search follow the source design; the code width, settling
// time and the upward search from code 0 are this design's own choices.
module zq_cal #(
  parameter int unsigned CODE_W = 6,
  parameter int unsigned SETTLE = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              comp,
  output logic              pu_phase,
  output logic [CODE_W-1:0] pd_code,
  output logic [CODE_W-1:0] pu_code,
  output logic              busy,
  output logic              done,
  output logic              err
);

  typedef enum logic [1:0] {Z_IDLE, Z_PD, Z_PU} zst_t;
  zst_t st;
  logic [$clog2(SETTLE+1)-1:0] wait_cnt;

  assign busy     = (st != Z_IDLE);
  assign pu_phase = (st == Z_PU);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= Z_IDLE;
      pd_code  <= '0;
      pu_code  <= '0;
      wait_cnt <= '0;
      done     <= 1'b0;
      err      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        Z_IDLE: if (start) begin
          st       <= Z_PD;
          pd_code  <= '0;
          pu_code  <= '0;
          err      <= 1'b0;
          wait_cnt <= ($clog2(SETTLE+1))'(SETTLE);
        end
        Z_PD: begin
          if (wait_cnt != 0) begin
            wait_cnt <= wait_cnt - 1'b1;
          end else if (comp && pd_code != '1) begin
            pd_code  <= pd_code + 1'b1;
            wait_cnt <= ($clog2(SETTLE+1))'(SETTLE);
          end else begin
            err      <= comp;
            st       <= Z_PU;
            wait_cnt <= ($clog2(SETTLE+1))'(SETTLE);
          end
        end
        Z_PU: begin
          if (wait_cnt != 0) begin
            wait_cnt <= wait_cnt - 1'b1;
          end else if (!comp && pu_code != '1) begin
            pu_code  <= pu_code + 1'b1;
            wait_cnt <= ($clog2(SETTLE+1))'(SETTLE);
          end else begin
            err  <= err | !comp;
            st   <= Z_IDLE;
            done <= 1'b1;
          end
        end
        default: st <= Z_IDLE;
      endcase
    end
  end

endmodule
