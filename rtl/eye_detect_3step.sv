// eye_detect_3step: adaptive 1x2y3x eye-center detection.
//
// Three one-axis sweeps replace a full two-dimensional scan of the eye:
//   1x  sweep the sampling time with the reference voltage fixed at VREF_INIT;
//   2y  sweep the reference voltage with the time fixed at the 1x center;
//   3x  sweep the time again with the voltage fixed at the 2y center.
// The eye center is (3x center, 2y center). Only four boundary registers
// (x start/end, y start/end) are kept; each center is their average.
// Every sweep runs on one agc_sweep engine, so with agc_en set the test count
// drops from 2*T_STEPS + V_STEPS (584 at 256 x 72) to about 133 + 41 + 133.
//
// If a sweep finds no passing code, the fixed coordinate is moved by
// RETRY_STEP codes and the sweep is repeated (voltage moved for an x sweep,
// time moved for the y sweep), up to MAX_RETRY times; `fail` is then set.
// x_only runs the 1x sweep alone (used for per-lane edge searches).
//
// Interface: start pulse; test_req with (time_code, volt_code) asks the link
// to test one point, test_ack/test_pass return the verdict (any latency).
// done pulses at the end; results hold until the next start.
// The three-sweep order, the averaging of two boundaries, the retry on a
// missing pass zone and the 256 x 72 axis sizes follow the source design;
// the retry step size and VREF_INIT code are this design's own choices.
module eye_detect_3step #(
  parameter int unsigned T_STEPS    = 256,
  parameter int unsigned V_STEPS    = 72,
  parameter int unsigned VREF_INIT  = 33,  // 23.2 % of VDDQ at 10 % + 0.4 %/code
  parameter int unsigned K_MAX      = 2,
  parameter int unsigned ALPHA      = 1,
  parameter int unsigned RETRY_STEP = 8,
  parameter int unsigned MAX_RETRY  = 8,
  localparam int unsigned PW        = $clog2(T_STEPS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          agc_en,
  input  logic          x_only,
  output logic          test_req,
  output logic [PW-1:0] time_code,
  output logic [PW-1:0] volt_code,
  input  logic          test_ack,
  input  logic          test_pass,
  output logic          done,
  output logic          busy,
  output logic          fail,
  output logic [PW-1:0] x_start,
  output logic [PW-1:0] x_end,
  output logic [PW-1:0] y_start,
  output logic [PW-1:0] y_end,
  output logic [PW-1:0] time_center,
  output logic [PW-1:0] volt_center,
  output logic [15:0]   n_tests,
  output logic          gain_up,
  output logic          bsearch,
  output logic          retry
);

  typedef enum logic [2:0] {E_IDLE, E_X1, E_Y2, E_X3, E_WAIT, E_DONE} est_t;
  est_t st, sweep_kind;

  logic          sw_start, sw_done, sw_busy, sw_found;
  logic [PW-1:0] sw_len, sw_pos, sw_ps, sw_pe;
  logic [15:0]   sw_tests;
  logic [PW-1:0] fix_time, fix_volt;
  logic [$clog2(MAX_RETRY+1)-1:0] n_retry;

  agc_sweep #(.NMAX(T_STEPS), .K_MAX(K_MAX), .ALPHA(ALPHA)) u_sweep (
    .clk, .rst_n,
    .start(sw_start), .agc_en, .len(sw_len),
    .test_req, .test_pos(sw_pos), .test_ack, .test_pass,
    .done(sw_done), .busy(sw_busy), .found(sw_found),
    .pass_start(sw_ps), .pass_end(sw_pe), .n_tests(sw_tests),
    .gain_up, .bsearch
  );

  assign sw_len    = (sweep_kind == E_Y2) ? PW'(V_STEPS) : PW'(T_STEPS);
  assign time_code = (sweep_kind == E_Y2) ? fix_time : sw_pos;
  assign volt_code = (sweep_kind == E_Y2) ? sw_pos : fix_volt;
  assign busy      = (st != E_IDLE);

  function automatic logic [PW-1:0] avg(input logic [PW-1:0] a, input logic [PW-1:0] b);
    logic [PW:0] s;
    s = (PW+1)'(a) + (PW+1)'(b);
    return s[PW:1];
  endfunction

  function automatic logic [PW-1:0] wrap_add(input logic [PW-1:0] a, input int unsigned lim);
    logic [PW:0] s;
    s = (PW+1)'(a) + (PW+1)'(RETRY_STEP);
    if (s >= (PW+1)'(lim)) s = s - (PW+1)'(lim);
    return s[PW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= E_IDLE;
      sweep_kind  <= E_X1;
      sw_start    <= 1'b0;
      fix_time    <= '0;
      fix_volt    <= '0;
      n_retry     <= '0;
      done        <= 1'b0;
      fail        <= 1'b0;
      retry       <= 1'b0;
      x_start     <= '0;
      x_end       <= '0;
      y_start     <= '0;
      y_end       <= '0;
      time_center <= '0;
      volt_center <= '0;
      n_tests     <= '0;
    end else begin
      sw_start <= 1'b0;
      done     <= 1'b0;
      retry    <= 1'b0;
      unique case (st)
        E_IDLE: if (start) begin
          fix_volt   <= PW'(VREF_INIT);
          fix_time   <= '0;
          n_retry    <= '0;
          n_tests    <= '0;
          fail       <= 1'b0;
          sweep_kind <= E_X1;
          sw_start   <= 1'b1;
          st         <= E_WAIT;
        end

        E_WAIT: if (sw_done) begin
          n_tests <= n_tests + sw_tests;
          if (!sw_found) begin
            if (n_retry == ($clog2(MAX_RETRY+1))'(MAX_RETRY)) begin
              fail <= 1'b1;
              st   <= E_DONE;
            end else begin
              // No pass zone on this line: move the fixed coordinate, retry.
              n_retry  <= n_retry + 1'b1;
              retry    <= 1'b1;
              if (sweep_kind == E_Y2) fix_time <= wrap_add(fix_time, T_STEPS);
              else                    fix_volt <= wrap_add(fix_volt, V_STEPS);
              sw_start <= 1'b1;
            end
          end else begin
            n_retry <= '0;
            unique case (sweep_kind)
              E_X1: begin
                x_start     <= sw_ps;
                x_end       <= sw_pe;
                time_center <= avg(sw_ps, sw_pe);
                volt_center <= fix_volt;
                if (x_only) begin
                  st <= E_DONE;
                end else begin
                  fix_time   <= avg(sw_ps, sw_pe);
                  sweep_kind <= E_Y2;
                  sw_start   <= 1'b1;
                end
              end
              E_Y2: begin
                y_start     <= sw_ps;
                y_end       <= sw_pe;
                volt_center <= avg(sw_ps, sw_pe);
                fix_volt    <= avg(sw_ps, sw_pe);
                sweep_kind  <= E_X3;
                sw_start    <= 1'b1;
              end
              default: begin
                x_start     <= sw_ps;
                x_end       <= sw_pe;
                time_center <= avg(sw_ps, sw_pe);
                st          <= E_DONE;
              end
            endcase
          end
        end

        E_DONE: begin
          done <= 1'b1;
          st   <= E_IDLE;
        end

        default: st <= E_IDLE;
      endcase
    end
  end

  wire unused_ok = sw_busy;

endmodule
