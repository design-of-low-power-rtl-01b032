// agc_sweep: one-axis eye-boundary search with adaptive gain control (AGC).
//
// The engine walks a training axis of `len` codes (0 .. len-1) and finds the
// first and last passing code of the eye opening. Each code is tested through
// a request/acknowledge handshake with whatever drives the link (test_req /
// test_pos out, test_ack / test_pass back).
//
// Adaptive gain: after ALPHA consecutive results that equal the previous one,
// the stride (gain) grows by one, up to K_MAX. When a result differs from the
// previous one, the boundary lies somewhere in the skipped gap; the engine then
// bisects that gap (binary search) until the exact boundary code is known, and
// re-initialises the gain to 1. The boundaries found are therefore identical
// to those of a plain step-by-step scan (agc_en = 0), while a scan of N codes
// needs only about N/K_MAX + K_MAX + 3*ALPHA tests.
//
// Results: pass_start / pass_end of the first contiguous pass window,
// `found` when any code passed, n_tests the number of tests used. done is a
// one-cycle pulse; results stay valid until the next start. gain_up and
// bsearch pulse once per gain increase and per bisection test.
//
// Timing: one test per handshake; the engine adds one cycle per test.
// The AGC and binary-search behaviour, K_MAX = 2 and ALPHA = 1 follow the
// source design; the handshake, the gain growing by one step at a time and
// the single-window assumption are this design's own choices.
module agc_sweep #(
  parameter int unsigned NMAX  = 256,  // largest axis length
  parameter int unsigned K_MAX = 2,    // maximum adaptive gain
  parameter int unsigned ALPHA = 1,    // equal results needed per gain step
  localparam int unsigned PW   = $clog2(NMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          agc_en,
  input  logic [PW-1:0] len,        // axis length, 2 .. NMAX
  output logic          test_req,
  output logic [PW-1:0] test_pos,
  input  logic          test_ack,
  input  logic          test_pass,
  output logic          done,
  output logic          busy,
  output logic          found,
  output logic [PW-1:0] pass_start,
  output logic [PW-1:0] pass_end,
  output logic [15:0]   n_tests,
  output logic          gain_up,
  output logic          bsearch
);

  typedef enum logic [1:0] {S_IDLE, S_TEST, S_BS, S_FIN} st_t;
  st_t st;

  logic [PW-1:0] pos, last_pos, lo, hi;
  logic [PW:0]   next_pos;
  logic [PW-1:0] gain;
  logic [PW-1:0] run;
  logic          prev, have_prev, end_set;
  logic [PW-1:0] mid;

  assign mid      = PW'((PW'(lo) + PW'(hi)) >> 1);
  assign next_pos = (PW+1)'(pos) + (PW+1)'(gain);
  assign busy     = (st != S_IDLE);
  assign test_req = (st == S_TEST) || (st == S_BS && (hi - lo) > PW'(1));
  assign test_pos = (st == S_BS) ? mid : pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      pos        <= '0;
      last_pos   <= '0;
      lo         <= '0;
      hi         <= '0;
      gain       <= PW'(1);
      run        <= '0;
      prev       <= 1'b0;
      have_prev  <= 1'b0;
      end_set    <= 1'b0;
      found      <= 1'b0;
      pass_start <= '0;
      pass_end   <= '0;
      n_tests    <= '0;
      done       <= 1'b0;
      gain_up    <= 1'b0;
      bsearch    <= 1'b0;
    end else begin
      done    <= 1'b0;
      gain_up <= 1'b0;
      bsearch <= 1'b0;
      unique case (st)
        S_IDLE: begin
          if (start) begin
            pos       <= '0;
            last_pos  <= '0;
            gain      <= PW'(1);
            run       <= '0;
            have_prev <= 1'b0;
            end_set   <= 1'b0;
            found     <= 1'b0;
            n_tests   <= '0;
            st        <= S_TEST;
          end
        end

        S_TEST: begin
          if (test_ack) begin
            n_tests <= n_tests + 16'd1;
            if (!have_prev || test_pass == prev || (pos - last_pos) <= PW'(1)) begin
              // No hidden gap: either the result repeats or the boundary is exact.
              if (!have_prev || test_pass == prev) begin
                if (agc_en && (run + PW'(1)) >= PW'(ALPHA) && gain < PW'(K_MAX)) begin
                  gain    <= gain + PW'(1);
                  run     <= '0;
                  gain_up <= 1'b1;
                end else begin
                  run <= run + PW'(1);
                end
              end else begin
                // Boundary exactly at pos: restart the gain ramp.
                gain <= PW'(1);
                run  <= '0;
              end
              if (!have_prev || test_pass != prev) begin
                if (test_pass && !found) begin
                  found      <= 1'b1;
                  pass_start <= pos;
                end else if (!test_pass && found && !end_set) begin
                  end_set  <= 1'b1;
                  pass_end <= pos - PW'(1);
                end
              end
              have_prev <= 1'b1;
              prev      <= test_pass;
              last_pos  <= pos;
              if (pos == len - PW'(1)) begin
                st <= S_FIN;
              end else if (next_pos > (PW+1)'(len - PW'(1))) begin
                pos <= len - PW'(1);
              end else begin
                pos <= next_pos[PW-1:0];
              end
            end else begin
              // Result changed across a gap: bisect (last_pos, pos].
              lo   <= last_pos;
              hi   <= pos;
              prev <= test_pass;   // value on the far side of the boundary
              st   <= S_BS;
            end
          end
        end

        S_BS: begin
          // Invariant: lo holds the old value (!prev), hi holds prev.
          if (hi - lo <= PW'(1)) begin
            gain     <= PW'(1);
            run      <= '0;
            last_pos <= pos;
            if (prev && !found) begin
              found      <= 1'b1;
              pass_start <= hi;
            end else if (!prev && found && !end_set) begin
              end_set  <= 1'b1;
              pass_end <= hi - PW'(1);
            end
            if (pos == len - PW'(1)) begin
              st <= S_FIN;
            end else begin
              pos <= pos + PW'(1);
              st  <= S_TEST;
            end
          end else if (test_ack) begin
            n_tests <= n_tests + 16'd1;
            bsearch <= 1'b1;
            if (test_pass == prev) hi <= mid;
            else                   lo <= mid;
          end
        end

        S_FIN: begin
          if (found && !end_set) pass_end <= len - PW'(1);
          done <= 1'b1;
          st   <= S_IDLE;
        end

        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
