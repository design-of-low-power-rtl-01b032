// adpll_dlf: digital loop filter of the ADPLL, with lock detector.
//
// The phase detector / TDC delivers a signed 6-bit phase error D[5:0] once
// per feedback-clock cycle (positive: the reference leads, the DCO is slow).
// The filter is proportional plus integral: the integral path accumulates
// D << KI_SHIFT, the proportional path adds D << KP_SHIFT, and the sum is the
// DCO control word with FRAC fractional bits, clamped to the code range.
// lock goes high after LOCK_N consecutive errors within +-LOCK_TH and drops
// on the first error outside it.
// Timing: code is registered, one DLF_CLK cycle after D.
// The P+I structure, the 6-bit error and the lock-detect output follow the
// source design; gains, thresholds and the start code are this design's own.
module adpll_dlf #(
  parameter int unsigned INT_W    = 10,
  parameter int unsigned FRAC     = 6,
  parameter int unsigned KP_SHIFT = 6,
  parameter int unsigned KI_SHIFT = 2,
  parameter int unsigned INIT     = 512,  // start code (integer part)
  parameter int unsigned LOCK_TH  = 1,
  parameter int unsigned LOCK_N   = 16,
  localparam int unsigned CW      = INT_W + FRAC
) (
  input  logic                 clk,    // DLF_CLK (feedback clock)
  input  logic                 rst_n,
  input  logic signed [5:0]    d,
  output logic [CW-1:0]        code,
  output logic                 lock
);

  localparam logic signed [CW+2:0] MAXV = (CW+3)'((1 << CW) - 1);

  logic signed [CW+2:0] integ, integ_n, sum;
  logic [$clog2(LOCK_N+1)-1:0] lcnt;
  logic signed [CW+2:0] dext;

  assign dext    = (CW+3)'(d);
  assign integ_n = integ + (dext <<< KI_SHIFT);
  assign sum     = integ_n + (dext <<< KP_SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ <= (CW+3)'(INIT << FRAC);
      code  <= CW'(INIT << FRAC);
      lcnt  <= '0;
      lock  <= 1'b0;
    end else begin
      if      (integ_n < 0)    integ <= '0;
      else if (integ_n > MAXV) integ <= MAXV;
      else                     integ <= integ_n;
      if      (sum < 0)    code <= '0;
      else if (sum > MAXV) code <= '1;
      else                 code <= sum[CW-1:0];
      if (d <= $signed(6'(LOCK_TH)) && d >= -$signed(6'(LOCK_TH))) begin
        if (lcnt == ($clog2(LOCK_N+1))'(LOCK_N)) lock <= 1'b1;
        else lcnt <= lcnt + 1'b1;
      end else begin
        lcnt <= '0;
        lock <= 1'b0;
      end
    end
  end

endmodule
