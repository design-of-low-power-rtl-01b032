// af_ctle: behavioural model of the CTLE with asynchronous feedback (AF-CTLE).
//
// Behavioural model of an analog part, not synthesizable logic. Voltages are
// integers in millivolts. The differential strobe receiver compares DQSP with
// DQSN plus an input offset of OFFSET_MV whose sign is set by an SR latch: the
// latch is set by the positive output YDQSP and reset by the negative output
// YDQSN, and its outputs FBP/FBN steer the offset toward the side that last
// won. While the strobe is idle both pins sit at the same (terminated) level;
// the offset, being larger than the noise, holds the output still instead of
// letting noise toggle it, and the latch is reset so the idle output is low.
// During a read, the latch follows every strobe transition, so the offset
// always opposes a new transition by the same amount in both directions and
// does not distort the duty cycle. rx_en = 0 turns the receiver off (outputs
// low, latch reset). Equalisation itself is not modelled.
// The SR-latch feedback from YDQSP/YDQSN to the CTLE offset follows the
// source design; the offset value and the integer-voltage interface are this
// model's own.
module af_ctle #(
  parameter int OFFSET_MV = 40
) (
  input  logic               rx_en,
  input  logic signed [11:0] dqsp_mv,
  input  logic signed [11:0] dqsn_mv,
  output logic               ydqsp,
  output logic               ydqsn,
  output logic               fbp
);

  logic q;   // SR latch state: 1 after YDQSP, 0 after YDQSN
  logic signed [12:0] diff;
  logic set_c, rst_c;

  // With the latch set, the offset favours DQSP and the output stays high
  // until DQSP - DQSN falls to -OFFSET_MV; with it reset, the output rises only
  // once DQSP - DQSN exceeds +OFFSET_MV. Between the two thresholds the latch
  // holds, so the comparator-plus-feedback loop is written as the set/reset
  // latch it amounts to.
  assign diff  = 13'(dqsp_mv) - 13'(dqsn_mv);
  assign set_c = rx_en && (diff > 13'(OFFSET_MV));
  assign rst_c = !rx_en || (diff <= -13'(OFFSET_MV));

  always_latch begin
    if (set_c || rst_c) q = set_c;
  end

  assign ydqsp = q;
  assign ydqsn = ~q;
  assign fbp   = q;

endmodule
