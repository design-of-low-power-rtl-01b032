// adpll_dsm: first-order delta-sigma modulator for the DCO control word.
//
// Turns the loop filter's control word (INT_W integer and FRAC fractional
// bits) into the 10-bit DCO code FCW[9:0]: the fractional part is added into
// an accumulator every clock, and the accumulator's carry is added to the
// integer part. The average of FCW therefore equals the full-precision word,
// and the quantisation error is pushed to high frequencies, where the loop
// filters it out. FCW saturates at the top code.
// Timing: FCW is registered.
// The first-order DSM and the 10-bit FCW follow the source design.
module adpll_dsm #(
  parameter int unsigned INT_W = 10,
  parameter int unsigned FRAC  = 6
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [INT_W+FRAC-1:0] code,
  output logic [INT_W-1:0]      fcw
);

  logic [FRAC-1:0] acc;
  logic [FRAC:0]   acc_n;
  logic [INT_W:0]  f_n;

  assign acc_n = {1'b0, acc} + {1'b0, code[FRAC-1:0]};
  assign f_n   = {1'b0, code[INT_W+FRAC-1:FRAC]} + (INT_W+1)'(acc_n[FRAC]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      fcw <= '0;
    end else begin
      acc <= acc_n[FRAC-1:0];
      fcw <= f_n[INT_W] ? '1 : f_n[INT_W-1:0];
    end
  end

endmodule
