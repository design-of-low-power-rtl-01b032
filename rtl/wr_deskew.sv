// wr_deskew: tDQS2DQ and per-pin skew compensation for write training.
//
// Write training first finds, for every data lane, the delay-line code at
// which that lane's write eye begins. All lanes share the DQS-to-DQ delay of
// the DRAM (tDQS2DQ), so the smallest of these codes is common to every lane
// and is removed: each lane's delay-line setting becomes its own code minus
// the common minimum, leaving only the per-pin skew (for example 77 - 53 = 24).
// The minimum is found one lane per clock; done pulses NLANE + 1 cycles after
// start, when out_code and min_code are valid. They hold until the next start.
// The subtraction of the common minimum follows the source design.
module wr_deskew #(
  parameter int unsigned NLANE = 18,
  parameter int unsigned W     = 9
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [NLANE-1:0][W-1:0]    in_code,
  output logic [NLANE-1:0][W-1:0]    out_code,
  output logic [W-1:0]               min_code,
  output logic                       done
);

  logic [$clog2(NLANE+1)-1:0] idx;
  logic busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx      <= '0;
      busy     <= 1'b0;
      min_code <= '0;
      out_code <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        idx      <= '0;
        min_code <= '1;
      end else if (busy) begin
        if (idx == ($clog2(NLANE+1))'(NLANE)) begin
          for (int i = 0; i < NLANE; i++) out_code[i] <= in_code[i] - min_code;
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          if (in_code[idx] < min_code) min_code <= in_code[idx];
          idx <= idx + 1'b1;
        end
      end
    end
  end

endmodule
