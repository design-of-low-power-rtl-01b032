// rx_des16: 4:16 receive deserializer in the PHY_CLK domain.
//
// Crosses read data from the strobe domain into PHY_CLK. fifo_en marks the
// start of a read burst; `lat` PHY_CLK cycles later the 4-bit word DQ_B from
// the strobe-domain deserializer is sampled, then again every two cycles,
// four samples in all, building a 16-bit word (first sample in bits 3:0).
// Because DQ_B is stable for two PHY_CLK cycles, the odd/even choice of lat
// selects which PHY_CLK edge inside that window samples it; read-latency
// training sweeps lat and picks the middle of the passing range.
// word_valid pulses when the word is complete; word holds until the next one.
// The latency code width (4 bits) and the FIFO_en control follow the source
// design; the sampling schedule is this design's own.
module rx_des16 (
  input  logic        clk,      // PHY_CLK
  input  logic        rst_n,
  input  logic        fifo_en,
  input  logic [3:0]  lat,
  input  logic [3:0]  dqb,
  output logic [15:0] word,
  output logic        word_valid
);

  logic [4:0]  cnt;       // cycles since fifo_en
  logic        active;
  logic [15:0] acc;
  logic [1:0]  nsamp;
  logic        take;

  assign take = active && (cnt >= {1'b0, lat}) && ((cnt - {1'b0, lat}) % 2 == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      active     <= 1'b0;
      acc        <= '0;
      nsamp      <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (fifo_en) begin
        cnt    <= '0;
        active <= 1'b1;
        nsamp  <= '0;
      end else if (active) begin
        cnt <= cnt + 5'd1;
      end
      if (!fifo_en && take) begin
        acc   <= {dqb, acc[15:4]};
        nsamp <= nsamp + 2'd1;
        if (nsamp == 2'd3) begin
          word       <= {dqb, acc[15:4]};
          word_valid <= 1'b1;
          active     <= 1'b0;
        end
      end
    end
  end

endmodule
