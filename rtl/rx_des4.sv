// rx_des4: 1:4 receive deserializer in the strobe (DQS) domain.
//
// The received data bit YDQ is captured on both edges of the received strobe
// YDQS: a rising-edge flop takes the even bit and is re-timed to the falling
// edge, where a falling-edge flop takes the odd bit, giving the pair DQ_A[1:0].
// YDQS divided by two (YDQS2) clocks a 2:4 stage: the pair present at the
// falling edge of YDQS2 is held, and at its rising edge it is joined with the
// current pair, giving DQ_B[3:0] (bit 0 earliest). DQ_B changes once per two
// strobe periods and is stable for four bit times, which is what the PHY_CLK
// side samples. Pre- and postamble strobe edges are clocked like data edges.
// Structure after the source design's 1:16 deserializer block diagram; the re-timing
// element drawn as a latch is a falling-edge flop here, which updates at the
// same instant.
module rx_des4 (
  input  logic       ydqs,
  input  logic       rst_n,
  input  logic       ydq,
  output logic [3:0] dqb
);

  logic q_r, dqa0, dqa1, ydqs2;
  logic [1:0] pair_early;

  always_ff @(posedge ydqs or negedge rst_n) begin
    if (!rst_n) begin
      q_r   <= 1'b0;
      ydqs2 <= 1'b0;
    end else begin
      q_r   <= ydq;
      ydqs2 <= ~ydqs2;
    end
  end

  always_ff @(negedge ydqs or negedge rst_n) begin
    if (!rst_n) begin
      dqa0 <= 1'b0;
      dqa1 <= 1'b0;
    end else begin
      dqa0 <= q_r;
      dqa1 <= ydq;
    end
  end

  always_ff @(negedge ydqs2 or negedge rst_n) begin
    if (!rst_n) pair_early <= '0;
    else        pair_early <= {dqa1, dqa0};
  end

  always_ff @(posedge ydqs2 or negedge rst_n) begin
    if (!rst_n) dqb <= '0;
    else        dqb <= {dqa1, dqa0, pair_early};
  end

endmodule
