// tx_ser16: 16:1 transmit serializer with latency control.
//
// Takes one 16-bit word per SYS_CLK period (SYS_CLK = PHY_CLK / 8) and sends
// it out at double data rate over eight PHY_CLK cycles: each cycle presents
// the next two bits as a (rise, fall) pair, bit 0 first; the pair is merged
// onto the pad by the DDR output stage. `sync` marks the PHY_CLK cycle in
// which the parallel word is stable and is loaded (once per SYS_CLK period,
// away from the SYS_CLK edge, which gives the wide crossing margin that is the
// reason for the 16:1 ratio). `lat` delays the serial stream by 0..15 whole
// PHY_CLK cycles (latency control). oe is high while valid bits are on the pair.
// The 16:1 ratio and the latency control follow the source design; bit order,
// the load strobe and the delay granularity are this design's own choices.
module tx_ser16 #(
  parameter int unsigned W = 16
) (
  input  logic         clk,      // PHY_CLK (after phase interpolator / DCDL)
  input  logic         rst_n,
  input  logic         sync,
  input  logic [W-1:0] word,
  input  logic         valid,
  input  logic [3:0]   lat,
  output logic         d_rise,
  output logic         d_fall,
  output logic         oe
);

  logic [W-1:0] sh;
  logic [$clog2(W/2+1)-1:0] left;
  logic [2:0]  dly [16];   // {oe, fall, rise} delay line
  logic [2:0]  cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      left <= '0;
    end else if (sync) begin
      sh   <= word;
      left <= valid ? ($clog2(W/2+1))'(W/2) : '0;
    end else begin
      sh   <= sh >> 2;
      left <= (left != 0) ? left - 1'b1 : left;
    end
  end

  assign cur = {left != 0, sh[1], sh[0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) dly[i] <= '0;
    end else begin
      dly[0] <= cur;
      for (int i = 1; i < 16; i++) dly[i] <= dly[i-1];
    end
  end

  // lat = 0 takes the pair straight from the shifter.
  always_comb begin
    logic [2:0] o;
    o = (lat == 4'd0) ? cur : dly[lat - 4'd1];
    {oe, d_fall, d_rise} = o;
  end

endmodule
