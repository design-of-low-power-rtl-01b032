// mmdiv: two-stage multi-modulus divider of the ADPLL.
//
// The DCO runs between 1333 and 2133 MHz. Stage 1 divides it by 1, 2, 4 or 8
// (div1_sel = 0..3) to give PHY_CLK, so that PHY_CLK covers 266..2133 MHz;
// SYS_CLK is PHY_CLK / 8 and clocks the link-training logic. The feedback
// clock for the phase detector is the stage-1 divide-by-4 output divided
// again by 5, 6, 7 or 8 (div2_sel = 0..3), a total N of 20, 24, 28 or 32 so
// that a 66.66 MHz reference locks the DCO at 1333, 1600, 1866 or 2133 MHz.
// phy_phase counts PHY_CLK cycles within a SYS_CLK period; SYS_CLK rises when
// it changes from 3 to 4.
// Divider ratios follow the source design; the counter structure and the
// duty cycle of the odd ratios (low for the larger half) are this design's own.
// Select inputs are static configuration: changing them on the fly may give a
// short clock pulse.
module mmdiv (
  input  logic       clk_dco,
  input  logic       rst_n,
  input  logic [1:0] div1_sel,
  input  logic [1:0] div2_sel,
  output logic       phy_clk,
  output logic       sys_clk,
  output logic       fb_clk,
  output logic [2:0] phy_phase
);

  logic [2:0] c1;
  logic [2:0] c2;
  logic [3:0] n2;

  always_ff @(posedge clk_dco or negedge rst_n) begin
    if (!rst_n) c1 <= '0;
    else        c1 <= c1 + 3'd1;
  end

  // Stage 1 output select; /1 passes the DCO clock itself.
  always_comb begin
    unique case (div1_sel)
      2'd0:    phy_clk = clk_dco;
      2'd1:    phy_clk = c1[0];
      2'd2:    phy_clk = c1[1];
      default: phy_clk = c1[2];
    endcase
  end

  always_ff @(posedge phy_clk or negedge rst_n) begin
    if (!rst_n) phy_phase <= '0;
    else        phy_phase <= phy_phase + 3'd1;
  end
  assign sys_clk = phy_phase[2];

  // Stage 2 on the divide-by-4 tap.
  assign n2 = 4'd5 + {2'b00, div2_sel};
  always_ff @(posedge c1[1] or negedge rst_n) begin
    if (!rst_n)                  c2 <= '0;
    else if ({1'b0, c2} == n2 - 4'd1) c2 <= '0;
    else                         c2 <= c2 + 3'd1;
  end
  assign fb_clk = ({1'b0, c2} < (n2 >> 1));

endmodule
