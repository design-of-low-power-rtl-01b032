// tb_mmdiv: self-checking test of the ADPLL's multi-modulus divider.
//
// For every setting of both stages the periods of PHY_CLK, SYS_CLK and the
// feedback clock are measured in DCO periods: PHY_CLK = DCO / 1, 2, 4, 8
// (stage 1), SYS_CLK = PHY_CLK / 8, feedback = DCO / 4 / (5..8), i.e. the
// total feedback ratios 20, 24, 28 and 32. Also checks phy_phase counts
// PHY_CLK cycles modulo 8 and SYS_CLK is its MSB.
module tb_mmdiv;
  localparam int HALF = 2;
  logic clk_dco = 0, rst_n = 1;
  logic [1:0] div1_sel = '0, div2_sel = '0;
  logic phy_clk, sys_clk, fb_clk;
  logic [2:0] phy_phase;
  int checks = 0, failures = 0;

  always #HALF clk_dco = ~clk_dco;

  mmdiv dut (.clk_dco, .rst_n, .div1_sel, .div2_sel, .phy_clk, .sys_clk, .fb_clk, .phy_phase);

  task automatic period(input int which, output time p);
    time a;
    if (which == 0) begin @(posedge phy_clk); a = $time; @(posedge phy_clk); end
    else if (which == 1) begin @(posedge sys_clk); a = $time; @(posedge sys_clk); end
    else begin @(posedge fb_clk); a = $time; @(posedge fb_clk); end
    p = $time - a;
  endtask

  initial begin
    time pp, ps, pf, dco;
    dco = 2 * HALF;
    for (int s1 = 0; s1 < 4; s1++) begin
      for (int s2 = 0; s2 < 4; s2++) begin
        rst_n = 1; #1 rst_n = 0;
        div1_sel = 2'(s1); div2_sel = 2'(s2);
        #10 rst_n = 1;
        repeat (3) @(posedge sys_clk);
        period(0, pp); period(1, ps); period(2, pf);
        checks++;
        if (pp != dco * (1 << s1) || ps != 8 * pp || pf != dco * 4 * (5 + s2)) begin
          failures++;
          $display("FAIL sel %0d/%0d: phy %0t sys %0t fb %0t", s1, s2, pp, ps, pf);
        end
        repeat (8) begin
          logic [2:0] prev_ph;
          @(negedge phy_clk) prev_ph = phy_phase;
          @(negedge phy_clk);
          checks++;
          if (phy_phase != prev_ph + 3'd1 || sys_clk !== phy_phase[2]) begin
            failures++; $display("FAIL phase count");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
