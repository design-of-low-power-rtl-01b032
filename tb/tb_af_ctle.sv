// tb_af_ctle: self-checking test of the behavioural AF-CTLE strobe receiver.
//
// Checks the hysteresis created by the SR-latch offset feedback: with the
// receiver enabled and the strobe idle (DQSP = DQSN plus noise below the
// 40 mV offset) the output must not move; a differential step above +40 mV
// sets it, one that stays above -40 mV keeps it set, one at or below -40 mV
// clears it; YDQSN is always the inverse of YDQSP and FBP follows the latch.
// A toggling strobe must give equal high and low output times (no duty-cycle
// distortion from the offset) and one output edge per input edge; rx_en = 0
// forces the output low.
module tb_af_ctle;
  localparam int OFS = 40;
  logic rx_en = 0;
  logic signed [11:0] dqsp_mv = '0, dqsn_mv = '0;
  logic ydqsp, ydqsn, fbp;
  int checks = 0, failures = 0, n_edges = 0;

  af_ctle #(.OFFSET_MV(OFS)) dut (.rx_en, .dqsp_mv, .dqsn_mv, .ydqsp, .ydqsn, .fbp);

  always @(posedge ydqsp) n_edges++;

  task automatic chk(input logic e, input string what);
    #1;
    checks++;
    if (ydqsp !== e || ydqsn !== ~e || fbp !== e) begin
      failures++;
      $display("FAIL %s: ydqsp=%b ydqsn=%b fbp=%b exp %b", what, ydqsp, ydqsn, fbp, e);
    end
  endtask

  task automatic drive(input int d);
    dqsp_mv = 12'(d / 2);
    dqsn_mv = 12'(d / 2 - d);
  endtask

  initial begin
    int t_hi, t_lo;
    drive(300);
    chk(0, "disabled");
    rx_en = 1;
    drive(0);
    chk(0, "enabled idle");
    n_edges = 0;
    for (int k = 0; k < 500; k++) begin
      drive($urandom_range(0, 2 * OFS - 2) - (OFS - 1));
      #1;
    end
    checks++;
    if (n_edges != 0) begin
      failures++; $display("FAIL idle noise toggled the output %0d times", n_edges);
    end
    drive(OFS + 2);   chk(1, "above +offset");
    drive(-OFS + 2);  chk(1, "hysteresis keeps high");
    drive(-OFS - 2);  chk(0, "below -offset");
    drive(OFS - 2);   chk(0, "hysteresis keeps low");
    drive(200);       chk(1, "strobe high");
    rx_en = 0;        chk(0, "disable clears");
    drive(0);
    rx_en = 1;        chk(0, "re-enable starts low");
    // toggling strobe: duty cycle and edge count
    n_edges = 0; t_hi = 0; t_lo = 0;
    for (int c = 0; c < 50; c++) begin
      for (int s = 0; s < 8; s++) begin
        drive((s < 4 ? 200 : -200) + int'($urandom_range(0, 20)) - 10);
        #1;
        if (ydqsp) t_hi++; else t_lo++;
      end
    end
    checks++;
    if (n_edges != 50 || t_hi != t_lo) begin
      failures++; $display("FAIL toggling: edges %0d high %0d low %0d", n_edges, t_hi, t_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
