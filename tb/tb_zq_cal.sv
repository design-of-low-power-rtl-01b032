// tb_zq_cal: self-checking test of the ZQ calibration logic.
//
// The pad is modelled with integer resistances: a 240 ohm reference against
// pull-down legs of RU_PD ohm each; then a pull-up replica of RU_PU ohm legs
// against the pull-down replica at the calibrated code. The comparator is
// high while the pad is above VDDQ/2. For several leg resistances the test
// checks that the pull-down code is the first one giving at most 240 ohm,
// that the pull-up code is the first one whose resistance is not above the
// calibrated pull-down's, that pull-down runs before pull-up, that done
// pulses once, that err flags a reference out of range, and that each code
// step waits SETTLE + 1 cycles.
module tb_zq_cal;
  localparam int SETTLE = 8;
  logic clk = 0, rst_n = 1, start = 0, comp;
  logic pu_phase, busy, done, err;
  logic [5:0] pd_code, pu_code;
  int checks = 0, failures = 0;
  int ru_pd, ru_pu;

  always #5 clk = ~clk;

  zq_cal #(.SETTLE(SETTLE)) dut (.clk, .rst_n, .start, .comp, .pu_phase, .pd_code, .pu_code,
                                  .busy, .done, .err);

  always_comb begin
    if (!pu_phase) comp = ru_pd > 240 * int'(pd_code);
    else           comp = ru_pu * int'(pd_code) <= ru_pd * int'(pu_code);
  end

  task automatic run(input int rpd, input int rpu);
    int epd, epu, cyc, n_done;
    bit pu_seen, exp_err;
    ru_pd = rpd; ru_pu = rpu;
    epd = 0;
    while (epd < 63 && rpd > 240 * epd) epd++;
    epu = 0;
    while (epu < 63 && !(rpu * epd <= rpd * epu)) epu++;
    exp_err = (rpd > 240 * epd) || !(rpu * epd <= rpd * epu);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1; n_done = 0; pu_seen = 0;
    while (!done) begin
      if (pu_phase) pu_seen = 1;
      checks++;
      if (!pu_phase && pu_seen) begin failures++; $display("FAIL pull-down after pull-up"); end
      @(negedge clk); cyc++;
    end
    checks++;
    if (int'(pd_code) != epd || int'(pu_code) != epu || err !== exp_err) begin
      failures++;
      $display("FAIL legs %0d/%0d: pd=%0d pu=%0d err=%b exp %0d %0d %b", rpd, rpu, pd_code,
               pu_code, err, epd, epu, exp_err);
    end
    checks++;
    if (cyc != (SETTLE + 1) * (epd + epu + 2) + 1) begin
      failures++; $display("FAIL duration %0d cycles for codes %0d %0d", cyc, epd, epu);
    end
    @(negedge clk);
    checks++;
    if (done || busy) begin failures++; $display("FAIL done not a pulse"); end
  endtask

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    run(6000, 5000);
    run(4800, 4800);
    run(9000, 7000);
    run(2000, 3000);
    run(20000, 5000);   // pull-down legs too weak: code saturates, err
    for (int k = 0; k < 6; k++) run($urandom_range(1000, 12000), $urandom_range(1000, 12000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
