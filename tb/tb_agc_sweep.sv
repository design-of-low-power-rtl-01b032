// tb_agc_sweep: self-checking test of the adaptive-gain one-axis sweep.
//
// A pass window [lo_w, hi_w] on a 256-code axis answers every test request
// after a random 0-2 cycle delay. For many random windows (including windows
// touching either end, single-code windows and no window at all) the test
// checks that the reported boundaries equal those of a plain code-by-code
// scan computed here, that the adaptive sweep needs no more than
// N/K + K + 3*alpha = 133 tests, that the non-adaptive sweep needs exactly 256,
// and that gain increases and bisection steps actually happened.
module tb_agc_sweep;
  localparam int N = 256;
  localparam int PW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  logic start = 0, agc_en = 1;
  logic test_req, test_ack = 0, test_pass = 0;
  logic [PW-1:0] test_pos, ps, pe;
  logic done, busy, found, gain_up, bsearch;
  logic [15:0] n_tests;
  int checks = 0, failures = 0;
  int lo_w, hi_w;
  int n_gain = 0, n_bs = 0;

  always #5 clk = ~clk;

  agc_sweep #(.NMAX(N)) dut (
    .clk, .rst_n, .start, .agc_en, .len(PW'(N)),
    .test_req, .test_pos, .test_ack, .test_pass,
    .done, .busy, .found, .pass_start(ps), .pass_end(pe), .n_tests,
    .gain_up, .bsearch
  );

  // Link model: answers a request after a random delay.
  initial begin
    forever begin
      @(posedge clk);
      test_ack <= 1'b0;
      if (test_req && !test_ack) begin
        repeat ($urandom_range(0, 2)) @(posedge clk);
        test_pass <= (int'(test_pos) >= lo_w) && (int'(test_pos) <= hi_w);
        test_ack  <= 1'b1;
      end
    end
  end

  always @(posedge clk) begin
    if (gain_up) n_gain++;
    if (bsearch) n_bs++;
  end

  task automatic run(input int l, input int h, input bit agc);
    int exp_found, exp_s, exp_e;
    lo_w = l; hi_w = h; agc_en = agc;
    exp_found = 0; exp_s = 0; exp_e = 0;
    for (int i = 0; i < N; i++) begin
      if (i >= l && i <= h) begin
        if (!exp_found) exp_s = i;
        exp_found = 1;
        exp_e = i;
      end
    end
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    wait (done); @(posedge clk);
    checks++;
    if (found !== 1'(exp_found)) begin
      failures++; $display("FAIL found window [%0d,%0d] got %0d", l, h, found);
    end
    if (exp_found) begin
      checks++;
      if (int'(ps) != exp_s || int'(pe) != exp_e) begin
        failures++;
        $display("FAIL window [%0d,%0d] agc=%0d got [%0d,%0d]", l, h, agc, ps, pe);
      end
    end
    checks++;
    if (agc ? (int'(n_tests) > N/2 + 2 + 3) : (int'(n_tests) != N)) begin
      failures++; $display("FAIL test count %0d agc=%0d window [%0d,%0d]", n_tests, agc, l, h);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(80, 180, 1);
    run(80, 180, 0);
    run(0, 100, 1);
    run(150, 255, 1);
    run(77, 78, 1);
    run(300, 400, 1);   // no pass window
    run(0, 255, 1);
    for (int k = 0; k < 60; k++) begin
      int a, b;
      // The window must be at least K_MAX codes wide, or a stride may skip it.
      a = $urandom_range(0, N - 2);
      b = $urandom_range(a + 1, N - 1);
      run(a, b, 1);
    end
    checks++;
    if (n_gain == 0 || n_bs == 0) begin
      failures++; $display("FAIL mechanisms gain_up=%0d bsearch=%0d", n_gain, n_bs);
    end
    $display("gain increases=%0d bisection tests=%0d", n_gain, n_bs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
