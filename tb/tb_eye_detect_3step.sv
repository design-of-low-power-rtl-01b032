// tb_eye_detect_3step: self-checking test of adaptive 1x2y3x eye detection.
//
// The link is modelled as a diamond-shaped eye in the 256 x 72 (time x
// voltage) code plane. For each eye the expected result is computed here by a
// plain code-by-code 1x2y3x search (scan time at VREF_INIT, scan voltage at the
// time center, scan time at the voltage center). The test checks the four
// boundary registers and both centers against it, with and without adaptive
// gain, checks that the adaptive run needs at most 133 + 41 + 133 = 307 tests
// and the plain run exactly 256 + 72 + 256 = 584, and covers the retry taken
// when the first time sweep finds no pass zone.
module tb_eye_detect_3step;
  localparam int T = 256, V = 72, VINIT = 33;
  localparam int PW = $clog2(T + 1);

  logic clk = 0, rst_n = 0;
  logic start = 0, agc_en = 1, x_only = 0;
  logic test_req, test_ack = 0, test_pass = 0;
  logic [PW-1:0] time_code, volt_code, xs, xe, ys, ye, tcen, vcen;
  logic done, busy, fail, gain_up, bsearch, retry;
  logic [15:0] n_tests;
  int checks = 0, failures = 0, n_retry = 0;
  int tc, vc, ht, hv;

  always #5 clk = ~clk;

  eye_detect_3step #(.T_STEPS(T), .V_STEPS(V), .VREF_INIT(VINIT)) dut (
    .clk, .rst_n, .start, .agc_en, .x_only,
    .test_req, .time_code, .volt_code, .test_ack, .test_pass,
    .done, .busy, .fail,
    .x_start(xs), .x_end(xe), .y_start(ys), .y_end(ye),
    .time_center(tcen), .volt_center(vcen), .n_tests, .gain_up, .bsearch, .retry
  );

  function automatic bit in_eye(int t, int v);
    int dt, dv;
    dt = t > tc ? t - tc : tc - t;
    dv = v > vc ? v - vc : vc - v;
    return dt * hv + dv * ht <= ht * hv;
  endfunction

  initial begin
    forever begin
      @(posedge clk);
      test_ack <= 1'b0;
      if (test_req && !test_ack) begin
        repeat ($urandom_range(0, 1)) @(posedge clk);
        test_pass <= in_eye(int'(time_code), int'(volt_code));
        test_ack  <= 1'b1;
      end
    end
  end

  always @(posedge clk) if (retry) n_retry++;

  // Plain scan of one line: first and last passing code.
  task automatic scan(input bit along_t, input int fixed, output int s, output int e,
                      output bit f);
    int n;
    n = along_t ? T : V;
    f = 0; s = 0; e = 0;
    for (int i = 0; i < n; i++) begin
      if (along_t ? in_eye(i, fixed) : in_eye(fixed, i)) begin
        if (!f) s = i;
        f = 1; e = i;
      end
    end
  endtask

  task automatic run(input int c_t, input int c_v, input int h_t, input int h_v,
                     input bit agc);
    int s1, e1, s2, e2, s3, e3, vfix;
    bit f;
    tc = c_t; vc = c_v; ht = h_t; hv = h_v; agc_en = agc;
    vfix = VINIT;
    scan(1, vfix, s1, e1, f);
    while (!f) begin
      vfix = (vfix + 8) % V;
      scan(1, vfix, s1, e1, f);
    end
    scan(0, (s1 + e1) / 2, s2, e2, f);
    scan(1, (s2 + e2) / 2, s3, e3, f);
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    wait (done); @(posedge clk);
    checks++;
    if (fail || int'(xs) != s3 || int'(xe) != e3 || int'(ys) != s2 || int'(ye) != e2 ||
        int'(tcen) != (s3 + e3) / 2 || int'(vcen) != (s2 + e2) / 2) begin
      failures++;
      $display("FAIL eye (%0d,%0d): got x[%0d,%0d] y[%0d,%0d] exp x[%0d,%0d] y[%0d,%0d]",
               c_t, c_v, xs, xe, ys, ye, s3, e3, s2, e2);
    end
    checks++;
    if (vfix == VINIT && (agc ? int'(n_tests) > 307 : int'(n_tests) != 584)) begin
      failures++; $display("FAIL test count %0d agc=%0d", n_tests, agc);
    end
    $display("eye (%0d,%0d) agc=%0d tests=%0d center=(%0d,%0d)", c_t, c_v, agc, n_tests,
             tcen, vcen);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(128, 36, 60, 20, 1);
    run(128, 36, 60, 20, 0);
    run(90, 30, 40, 12, 1);
    run(170, 40, 70, 25, 1);
    run(128, 60, 60, 10, 1);   // eye above VREF_INIT: retries needed
    for (int k = 0; k < 10; k++)
      run($urandom_range(60, 190), $urandom_range(25, 45), $urandom_range(20, 60),
          $urandom_range(12, 25), 1);
    checks++;
    if (n_retry == 0) begin
      failures++; $display("FAIL no retry seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
