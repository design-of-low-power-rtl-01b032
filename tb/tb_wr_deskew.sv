// tb_wr_deskew: self-checking test of the tDQS2DQ deskew calculation.
//
// Loads per-lane write-eye edge codes, including the source design's example
// (minimum 53, a lane at 77 ends at 24) and random sets, and checks that the
// common minimum is found, that every lane's result is its code minus that
// minimum (the earliest lane gets 0), and that done pulses once, NLANE + 1
// cycles after start (one lane examined per cycle).
module tb_wr_deskew;
  localparam int NL = 18, W = 9;
  logic clk = 0, rst_n = 1, start = 0;
  logic [NL-1:0][W-1:0] in_code = '0, out_code;
  logic [W-1:0] min_code;
  logic done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wr_deskew #(.NLANE(NL), .W(W)) dut (.clk, .rst_n, .start, .in_code, .out_code, .min_code, .done);

  task automatic run();
    int mn, cyc;
    mn = 1 << W;
    for (int i = 0; i < NL; i++) if (int'(in_code[i]) < mn) mn = int'(in_code[i]);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != NL + 2 || int'(min_code) != mn) begin
      failures++; $display("FAIL min %0d exp %0d after %0d cycles", min_code, mn, cyc);
    end
    for (int i = 0; i < NL; i++) begin
      checks++;
      if (int'(out_code[i]) != int'(in_code[i]) - mn) begin
        failures++; $display("FAIL lane %0d: %0d exp %0d", i, out_code[i], int'(in_code[i]) - mn);
      end
    end
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done not a pulse"); end
  endtask

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int i = 0; i < NL; i++) in_code[i] = W'(53 + (i * 7) % 30);
    in_code[5] = W'(77);
    run();
    checks++;
    if (out_code[5] != W'(24) || out_code[0] != '0) begin
      failures++; $display("FAIL example 77 - 53");
    end
    for (int k = 0; k < 10; k++) begin
      for (int i = 0; i < NL; i++) in_code[i] = W'($urandom_range(0, 511));
      run();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
