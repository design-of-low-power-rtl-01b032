// tb_wr_leveling: self-checking test of the write-leveling search.
//
// The DRAM model samples CK with each DQS pulse: byte b returns 1 once the
// DQS phase code has reached its crossing point thr[b], 0 before. The
// feedback changes on the DQS pulse, asynchronously to the controller. The
// test checks that each byte's code is its crossing point (including the
// 6 and 10 of the source design's simulation), that the search ends as soon
// as all bytes are found, that a byte whose feedback is 1 from the start
// (no 0 -> 1 transition) is reported not found after the full range, and
// that each code step takes SETTLE + FB_WAIT + 3 cycles.
module tb_wr_leveling;
  localparam int SETTLE = 4, FB_WAIT = 6;
  logic clk = 0, rst_n = 1, start = 0;
  logic [1:0] fb = '0;
  logic [6:0] sweep_code;
  logic dqs_pulse, busy, done;
  logic [1:0][6:0] code;
  logic [1:0] found;
  int checks = 0, failures = 0;
  int thr [2];

  always #5 clk = ~clk;

  wr_leveling #(.NBYTE(2), .SETTLE(SETTLE), .FB_WAIT(FB_WAIT)) dut (
    .clk, .rst_n, .start, .fb, .sweep_code, .dqs_pulse, .code, .found, .busy, .done
  );

  always @(posedge clk) if (dqs_pulse) begin
    #3;
    for (int b = 0; b < 2; b++) fb[b] = int'(sweep_code) >= thr[b];
  end

  task automatic run(input int t0, input int t1);
    int cyc, last;
    thr[0] = t0; thr[1] = t1;
    fb = '0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    for (int b = 0; b < 2; b++) begin
      checks++;
      if (thr[b] > 0 && thr[b] < 128) begin
        if (!found[b] || int'(code[b]) != thr[b]) begin
          failures++; $display("FAIL byte %0d: found=%b code=%0d exp %0d", b, found[b], code[b], thr[b]);
        end
      end else if (found[b]) begin
        failures++; $display("FAIL byte %0d found without a 0->1 transition", b);
      end
    end
    last = (t0 > 0 && t0 < 128 && t1 > 0 && t1 < 128) ? (t0 > t1 ? t0 : t1) : 127;
    checks++;
    if (cyc != (last + 1) * (SETTLE + FB_WAIT + 3) + 1) begin
      failures++; $display("FAIL duration %0d cycles for last code %0d", cyc, last);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    run(10, 6);
    run(1, 127);
    run(0, 20);      // byte 0 always 1: not found
    run(50, 200);    // byte 1 never 1: not found
    for (int k = 0; k < 8; k++) run($urandom_range(1, 127), $urandom_range(1, 127));
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
