// tb_adpll_dlf: self-checking test of the ADPLL loop filter and lock detector.
//
// Random phase errors are applied once per clock and a reference model of the
// proportional-plus-integral filter (integral += D * 2^KI_SHIFT, code =
// integral + D * 2^KP_SHIFT, both clamped to the code range) is compared
// with the code every cycle, including long runs of the largest positive and
// negative errors that drive the code into both limits. The lock output must
// rise exactly after LOCK_N + 1 consecutive small errors and drop on the
// first large one.
module tb_adpll_dlf;
  localparam int FRAC = 6, KP = 6, KI = 2, INIT = 512, LOCK_N = 16;
  localparam int MAXV = (1 << 16) - 1;
  logic clk = 0, rst_n = 1;
  logic signed [5:0] d = '0;
  logic [15:0] code;
  logic lock;
  int checks = 0, failures = 0;
  int integ, ecode, small_run;
  bit n_hi = 0, n_lo = 0;

  always #5 clk = ~clk;

  adpll_dlf dut (.clk, .rst_n, .d, .code, .lock);

  task automatic step(input int dv);
    int in_n, s;
    d = 6'(dv);
    @(posedge clk);
    in_n = integ + dv * (1 << KI);
    s = in_n + dv * (1 << KP);
    integ = in_n < 0 ? 0 : (in_n > MAXV ? MAXV : in_n);
    ecode = s < 0 ? 0 : (s > MAXV ? MAXV : s);
    if (dv >= -1 && dv <= 1) small_run++; else small_run = 0;
    #1;
    checks++;
    if (int'(code) != ecode) begin
      failures++; $display("FAIL code %0d exp %0d", code, ecode);
    end
    if (ecode == MAXV) n_hi = 1;
    if (ecode == 0) n_lo = 1;
    checks++;
    if (lock !== (small_run > LOCK_N)) begin
      failures++; $display("FAIL lock=%b after %0d small errors", lock, small_run);
    end
  endtask

  initial begin
    integ = INIT << FRAC; ecode = INIT << FRAC; small_run = 0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 200; n++) step($urandom_range(0, 62) - 31);
    repeat (600) step(31);
    repeat (1200) step(-31);
    repeat (30) step($urandom_range(0, 2) - 1);
    step(5);
    repeat (20) step(0);
    checks++;
    if (!n_hi || !n_lo) begin failures++; $display("FAIL limits not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
