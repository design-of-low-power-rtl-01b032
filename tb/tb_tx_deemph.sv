// tb_tx_deemph: self-checking test of the de-emphasis pre-driver control.
//
// Random DDR bit pairs are applied every cycle. A reference model computes
// the expected registered main-driver bits and de-emphasis tap bits: with
// de-emphasis enabled, each tap carries the inverse of the bit sent one bit
// time earlier (rise tap: previous cycle's fall bit; fall tap: this cycle's
// rise bit); disabled, the tap repeats the main bit. Both settings are checked
// every cycle, with en toggled at random.
module tb_tx_deemph;
  logic clk = 0, rst_n = 1, en = 0, d_rise = 0, d_fall = 0;
  logic main_rise, main_fall, tap_rise, tap_fall;
  logic e_mr, e_mf, e_tr, e_tf, last_f;
  int checks = 0, failures = 0, n_emph = 0;

  always #5 clk = ~clk;

  tx_deemph dut (.clk, .rst_n, .en, .d_rise, .d_fall, .main_rise, .main_fall, .tap_rise, .tap_fall);

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    last_f = 0;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      d_rise = 1'($urandom); d_fall = 1'($urandom);
      if (n % 50 == 0) en = ~en;
      e_mr = d_rise; e_mf = d_fall;
      e_tr = en ? ~last_f : d_rise;
      e_tf = en ? ~d_rise : d_fall;
      last_f = d_fall;
      @(negedge clk);
      checks++;
      if ({main_rise, main_fall, tap_rise, tap_fall} !== {e_mr, e_mf, e_tr, e_tf}) begin
        failures++;
        $display("FAIL cycle %0d en=%0d got %b exp %b", n, en,
                 {main_rise, main_fall, tap_rise, tap_fall}, {e_mr, e_mf, e_tr, e_tf});
      end
      if (en && (tap_rise != main_rise)) n_emph++;
    end
    checks++;
    if (n_emph == 0) begin
      failures++; $display("FAIL no de-emphasised bit seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
