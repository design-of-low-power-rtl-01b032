// tb_clk_gate: self-checking test of the glitch-free clock gate.
//
// The enable changes at random times, both synchronously (right after a
// rising clock edge, as from a flop) and asynchronously (anywhere in the
// clock period). Every gated clock pulse must have the full high width of
// the input clock (no glitch, no truncated pulse), the gated clock must be
// low while disabled, and with a synchronous enable the number of gated
// pulses must equal the number of cycles the enable was high.
module tb_clk_gate;
  localparam int HALF = 5;
  logic clk = 0, rst_n = 1, en = 0;
  logic gclk;
  int checks = 0, failures = 0, n_pulse = 0, n_bad = 0, n_en = 0;
  time t_r = 0;

  always #HALF clk = ~clk;

  clk_gate dut (.clk, .rst_n, .en, .gclk);

  always @(posedge gclk) begin t_r = $time; n_pulse++; end
  always @(negedge gclk) if (t_r != 0 && $time - t_r != HALF) begin
    n_bad++; $display("pulse of %0t at %0t", $time - t_r, $time);
  end

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    // synchronous enable
    @(posedge clk);
    n_pulse = 0; n_en = 0;
    for (int n = 0; n < 300; n++) begin
      #1 en = 1'($urandom);
      @(posedge clk);
      if (en) n_en++;
    end
    #1 en = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_pulse != n_en) begin
      failures++; $display("FAIL %0d pulses for %0d enabled cycles", n_pulse, n_en);
    end
    // asynchronous enable
    for (int n = 0; n < 300; n++) begin
      #($urandom_range(1, 4 * HALF)) en = ~en;
    end
    en = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_bad != 0) begin
      failures++; $display("FAIL %0d truncated pulses", n_bad);
    end
    repeat (20) begin
      @(negedge clk); #1;
      checks++;
      if (gclk !== 1'b0) begin failures++; $display("FAIL gated clock active when disabled"); end
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
