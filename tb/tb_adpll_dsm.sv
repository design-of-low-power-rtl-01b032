// tb_adpll_dsm: self-checking test of the first-order delta-sigma modulator.
//
// For random control words the 10-bit FCW must only take the two codes next
// to the word's integer part, and over any 64 consecutive cycles (the
// accumulator period for 6 fractional bits) the FCW sum must equal exactly
// 64 * integer part + fractional part, i.e. the average equals the word.
// At the top code the output must saturate instead of wrapping to 0.
module tb_adpll_dsm;
  logic clk = 0, rst_n = 1;
  logic [15:0] code = '0;
  logic [9:0] fcw;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  adpll_dsm dut (.clk, .rst_n, .code, .fcw);

  task automatic run(input int ip, input int fr);
    int sum;
    code = 16'((ip << 6) | fr);
    repeat (70) @(posedge clk);
    sum = 0;
    for (int n = 0; n < 64; n++) begin
      @(posedge clk); #1;
      sum += int'(fcw);
      if (ip < 1023 && !(int'(fcw) == ip || int'(fcw) == ip + 1)) begin
        checks++; failures++; $display("FAIL fcw %0d for word %0d.%0d", fcw, ip, fr);
      end
    end
    checks++;
    if (ip < 1023 && sum != 64 * ip + fr) begin
      failures++; $display("FAIL average: sum %0d for word %0d + %0d/64", sum, ip, fr);
    end
    if (ip == 1023 && sum != 64 * 1023) begin
      failures++; $display("FAIL saturation: sum %0d", sum);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    run(520, 0);
    run(520, 1);
    run(520, 32);
    run(100, 63);
    for (int k = 0; k < 20; k++) run($urandom_range(0, 1022), $urandom_range(0, 63));
    run(1023, 63);
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
