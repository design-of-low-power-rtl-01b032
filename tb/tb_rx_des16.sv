// tb_rx_des16: self-checking test of the PHY_CLK-domain 4:16 deserializer.
//
// After a fifo_en pulse the 4-bit input presents four nibbles, each held for
// two clock cycles, starting at an offset that matches latency code lat. For
// every latency code 0..15 the test checks that the assembled 16-bit word
// has the first nibble in bits [3:0], that word_valid pulses exactly once,
// lat + 7 cycles after fifo_en was sampled (one nibble every 2 cycles), and
// that a wrong latency code assembles a wrong word.
module tb_rx_des16;
  logic clk = 0, rst_n = 1, fifo_en = 0;
  logic [3:0] lat = '0, dqb = '0;
  logic [15:0] word;
  logic word_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rx_des16 dut (.clk, .rst_n, .fifo_en, .lat, .dqb, .word, .word_valid);

  // Nibble k is on dqb before edges lat+2k and lat+2k+1 after the fifo_en edge.
  task automatic run(input logic [15:0] w, input int l, input int dl);
    int n_valid, at;
    lat = 4'(l);
    @(negedge clk) fifo_en = 1;
    @(negedge clk) fifo_en = 0;      // fifo_en edge was edge 0
    n_valid = 0; at = -1;
    for (int n = 1; n <= 30; n++) begin
      int k;
      k = (n - dl) / 2;
      dqb = (n >= dl && k < 4) ? w[4*k +: 4] : 4'hx;
      if (n >= dl && k >= 4) dqb = 4'h0;
      @(negedge clk);
      if (word_valid) begin
        n_valid++; at = n;
        checks++;
        if ((word !== w) == (dl == l)) begin
          failures++;
          $display("FAIL lat %0d data offset %0d word=%h exp %h", l, dl, word, w);
        end
      end
    end
    checks++;
    if (n_valid != 1 || at != l + 7) begin
      failures++; $display("FAIL lat %0d valid pulses %0d at %0d", l, n_valid, at);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int l = 0; l < 16; l++) run(16'($urandom), l, l);
    run(16'h1234, 5, 5);
    run(16'h1234, 5, 7);   // data two cycles late: wrong word
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
