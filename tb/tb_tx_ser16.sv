// tb_tx_ser16: self-checking test of the 16:1 DDR transmit serializer.
//
// A sync pulse every 8 clock cycles (the SYS_CLK boundary) loads a random
// 16-bit word when valid is set. The test checks that the word leaves as 8
// rise/fall bit pairs, least significant bit first, in exactly 8 cycles
// (2 bits per cycle, i.e. 16 bits per SYS_CLK cycle), with oe high for
// exactly those 8 cycles, that words without valid produce no output enable,
// and that every latency code 0..15 delays the stream by that many cycles.
module tb_tx_ser16;
  logic clk = 0, rst_n = 1, sync = 0, valid = 0;
  logic [15:0] word = '0;
  logic [3:0] lat = '0;
  logic d_rise, d_fall, oe;
  int checks = 0, failures = 0;
  int ph = 0;

  always #5 clk = ~clk;

  tx_ser16 dut (.clk, .rst_n, .sync, .word, .valid, .lat, .d_rise, .d_fall, .oe);

  // sync is high for one cycle in every eight.
  always @(posedge clk) begin
    ph   <= (ph + 1) % 8;
    sync <= ((ph + 1) % 8 == 0);
  end

  task automatic send(input logic [15:0] w, input bit v, input int l);
    int n_oe;
    lat = 4'(l);
    // present the word before the sync cycle
    while (!((ph + 1) % 8 == 0)) @(negedge clk);
    word = w; valid = v;
    @(negedge clk);     // sync now high; loads at the next edge
    @(negedge clk);
    valid = 0;
    repeat (l) @(negedge clk);
    n_oe = 0;
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (v && (oe !== 1'b1 || d_rise !== w[2*c] || d_fall !== w[2*c+1])) begin
        failures++;
        $display("FAIL lat %0d pair %0d: oe=%b rise=%b fall=%b word=%h", l, c, oe, d_rise, d_fall, w);
      end
      if (!v && oe !== 1'b0) begin
        failures++; $display("FAIL oe without valid");
      end
      @(negedge clk);
    end
    checks++;
    if (oe !== 1'b0) begin
      failures++; $display("FAIL oe longer than 8 cycles at lat %0d", l);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int l = 0; l < 16; l++) send(16'($urandom), 1, l);
    send(16'hA5C3, 0, 0);
    for (int k = 0; k < 20; k++) send(16'($urandom), 1, $urandom_range(0, 15));
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
