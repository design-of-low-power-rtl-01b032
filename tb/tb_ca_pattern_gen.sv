// tb_ca_pattern_gen: self-checking test of the CA training pattern sequencer.
//
// Steps the generator through three full rounds of the ten-entry sequence
// 0-A-0-B-0-C-0-D-0-E, with idle cycles between the next pulses, and checks
// every entry, the index and the zero flag. Checks that one entry is consumed
// per next pulse (ten pulses bring the index back to 0), that idle cycles hold
// the entry, and that restart returns to the first entry from any position.
module tb_ca_pattern_gen;
  import lp4_pkg::*;
  logic clk = 0, rst_n = 1, restart = 0, next = 0;
  logic [CA_W-1:0] pat;
  logic [3:0] idx;
  logic is_zero;
  int checks = 0, failures = 0;
  logic [CA_W-1:0] exp_seq [10];

  always #5 clk = ~clk;

  ca_pattern_gen dut (.clk, .rst_n, .restart, .next, .pat, .idx, .is_zero);

  task automatic expect_entry(input int i);
    checks++;
    if (pat !== exp_seq[i] || int'(idx) != i || is_zero !== (i % 2 == 0)) begin
      failures++;
      $display("FAIL entry %0d: pat=%b idx=%0d zero=%0d", i, pat, idx, is_zero);
    end
  endtask

  initial begin
    exp_seq = '{6'b000000, 6'b111001, 6'b000000, 6'b000110, 6'b000000, 6'b010001,
                6'b000000, 6'b101110, 6'b000000, 6'b101101};
    #1 rst_n = 0;
    #20 rst_n = 1;
    @(negedge clk);
    expect_entry(0);
    for (int n = 1; n <= 30; n++) begin
      next = 1;
      @(negedge clk);
      next = 0;
      expect_entry(n % 10);
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        expect_entry(n % 10);
      end
    end
    for (int k = 0; k < 5; k++) begin
      int steps;
      steps = $urandom_range(1, 9);
      repeat (steps) begin next = 1; @(negedge clk); end
      next = 0;
      expect_entry(steps);
      restart = 1; next = $urandom_range(0, 1);
      @(negedge clk);
      restart = 0; next = 0;
      expect_entry(0);
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
