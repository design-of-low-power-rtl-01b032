// tb_rx_des4: self-checking test of the strobe-domain 1:4 deserializer.
//
// Drives read bursts as the DRAM does: 10 rising strobe edges per burst (8
// data beats with one bit on each strobe edge, then 2 postamble beats), data
// changing halfway between strobe edges, the strobe idle low between bursts.
// After strobe rising edges 2, 4, 6 and 8 of a burst the 4-bit output must
// hold data bits [3:0], [7:4], [11:8] and [15:12] of the burst, so the
// 16 bits of a burst come out as 4 nibbles at half the strobe rate. The even
// edge count keeps the divided strobe in phase from one burst to the next.
module tb_rx_des4;
  logic ydqs = 0, rst_n = 1, ydq = 0;
  logic [3:0] dqb;
  int checks = 0, failures = 0;

  rx_des4 dut (.ydqs, .rst_n, .ydq, .dqb);

  task automatic burst(input logic [15:0] w);
    for (int e = 0; e < 10; e++) begin
      ydq = (e < 8) ? w[2*e] : 1'b0;
      #2 ydqs = 1;
      if (e >= 2 && e % 2 == 0) begin
        #1;
        checks++;
        if (dqb !== w[4*(e/2-1) +: 4]) begin
          failures++;
          $display("FAIL word %h edge %0d dqb=%b exp %b", w, e, dqb, w[4*(e/2-1) +: 4]);
        end
        #1;
      end else #2;
      ydq = (e < 8) ? w[2*e+1] : 1'b0;
      #2 ydqs = 0;
      #2;
    end
    #1;
    checks++;
    if (dqb !== w[15:12]) begin
      failures++; $display("FAIL last nibble %b", dqb);
    end
    #($urandom_range(5, 30));
  endtask

  initial begin
    #1 rst_n = 0;
    #10 rst_n = 1;
    #10;
    burst(16'h1234);
    burst(16'hFFFF);
    burst(16'h0000);
    for (int k = 0; k < 30; k++) burst(16'($urandom));
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
