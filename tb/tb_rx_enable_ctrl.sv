// tb_rx_enable_ctrl: self-checking test of the read receive-enable control.
//
// Sends CS-qualified commands (held 8 clock cycles, one SYS_CLK cycle) and
// checks that only a READ opens the receiver: rx_on must rise rd_dly + 2
// cycles after the first cycle the READ is seen, stay high for exactly RX_WIN
// (12) cycles and fall again, with a single fifo_en pulse in the cycle rx_on
// rises. Other commands and CS-less CA words must leave the receiver off.
module tb_rx_enable_ctrl;
  import lp4_pkg::*;
  localparam int RX_WIN = 12;
  logic clk = 0, rst_n = 1, cmd_valid = 0;
  logic [CA_W-1:0] cmd = '0;
  logic [5:0] rd_dly = '0;
  logic rx_on, fifo_en;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rx_enable_ctrl #(.RX_WIN(RX_WIN)) dut (.clk, .rst_n, .cmd_valid, .cmd, .rd_dly, .rx_on, .fifo_en);

  task automatic send(input bit v, input logic [CA_W-1:0] c, input int d);
    int rise_at, width, n_fifo, fifo_at;
    rd_dly = 6'(d);
    @(negedge clk);
    cmd_valid = v; cmd = c;
    rise_at = -1; width = 0; n_fifo = 0; fifo_at = -1;
    for (int n = 1; n < d + 40; n++) begin
      @(negedge clk);               // after edge n (edge 1 sees the command)
      if (n == 8) begin cmd_valid = 0; cmd = '0; end
      if (rx_on) begin
        if (rise_at < 0) rise_at = n;
        width++;
      end
      if (fifo_en) begin n_fifo++; fifo_at = n; end
    end
    checks++;
    if (v && c == CMD_RD) begin
      if (rise_at != d + 2 || width != RX_WIN || n_fifo != 1 || fifo_at != rise_at) begin
        failures++;
        $display("FAIL read rd_dly=%0d: rx_on at %0d for %0d, fifo_en %0d at %0d",
                 d, rise_at, width, n_fifo, fifo_at);
      end
    end else if (width != 0 || n_fifo != 0) begin
      failures++;
      $display("FAIL command %h valid %0d opened the receiver", c, v);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int d = 0; d < 12; d++) send(1, CMD_RD, d);
    send(1, CMD_WR, 3);
    send(1, CMD_MRW, 3);
    send(0, CMD_RD, 3);
    for (int k = 0; k < 10; k++) send(1, CMD_RD, $urandom_range(0, 63));
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
