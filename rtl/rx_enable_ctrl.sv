// rx_enable_ctrl: receiver enable from the command decoder.
//
// The receiver must be off except during reads, or the controller's own
// write data would loop back into it. This block decodes the command being
// sent; for a READ it counts `rd_dly` PHY_CLK cycles (the trained delay from
// command to returning strobe) and then turns the receiver on for RX_WIN
// cycles, long enough for preamble, burst and postamble. fifo_en pulses when
// the window opens and starts the 4:16 deserializer.
// cmd_valid/cmd come from the SYS_CLK domain and are held for a whole
// SYS_CLK period; a rising edge of "valid READ" starts the count.
// Decoding the command and enabling the receiver after a trained number of
// cycles follows the source design; the window length is this design's own.
module rx_enable_ctrl
  import lp4_pkg::*;
#(
  parameter int unsigned RX_WIN = 12
) (
  input  logic            clk,       // PHY_CLK
  input  logic            rst_n,
  input  logic            cmd_valid,
  input  logic [CA_W-1:0] cmd,
  input  logic [5:0]      rd_dly,
  output logic            rx_on,
  output logic            fifo_en
);

  logic       is_rd, is_rd_q;
  logic [5:0] dcnt;
  logic       counting;
  logic [$clog2(RX_WIN+1)-1:0] wcnt;

  assign is_rd = cmd_valid && (cmd == CMD_RD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      is_rd_q  <= 1'b0;
      dcnt     <= '0;
      counting <= 1'b0;
      wcnt     <= '0;
      rx_on    <= 1'b0;
      fifo_en  <= 1'b0;
    end else begin
      is_rd_q <= is_rd;
      fifo_en <= 1'b0;
      if (is_rd && !is_rd_q) begin
        counting <= 1'b1;
        dcnt     <= rd_dly;
      end else if (counting) begin
        if (dcnt == 0) begin
          counting <= 1'b0;
          rx_on    <= 1'b1;
          fifo_en  <= 1'b1;
          wcnt     <= ($clog2(RX_WIN+1))'(RX_WIN);
        end else begin
          dcnt <= dcnt - 6'd1;
        end
      end
      if (rx_on) begin
        if (wcnt <= 1) rx_on <= 1'b0;
        wcnt <= wcnt - 1'b1;
      end
    end
  end

endmodule
