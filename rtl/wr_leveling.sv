// wr_leveling: write-leveling search of the DQS launch phase.
//
// In write-leveling mode the DRAM samples CK with each rising DQS edge and
// returns the sample on DQ asynchronously. This block steps the DQS phase code
// from 0 upward; for each code it waits SETTLE cycles, asks for one DQS pulse
// (dqs_pulse), waits FB_WAIT cycles and samples the feedback of every byte
// (through a two-flop synchroniser). The code at which a byte's feedback
// first changes from 0 to 1 is where its DQS edge crosses the CK rising edge;
// it is stored as that byte's result. The sweep ends when every byte is found
// or the code range (one tCK, 2^CODE_W codes) is exhausted.
// done pulses at the end; found[b] and code[b] hold the results.
// The search for the DQS/CK crossing follows the source design; the step
// timing and the shared sweep for all bytes are this design's own.
module wr_leveling #(
  parameter int unsigned NBYTE   = 2,
  parameter int unsigned CODE_W  = 7,
  parameter int unsigned SETTLE  = 4,
  parameter int unsigned FB_WAIT = 6
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [NBYTE-1:0]              fb,
  output logic [CODE_W-1:0]             sweep_code,
  output logic                          dqs_pulse,
  output logic [NBYTE-1:0][CODE_W-1:0]  code,
  output logic [NBYTE-1:0]              found,
  output logic                          busy,
  output logic                          done
);

  typedef enum logic [1:0] {W_IDLE, W_SETTLE, W_WAIT, W_SAMPLE} wst_t;
  wst_t st;
  logic [NBYTE-1:0] fb_s1, fb_s2, prev_fb, seen0;
  logic [4:0] cnt;

  assign busy = (st != W_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fb_s1 <= '0;
      fb_s2 <= '0;
    end else begin
      fb_s1 <= fb;
      fb_s2 <= fb_s1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= W_IDLE;
      sweep_code <= '0;
      dqs_pulse  <= 1'b0;
      code       <= '0;
      found      <= '0;
      prev_fb    <= '0;
      seen0      <= '0;
      cnt        <= '0;
      done       <= 1'b0;
    end else begin
      dqs_pulse <= 1'b0;
      done      <= 1'b0;
      unique case (st)
        W_IDLE: if (start) begin
          sweep_code <= '0;
          found      <= '0;
          seen0      <= '0;
          cnt        <= 5'(SETTLE);
          st         <= W_SETTLE;
        end
        W_SETTLE: begin
          if (cnt == 0) begin
            dqs_pulse <= 1'b1;
            cnt       <= 5'(FB_WAIT);
            st        <= W_WAIT;
          end else cnt <= cnt - 5'd1;
        end
        W_WAIT: begin
          if (cnt == 0) st <= W_SAMPLE;
          else cnt <= cnt - 5'd1;
        end
        W_SAMPLE: begin
          for (int b = 0; b < NBYTE; b++) begin
            if (!fb_s2[b]) seen0[b] <= 1'b1;
            if (!found[b] && seen0[b] && !prev_fb[b] && fb_s2[b]) begin
              found[b] <= 1'b1;
              code[b]  <= sweep_code;
            end
          end
          prev_fb <= fb_s2;
          if (((found | (seen0 & ~prev_fb & fb_s2)) == '1) || sweep_code == '1) begin
            st   <= W_IDLE;
            done <= 1'b1;
          end else begin
            sweep_code <= sweep_code + 1'b1;
            cnt        <= 5'(SETTLE);
            st         <= W_SETTLE;
          end
        end
        default: st <= W_IDLE;
      endcase
    end
  end

endmodule
