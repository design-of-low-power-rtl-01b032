// ca_pattern_gen: command-bus training pattern sequencer.
//
// Steps through the ten-entry sequence 0-A-0-B-0-C-0-D-0-E and wraps back to
// the start, one entry per `next` pulse. A zero pattern sits between the
// data patterns so that a timing error on one pattern cannot alias into the
// next. `restart` returns to the first entry. pat is registered: it changes
// on the clock edge that samples next or restart.
// The five patterns and their order follow the source design's CA training
// waveform; the handshake is this design's own.
module ca_pattern_gen
  import lp4_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            restart,
  input  logic            next,
  output logic [CA_W-1:0] pat,
  output logic [3:0]      idx,
  output logic            is_zero
);

  function automatic logic [CA_W-1:0] entry(input logic [3:0] i);
    unique case (i)
      4'd1:    return CA_PAT_A;
      4'd3:    return CA_PAT_B;
      4'd5:    return CA_PAT_C;
      4'd7:    return CA_PAT_D;
      4'd9:    return CA_PAT_E;
      default: return '0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       idx <= '0;
    else if (restart) idx <= '0;
    else if (next)    idx <= (idx == 4'd9) ? 4'd0 : idx + 4'd1;
  end

  assign pat     = entry(idx);
  assign is_zero = ~idx[0];

endmodule
