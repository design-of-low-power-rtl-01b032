// tx_deemph: pre-driver control for 1-tap de-emphasis.
//
// The output driver is split into a main segment and a tap segment. The main
// segment always drives the current bit. When de-emphasis is enabled the tap
// segment drives the inverse of the previous bit, so a run of equal bits is
// sent with reduced swing and every transition with full swing; disabled, the
// tap segment simply helps the main segment. Works on the (rise, fall) bit
// pair of a DDR serializer: the rise bit's predecessor is the previous cycle's
// fall bit. Outputs are registered, one PHY_CLK cycle after the inputs.
// That the pre-driver offers 1-tap de-emphasis follows the source design; the
// split-segment form is this design's own reading of it.
module tx_deemph (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic d_rise,
  input  logic d_fall,
  output logic main_rise,
  output logic main_fall,
  output logic tap_rise,
  output logic tap_fall
);

  logic last_fall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_fall <= 1'b0;
      main_rise <= 1'b0;
      main_fall <= 1'b0;
      tap_rise  <= 1'b0;
      tap_fall  <= 1'b0;
    end else begin
      last_fall <= d_fall;
      main_rise <= d_rise;
      main_fall <= d_fall;
      tap_rise  <= en ? ~last_fall : d_rise;
      tap_fall  <= en ? ~d_rise    : d_fall;
    end
  end

endmodule
