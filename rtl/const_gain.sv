// const_gain: constant multiplier, out = GAIN * in, registered.
//
// Scales a carrier sample by a fixed integer gain; the published design uses
// three of them, A1 = 3 and A2 = 1 on the cosine carrier and A3 = 1 on the
// sine carrier, to make the amplitude levels the digital modes choose from.
// The product is sign-extended to OUT_W bits; OUT_W must leave room for the
// gain (18 bits hold 3 * 16384). One clock of latency, as the vendor block
// the design used shows by default. Widths and the synchronous active-high
// reset are this design's choices.
module const_gain
  import mmm_pkg::*;
#(
  parameter int signed   GAIN  = 1,
  parameter int unsigned IN_W  = CARRIER_W,
  parameter int unsigned OUT_W = SAMPLE_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [OUT_W-1:0] dout
);

  logic signed [OUT_W-1:0] din_x, prod;
  assign din_x = OUT_W'(din);
  assign prod  = din_x * OUT_W'(GAIN);

  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else     dout <= prod;
  end

endmodule
