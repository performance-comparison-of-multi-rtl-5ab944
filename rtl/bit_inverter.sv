// bit_inverter: bitwise complement of a two's-complement sample, registered.
//
// ~x equals -x - 1, so the inverter turns a carrier upside down (a half-turn
// phase shift) with an offset of one LSB. The published design uses such
// inverters to derive -A*cos and -A*sin for the phase and amplitude keyed
// modes and the inverted carrier for PM. One clock of latency, as the vendor
// block the design used shows by default; the reset is this design's choice.
module bit_inverter
  import mmm_pkg::*;
#(
  parameter int unsigned W = SAMPLE_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);

  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else     dout <= ~din;
  end

endmodule
