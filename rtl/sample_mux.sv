// sample_mux: N-input multiplexer with a registered output.
//
// dout takes d[sel] one clock after sel and d are presented, as the vendor
// mux block the design used shows by default (one clock of latency). A
// select value of N or more gives zero. The published design uses 2-input
// muxes for PM and FM, switched by the message, and 4-input muxes for the
// three keyed modes, switched by the 2-bit symbol. The reset is this
// design's choice.
module sample_mux
  import mmm_pkg::*;
#(
  parameter int unsigned N     = 2,
  parameter int unsigned W     = SAMPLE_W,
  parameter int unsigned SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [SEL_W-1:0]    sel,
  input  logic signed [W-1:0] d [N],
  output logic signed [W-1:0] dout
);

  logic signed [W-1:0] pick;

  always_comb begin
    pick = '0;
    for (int i = 0; i < N; i++)
      if (int'(sel) == i) pick = d[i];
  end

  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else     dout <= pick;
  end

endmodule
