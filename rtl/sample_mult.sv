// sample_mult: pipelined fixed-point multiplier, out = (a * b) >>> SHIFT.
//
// Used as the AM mixer: the message sample times the carrier sample, both
// with FRAC_BITS fractional bits, gives a product with twice as many, and the
// arithmetic shift by SHIFT brings it back to the common format. The result
// saturates to OUT_W bits. The product passes through LATENCY registers (3
// by default, the vendor multiplier's default latency); the first register
// holds the inputs, the rest the product. Widths, saturation and the
// synchronous active-high reset are this design's choices.
module sample_mult
  import mmm_pkg::*;
#(
  parameter int unsigned A_W     = CARRIER_W,
  parameter int unsigned B_W     = SAMPLE_W,
  parameter int unsigned OUT_W   = SAMPLE_W,
  parameter int unsigned SHIFT   = FRAC_BITS,
  parameter int unsigned LATENCY = 3
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [A_W-1:0]   a,
  input  logic signed [B_W-1:0]   b,
  output logic signed [OUT_W-1:0] p
);

  localparam int unsigned P_W = A_W + B_W;

  logic signed [A_W-1:0] a_r;
  logic signed [B_W-1:0] b_r;
  logic signed [P_W-1:0] prod, shifted;
  logic signed [OUT_W-1:0] sat;
  logic signed [OUT_W-1:0] pipe [LATENCY-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      a_r <= '0;
      b_r <= '0;
    end else begin
      a_r <= a;
      b_r <= b;
    end
  end

  assign prod    = P_W'(a_r) * P_W'(b_r);
  assign shifted = prod >>> SHIFT;

  localparam logic signed [P_W-1:0] MAXV = P_W'((64'sd1 <<< (OUT_W-1)) - 1);
  localparam logic signed [P_W-1:0] MINV = -P_W'(64'sd1 <<< (OUT_W-1));

  always_comb begin
    if (shifted > MAXV)      sat = OUT_W'(MAXV);
    else if (shifted < MINV) sat = OUT_W'(MINV);
    else                     sat = shifted[OUT_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LATENCY-1; i++) pipe[i] <= '0;
    end else begin
      pipe[0] <= sat;
      for (int i = 1; i < LATENCY-1; i++) pipe[i] <= pipe[i-1];
    end
  end

  assign p = pipe[LATENCY-2];

  initial assert (LATENCY >= 2)
    else $error("sample_mult: LATENCY must be at least 2");

endmodule
