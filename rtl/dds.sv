// dds: direct digital synthesizer giving a sine and a cosine carrier.
//
// A PHASE_W-bit phase accumulator advances by PHASE_INC every clock, so the
// output frequency is PHASE_INC * f_clk / 2**PHASE_W (10 kHz at the 5 MHz
// system clock by default; the frequency resolution is 5 MHz / 2**32, about
// 1.2 mHz). The top 24 bits of the phase are folded into [-pi/2, pi/2) and
// turned into cosine and sine by an ITER-stage pipelined CORDIC rotator, one
// stage per clock; the fold's half-turn is undone by negating the result.
// Samples are signed with FRAC_BITS fractional bits and amplitude 1.0
// (16384); the CORDIC error is a few LSBs.
//
// Interface: clk, synchronous active-high rst. data_tdata_sine/cosine and
// phase_tdata_phase_out (the accumulator value the samples belong to) are
// valid, and data_tvalid is high, from LATENCY = ITER + 3 clocks after the
// first clock with rst low; they then change every clock. The port names
// follow the vendor DDS core the published design used; how the sine and
// cosine are computed (CORDIC rather than a look-up table), the widths and
// the latency are this design's choices. There is no back-pressure: the
// carrier runs freely.
module dds
  import mmm_pkg::*;
#(
  parameter phase_t      PHASE_INC = phase_inc(CARRIER_HZ, SYS_CLK_HZ),
  parameter int unsigned ITER      = 16
) (
  input  logic     clk,
  input  logic     rst,
  output carrier_t data_tdata_sine,
  output carrier_t data_tdata_cosine,
  output logic     data_tvalid,
  output phase_t   phase_tdata_phase_out
);

  localparam int unsigned LATENCY = ITER + 3;
  localparam int unsigned ANG_W   = 24;            // CORDIC angle, 2**24 = one turn
  localparam int unsigned GUARD   = 2;             // extra fractional bits in the rotator
  localparam int unsigned XY_W    = CARRIER_W + GUARD + 2;
  // round(2**(FRAC_BITS+GUARD) * prod_i 1/sqrt(1 + 2**-2i)): start vector
  // length that cancels the CORDIC gain.
  localparam int signed   X_START = 39797;

  // round(atan(2**-i) / (2*pi) * 2**ANG_W)
  localparam logic [ANG_W-1:0] ATAN [18] = '{
    24'd2097152, 24'd1238021, 24'd654136, 24'd332050, 24'd166669, 24'd83416,
    24'd41718,   24'd20860,   24'd10430,  24'd5215,   24'd2608,   24'd1304,
    24'd652,     24'd326,     24'd163,    24'd81,     24'd41,     24'd20
  };

  typedef logic signed [XY_W-1:0]  xy_t;
  typedef logic signed [ANG_W:0]   ang_t;

  phase_t acc;
  xy_t    x    [ITER+1];
  xy_t    y    [ITER+1];
  ang_t   z    [ITER+1];
  logic   flip [ITER+1];
  phase_t ph   [ITER+1];
  logic [LATENCY-1:0] vld;

  // Phase accumulator.
  always_ff @(posedge clk) begin
    if (rst) acc <= '0;
    else     acc <= acc + PHASE_INC;
  end

  // Quadrant fold: angles in the second and third quadrant are shifted by
  // half a turn, which flips the sign of both outputs.
  logic [ANG_W-1:0] ang_in;
  logic             fold;
  assign ang_in = acc[PHASE_W-1 -: ANG_W];
  assign fold   = ang_in[ANG_W-1] ^ ang_in[ANG_W-2];

  always_ff @(posedge clk) begin
    if (rst) begin
      x[0] <= '0; y[0] <= '0; z[0] <= '0; flip[0] <= 1'b0; ph[0] <= '0;
    end else begin
      x[0]    <= xy_t'(X_START);
      y[0]    <= '0;
      z[0]    <= ang_t'(signed'(fold ? {~ang_in[ANG_W-1], ang_in[ANG_W-2:0]} : ang_in));
      flip[0] <= fold;
      ph[0]   <= acc;
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (rst) begin
        x[i+1] <= '0; y[i+1] <= '0; z[i+1] <= '0; flip[i+1] <= 1'b0; ph[i+1] <= '0;
      end else begin
        if (!z[i][ANG_W]) begin
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - ang_t'(ATAN[i]);
        end else begin
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + ang_t'(ATAN[i]);
        end
        flip[i+1] <= flip[i];
        ph[i+1]   <= ph[i];
      end
    end
  end

  // Undo the fold, drop the guard bits with rounding.
  xy_t cos_r, sin_r;
  assign cos_r = (flip[ITER] ? -x[ITER] : x[ITER]) + xy_t'(1 << (GUARD-1));
  assign sin_r = (flip[ITER] ? -y[ITER] : y[ITER]) + xy_t'(1 << (GUARD-1));

  always_ff @(posedge clk) begin
    if (rst) begin
      data_tdata_cosine     <= '0;
      data_tdata_sine       <= '0;
      phase_tdata_phase_out <= '0;
      vld                   <= '0;
    end else begin
      data_tdata_cosine     <= carrier_t'(cos_r >>> GUARD);
      data_tdata_sine       <= carrier_t'(sin_r >>> GUARD);
      phase_tdata_phase_out <= ph[ITER];
      vld                   <= {vld[LATENCY-2:0], 1'b1};
    end
  end

  assign data_tvalid = vld[LATENCY-1];

  initial assert (ITER >= 4 && ITER <= 18)
    else $error("dds: ITER must be between 4 and 18");

endmodule
