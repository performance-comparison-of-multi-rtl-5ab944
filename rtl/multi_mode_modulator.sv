// multi_mode_modulator: six modulators (AM, PM, FM, QASK, QPSK, 4-QAM) that
// run side by side and share one carrier generator and three constant
// multipliers.
//
// Structure:
//   carrier DDS (10 kHz at 5 MHz)  -> cosine, sine
//   A1 = 3 on the cosine, A2 = 1 on the cosine, A3 = 1 on the sine
//   a bitwise inverter after each of the three gains
//   analog section : AM multiplier, PM mux and FM mux on A3*sin (and its
//                    inverse); the FM mux also takes a second sine, the FM
//                    tone, from its own DDS (20 kHz)
//   digital section: QASK mux on {A1cos, A2cos, inverses}; QPSK and 4-QAM
//                    muxes on {A2cos, A3sin, inverses}
// The six message inputs and six outputs are independent: every output is
// valid at the same time and each follows only its own input.
//
// Timing (clk is the 5 MHz system clock, rst synchronous active-high):
// carrier_valid rises CARRIER_ITER + 3 clocks after reset is released and the
// outputs carry meaningful waveforms from then on. From an input change to
// the output: AM 3 clocks, PM/FM/QASK/QPSK/QAM 1 clock. The carrier reaches
// a mux 1 clock (through a gain) or 2 clocks (through a gain and an inverter)
// after the DDS.
//
// Sharing the DDS and the three constant multipliers among all six modes,
// the gains A1 = 3, A2 = A3 = 1, the clock and carrier frequencies and which
// carrier version each mode and symbol selects follow the published design.
// The CORDIC inside the DDS, the word widths, the FM tone frequency, the
// message-sign mux select and the reset are this design's choices.
module multi_mode_modulator
  import mmm_pkg::*;
#(
  parameter phase_t      CARRIER_INC  = phase_inc(CARRIER_HZ, SYS_CLK_HZ),
  parameter phase_t      FM_TONE_INC  = phase_inc(FM_TONE_HZ, SYS_CLK_HZ),
  parameter int unsigned CARRIER_ITER = 16,
  parameter int signed   A1           = GAIN_A1,
  parameter int signed   A2           = GAIN_A2,
  parameter int signed   A3           = GAIN_A3
) (
  input  logic     clk,
  input  logic     rst,
  // digital message inputs, one 2-bit symbol each
  input  symbol_t  qpsk_in,
  input  symbol_t  qask_in,
  input  symbol_t  qam_in,
  // analog message inputs, signed, 1.0 = 2**FRAC_BITS
  input  carrier_t pm_in,
  input  carrier_t am_in,
  input  carrier_t fm_in,
  // modulated outputs, signed, 1.0 = 2**FRAC_BITS
  output sample_t  qam_out,
  output sample_t  qask_out,
  output sample_t  qpsk_out,
  output sample_t  am_out,
  output sample_t  fm_out,
  output sample_t  pm_out,
  output logic     carrier_valid
);

  // ---------------------------------------------------------------- carrier
  carrier_t car_sin, car_cos;
  phase_t   car_phase;

  dds #(.PHASE_INC(CARRIER_INC), .ITER(CARRIER_ITER)) u_carrier_dds (
    .clk(clk), .rst(rst),
    .data_tdata_sine(car_sin), .data_tdata_cosine(car_cos),
    .data_tvalid(carrier_valid), .phase_tdata_phase_out(car_phase)
  );

  // FM tone: a second, free-running sine.
  carrier_t tone_sin, tone_cos;
  logic     tone_valid;
  phase_t   tone_phase;

  dds #(.PHASE_INC(FM_TONE_INC), .ITER(CARRIER_ITER)) u_fm_tone (
    .clk(clk), .rst(rst),
    .data_tdata_sine(tone_sin), .data_tdata_cosine(tone_cos),
    .data_tvalid(tone_valid), .phase_tdata_phase_out(tone_phase)
  );

  // ------------------------------------------------- shared gains, inverters
  carrier_set_t car;

  const_gain #(.GAIN(A1), .IN_W(CARRIER_W), .OUT_W(SAMPLE_W)) u_gain_a1 (
    .clk(clk), .rst(rst), .din(car_cos), .dout(car.a1_cos)
  );
  const_gain #(.GAIN(A2), .IN_W(CARRIER_W), .OUT_W(SAMPLE_W)) u_gain_a2 (
    .clk(clk), .rst(rst), .din(car_cos), .dout(car.a2_cos)
  );
  const_gain #(.GAIN(A3), .IN_W(CARRIER_W), .OUT_W(SAMPLE_W)) u_gain_a3 (
    .clk(clk), .rst(rst), .din(car_sin), .dout(car.a3_sin)
  );

  bit_inverter #(.W(SAMPLE_W)) u_inv_a1 (
    .clk(clk), .rst(rst), .din(car.a1_cos), .dout(car.a1_cos_n)
  );
  bit_inverter #(.W(SAMPLE_W)) u_inv_a2 (
    .clk(clk), .rst(rst), .din(car.a2_cos), .dout(car.a2_cos_n)
  );
  bit_inverter #(.W(SAMPLE_W)) u_inv_a3 (
    .clk(clk), .rst(rst), .din(car.a3_sin), .dout(car.a3_sin_n)
  );

  // --------------------------------------------------------------- sections
  analog_modulator u_analog (
    .clk(clk), .rst(rst),
    .am_in(am_in), .pm_in(pm_in), .fm_in(fm_in),
    .carrier(car.a3_sin), .carrier_n(car.a3_sin_n),
    .fm_tone(SAMPLE_W'(tone_sin)),
    .am_out(am_out), .pm_out(pm_out), .fm_out(fm_out)
  );

  digital_modulator u_digital (
    .clk(clk), .rst(rst),
    .qask_in(qask_in), .qpsk_in(qpsk_in), .qam_in(qam_in),
    .car(car),
    .qask_out(qask_out), .qpsk_out(qpsk_out), .qam_out(qam_out)
  );

endmodule
