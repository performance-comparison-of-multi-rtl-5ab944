// digital_modulator: the QASK, QPSK and 4-QAM section of the multi-mode
// modulator.
//
// Each mode has its own 2-bit symbol input and a 4-input mux, registered
// (one clock), that picks one of the six prepared carriers:
//   symbol  QASK (4-ASK)      QPSK and 4-QAM
//   00      -3 cos  ~A1cos    +cos  A2cos
//   01      -1 cos  ~A2cos    +sin  A3sin
//   10      +1 cos   A2cos    -cos  ~A2cos
//   11      +3 cos   A1cos    -sin  ~A3sin
// (~ is the bitwise complement, i.e. -x - 1.) The QASK levels follow
// A_i = (2i - 1 - M) for M = 4, in natural binary order; QPSK uses the phases
// 0, 90, 180, 270 degrees for symbols 00..11. The published derivation
// gives 4-QAM with two amplitude levels the same four waveforms as QPSK,
// so the two muxes are wired identically; they stay separate because the
// two modes have their own inputs and outputs.
//
// The symbol to waveform table follows the published equations and
// constellation diagrams; the 2-bit symbol encoding of the inputs is as
// labelled there. Muxes switch on the symbol each clock; the symbol rate is
// set by whoever drives the inputs.
module digital_modulator
  import mmm_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  symbol_t      qask_in,
  input  symbol_t      qpsk_in,
  input  symbol_t      qam_in,
  input  carrier_set_t car,
  output sample_t      qask_out,
  output sample_t      qpsk_out,
  output sample_t      qam_out
);

  sample_t ask_d [4];
  assign ask_d[0] = car.a1_cos_n;
  assign ask_d[1] = car.a2_cos_n;
  assign ask_d[2] = car.a2_cos;
  assign ask_d[3] = car.a1_cos;

  sample_t psk_d [4];
  assign psk_d[0] = car.a2_cos;
  assign psk_d[1] = car.a3_sin;
  assign psk_d[2] = car.a2_cos_n;
  assign psk_d[3] = car.a3_sin_n;

  sample_mux #(.N(4), .W(SAMPLE_W)) u_qask_mux (
    .clk(clk), .rst(rst), .sel(qask_in), .d(ask_d), .dout(qask_out)
  );

  sample_mux #(.N(4), .W(SAMPLE_W)) u_qpsk_mux (
    .clk(clk), .rst(rst), .sel(qpsk_in), .d(psk_d), .dout(qpsk_out)
  );

  sample_mux #(.N(4), .W(SAMPLE_W)) u_qam_mux (
    .clk(clk), .rst(rst), .sel(qam_in), .d(psk_d), .dout(qam_out)
  );

endmodule
