// analog_modulator: the AM, PM and FM section of the multi-mode modulator.
//
// Each mode has its own message input and output, all running at once:
//   AM  am_out = (am_in * carrier) >>> FRAC_BITS, through the 3-clock
//       multiplier; the message multiplies the carrier's amplitude.
//   PM  a 2-input mux switched by the PM message: carrier while pm_in >= 0,
//       the inverted carrier (a half-turn phase step) while pm_in < 0.
//   FM  a 2-input mux switched by the FM message: the FM tone (a second,
//       higher-frequency sine) while fm_in >= 0, the carrier while fm_in < 0.
// The muxes add one clock. The carrier and its complement come from the
// shared carrier front end (A3 * sin and its bitwise inverse); they are not
// delay-matched, so the inverted input lags by one clock, as in the
// published model, where each block keeps its own latency.
//
// The three mechanisms and which mux input each level selects follow the
// published model (multiplier for AM, carrier / inverted carrier for PM,
// carrier / second sine for FM). Deriving the mux select from the sign of
// the message is this design's choice.
module analog_modulator
  import mmm_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  carrier_t am_in,
  input  carrier_t pm_in,
  input  carrier_t fm_in,
  input  sample_t  carrier,
  input  sample_t  carrier_n,
  input  sample_t  fm_tone,
  output sample_t  am_out,
  output sample_t  pm_out,
  output sample_t  fm_out
);

  // AM: message times carrier.
  sample_mult #(
    .A_W(CARRIER_W), .B_W(SAMPLE_W), .OUT_W(SAMPLE_W), .SHIFT(FRAC_BITS), .LATENCY(3)
  ) u_am_mult (
    .clk(clk), .rst(rst), .a(am_in), .b(carrier), .p(am_out)
  );

  // PM: d0 = inverted carrier, d1 = carrier.
  sample_t pm_d [2];
  assign pm_d[0] = carrier_n;
  assign pm_d[1] = carrier;

  sample_mux #(.N(2), .W(SAMPLE_W)) u_pm_mux (
    .clk(clk), .rst(rst), .sel(~pm_in[CARRIER_W-1]), .d(pm_d), .dout(pm_out)
  );

  // FM: d0 = carrier, d1 = FM tone.
  sample_t fm_d [2];
  assign fm_d[0] = carrier;
  assign fm_d[1] = fm_tone;

  sample_mux #(.N(2), .W(SAMPLE_W)) u_fm_mux (
    .clk(clk), .rst(rst), .sel(~fm_in[CARRIER_W-1]), .d(fm_d), .dout(fm_out)
  );

endmodule
