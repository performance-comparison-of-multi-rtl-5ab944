// mmm_pkg: types and constants shared by the multi-mode modulator.
//
// All waveforms are signed two's-complement fixed-point samples with
// FRAC_BITS fractional bits, so the value 1.0 is 2**FRAC_BITS = 16384.
// The carrier generator produces CARRIER_W-bit samples of amplitude 1.0;
// everything downstream of the constant multipliers is SAMPLE_W bits wide,
// which leaves room for the largest gain (A1 = 3) without overflow.
// Message inputs of the analog modes use the carrier format; the digital
// modes take a 2-bit symbol per input.
//
// The system clock, carrier frequency, message frequency and the gains
// A1 = 3, A2 = A3 = 1 are the design's published values; the word widths,
// the number format and the FM tone frequency are choices of this design.
package mmm_pkg;

  localparam int unsigned FRAC_BITS = 14;
  localparam int unsigned CARRIER_W = 16;
  localparam int unsigned SAMPLE_W  = 18;
  localparam int unsigned PHASE_W   = 32;

  // Published system parameters.
  localparam int unsigned SYS_CLK_HZ    = 5_000_000;
  localparam int unsigned CARRIER_HZ    = 10_000;
  localparam int unsigned MESSAGE_HZ    = 5;
  // Frequency of the FM tone generator (not published; chosen as 2 x fc).
  localparam int unsigned FM_TONE_HZ    = 20_000;

  localparam int signed GAIN_A1 = 3;
  localparam int signed GAIN_A2 = 1;
  localparam int signed GAIN_A3 = 1;

  typedef logic signed [CARRIER_W-1:0] carrier_t;
  typedef logic signed [SAMPLE_W-1:0]  sample_t;
  typedef logic        [PHASE_W-1:0]   phase_t;
  typedef logic        [1:0]           symbol_t;

  // Phase increment for a tone of f_hz at a clock of clk_hz:
  // round(f_hz * 2**PHASE_W / clk_hz).
  function automatic phase_t phase_inc(input int unsigned f_hz,
                                       input int unsigned clk_hz);
    longint unsigned num;
    num = (longint'(f_hz) << PHASE_W) + (longint'(clk_hz) >> 1);
    return phase_t'(num / longint'(clk_hz));
  endfunction

  // The six carrier versions that the digital modes choose from:
  // A1*cos, A2*cos, A3*sin and the bitwise complement of each.
  typedef struct packed {
    sample_t a1_cos;
    sample_t a1_cos_n;
    sample_t a2_cos;
    sample_t a2_cos_n;
    sample_t a3_sin;
    sample_t a3_sin_n;
  } carrier_set_t;

endpackage
