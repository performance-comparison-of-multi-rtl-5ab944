// tb_multi_mode_modulator: end-to-end test of the six-mode modulator with
// every parameter at its default (5 MHz clock, 10 kHz carrier, 20 kHz FM
// tone, A1 = 3, A2 = A3 = 1).
//
// Stimulus, as in the published test set-up: one analog message, a 5 Hz
// sine of amplitude 1.0, drives the AM, PM and FM inputs, and one symbol
// stream drives the QASK, QPSK and QAM inputs. The symbol changes every
// SYM_CLKS clocks (one carrier period) and walks through all 16 symbol
// pairs. The run covers one full message period (1,000,000 clocks).
//
// Reference: for clock edge j after reset release the carrier DDS holds
// C(j), S(j) = 16384*cos/sin(2*pi*(j-ITER-2)*INC/2**32), computed here with
// real arithmetic, and the tone DDS T(j) likewise. From the block latencies
// (gain 1, inverter 1, mux 1, multiplier 3 clocks) the outputs after edge j
// must be, within a few LSBs:
//   AM   floor(m(j-2) * S(j-4) / 2**14)
//   PM   S(j-2) if m(j) >= 0 else -S(j-3) - 1
//   FM   T(j-1) if m(j) >= 0 else S(j-2)
//   QASK by symbol 00..11: -3C(j-3)-1, -C(j-3)-1, C(j-2), 3C(j-2)
//   QPSK/QAM by symbol 00..11: C(j-2), S(j-2), -C(j-3)-1, -S(j-3)-1
// where m(j) and the symbol are the inputs sampled at edge j. The test
// also checks when carrier_valid rises and counts every mechanism (both PM
// phases, both FM frequencies, positive and negative AM envelope, each
// symbol of each keyed mode, symbol changes); one that never occurs is a
// failure.
module tb_multi_mode_modulator;
  import mmm_pkg::*;

  localparam int     ITER     = 16;
  localparam int     NCYC     = SYS_CLK_HZ / MESSAGE_HZ;   // one message period
  localparam int     SYM_CLKS = SYS_CLK_HZ / CARRIER_HZ;
  localparam int     START    = ITER + 3 + 4;
  localparam real    TWO_PI   = 6.283185307179586;
  localparam phase_t C_INC    = phase_inc(CARRIER_HZ, SYS_CLK_HZ);
  localparam phase_t T_INC    = phase_inc(FM_TONE_HZ, SYS_CLK_HZ);

  logic     clk = 1'b0;
  logic     rst = 1'b1;
  symbol_t  qpsk_in, qask_in, qam_in;
  carrier_t pm_in, am_in, fm_in;
  sample_t  qam_out, qask_out, qpsk_out, am_out, fm_out, pm_out;
  logic     carrier_valid;

  int checks = 0, failures = 0;
  int pm_n [2], fm_n [2], am_n [2];
  int sym_n [3][4];
  int sym_changes = 0;
  int max_err = 0;

  multi_mode_modulator dut (
    .clk(clk), .rst(rst),
    .qpsk_in(qpsk_in), .qask_in(qask_in), .qam_in(qam_in),
    .pm_in(pm_in), .am_in(am_in), .fm_in(fm_in),
    .qam_out(qam_out), .qask_out(qask_out), .qpsk_out(qpsk_out),
    .am_out(am_out), .fm_out(fm_out), .pm_out(pm_out),
    .carrier_valid(carrier_valid)
  );

  always #100ns clk = ~clk;   // 5 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic near(input sample_t got, input real want, input int tol, input string what);
    real d;
    d = real'(got) - want;
    if (d < 0) d = -d;
    if (int'(d) > max_err) max_err = int'(d);
    check(d <= real'(tol), $sformatf("%s got %0d want %f", what, got, want));
  endtask

  // message and symbol sampled at edge j
  function automatic int msg(int j);
    return int'($floor(16384.0 * $sin(TWO_PI * real'(MESSAGE_HZ) * real'(j) /
                                     real'(SYS_CLK_HZ)) + 0.5));
  endfunction

  function automatic symbol_t sym(int j);
    int k;
    k = j / SYM_CLKS;
    return symbol_t'(k + k / 4);
  endfunction

  function automatic real wave(int j, phase_t inc, bit cosine);
    longint unsigned p;
    real a;
    p = longint'((longint'(j) - longint'(ITER) - 64'sd2) * longint'(inc)) & 64'hFFFF_FFFF;
    a = TWO_PI * real'(p) / 4294967296.0;
    return 16384.0 * (cosine ? $cos(a) : $sin(a));
  endfunction

  function automatic real S(int j); return wave(j, C_INC, 1'b0); endfunction
  function automatic real C(int j); return wave(j, C_INC, 1'b1); endfunction
  function automatic real T(int j); return wave(j, T_INC, 1'b0); endfunction

  task automatic drive(int j);
    am_in   = carrier_t'(msg(j));
    pm_in   = carrier_t'(msg(j));
    fm_in   = carrier_t'(msg(j));
    qask_in = sym(j);
    qpsk_in = sym(j);
    qam_in  = sym(j);
  endtask

  initial begin : watchdog
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int  m, mj, sj;
    real e;
    symbol_t s, s_prev;

    drive(1);
    repeat (3) @(posedge clk);
    #1;
    check(!carrier_valid, "carrier not valid in reset");
    rst = 1'b0;
    s_prev = sym(1);
    for (int j = 1; j <= NCYC; j++) begin
      drive(j);                       // inputs sampled at edge j
      @(posedge clk);
      #1;
      if (j == ITER + 2) check(!carrier_valid, "carrier_valid not early");
      if (j == ITER + 3) check(carrier_valid,  "carrier_valid on time");
      if (j < START) continue;
      check(carrier_valid, "carrier_valid stays high");

      m = msg(j);
      mj = msg(j - 2);
      s = sym(j);

      // AM
      e = $floor(real'(mj) * S(j - 4) / 16384.0);
      near(am_out, e, 4, "AM");
      if (mj > 0) am_n[1]++; else if (mj < 0) am_n[0]++;

      // PM
      if (m >= 0) begin near(pm_out, S(j - 2), 4, "PM+"); pm_n[1]++; end
      else        begin near(pm_out, -S(j - 3) - 1.0, 4, "PM-"); pm_n[0]++; end

      // FM
      if (m >= 0) begin near(fm_out, T(j - 1), 4, "FM tone"); fm_n[1]++; end
      else        begin near(fm_out, S(j - 2), 4, "FM carrier"); fm_n[0]++; end

      // QASK
      case (s)
        2'b00: near(qask_out, -3.0 * C(j - 3) - 1.0, 10, "QASK 00");
        2'b01: near(qask_out, -C(j - 3) - 1.0,       4,  "QASK 01");
        2'b10: near(qask_out, C(j - 2),              4,  "QASK 10");
        2'b11: near(qask_out, 3.0 * C(j - 2),        10, "QASK 11");
      endcase
      // QPSK and QAM share the waveform table
      case (s)
        2'b00: e = C(j - 2);
        2'b01: e = S(j - 2);
        2'b10: e = -C(j - 3) - 1.0;
        2'b11: e = -S(j - 3) - 1.0;
      endcase
      near(qpsk_out, e, 4, $sformatf("QPSK %b", s));
      near(qam_out,  e, 4, $sformatf("QAM %b", s));
      sym_n[0][s]++;
      sym_n[1][s]++;
      sym_n[2][s]++;
      if (s != s_prev) sym_changes++;
      s_prev = s;
    end

    check(am_n[0] > 0 && am_n[1] > 0, "AM saw both message signs");
    check(pm_n[0] > 0 && pm_n[1] > 0, "PM switched between carrier and inverse");
    check(fm_n[0] > 0 && fm_n[1] > 0, "FM switched between carrier and tone");
    for (int md = 0; md < 3; md++)
      for (sj = 0; sj < 4; sj++)
        check(sym_n[md][sj] > 0, $sformatf("mode %0d symbol %0d never sent", md, sj));
    check(sym_changes > 0, "symbol changes");
    $display("clocks %0d; AM -/+ %0d/%0d, PM inv/carrier %0d/%0d, FM carrier/tone %0d/%0d",
             NCYC, am_n[0], am_n[1], pm_n[0], pm_n[1], fm_n[0], fm_n[1]);
    $display("symbols 00..11 %0d %0d %0d %0d, symbol changes %0d, max error %0d LSB",
             sym_n[0][0], sym_n[0][1], sym_n[0][2], sym_n[0][3], sym_changes, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
