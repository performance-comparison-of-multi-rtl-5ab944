// tb_analog_modulator: checks the AM, PM and FM section with independent,
// random carrier, inverted-carrier, FM-tone and message samples.
// Expected values, worked out here from the mode definitions:
//   AM = floor(am_in * carrier / 2**14), 3 clocks after the inputs
//   PM = carrier if pm_in >= 0 else carrier_n, 1 clock after
//   FM = fm_tone if fm_in >= 0 else carrier,   1 clock after
// Both settings of each mux must occur.
module tb_analog_modulator;
  import mmm_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  carrier_t am_in, pm_in, fm_in;
  sample_t  carrier, carrier_n, fm_tone;
  sample_t  am_out, pm_out, fm_out;
  int checks = 0, failures = 0;
  int pm_pos = 0, pm_neg = 0, fm_pos = 0, fm_neg = 0;
  longint am_hist [$];

  analog_modulator dut (
    .clk(clk), .rst(rst),
    .am_in(am_in), .pm_in(pm_in), .fm_in(fm_in),
    .carrier(carrier), .carrier_n(carrier_n), .fm_tone(fm_tone),
    .am_out(am_out), .pm_out(pm_out), .fm_out(fm_out)
  );

  always #100ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    sample_t e_pm, e_fm;
    longint  m, c;
    am_in = '0; pm_in = '0; fm_in = '0;
    carrier = '0; carrier_n = '0; fm_tone = '0;
    repeat (4) @(posedge clk);
    #1;
    check(am_out == 0 && pm_out == 0 && fm_out == 0, "reset value");
    rst = 1'b0;
    am_hist.push_back(0);
    am_hist.push_back(0);
    for (int n = 0; n < 2000; n++) begin
      m = longint'($urandom_range(32768)) - 16384;
      c = longint'($urandom_range(32768)) - 16384;
      am_in     = carrier_t'(m);
      carrier   = sample_t'(c);
      carrier_n = sample_t'($urandom_range(32768)) - 18'sd16384;
      fm_tone   = sample_t'($urandom_range(32768)) - 18'sd16384;
      pm_in     = carrier_t'($urandom);
      fm_in     = carrier_t'($urandom);
      if (n == 0) pm_in = 16'sd0;      // zero counts as non-negative
      if (n == 1) fm_in = 16'sd0;
      am_hist.push_back((m * c) >>> FRAC_BITS);
      e_pm = (pm_in >= 0) ? carrier : carrier_n;
      e_fm = (fm_in >= 0) ? fm_tone : carrier;
      if (pm_in >= 0) pm_pos++; else pm_neg++;
      if (fm_in >= 0) fm_pos++; else fm_neg++;
      @(posedge clk);
      #1;
      check(pm_out == e_pm, $sformatf("PM got %0d want %0d", pm_out, e_pm));
      check(fm_out == e_fm, $sformatf("FM got %0d want %0d", fm_out, e_fm));
      check(longint'(am_out) == am_hist[0],
            $sformatf("AM got %0d want %0d", am_out, am_hist[0]));
      void'(am_hist.pop_front());
    end
    check(pm_pos > 0 && pm_neg > 0, "PM used both carrier phases");
    check(fm_pos > 0 && fm_neg > 0, "FM used both frequencies");
    $display("PM carrier/inverted %0d/%0d, FM tone/carrier %0d/%0d",
             pm_pos, pm_neg, fm_pos, fm_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
