// tb_fm_tone: checks the DDS in its FM tone configuration (20 kHz from the
// 5 MHz clock, the increment the top level uses). For the k-th valid sample
// the sine and cosine must stay within TOL LSBs of 16384 * sin/cos(2*pi*
// 20e3*k/5e6), and the sine must cross zero upwards once every 250 clocks.
module tb_fm_tone;
  import mmm_pkg::*;

  localparam int     TOL  = 3;
  localparam int     NCYC = 5000;
  localparam phase_t INC  = phase_inc(FM_TONE_HZ, SYS_CLK_HZ);

  logic     clk = 1'b0;
  logic     rst = 1'b1;
  carrier_t s, c;
  logic     v;
  phase_t   ph;
  int checks = 0, failures = 0;

  dds #(.PHASE_INC(INC)) dut (
    .clk(clk), .rst(rst),
    .data_tdata_sine(s), .data_tdata_cosine(c),
    .data_tvalid(v), .phase_tdata_phase_out(ph)
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
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int k, crossings, last_x, span_bad;
    carrier_t prev_s;
    real es, ec;
    check(INC == 32'd17179869, "phase increment for 20 kHz");
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    do begin
      @(posedge clk);
      #1;
    end while (!v);
    // the first valid sample belongs to the first accumulator step
    k = 1;
    prev_s = s;
    crossings = 0;
    last_x = -1;
    span_bad = 0;
    for (int n = 0; n < NCYC; n++) begin
      es = 16384.0 * $sin(2.0 * 3.14159265358979 * real'(FM_TONE_HZ) * real'(k) /
                          real'(SYS_CLK_HZ));
      ec = 16384.0 * $cos(2.0 * 3.14159265358979 * real'(FM_TONE_HZ) * real'(k) /
                          real'(SYS_CLK_HZ));
      check((real'(s) - es) <= TOL && (es - real'(s)) <= TOL,
            $sformatf("sample %0d: %0d vs %f", k, s, es));
      check((real'(c) - ec) <= TOL && (ec - real'(c)) <= TOL,
            $sformatf("cosine %0d: %0d vs %f", k, c, ec));
      if (prev_s < 0 && s >= 0) begin
        if (last_x >= 0 && n - last_x != 250) span_bad++;
        crossings++;
        last_x = n;
      end
      prev_s = s;
      @(posedge clk);
      #1;
      k++;
    end
    check(crossings == 20, $sformatf("crossings %0d", crossings));
    check(span_bad == 0, "period of 250 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
