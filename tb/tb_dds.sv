// tb_dds: self-checking testbench for the carrier DDS at its default
// configuration (10 kHz carrier from a 5 MHz clock).
//
// Checks that data_tvalid rises exactly ITER + 3 clocks after reset is
// released, that the reported phase advances by the phase increment every
// clock, that every valid sine and cosine sample is within TOL LSBs of
// 16384 * sin/cos(2*pi*phase/2**32) computed with real arithmetic, and that
// the sine crosses zero upwards once per 500 clocks (10 kHz at 5 MHz).
module tb_dds;
  import mmm_pkg::*;

  localparam int unsigned ITER = 16;
  localparam int          TOL  = 3;
  localparam int          NCYC = 5000;
  localparam phase_t      INC  = phase_inc(CARRIER_HZ, SYS_CLK_HZ);

  logic     clk = 1'b0;
  logic     rst = 1'b1;
  carrier_t s, c;
  logic     v;
  phase_t   ph;

  int checks = 0, failures = 0;

  dds #(.ITER(ITER)) dut (
    .clk(clk), .rst(rst),
    .data_tdata_sine(s), .data_tdata_cosine(c),
    .data_tvalid(v), .phase_tdata_phase_out(ph)
  );

  always #100ns clk = ~clk;   // 5 MHz

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
    int     lat;
    int     crossings;
    int     first_x, last_x;
    phase_t prev_ph;
    carrier_t prev_s;
    real    ang, es, ec;

    repeat (3) @(posedge clk);
    rst <= 1'b0;
    lat = 0;
    do begin
      @(posedge clk);
      #1;
      lat++;
    end while (!v && lat < 100);
    // rst sampled low on the first edge; tvalid seen after that edge.
    check(lat == ITER + 3, $sformatf("latency %0d", lat));

    prev_ph   = ph;
    prev_s    = s;
    crossings = 0;
    first_x   = -1;
    last_x    = -1;
    for (int n = 0; n < NCYC; n++) begin
      @(posedge clk);
      #1;
      check(v, "tvalid stays high");
      check(ph == prev_ph + INC, "phase step");
      ang = 2.0 * 3.14159265358979 * real'(ph) / (2.0 ** 32);
      es  = 16384.0 * $sin(ang);
      ec  = 16384.0 * $cos(ang);
      check((real'(s) - es) <= TOL && (es - real'(s)) <= TOL,
            $sformatf("sine %0d vs %f", s, es));
      check((real'(c) - ec) <= TOL && (ec - real'(c)) <= TOL,
            $sformatf("cosine %0d vs %f", c, ec));
      if (prev_s < 0 && s >= 0) begin
        crossings++;
        if (first_x < 0) first_x = n;
        last_x = n;
      end
      prev_ph = ph;
      prev_s  = s;
    end
    // 5000 clocks at 500 clocks per period: 10 upward zero crossings, 500 apart.
    check(crossings == 10, $sformatf("crossings %0d", crossings));
    check(last_x - first_x == 9 * 500 || last_x - first_x == 9 * 500 + 1 ||
          last_x - first_x == 9 * 500 - 1, $sformatf("period span %0d", last_x - first_x));

    // Reset clears the accumulator and the valid flag.
    rst <= 1'b1;
    @(posedge clk);
    @(posedge clk);
    #1;
    check(!v, "tvalid low in reset");
    check(ph == '0, "phase cleared");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
