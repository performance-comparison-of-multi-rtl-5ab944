// tb_sample_mult: checks the AM multiplier. For random message and carrier
// samples in the Q2.14 range the output must equal floor(a * b / 2**14)
// exactly 3 clocks after the inputs, a full-scale product must saturate,
// and reset must clear the pipeline.
module tb_sample_mult;
  import mmm_pkg::*;

  localparam int LAT = 3;

  logic clk = 1'b0;
  logic rst = 1'b1;
  carrier_t a;
  sample_t  b, p;
  int checks = 0, failures = 0;
  longint hist [$];

  sample_mult #(.LATENCY(LAT)) dut (.clk(clk), .rst(rst), .a(a), .b(b), .p(p));

  always #100ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic longint expect_of(longint x, longint y);
    longint q;
    q = (x * y) >>> FRAC_BITS;
    if (q > 131071) q = 131071;
    if (q < -131072) q = -131072;
    return q;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    longint x, y;
    a = '0;
    b = '0;
    repeat (LAT + 1) @(posedge clk);
    #1;
    check(p == 0, "reset value");
    rst = 1'b0;
    for (int k = 0; k < LAT - 1; k++) hist.push_back(0);
    for (int n = 0; n < 2000; n++) begin
      case (n)
        0: begin x = 16384;  y = 16384;  end
        1: begin x = -16384; y = 16384;  end
        2: begin x = 32767;  y = 131071; end   // saturates high
        3: begin x = -32768; y = 131071; end   // saturates low
        4: begin x = -1;     y = 1;      end   // rounds towards minus infinity
        default: begin
          x = longint'($urandom_range(32768)) - 16384;
          y = longint'($urandom_range(98304)) - 49152;
        end
      endcase
      a = carrier_t'(x);
      b = sample_t'(y);
      hist.push_back(expect_of(x, y));
      @(posedge clk);
      #1;
      // LAT registers: the inputs sampled at this edge show at the output
      // after the edge LAT - 1 clocks later.
      check(longint'(p) == hist[0], $sformatf("got %0d want %0d", p, hist[0]));
      void'(hist.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
