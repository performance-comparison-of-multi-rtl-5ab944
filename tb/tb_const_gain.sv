// tb_const_gain: checks the constant multiplier for the three published
// gains (A1 = 3, A2 = A3 = 1) and a negative gain, with random full-scale
// carrier samples. Every output must equal GAIN * input of exactly one
// clock earlier, and reset must clear the output.
module tb_const_gain;
  import mmm_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  carrier_t din;
  sample_t  d3, d1, dm2;
  int checks = 0, failures = 0;

  const_gain #(.GAIN(3))  u3  (.clk(clk), .rst(rst), .din(din), .dout(d3));
  const_gain #(.GAIN(1))  u1  (.clk(clk), .rst(rst), .din(din), .dout(d1));
  const_gain #(.GAIN(-2)) um2 (.clk(clk), .rst(rst), .din(din), .dout(dm2));

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
    int prev;
    din = '0;
    repeat (2) @(posedge clk);
    #1;
    check(d3 == 0 && d1 == 0 && dm2 == 0, "reset value");
    rst = 1'b0;
    din = 16384;
    prev = 16384;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      #1;
      check(int'(d3)  == 3 * prev,  $sformatf("x3 of %0d gave %0d", prev, d3));
      check(int'(d1)  == prev,      $sformatf("x1 of %0d gave %0d", prev, d1));
      check(int'(dm2) == -2 * prev, $sformatf("x-2 of %0d gave %0d", prev, dm2));
      case (n)
        0: prev = -16384;
        1: prev = 0;
        default: prev = int'($urandom_range(32768)) - 16384;
      endcase
      din = carrier_t'(prev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
