// tb_bit_inverter: checks that the inverter outputs -x - 1 (the bitwise
// complement) of the sample presented exactly one clock earlier, for the
// extremes and for random samples, and that reset clears it.
module tb_bit_inverter;
  import mmm_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  sample_t din, dout;
  int checks = 0, failures = 0;

  bit_inverter #(.W(SAMPLE_W)) dut (.clk(clk), .rst(rst), .din(din), .dout(dout));

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
    din = 18'sd5;
    repeat (2) @(posedge clk);
    #1;
    check(dout == 0, "reset value");
    rst = 1'b0;
    prev = 49152;
    din = sample_t'(prev);
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      #1;
      check(int'(dout) == -prev - 1, $sformatf("inv of %0d gave %0d", prev, dout));
      case (n)
        0: prev = -49152;
        1: prev = 0;
        2: prev = -1;
        default: prev = int'($urandom_range(98304)) - 49152;
      endcase
      din = sample_t'(prev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
