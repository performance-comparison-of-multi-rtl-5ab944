// tb_sample_mux: checks the registered multiplexer in its 2-input and
// 4-input forms. Each output must equal the data input that sel picked one
// clock earlier, for random data and selects, and reset must clear it.
module tb_sample_mux;
  import mmm_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic        sel2;
  logic [1:0]  sel4;
  sample_t d2 [2];
  sample_t d4 [4];
  sample_t o2, o4;
  int checks = 0, failures = 0;
  int seen4 [4];

  sample_mux #(.N(2)) u2 (.clk(clk), .rst(rst), .sel(sel2), .d(d2), .dout(o2));
  sample_mux #(.N(4)) u4 (.clk(clk), .rst(rst), .sel(sel4), .d(d4), .dout(o4));

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
    sample_t e2, e4;
    sel2 = 1'b1;
    sel4 = 2'd3;
    foreach (d2[i]) d2[i] = sample_t'(100 + i);
    foreach (d4[i]) d4[i] = sample_t'(200 + i);
    repeat (2) @(posedge clk);
    #1;
    check(o2 == 0 && o4 == 0, "reset value");
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      foreach (d2[i]) d2[i] = sample_t'($urandom);
      foreach (d4[i]) d4[i] = sample_t'($urandom);
      sel2 = 1'($urandom);
      sel4 = 2'($urandom);
      e2 = d2[sel2];
      e4 = d4[sel4];
      seen4[sel4]++;
      @(posedge clk);
      #1;
      // new data after the edge must not show until the next one
      foreach (d4[i]) d4[i] = ~d4[i];
      foreach (d2[i]) d2[i] = ~d2[i];
      #1;
      check(o2 == e2, $sformatf("mux2 got %0d want %0d", o2, e2));
      check(o4 == e4, $sformatf("mux4 got %0d want %0d", o4, e4));
    end
    foreach (seen4[i]) check(seen4[i] > 0, $sformatf("select %0d never used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
