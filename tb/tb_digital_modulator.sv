// tb_digital_modulator: checks the QASK, QPSK and 4-QAM section. The six
// carrier versions are driven with distinct random values so that every
// output identifies which one was picked. Expected, one clock after the
// symbol:
//   QASK 00 -> ~A1cos (-3), 01 -> ~A2cos (-1), 10 -> A2cos (+1), 11 -> A1cos (+3)
//   QPSK, QAM 00 -> A2cos, 01 -> A3sin, 10 -> ~A2cos, 11 -> ~A3sin
// Every symbol of every mode must occur.
module tb_digital_modulator;
  import mmm_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  symbol_t qask_in, qpsk_in, qam_in;
  carrier_set_t car;
  sample_t qask_out, qpsk_out, qam_out;
  int checks = 0, failures = 0;
  int seen [3][4];

  digital_modulator dut (
    .clk(clk), .rst(rst),
    .qask_in(qask_in), .qpsk_in(qpsk_in), .qam_in(qam_in), .car(car),
    .qask_out(qask_out), .qpsk_out(qpsk_out), .qam_out(qam_out)
  );

  always #100ns clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic sample_t ask_ref(symbol_t s, carrier_set_t k);
    case (s)
      2'b00:   return k.a1_cos_n;
      2'b01:   return k.a2_cos_n;
      2'b10:   return k.a2_cos;
      default: return k.a1_cos;
    endcase
  endfunction

  function automatic sample_t psk_ref(symbol_t s, carrier_set_t k);
    case (s)
      2'b00:   return k.a2_cos;
      2'b01:   return k.a3_sin;
      2'b10:   return k.a2_cos_n;
      default: return k.a3_sin_n;
    endcase
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    sample_t e_ask, e_psk, e_qam;
    qask_in = '0; qpsk_in = '0; qam_in = '0;
    car = '0;
    repeat (2) @(posedge clk);
    #1;
    check(qask_out == 0 && qpsk_out == 0 && qam_out == 0, "reset value");
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      // six distinct values: a common random base plus distinct offsets
      car.a1_cos   = sample_t'($urandom_range(30000)) + 18'sd1;
      car.a1_cos_n = car.a1_cos + 18'sd1000;
      car.a2_cos   = car.a1_cos + 18'sd2000;
      car.a2_cos_n = car.a1_cos + 18'sd3000;
      car.a3_sin   = car.a1_cos + 18'sd4000;
      car.a3_sin_n = -car.a1_cos;
      qask_in = symbol_t'($urandom);
      qpsk_in = symbol_t'($urandom);
      qam_in  = symbol_t'($urandom);
      seen[0][qask_in]++;
      seen[1][qpsk_in]++;
      seen[2][qam_in]++;
      e_ask = ask_ref(qask_in, car);
      e_psk = psk_ref(qpsk_in, car);
      e_qam = psk_ref(qam_in, car);
      @(posedge clk);
      #1;
      check(qask_out == e_ask, $sformatf("QASK sym %0d got %0d want %0d", qask_in, qask_out, e_ask));
      check(qpsk_out == e_psk, $sformatf("QPSK sym %0d got %0d want %0d", qpsk_in, qpsk_out, e_psk));
      check(qam_out  == e_qam, $sformatf("QAM sym %0d got %0d want %0d",  qam_in,  qam_out,  e_qam));
    end
    for (int m = 0; m < 3; m++)
      for (int s = 0; s < 4; s++)
        check(seen[m][s] > 0, $sformatf("mode %0d symbol %0d never sent", m, s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
