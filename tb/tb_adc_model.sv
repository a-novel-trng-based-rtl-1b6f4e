// tb_adc_model: checks the ADC model's conversion time (done exactly
// CONV_CYCLES clocks after start), the ideal rounding-down transfer of an
// instance without nonlinearity, clamping at both ends, and that the
// default instance stays within one code of ideal, repeats its code for
// the same voltage, and does differ from ideal near some transitions.
module tb_adc_model;
  logic clk = 0, rst_n = 0;
  logic start;
  real  vin;
  logic done_a, done_b;
  logic [11:0] data_a, data_b;
  int checks = 0, failures = 0;
  int n_nonideal = 0;

  always #5 clk = ~clk;

  adc_model                    dut_a (.clk, .rst_n, .start, .vin, .done(done_a), .data(data_a));
  adc_model #(.DNL_LSB(0.0))   dut_b (.clk, .rst_n, .start, .vin, .done(done_b), .data(data_b));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(input real v, output logic [11:0] ca, output logic [11:0] cb);
    int n;
    @(negedge clk);
    vin = v; start = 1;
    @(negedge clk);
    start = 0; vin = 0.0;
    n = 1;
    while (!done_a && n < 100) begin @(negedge clk); n++; end
    checks++;
    if (n != 20 || !done_b) begin failures++; $display("FAIL: conversion took %0d cycles", n); end
    ca = data_a; cb = data_b;
    @(negedge clk);
    checks++;
    if (done_a) begin failures++; $display("FAIL: done longer than one cycle"); end
  endtask

  initial begin
    logic [11:0] ca, cb, ca2, cb2;
    int ideal;
    real v;
    start = 0; vin = 0.0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    convert(-0.1, ca, cb);
    checks++; if (ca != 0 || cb != 0) begin failures++; $display("FAIL: negative clamp"); end
    convert(3.4, ca, cb);
    checks++; if (ca != 4095 || cb != 4095) begin failures++; $display("FAIL: top clamp"); end
    for (int i = 0; i < 2000; i++) begin
      v = 3.3 * real'($urandom % 100000) / 100000.0;
      ideal = int'($floor(v * 4096.0 / 3.3));
      if (ideal > 4095) ideal = 4095;
      convert(v, ca, cb);
      checks++;
      if (int'(cb) != ideal) begin failures++; $display("FAIL: ideal %0d got %0d", ideal, cb); end
      checks++;
      if (int'(ca) < ideal - 1 || int'(ca) > ideal + 1) begin
        failures++; $display("FAIL: nonlinear code %0d too far from %0d", ca, ideal);
      end
      if (int'(ca) != ideal) n_nonideal++;
      convert(v, ca2, cb2);
      checks++;
      if (ca2 != ca) begin failures++; $display("FAIL: same voltage, different code"); end
    end
    checks++;
    if (n_nonideal == 0 || n_nonideal > 1000) begin
      failures++; $display("FAIL: %0d non-ideal codes", n_nonideal);
    end
    $display("non-ideal codes: %0d of 2000", n_nonideal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
