// tb_rc_entropy_source: checks the RC model against the closed-form
// charge curve VCC*(1 - exp(-n*T/RC)) and discharge curve v0*exp(-m*T/RC),
// exactly for a noiseless instance and within the noise bound for the
// default one, whose noise must also be present.
module tb_rc_entropy_source;
  logic clk = 0, rst_n = 0;
  logic vpower;
  real  v_a, v_b;
  int checks = 0, failures = 0;
  localparam real T  = 1000.0 / 60.0;
  localparam real RC = 2000.0;

  always #5 clk = ~clk;

  rc_entropy_source                 dut_a (.clk, .rst_n, .vpower, .v_adc(v_a));
  rc_entropy_source #(.NOISE_V(0.0)) dut_b (.clk, .rst_n, .vpower, .v_adc(v_b));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    real ideal, v0;
    int  noisy;
    noisy = 0;
    vpower = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (v_b != 0.0) begin failures++; $display("FAIL: not discharged at reset"); end
    vpower = 1;
    for (int n = 1; n <= 600; n++) begin
      @(negedge clk);
      ideal = 3.3 * (1.0 - $exp(-real'(n) * T / RC));
      checks++;
      if (absr(v_b - ideal) > 1e-9) begin failures++; $display("FAIL: charge n=%0d %f vs %f", n, v_b, ideal); end
      checks++;
      if (absr(v_a - ideal) > 0.001 + 1e-9) begin failures++; $display("FAIL: noisy charge n=%0d", n); end
      if (absr(v_a - ideal) > 1e-6) noisy++;
    end
    v0 = v_b;
    vpower = 0;
    for (int m = 1; m <= 600; m++) begin
      @(negedge clk);
      ideal = v0 * $exp(-real'(m) * T / RC);
      checks++;
      if (absr(v_b - ideal) > 1e-9) begin failures++; $display("FAIL: discharge m=%0d %f vs %f", m, v_b, ideal); end
      checks++;
      if (absr(v_a - ideal) > 0.001 + 1e-9) begin failures++; $display("FAIL: noisy discharge m=%0d", m); end
      if (absr(v_a - ideal) > 1e-6) noisy++;
    end
    checks++;
    if (noisy < 600) begin failures++; $display("FAIL: noise seen only %0d times", noisy); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
