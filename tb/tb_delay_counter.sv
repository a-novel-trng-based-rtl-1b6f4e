// tb_delay_counter: checks that the random delay lasts exactly (TRN & CONST)
// cycles, for the default mask of 63 and for a mask of 15.
module tb_delay_counter;
  logic clk = 0, rst_n = 0;
  logic load_a, load_b, exp_a, exp_b;
  logic [15:0] trn;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  delay_counter                       dut_a (.clk, .rst_n, .load(load_a), .trn, .expired(exp_a));
  delay_counter #(.TRN_W(16), .CONST(15)) dut_b (.clk, .rst_n, .load(load_b), .trn, .expired(exp_b));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Load at one negedge, then count negedges until expired is seen.
  task automatic measure(input bit which, input logic [15:0] v, input int expect_cycles);
    int n;
    @(negedge clk);
    trn = v;
    if (which) load_b = 1; else load_a = 1;
    @(negedge clk);
    load_a = 0; load_b = 0;
    n = 0;
    while (!(which ? exp_b : exp_a)) begin
      n++;
      @(negedge clk);
    end
    checks++;
    if (n != expect_cycles) begin
      failures++;
      $display("FAIL: mask %0d trn %h waited %0d expected %0d", which ? 15 : 63, v, n, expect_cycles);
    end
  endtask

  initial begin
    load_a = 0; load_b = 0; trn = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (!exp_a || !exp_b) begin failures++; $display("FAIL: not expired after reset"); end
    measure(0, 16'h0000, 0);
    measure(0, 16'hFFFF, 63);
    measure(1, 16'hFFFF, 15);
    for (int i = 0; i < 300; i++) begin
      logic [15:0] v;
      v = 16'($urandom);
      measure(0, v, int'(v[5:0]));
      measure(1, v, int'(v[3:0]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
