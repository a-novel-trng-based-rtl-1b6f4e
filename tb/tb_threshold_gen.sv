// tb_threshold_gen: exhaustive check of the thresholds for every 16-bit
// number, against D_LT = 256 + 4*lo and D_HT = 3839 - 4*hi for a 12-bit ADC,
// and that D_LT stays below D_HT.
module tb_threshold_gen;
  logic [15:0] rn;
  logic [11:0] d_ht, d_lt;
  int checks = 0, failures = 0;

  threshold_gen dut (.rn, .d_ht, .d_lt);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      int lo, hi;
      rn = 16'(v);
      #1;
      lo = v % 256;
      hi = v / 256;
      checks++;
      if (int'(d_lt) != 256 + 4 * lo || int'(d_ht) != 4095 - 256 - 4 * hi || d_lt >= d_ht) begin
        failures++;
        if (failures < 10) $display("FAIL: rn %h ht %0d lt %0d", rn, d_ht, d_lt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
