// tb_cyclic_extract: exhaustive check over all 12-bit codes and rotate
// amounts: output bit i must be code bit (i + sbs) mod 12, and in sensor
// mode the selected bit must be code bit bit_sel.
module tb_cyclic_extract;
  logic [11:0] d;
  logic [2:0]  sbs;
  logic [1:0]  bit_sel;
  logic [3:0]  bits;
  logic        bit1;
  int checks = 0, failures = 0;

  cyclic_extract dut (.d, .sbs, .bit_sel, .bits, .bit1);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      for (int s = 0; s < 8; s++) begin
        logic [3:0] expect_bits;
        d = 12'(v); sbs = 3'(s); bit_sel = 2'(s % 4);
        #1;
        for (int i = 0; i < 4; i++) expect_bits[i] = d[(i + s) % 12];
        checks++;
        if (bits !== expect_bits || bit1 !== d[s % 4]) begin
          failures++;
          if (failures < 10) $display("FAIL: d %h sbs %0d bits %h exp %h", d, s, bits, expect_bits);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
