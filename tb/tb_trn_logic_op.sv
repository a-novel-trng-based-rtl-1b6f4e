// tb_trn_logic_op: checks that raw data passes unchanged before any number
// arrives (key zero, XOR), that each delivered number becomes the key, and
// every selectable operation one cycle after the data.
module tb_trn_logic_op;
  import trng_pkg::*;
  logic clk = 0, rst_n = 0;
  logic trn_valid, in_valid, out_valid;
  trn_t trn_data, raw_data, logic_data, key;
  lop_e func_sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  trn_logic_op dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trn_t ref_key, expect_data;
    trn_valid = 0; in_valid = 0; trn_data = 0; raw_data = 0; func_sel = LOP_XOR;
    repeat (2) @(negedge clk);
    rst_n = 1;
    ref_key = '0;
    raw_data = 16'hA5C3; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || logic_data != 16'hA5C3) begin failures++; $display("FAIL: passthrough"); end
    for (int i = 0; i < 3000; i++) begin
      trn_valid = 1'($urandom);
      trn_data  = 16'($urandom);
      in_valid  = 1'($urandom);
      raw_data  = 16'($urandom);
      func_sel  = lop_e'($urandom % 4);
      case (func_sel)
        LOP_XOR:  expect_data = raw_data ^ ref_key;
        LOP_XNOR: expect_data = ~(raw_data ^ ref_key);
        LOP_AND:  expect_data = raw_data & ref_key;
        default:  expect_data = raw_data | ref_key;
      endcase
      if (trn_valid) ref_key = trn_data;
      @(negedge clk);
      checks++;
      if (out_valid != in_valid) begin failures++; $display("FAIL: out_valid"); end
      if (in_valid) begin
        checks++;
        if (logic_data != expect_data) begin
          failures++; $display("FAIL: op %s got %h expected %h", func_sel.name(), logic_data, expect_data);
        end
      end
      checks++;
      if (key != ref_key) begin failures++; $display("FAIL: key"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
