// trn_logic_op: TRN logical operation placed in front of a cipher's F
// operation.
//
// Every word the generator delivers (`trn_valid`) is kept as the current
// key word. A 16-bit raw data word presented with `in_valid` is combined
// with that key by the operation chosen on `func_sel` (XOR, XNOR, AND, OR)
// and leaves registered one clock later on `out_valid`/`logic_data`, ready
// for the F operation. The key resets to zero, so with XOR selected and no
// number yet delivered the data passes unchanged and the cipher behaves as
// the original one. Combining data and TRN by a selectable logical
// operation follows the described encryption front end; the set of four
// operations and their codes (trng_pkg::lop_e) are this design's choice.
module trn_logic_op
  import trng_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic trn_valid,
  input  trn_t trn_data,
  input  logic in_valid,
  input  trn_t raw_data,
  input  lop_e func_sel,
  output logic out_valid,
  output trn_t logic_data,
  output trn_t key
);

  trn_t result;

  always_comb begin
    unique case (func_sel)
      LOP_XOR:  result = raw_data ^ key;
      LOP_XNOR: result = ~(raw_data ^ key);
      LOP_AND:  result = raw_data & key;
      LOP_OR:   result = raw_data | key;
      default:  result = raw_data ^ key;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key        <= '0;
      out_valid  <= 1'b0;
      logic_data <= '0;
    end else begin
      if (trn_valid) key <= trn_data;
      out_valid <= in_valid;
      if (in_valid) logic_data <= result;
    end
  end

endmodule
