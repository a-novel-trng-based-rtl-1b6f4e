// trn_memory: pool of stored true random numbers.
//
// DEPTH words of W bits with one synchronous read port (data one clock
// after `rd_en`) and one write port. The controller uses the low 8 bits of
// an ADC code as the read address, and writes each new word at the address
// held in the pointer register `ptr`, which it then advances; `ptr` plays
// the part of the fixed location where the address of the last stored
// number is kept. The word array has no reset, like the processor memory it
// stands for: numbers saved earlier survive, and a host fills it through
// the write port. `ptr` is reset to zero.
module trn_memory #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          ptr_we,
  input  logic [AW-1:0] ptr_d,
  output logic [AW-1:0] ptr
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ptr <= '0;
    else if (ptr_we) ptr <= ptr_d;
  end

endmodule
