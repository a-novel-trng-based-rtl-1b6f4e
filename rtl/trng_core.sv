// trng_core: digital part of the generator inside the processor: the
// controller (trngc) and the pool of stored numbers (trn_memory).
//
// The pool's write port is shared: while the controller is idle a host may
// store numbers through host_wr_* (for example numbers saved in non-volatile
// memory before power-down); while a run is in progress the controller owns
// the port and host writes are ignored (`host_wr_ready` low). The ADC and
// the RC supply pin are outside, on adc_* and vpower. Timing is that of
// trngc.
module trng_core
  import trng_pkg::*;
#(
  parameter int unsigned ADC_BITS = 12,
  parameter int unsigned RN_M     = 4,
  parameter int unsigned CONST1   = 63,
  parameter int unsigned CONST2   = 63
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [31:0]         rn_bits,
  input  logic                sensor_mode,
  input  logic [1:0]          bit_sel,
  output logic                busy,
  output logic                done,
  output logic                trn_valid,
  output trn_t                trn_data,
  output logic                vpower,
  output logic                adc_start,
  input  logic                adc_done,
  input  logic [ADC_BITS-1:0] adc_data,
  input  logic                host_wr_en,
  input  addr_t               host_wr_addr,
  input  trn_t                host_wr_data,
  output logic                host_wr_ready
);

  logic  rd_en, c_wr_en, wr_en, ptr_we;
  addr_t rd_addr, c_wr_addr, wr_addr, ptr, ptr_d;
  trn_t  rd_data, c_wr_data, wr_data;

  trngc #(.ADC_BITS(ADC_BITS), .RN_M(RN_M), .CONST1(CONST1), .CONST2(CONST2)) u_ctrl (
    .clk, .rst_n, .start, .rn_bits, .sensor_mode, .bit_sel, .busy, .done,
    .trn_valid, .trn_data, .vpower, .adc_start, .adc_done, .adc_data,
    .mem_rd_en(rd_en), .mem_rd_addr(rd_addr), .mem_rd_data(rd_data),
    .mem_wr_en(c_wr_en), .mem_wr_addr(c_wr_addr), .mem_wr_data(c_wr_data),
    .mem_ptr(ptr), .mem_ptr_we(ptr_we), .mem_ptr_d(ptr_d)
  );

  assign host_wr_ready = !busy;
  assign wr_en   = busy ? c_wr_en   : host_wr_en;
  assign wr_addr = busy ? c_wr_addr : host_wr_addr;
  assign wr_data = busy ? c_wr_data : host_wr_data;

  trn_memory #(.DEPTH(1 << ADDR_W), .W(TRN_W)) u_mem (
    .clk, .rst_n, .rd_en, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data,
    .ptr_we, .ptr_d, .ptr
  );

endmodule
