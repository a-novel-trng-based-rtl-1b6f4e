// trng_system: the complete generator and the two units that use its
// numbers.
//
// An RC circuit (rc_entropy_source) is charged or discharged by the
// controller's supply pin; the processor's ADC (adc_model) samples it at
// random intervals; the digital core (trng_core: controller and pool of
// stored numbers) turns the codes into 16-bit true random numbers. Every
// word delivered goes to the cipher front end (trn_logic_op), which
// combines raw data with it, and to the tag's anticollision slot counter
// (anticollision_q), which takes Q bits of a fresh word at each Query or
// QueryAdjust. When the slot counter asks for a word and the core is idle,
// a one-word run is started for it; a host run (host_start) has priority.
// The supply pin, the ADC interface and the word stream are brought out for
// observation; the cipher's F operation, the host processor and the RFID
// reader are outside and connect through the remaining ports.
// The RC source and the ADC are behavioural models, so this top simulates
// but does not synthesize; trng_core is the synthesizable part.
module trng_system
  import trng_pkg::*;
#(
  parameter int unsigned ADC_BITS    = 12,
  parameter int unsigned RN_M        = 4,
  parameter int unsigned CONST1      = 63,
  parameter int unsigned CONST2      = 63,
  parameter int unsigned CONV_CYCLES = 20,
  parameter real         VCC         = 3.3,
  parameter real         RC_NS       = 2000.0,
  parameter real         TCLK_NS     = 1000.0 / 60.0,
  parameter real         NOISE_V     = 0.001,
  parameter real         DNL_LSB     = 0.3,
  parameter int unsigned SEED        = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // host run control
  input  logic                host_start,
  input  logic [31:0]         host_rn_bits,
  input  logic                sensor_mode,
  input  logic [1:0]          bit_sel,
  output logic                busy,
  output logic                done,
  output logic                trn_valid,
  output trn_t                trn_data,
  // host access to the pool of stored numbers
  input  logic                host_wr_en,
  input  addr_t               host_wr_addr,
  input  trn_t                host_wr_data,
  output logic                host_wr_ready,
  // observation of the entropy source and the ADC
  output logic                vpower,
  output logic                adc_start,
  output logic                adc_done,
  output logic [ADC_BITS-1:0] adc_data,
  // cipher front end: data in, logic data out to the F operation
  input  logic                raw_valid,
  input  trn_t                raw_data,
  input  lop_e                func_sel,
  output logic                logic_valid,
  output trn_t                logic_data,
  // anticollision: commands from the reader, reply of the tag
  input  logic                ac_cmd_valid,
  output logic                ac_cmd_ready,
  input  ac_cmd_e             ac_cmd,
  input  logic [3:0]          ac_q_in,
  input  logic [2:0]          ac_updn,
  output logic                ac_reply,
  output trn_t                ac_reply_rn,
  output logic [3:0]          ac_q,
  output logic [14:0]         ac_slot
);

  real         v_adc;
  logic        core_start, ac_rn_req, ac_started;
  logic [31:0] core_rn_bits;
  trn_t        key;

  rc_entropy_source #(
    .VCC(VCC), .RC_NS(RC_NS), .TCLK_NS(TCLK_NS), .NOISE_V(NOISE_V), .SEED(SEED)
  ) u_rc (
    .clk, .rst_n, .vpower, .v_adc
  );

  adc_model #(
    .BITS(ADC_BITS), .VREF(VCC), .CONV_CYCLES(CONV_CYCLES), .DNL_LSB(DNL_LSB)
  ) u_adc (
    .clk, .rst_n, .start(adc_start), .vin(v_adc), .done(adc_done), .data(adc_data)
  );

  // Start a one-word run for the slot counter only when it asks, the core
  // is idle, the host is not starting one, and none is already running.
  assign core_start   = !busy && (host_start || (ac_rn_req && !ac_started));
  assign core_rn_bits = host_start ? host_rn_bits : 32'(TRN_W);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         ac_started <= 1'b0;
    else if (!ac_rn_req || trn_valid)   ac_started <= 1'b0;
    else if (core_start && !host_start) ac_started <= 1'b1;
  end

  trng_core #(.ADC_BITS(ADC_BITS), .RN_M(RN_M), .CONST1(CONST1), .CONST2(CONST2)) u_core (
    .clk, .rst_n, .start(core_start), .rn_bits(core_rn_bits), .sensor_mode, .bit_sel,
    .busy, .done, .trn_valid, .trn_data, .vpower, .adc_start, .adc_done, .adc_data,
    .host_wr_en, .host_wr_addr, .host_wr_data, .host_wr_ready
  );

  trn_logic_op u_lop (
    .clk, .rst_n, .trn_valid, .trn_data, .in_valid(raw_valid), .raw_data, .func_sel,
    .out_valid(logic_valid), .logic_data, .key
  );

  anticollision_q u_ac (
    .clk, .rst_n, .cmd_valid(ac_cmd_valid), .cmd_ready(ac_cmd_ready), .cmd(ac_cmd),
    .q_in(ac_q_in), .updn(ac_updn), .rn_req(ac_rn_req), .rn_valid(trn_valid),
    .rn_data(trn_data), .reply(ac_reply), .reply_rn(ac_reply_rn), .q(ac_q), .slot(ac_slot)
  );

endmodule
