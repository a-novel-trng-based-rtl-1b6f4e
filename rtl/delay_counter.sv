// delay_counter: the random delay of the generator, t = (TRN & CONST) clock
// cycles.
//
// On `load` the counter takes `trn & CONST`; it then counts down by one per
// clock and `expired` is high once it has reached zero. A controller that
// loads it and then waits while `expired` is low spends exactly
// (trn & CONST) cycles in its wait state after the load cycle, plus the one
// cycle in which it sees `expired`. The masking with a constant follows the
// described delays t0 = TRN0 & const1 and tr = TRN_DADC & const2 in units
// of the clock period; the counter itself is this design's way of doing it.
module delay_counter #(
  parameter int unsigned TRN_W = 16,
  parameter int unsigned CONST = 63
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [TRN_W-1:0] trn,
  output logic             expired
);

  localparam int unsigned CW = (CONST > 0) ? $clog2(CONST + 1) : 1;
  localparam logic [TRN_W-1:0] MASK = TRN_W'(CONST);

  logic [CW-1:0] cnt;
  logic [TRN_W-1:0] masked;

  assign masked = trn & MASK;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (load)       cnt <= CW'(masked);
    else if (cnt != '0)  cnt <= cnt - 1'b1;
  end

  assign expired = (cnt == '0);

endmodule
