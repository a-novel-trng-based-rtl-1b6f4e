// threshold_gen: charge and discharge thresholds drawn from a stored TRN.
//
// The controller discharges the RC circuit when the last ADC code is above
// D_HT and charges it when the code is below D_LT; both thresholds are
// made from a random number so that the turning points move from one word
// to the next. How the number maps onto the thresholds is this design's
// choice: the low byte places D_LT inside the second sixteenth .. fifth
// sixteenth of the code range, the high byte places D_HT at the mirror
// position near the top, so that the two never cross and never sit on a
// rail the RC curve only approaches:
//   D_LT = 2^(N-4)            + rn[7:0]  * 2^(N-2) / 256
//   D_HT = 2^N - 1 - 2^(N-4)  - rn[15:8] * 2^(N-2) / 256
// Purely combinational.
module threshold_gen #(
  parameter int unsigned ADC_BITS = 12
) (
  input  logic [15:0]         rn,
  output logic [ADC_BITS-1:0] d_ht,
  output logic [ADC_BITS-1:0] d_lt
);

  localparam int unsigned W = ADC_BITS + 8;
  localparam logic [W-1:0] BASE = W'(1) << (ADC_BITS - 4);
  localparam logic [W-1:0] FULL = (W'(1) << ADC_BITS) - W'(1);

  logic [W-1:0] lo_span, hi_span;

  always_comb begin
    lo_span = (W'(rn[7:0])  << (ADC_BITS - 2)) >> 8;
    hi_span = (W'(rn[15:8]) << (ADC_BITS - 2)) >> 8;
    d_lt    = ADC_BITS'(BASE + lo_span);
    d_ht    = ADC_BITS'(FULL - BASE - hi_span);
  end

endmodule
