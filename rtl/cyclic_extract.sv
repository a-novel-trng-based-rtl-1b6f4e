// cyclic_extract: post-processing of one ADC code into random bits.
//
// RC mode: the code is rotated right by SBS places within its ADC_BITS width
// and the low OUT_BITS bits of the rotated code are the output (`bits`).
// Sensor mode: one bit of the raw code, chosen by `bit_sel` (0 = LSB), is
// the output (`bit1`). The rotation and the 4-bit extraction follow the
// described post-processing; the direction of the rotation (right) is this
// design's choice. Purely combinational.
module cyclic_extract #(
  parameter int unsigned ADC_BITS = 12,
  parameter int unsigned OUT_BITS = 4,
  parameter int unsigned SBS_W    = 3
) (
  input  logic [ADC_BITS-1:0] d,
  input  logic [SBS_W-1:0]    sbs,
  input  logic [1:0]          bit_sel,
  output logic [OUT_BITS-1:0] bits,
  output logic                bit1
);

  logic [2*ADC_BITS-1:0] dd;
  logic [ADC_BITS-1:0]   rot;

  always_comb begin
    dd   = {d, d} >> sbs;
    rot  = dd[ADC_BITS-1:0];
    bits = rot[OUT_BITS-1:0];
    bit1 = d[$clog2(ADC_BITS)'(bit_sel)];
  end

endmodule
