// rc_entropy_source: behavioural model of the RC entropy source circuit.
// Not synthesizable: it is the analog part of the generator.
//
// A resistor charges a capacitor towards the supply pin `vpower` (high =
// VCC) or discharges it to ground (low). Per clock of period TCLK_NS the
// node moves by the exact step of the exponential RC response,
//   charge:    v += (VCC - v) * (1 - exp(-TCLK/RC))
//   discharge: v -= v * (1 - exp(-TCLK/RC)),
// and the output `v_adc` is that node voltage plus circuit noise, uniform in
// [-NOISE_V, +NOISE_V] and drawn fresh every clock from a seeded generator.
// The charge/discharge equations and the millivolt order of the noise follow
// the described entropy source; VCC, RC and the noise distribution are
// this model's assumptions. The node starts discharged (0 V) at reset.
module rc_entropy_source #(
  parameter real         VCC     = 3.3,
  parameter real         RC_NS   = 2000.0,
  parameter real         TCLK_NS = 1000.0 / 60.0,
  parameter real         NOISE_V = 0.001,
  parameter int unsigned SEED    = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic vpower,
  output real  v_adc
);

  real         alpha;
  real         v_node;
  int unsigned rng;

  initial begin
    alpha  = 1.0 - $exp(-TCLK_NS / RC_NS);
    v_node = 0.0;
    v_adc  = 0.0;
    rng    = SEED;
  end

  // 32-bit xorshift generator, so runs with the same seed repeat exactly.
  function automatic int unsigned xorshift(input int unsigned s);
    int unsigned x;
    x = s;
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  // Next node voltage for the present supply state.
  function automatic real step(input real v, input logic up);
    return up ? v + (VCC - v) * alpha : v - v * alpha;
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_node <= 0.0;
      v_adc  <= 0.0;
    end else begin
      v_node <= step(v_node, vpower);
      rng    <= xorshift(rng);
      v_adc  <= step(v_node, vpower)
              + NOISE_V * ((real'(rng % 32'd2001) - 1000.0) / 1000.0);
    end
  end

endmodule
