// adc_model: behavioural model of the processor's built-in N-bit ADC.
// Not synthesizable: it is the analog-to-digital converter macro.
//
// A pulse on `start` (while idle) samples `vin`; CONV_CYCLES clocks after
// the clock that took `start` (CONV_CYCLES >= 2), `done` pulses for one clock with the code on `data`, which then holds
// until the next conversion. The transfer is the rounding-down converter
//   code = floor(2^BITS / VREF * vin + e(code)),  clamped to 0 .. 2^BITS-1,
// where e is a fixed per-code offset in [-DNL_LSB, +DNL_LSB] LSB that
// shifts each code transition and so gives the converter its differential
// nonlinearity. The offset pattern comes from a hash of the code, so it is
// the same for every run, as a given chip's nonlinearity would be.
// The rounding-down transfer, the 12-bit width and the 3 MHz conversion at a
// 60 MHz clock (20 cycles) follow the described generator; the size and
// shape of the nonlinearity are this model's assumptions.
module adc_model #(
  parameter int unsigned BITS        = 12,
  parameter real         VREF        = 3.3,
  parameter int unsigned CONV_CYCLES = 20,
  parameter real         DNL_LSB     = 0.3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  real             vin,
  output logic            done,
  output logic [BITS-1:0] data
);

  localparam int MAXC = (1 << BITS) - 1;

  int unsigned cnt;
  logic        busy;
  real         held;

  // Offset of the transition into code c, in LSB.
  function automatic real code_offset(input int c);
    int unsigned h;
    h = int'(c) * 32'd2654435761;
    h = h ^ (h >> 15);
    return DNL_LSB * ((real'(h % 32'd1001) - 500.0) / 500.0);
  endfunction

  function automatic int convert(input real v);
    real u;
    int  c;
    u = v * real'(1 << BITS) / VREF;
    if (u < 0.0) return 0;
    c = int'($floor(u));
    if (c > MAXC) return MAXC;
    // Shift the transitions at c and c+1 by their offsets.
    if (c < MAXC && u >= real'(c + 1) + code_offset(c + 1)) return c + 1;
    if (c > 0 && u < real'(c) + code_offset(c)) return c - 1;
    return c;
  endfunction

  initial assert (CONV_CYCLES >= 2) else $error("adc_model: CONV_CYCLES must be at least 2");

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= 0;
      busy <= 1'b0;
      done <= 1'b0;
      data <= '0;
      held <= 0.0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          held <= vin;
          cnt  <= CONV_CYCLES - 2;
          busy <= 1'b1;
        end
      end else if (cnt == 0) begin
        data <= BITS'(convert(held));
        done <= 1'b1;
        busy <= 1'b0;
      end else begin
        cnt <= cnt - 1;
      end
    end
  end

endmodule
