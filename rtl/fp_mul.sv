// fp_mul: pipelined binary32 multiplier with a clock enable.
//
// The result y = a * b (round to nearest-even, see si_pkg for the handling
// of subnormals, infinities and NaN) appears LATENCY enabled clock cycles
// after a and b are presented: on every rising edge with en high the
// pipeline moves one stage. With en low every stage holds its value, which
// is how the wrapper around a static island stalls the whole island.
//
// Timing: the product is computed in front of the first register; the other
// LATENCY-1 registers only delay it, so that a retiming synthesis step
// can spread the logic over them. The latency of 5 cycles is the value
// the island example assumes for a multiplier; the structure is this
// design's own. There is no reset: the data carries no state of its own,
// and which stages hold a live value is tracked by the wrapper.
module fp_mul
  import si_pkg::*;
#(
  parameter int unsigned LATENCY = 5
) (
  input  logic     clk,
  input  logic     en,
  input  float32_t a,
  input  float32_t b,
  output float32_t y
);

  float32_t stage [LATENCY];

  always_ff @(posedge clk) begin
    if (en) begin
      stage[0] <= f32_mul(a, b);
      for (int i = 1; i < LATENCY; i++) stage[i] <= stage[i-1];
    end
  end

  assign y = stage[LATENCY-1];

  initial assert (LATENCY >= 1) else $error("fp_mul: LATENCY must be at least 1");

endmodule
