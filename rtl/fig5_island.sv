// fig5_island: the example static island x = ((0.9 + a) * 0.7 + 0.3) * b.
//
// A statically scheduled pipeline of four binary32 operators: an adder
// (0.9 + a), a multiplier (* 0.7), an adder (+ 0.3) and a final
// multiplier (* b). Input a is used in the cycle an iteration starts
// (offset 0). Input b is used only by the last multiplier, so it is
// needed B_OFFSET = 2*ADD_LAT + MUL_LAT enabled cycles after a: 13 with
// the adder latency of 4 and multiplier latency of 5 that this example
// assumes. The result appears LATENCY = B_OFFSET + MUL_LAT = 18 enabled
// cycles after a.
//
// Interface: no handshake. The island advances one stage on each rising
// edge with ce high and holds otherwise. Whoever drives it (the wrapper)
// must present b exactly when the iteration that a started has made
// B_OFFSET enabled steps, and must track which stages hold live data.
// The constants, the operator order and both latencies follow the
// example; the binary32 format is this design's choice.
module fig5_island
  import si_pkg::*;
#(
  parameter int unsigned ADD_LAT = 4,
  parameter int unsigned MUL_LAT = 5
) (
  input  logic     clk,
  input  logic     ce,
  input  float32_t a,
  input  float32_t b,
  output float32_t x
);

  // Constants rounded to binary32.
  localparam float32_t F32_0P9 = 32'h3F66_6666;
  localparam float32_t F32_0P7 = 32'h3F33_3333;
  localparam float32_t F32_0P3 = 32'h3E99_999A;

  float32_t s_add1, s_mul1, s_add2;

  fp_add #(.LATENCY(ADD_LAT)) u_add1 (.clk, .en(ce), .a(a),      .b(F32_0P9), .y(s_add1));
  fp_mul #(.LATENCY(MUL_LAT)) u_mul1 (.clk, .en(ce), .a(s_add1), .b(F32_0P7), .y(s_mul1));
  fp_add #(.LATENCY(ADD_LAT)) u_add2 (.clk, .en(ce), .a(s_mul1), .b(F32_0P3), .y(s_add2));
  fp_mul #(.LATENCY(MUL_LAT)) u_mul2 (.clk, .en(ce), .a(s_add2), .b(b),       .y(x));

endmodule
