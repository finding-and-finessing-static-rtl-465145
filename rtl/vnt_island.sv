// vnt_island: the static island of the vecNormTrans kernel,
//   weight' = ((d * d + 19.5) * d + 3.7) * d + 0.73 * weight.
//
// Six binary32 operators in a fixed schedule, each starting as soon as
// its operands exist (with adder latency ADD_LAT = 4 and multiplier
// latency MUL_LAT = 5):
//   cycle  0        d * d
//   cycle  M        + 19.5
//   cycle  M+A      * d          (d held in a delay line)
//   cycle  2M+A     + 3.7
//   cycle  2M+2A    * d          (d held in the same delay line)
//   cycle  2M+2A    weight * 0.73
//   cycle  3M+2A    the final sum, ready at LATENCY = 3M+3A = 27
// Input d therefore has offset 0 and input weight offset
// W_OFFSET = 2M+2A = 18: weight is read 18 enabled cycles after d. The
// carried dependence on weight leaves LATENCY - W_OFFSET = A + M = 9
// cycles per iteration, the initiation interval reported for this
// kernel's first island.
//
// Interface: no handshake, like fig5_island. The island moves on each
// rising edge with ce high; its wrapper presents weight when the
// iteration is W_OFFSET steps old and tracks which stages are live.
// The expression is the kernel's; the schedule, the latencies (taken from
// the other island example), the binary32 format and building every
// operator separately rather than sharing them are this design's choices.
module vnt_island
  import si_pkg::*;
#(
  parameter int unsigned ADD_LAT = 4,
  parameter int unsigned MUL_LAT = 5
) (
  input  logic     clk,
  input  logic     ce,
  input  float32_t d,
  input  float32_t w,
  output float32_t y
);

  // Constants rounded to binary32.
  localparam float32_t F32_19P5 = 32'h419C_0000;
  localparam float32_t F32_3P7  = 32'h406C_CCCD;
  localparam float32_t F32_0P73 = 32'h3F3A_E148;

  localparam int unsigned STEP = ADD_LAT + MUL_LAT;   // one multiply-add

  float32_t dd, p1, p2, p3, p4, q;
  float32_t d_line [2 * STEP];                         // d delayed by 1 .. 2*STEP

  always_ff @(posedge clk) begin
    if (ce) begin
      d_line[0] <= d;
      for (int i = 1; i < 2 * STEP; i++) d_line[i] <= d_line[i-1];
    end
  end

  fp_mul #(.LATENCY(MUL_LAT)) u_m1 (.clk, .en(ce), .a(d),  .b(d),                   .y(dd));
  fp_add #(.LATENCY(ADD_LAT)) u_a1 (.clk, .en(ce), .a(dd), .b(F32_19P5),            .y(p1));
  fp_mul #(.LATENCY(MUL_LAT)) u_m2 (.clk, .en(ce), .a(p1), .b(d_line[STEP-1]),      .y(p2));
  fp_add #(.LATENCY(ADD_LAT)) u_a2 (.clk, .en(ce), .a(p2), .b(F32_3P7),             .y(p3));
  fp_mul #(.LATENCY(MUL_LAT)) u_m3 (.clk, .en(ce), .a(p3), .b(d_line[2*STEP-1]),    .y(p4));
  fp_mul #(.LATENCY(MUL_LAT)) u_m4 (.clk, .en(ce), .a(w),  .b(F32_0P73),            .y(q));
  fp_add #(.LATENCY(ADD_LAT)) u_a3 (.clk, .en(ce), .a(p4), .b(q),                   .y(y));

endmodule
