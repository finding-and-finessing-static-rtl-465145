// vnt_island_shared: the vecNormTrans static island,
//   weight' = ((d * d + 19.5) * d + 3.7) * d + 0.73 * weight,
// on one shared multiplier and one shared adder.
//
// The loop around this island can start an iteration only every
// II = ADD_LAT + MUL_LAT = 9 cycles (its carried dependence on weight),
// so a separate operator for each of the seven operations would idle most
// of the time. Here the four multiplications and three additions take
// turns on one fp_mul and one fp_add under a fixed modulo schedule: a
// slot counter, advanced with the clock enable and cleared by reset,
// names the cycle of the current interval, and every operator input is a
// multiplexer driven by it. With A = ADD_LAT and M = MUL_LAT (4 and 5):
//   slot 0      multiplier  d * d                  (issued at cycle 0)
//   slot M      adder       + 19.5                 (cycle M)
//   slot 0      result of the adder kept in h1     (cycle M+A)
//   slot 1      multiplier  h1 * d                 (cycle M+A+1)
//   slot M+1    adder       + 3.7                  (cycle 2M+A+1)
//   slot 1      result kept in h2                  (cycle 2M+2A+1)
//   slot 2      multiplier  h2 * d                 (cycle 2M+2A+2)
//   slot 3      multiplier  weight * 0.73          (cycle 2M+2A+3 = 21)
//   slot M+2    product h2*d kept in h3            (cycle 3M+2A+2)
//   slot M+3    adder       h3 + weight * 0.73     (cycle 3M+2A+3)
//   result at the adder's output                   (cycle 3M+3A+3 = 30)
// No two operations of any iterations meet on an operator, because their
// slots differ. d is held for its later uses in a delay line moved by the
// clock enable.
//
// Interface: like vnt_island, a pipeline with clock enable and no
// handshake. Iterations may start only in slot 0, the wrapper must be
// reset with the island so that its start slots line up, weight is read
// W_OFFSET = 2M+2A+3 = 21 enabled cycles after d, and the result is valid
// LATENCY = 3M+3A+3 = 30 enabled cycles after d. LATENCY - W_OFFSET is
// still A + M = 9, so the loop keeps its interval of 9.
//
// Sharing operators inside this island follows the kernel's description
// (its polynomial island is shared to save multipliers); the schedule is
// this design's own. It needs ADD_LAT >= 4, which is checked.
module vnt_island_shared
  import si_pkg::*;
#(
  parameter int unsigned ADD_LAT = 4,
  parameter int unsigned MUL_LAT = 5
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     ce,
  input  float32_t d,
  input  float32_t w,
  output float32_t y
);

  // Constants rounded to binary32.
  localparam float32_t F32_19P5 = 32'h419C_0000;
  localparam float32_t F32_3P7  = 32'h406C_CCCD;
  localparam float32_t F32_0P73 = 32'h3F3A_E148;

  localparam int unsigned II  = ADD_LAT + MUL_LAT;
  localparam int unsigned SW  = $clog2(II);
  localparam int unsigned DLY = 2 * II + 2;           // d is last used DLY cycles after it arrives

  if (ADD_LAT < 4) begin : g_lat_check
    $error("vnt_island_shared: the schedule needs ADD_LAT >= 4");
  end

  logic [SW-1:0] slot;
  float32_t      d_line [DLY];                         // d delayed by 1 .. DLY
  float32_t      mul_a, mul_b, mul_y, add_a, add_b, add_y, h1, h2, h3;

  always_ff @(posedge clk) begin
    if (rst)     slot <= '0;
    else if (ce) slot <= (slot == SW'(II - 1)) ? '0 : slot + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      d_line[0] <= d;
      for (int i = 1; i < DLY; i++) d_line[i] <= d_line[i-1];
      if (slot == SW'(0))           h1 <= add_y;
      if (slot == SW'(1))           h2 <= add_y;
      if (slot == SW'(MUL_LAT + 2)) h3 <= mul_y;
    end
  end

  always_comb begin
    unique case (slot)
      SW'(1):  begin mul_a = h1; mul_b = d_line[II];          end
      SW'(2):  begin mul_a = h2; mul_b = d_line[2 * II + 1];  end
      SW'(3):  begin mul_a = w;  mul_b = F32_0P73;            end
      default: begin mul_a = d;  mul_b = d;                   end
    endcase
    if (slot == SW'(MUL_LAT + 1)) begin
      add_a = mul_y; add_b = F32_3P7;
    end else if (slot == SW'(MUL_LAT + 3)) begin
      add_a = h3;    add_b = mul_y;
    end else begin
      add_a = mul_y; add_b = F32_19P5;
    end
  end

  fp_mul #(.LATENCY(MUL_LAT)) u_mul (.clk, .en(ce), .a(mul_a), .b(mul_b), .y(mul_y));
  fp_add #(.LATENCY(ADD_LAT)) u_add (.clk, .en(ce), .a(add_a), .b(add_b), .y(add_y));

  assign y = add_y;

endmodule
