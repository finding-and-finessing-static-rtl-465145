// si_pkg: types, constants and arithmetic shared by the static-island design.
//
// The islands of this design work on IEEE-754 binary32 values. The
// functions below compute one binary32 addition, multiplication and
// division, rounded to nearest-even. They are written for
// synthesis: each is one combinational cloud, and the operator modules
// (fp_add, fp_mul, fp_div) place it in front of a register pipeline.
//
// Simplifications, chosen for this design: subnormal inputs are read as
// zero and subnormal results are flushed to a signed zero; any NaN input
// gives the quiet NaN 32'h7FC00000; overflow gives a signed infinity.
package si_pkg;

  typedef logic [31:0] float32_t;

  localparam float32_t F32_QNAN = 32'h7FC0_0000;

  // Round a normalised 24-bit significand with guard and sticky bits to
  // nearest-even and pack it. `exp` is the biased exponent of the value
  // 1.m * 2^(exp-127), with room for under- and overflow.
  function automatic float32_t f32_pack(input logic sign, input logic signed [10:0] exp,
                                        input logic [23:0] mant, input logic guard,
                                        input logic sticky);
    logic [24:0] rounded;
    logic signed [10:0] e;
    float32_t r;
    rounded = {1'b0, mant} + {24'd0, (guard & (sticky | mant[0]))};
    e = exp;
    if (rounded[24]) begin
      rounded = rounded >> 1;
      e = e + 11'sd1;
    end
    if (e <= 0)        r = {sign, 31'd0};
    else if (e >= 255) r = {sign, 8'hFF, 23'd0};
    else               r = {sign, e[7:0], rounded[22:0]};
    return r;
  endfunction

  function automatic float32_t f32_add(input float32_t x, input float32_t y);
    logic        x_nan, y_nan, x_inf, y_inf;
    float32_t    larger, lesser;
    logic [7:0]  d;
    logic [26:0] mb, ms, shifted;      // 24-bit significand and 3 guard bits
    logic        sticky;
    logic [27:0] sum;
    logic signed [10:0] e;
    int          lz;
    float32_t    r;

    x_nan = (x[30:23] == 8'hFF) && (x[22:0] != 0);
    y_nan = (y[30:23] == 8'hFF) && (y[22:0] != 0);
    x_inf = (x[30:23] == 8'hFF) && (x[22:0] == 0);
    y_inf = (y[30:23] == 8'hFF) && (y[22:0] == 0);

    if (x_nan || y_nan || (x_inf && y_inf && (x[31] != y[31]))) begin
      r = F32_QNAN;
    end else if (x_inf) begin
      r = x;
    end else if (y_inf) begin
      r = y;
    end else begin
      // Order by magnitude; subnormals count as zero.
      if (x[30:0] >= y[30:0]) begin larger = x; lesser = y; end
      else                    begin larger = y; lesser = x; end
      mb = (larger[30:23]   == 0) ? 27'd0 : {1'b1, larger[22:0], 3'b000};
      ms = (lesser[30:23] == 0) ? 27'd0 : {1'b1, lesser[22:0], 3'b000};
      if (mb == 0) begin
        // Both operands zero: -0 only when both are -0.
        r = {larger[31] & lesser[31], 31'd0};
      end else begin
        d = larger[30:23] - ((lesser[30:23] == 0) ? larger[30:23] : lesser[30:23]);
        if (d >= 8'd27) begin
          shifted = 27'd0;
          sticky  = (ms != 0);
        end else begin
          shifted = ms >> d;
          sticky  = ((shifted << d) != ms);
        end
        shifted[0] = shifted[0] | sticky;
        e = {3'b000, larger[30:23]};
        if (larger[31] == lesser[31]) sum = {1'b0, mb} + {1'b0, shifted};
        else                      sum = {1'b0, mb} - {1'b0, shifted};
        if (sum == 0) begin
          r = 32'd0;  // exact cancellation gives +0 under round-to-nearest
        end else begin
          if (sum[27]) begin
            sum = {1'b0, sum[27:2], sum[1] | sum[0]};
            e = e + 11'sd1;
          end else begin
            lz = 0;
            for (int i = 26; i >= 0; i--) begin
              if (sum[i]) break;
              lz++;
            end
            sum = sum << lz;
            e = e - 11'(lz);
          end
          r = f32_pack(larger[31], e, sum[26:3], sum[2], sum[1] | sum[0]);
        end
      end
    end
    return r;
  endfunction

  function automatic float32_t f32_mul(input float32_t x, input float32_t y);
    logic        x_nan, y_nan, x_inf, y_inf, x_zero, y_zero, sign;
    logic [47:0] p;
    logic signed [10:0] e;
    float32_t    r;

    sign   = x[31] ^ y[31];
    x_nan  = (x[30:23] == 8'hFF) && (x[22:0] != 0);
    y_nan  = (y[30:23] == 8'hFF) && (y[22:0] != 0);
    x_inf  = (x[30:23] == 8'hFF) && (x[22:0] == 0);
    y_inf  = (y[30:23] == 8'hFF) && (y[22:0] == 0);
    x_zero = (x[30:23] == 0);
    y_zero = (y[30:23] == 0);

    if (x_nan || y_nan || (x_inf && y_zero) || (y_inf && x_zero)) begin
      r = F32_QNAN;
    end else if (x_inf || y_inf) begin
      r = {sign, 8'hFF, 23'd0};
    end else if (x_zero || y_zero) begin
      r = {sign, 31'd0};
    end else begin
      p = {24'd0, 1'b1, x[22:0]} * {24'd0, 1'b1, y[22:0]};
      e = $signed({3'b000, x[30:23]}) + $signed({3'b000, y[30:23]}) - 11'sd127;
      if (p[47]) r = f32_pack(sign, e + 11'sd1, p[47:24], p[23], |p[22:0]);
      else       r = f32_pack(sign, e,          p[46:23], p[22], |p[21:0]);
    end
    return r;
  endfunction

  // Binary32 division x / y. The significand quotient is formed with two
  // guard positions and a sticky bit from the remainder, then rounded by
  // f32_pack. 0/0, inf/inf and NaN give the quiet NaN; x/0 gives infinity.
  function automatic float32_t f32_div(input float32_t x, input float32_t y);
    logic        x_nan, y_nan, x_inf, y_inf, x_zero, y_zero, sign;
    logic [49:0] num;
    logic [23:0] den;
    logic [26:0] q;                    // quotient of 1.x * 2^26 by 1.y: 26 or 27 bits
    logic [23:0] rem;
    logic signed [10:0] e;
    float32_t    r;

    x_nan  = (x[30:23] == 8'hFF) && (x[22:0] != 0);
    y_nan  = (y[30:23] == 8'hFF) && (y[22:0] != 0);
    x_inf  = (x[30:23] == 8'hFF) && (x[22:0] == 0);
    y_inf  = (y[30:23] == 8'hFF) && (y[22:0] == 0);
    x_zero = (x[30:23] == 8'h00);
    y_zero = (y[30:23] == 8'h00);
    sign   = x[31] ^ y[31];

    if (x_nan || y_nan || (x_inf && y_inf) || (x_zero && y_zero)) begin
      r = F32_QNAN;
    end else if (x_inf || y_zero) begin
      r = {sign, 8'hFF, 23'd0};
    end else if (x_zero || y_inf) begin
      r = {sign, 31'd0};
    end else begin
      num = {1'b1, x[22:0], 26'd0};
      den = {1'b1, y[22:0]};
      q   = 27'(num / {26'd0, den});
      rem = 24'(num % {26'd0, den});
      e   = 11'(signed'({3'b000, x[30:23]})) - 11'(signed'({3'b000, y[30:23]})) + 11'sd127;
      if (q[26]) r = f32_pack(sign, e,          q[26:3], q[2], (q[1:0] != 0) || (rem != 0));
      else       r = f32_pack(sign, e - 11'sd1, q[25:2], q[1], q[0] || (rem != 0));
    end
    return r;
  endfunction


  // x < y for binary32 values; subnormals count as zero, -0 equals +0,
  // and any NaN makes the comparison false.
  function automatic logic f32_lt(input float32_t x, input float32_t y);
    logic [30:0] mx, my;
    mx = (x[30:23] == 0) ? 31'd0 : x[30:0];
    my = (y[30:23] == 0) ? 31'd0 : y[30:0];
    if ((x[30:23] == 8'hFF && x[22:0] != 0) || (y[30:23] == 8'hFF && y[22:0] != 0)) return 1'b0;
    if (mx == 0 && my == 0) return 1'b0;
    if (x[31] && !y[31]) return 1'b1;               // negative < positive
    if (!x[31] && y[31]) return 1'b0;
    if (!x[31]) return mx < my;                     // both positive
    return mx > my;                                 // both negative
  endfunction

endpackage
