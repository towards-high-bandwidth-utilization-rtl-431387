// fp64_add: IEEE-754 double-precision adder, round to nearest even.
//
// The sum is formed in one combinational step: the operands are ordered by
// magnitude, the smaller significand is aligned with guard, round and sticky
// bits, added or subtracted, renormalised with a leading-zero count and
// rounded. It then passes through LAT register stages (LAT = 0 is purely
// combinational; the accumulators use that form, the adder tree uses LAT = 10).
// Number format choices of this design: subnormal inputs and results are
// flushed to signed zero, NaN inputs and inf-inf give the quiet NaN
// 0x7FF8000000000000, overflow gives a signed infinity, and an exact zero sum
// of operands with opposite signs is +0.
module fp64_add #(
  parameter int unsigned LAT = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);

  logic [63:0] res;

  always_comb begin
    logic        sa, sb, sx, sy;
    logic [10:0] ea, eb, ex, ey;
    logic [51:0] fa, fb, fx, fy;
    logic a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
    logic [11:0] d;
    logic [55:0] mx, my, my_sh;
    logic [56:0] sum;
    logic [55:0] norm;
    logic signed [13:0] e;
    logic [5:0]  lz;
    logic [53:0] mant_r;
    logic        sticky;
    sticky = 1'b0;

    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    a_nan  = (ea == 11'h7FF) && (fa != '0);
    b_nan  = (eb == 11'h7FF) && (fb != '0);
    a_inf  = (ea == 11'h7FF) && (fa == '0);
    b_inf  = (eb == 11'h7FF) && (fb == '0);
    a_zero = (ea == '0);
    b_zero = (eb == '0);

    // x is the operand of larger magnitude
    if ({ea, fa} >= {eb, fb}) begin
      {sx, ex, fx} = a; {sy, ey, fy} = b;
    end else begin
      {sx, ex, fx} = b; {sy, ey, fy} = a;
    end

    d  = {1'b0, ex} - {1'b0, ey};
    mx = {1'b1, fx, 3'b000};
    my = {1'b1, fy, 3'b000};
    if (d >= 12'd56) begin
      my_sh = 56'd1;  // only the sticky bit survives
    end else begin
      my_sh  = my >> d;
      sticky = |(my & ((56'd1 << d) - 56'd1));
      my_sh[0] = my_sh[0] | sticky;
    end

    e = $signed({3'b0, ex});
    if (sx == sy) sum = {1'b0, mx} + {1'b0, my_sh};
    else          sum = {1'b0, mx} - {1'b0, my_sh};

    if (sum[56]) begin
      norm = sum[56:1];
      norm[0] = norm[0] | sum[0];
      e = e + 14'sd1;
      lz = '0;
    end else begin
      lz = 6'd0;
      for (int i = 55; i >= 0; i--) begin
        if (sum[i]) break;
        lz = lz + 6'd1;
      end
      norm = sum[55:0] << lz;
      e = e - $signed({8'b0, lz});
    end

    mant_r = {1'b0, norm[55:3]} + {53'b0, norm[2] & (norm[1] | norm[0] | norm[3])};
    if (mant_r[53]) begin
      mant_r = mant_r >> 1;
      e      = e + 14'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      res = 64'h7FF8_0000_0000_0000;
    else if (a_inf)
      res = a;
    else if (b_inf)
      res = b;
    else if (a_zero && b_zero)
      res = {sa & sb, 63'b0};
    else if (b_zero)
      res = a;
    else if (a_zero)
      res = b;
    else if (sum == '0)
      res = 64'b0;
    else if (e >= 14'sd2047)
      res = {sx, 11'h7FF, 52'b0};
    else if (e <= 14'sd0)
      res = {sx, 63'b0};
    else
      res = {sx, e[10:0], mant_r[51:0]};
  end

  pipe_delay #(.W(64), .LAT(LAT)) u_dly (.clk(clk), .rst_n(rst_n), .d(res), .q(y));

endmodule
