// fp64_mul: IEEE-754 double-precision multiplier, round to nearest even.
//
// The product is computed in one combinational step and then passes through
// LAT register stages (LAT = 0 gives a purely combinational multiplier), so
// the result of the operands presented in cycle t appears in cycle t+LAT.
// The stages model the pipelined floating-point core an FPGA design would use;
// the published design names the multiplication but not its core, so the
// number format details are this design's choice: subnormal inputs and
// results are flushed to signed zero, any NaN input or inf*0 gives the quiet
// NaN 0x7FF8000000000000, and overflow gives a signed infinity.
module fp64_mul #(
  parameter int unsigned LAT = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);

  logic        sa, sb, sy;
  logic [10:0] ea, eb;
  logic [51:0] fa, fb;
  logic [63:0] res;

  assign {sa, ea, fa} = a;
  assign {sb, eb, fb} = b;
  assign sy = sa ^ sb;

  always_comb begin
    logic [105:0] prod;
    logic [52:0]  mant;
    logic [53:0]  mant_r;
    logic         g, s;
    logic signed [13:0] e;
    logic a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

    a_nan  = (ea == 11'h7FF) && (fa != '0);
    b_nan  = (eb == 11'h7FF) && (fb != '0);
    a_inf  = (ea == 11'h7FF) && (fa == '0);
    b_inf  = (eb == 11'h7FF) && (fb == '0);
    a_zero = (ea == '0);
    b_zero = (eb == '0);

    prod = {1'b1, fa} * {1'b1, fb};
    e    = $signed({3'b0, ea}) + $signed({3'b0, eb}) - 14'sd1023;
    if (prod[105]) begin
      mant = prod[105:53];
      g    = prod[52];
      s    = |prod[51:0];
      e    = e + 14'sd1;
    end else begin
      mant = prod[104:52];
      g    = prod[51];
      s    = |prod[50:0];
    end
    mant_r = {1'b0, mant} + {53'b0, g & (s | mant[0])};
    if (mant_r[53]) begin
      mant_r = mant_r >> 1;
      e      = e + 14'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      res = 64'h7FF8_0000_0000_0000;
    else if (a_inf || b_inf)
      res = {sy, 11'h7FF, 52'b0};
    else if (a_zero || b_zero)
      res = {sy, 63'b0};
    else if (e >= 14'sd2047)
      res = {sy, 11'h7FF, 52'b0};
    else if (e <= 14'sd0)
      res = {sy, 63'b0};
    else
      res = {sy, e[10:0], mant_r[51:0]};
  end

  pipe_delay #(.W(64), .LAT(LAT)) u_dly (.clk(clk), .rst_n(rst_n), .d(res), .q(y));

endmodule
