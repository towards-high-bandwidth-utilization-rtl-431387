// pe: processing element. Multiplies a matrix value by the vector element of
// its column and forwards the product with the row index of the non-zero.
//
// Inputs arrive when the vector buffer delivers the element; the product
// leaves MUL_LAT cycles later (MUL_LAT = 6 by default, an assumed pipeline
// depth for a double-precision multiplier). The valid bit and row index
// travel in a delay line of the same length. A padding element (valid low)
// yields an invalid product. The published design gives the PE's job; its
// pipeline depth is this design's choice.
module pe
  import spmv_pkg::*;
#(
  parameter int unsigned MUL_LAT = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [IW-1:0] in_row,
  input  fp64_t         in_val,
  input  fp64_t         in_x,
  output prod_t         out
);
  fp64_t p;

  fp64_mul #(.LAT(MUL_LAT)) u_mul (.clk(clk), .rst_n(rst_n), .a(in_val), .b(in_x), .y(p));

  logic [IW:0] side;
  pipe_delay #(.W(IW+1), .LAT(MUL_LAT)) u_side (
    .clk(clk), .rst_n(rst_n), .d({in_valid, in_row}), .q(side)
  );

  assign out.valid = side[IW];
  assign out.row   = side[IW-1:0];
  assign out.val   = side[IW] ? p : '0;
endmodule
