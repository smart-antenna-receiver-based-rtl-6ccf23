// fbs_agu: address generation unit of the FBS processor.
//
// Forms the address of element (row, col) of a matrix stored row by row with `stride`
// words per row from `base`, or of element (col, row) when `transpose` is set, so that a
// loop over one index can walk down a column of L (needed for the products with L^H) as
// easily as along a row. With stride = 0 it walks a vector. Combinational.
// The document only names the two AGUs; this addressing scheme is this design's choice.
module fbs_agu #(
  parameter int unsigned AW = 8
) (
  input  logic [AW-1:0] base,
  input  logic [AW-1:0] stride,
  input  logic [AW-1:0] row,
  input  logic [AW-1:0] col,
  input  logic          transpose,
  output logic [AW-1:0] addr
);

  always_comb begin
    if (transpose) addr = base + AW'(col * stride) + row;
    else           addr = base + AW'(row * stride) + col;
  end

endmodule
