// fbs_bs: back-substitution unit of the FBS processor (multiplier/divider and adder).
//
// op = BS_SUBDIV: res = (x - s) / d   -- closes one row of a forward or backward
//                                         substitution: x is the right-hand side, s the
//                                         inner product from the MAC, d the real diagonal
//                                         element of the triangular factor.
// op = BS_SCALE : res = x * d          -- scales by a real number (normalisation of h).
// Complex operands, real d, floating point format of jste_pkg. Purely combinational; the
// caller registers the result. The document gives the unit's function and its
// multiplier/divider plus adder structure; the two-operation encoding is this design's.
module fbs_bs
  import jste_pkg::*;
(
  input  logic op,      // 0: (x - s) / d, 1: x * d
  input  cfp_t x,
  input  cfp_t s,
  input  fp_t  d,
  output cfp_t res
);

  cfp_t diff;

  always_comb begin
    diff = cfp_sub(x, s);
    if (op) begin
      res.re = fp_mul(x.re, d);
      res.im = fp_mul(x.im, d);
    end else begin
      res.re = fp_div(diff.re, d);
      res.im = fp_div(diff.im, d);
    end
  end

endmodule
