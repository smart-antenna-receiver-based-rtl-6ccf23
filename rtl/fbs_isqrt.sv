// fbs_isqrt: inverse square root unit of the FBS unit, used to normalise the channel
// estimate h to unit norm (res = 1 / sqrt(x) for x > 0).
//
// The mantissa is aligned to an even exponent, its square root is taken bit by bit
// (15 result bits) and the reciprocal is formed with the floating point divider of
// jste_pkg. Combinational; x <= 0 gives the largest positive number. The document names
// the unit and its purpose; the algorithm is this design's choice.
module fbs_isqrt
  import jste_pkg::*;
(
  input  fp_t x,
  output fp_t res
);

  assign res = fp_isqrt(x);

endmodule
