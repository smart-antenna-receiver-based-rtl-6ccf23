// fbs_mac: complex floating point multiply-accumulate unit of the FBS processor.
//
// Each enabled cycle adds op_a * op_b (or conj(op_a) * op_b when conj_a is set) to the
// complex accumulator; clr empties it first in the same cycle, so a new dot product
// starts with clr and en together. The unit computes the inner products of the
// substitutions, U^H h, the spatial filter w^H y, the matched filter and the channel
// autocorrelation. Numbers use the 16-bit mantissa / 5-bit exponent format of jste_pkg.
// Timing: one product per clock, result in acc the cycle after. The document gives the
// unit's function and number format; its one-cycle, unpipelined form is this design's choice.
module fbs_mac
  import jste_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  input  logic conj_a,
  input  cfp_t op_a,
  input  cfp_t op_b,
  output cfp_t acc
);

  cfp_t a_eff, prod, base;

  always_comb begin
    a_eff = conj_a ? cfp_conj(op_a) : op_a;
    prod  = cfp_mul(a_eff, op_b);
    base  = clr ? '{re: FP_ZERO, im: FP_ZERO} : acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   acc <= '{re: FP_ZERO, im: FP_ZERO};
    else if (en)  acc <= cfp_add(base, prod);
    else if (clr) acc <= '{re: FP_ZERO, im: FP_ZERO};
  end

endmodule
