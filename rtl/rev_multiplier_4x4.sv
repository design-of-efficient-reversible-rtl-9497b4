// 4 x 4 unsigned reversible multiplier: p = x * y.
//
// Two stages, both combinational and built only from reversible gates:
//   1. toffoli_ppg: 16 Toffoli gates form all partial products x[i].y[j]
//      in parallel (target input tied to 0).
//   2. scg_pp_adder: 13 SCG gates, each a full adder, sum the partial
//      products into the 8-bit product.
// 29 gates in all. Ports are the 8 operand bits and 8 product bits; no
// clock, no registers. The two-stage structure and gate types are the
// published design; the operand placement inside the adder network is
// partly this design's choice (see scg_pp_adder).
module rev_multiplier_4x4
  import rev_pkg::*;
(
  input  mul_operand_t x,
  input  mul_operand_t y,
  output mul_product_t p
);

  logic [MUL_W*MUL_W-1:0] pp;
  mul_operand_t           x_garbage, y_garbage;

  toffoli_ppg u_ppg (
    .x(x), .y(y), .pp(pp), .x_pass(x_garbage), .y_pass(y_garbage)
  );

  scg_pp_adder u_add (
    .pp(pp), .p(p)
  );

endmodule
