// One SCG gate computing NAND and XNOR of two bits (NAND makes the gate
// universal).
//
// Terminals (D, C, B, A) = (a, b, 1, 0) give
//   P = (a.b)',  Q = b.a',  R = a xor b,  S = (a xor b)'.
// Published configuration; combinational.
module scg_nand_xnor (
  input  logic a,
  input  logic b,
  output logic o_nand,
  output logic o_bna,
  output logic o_xor,
  output logic o_xnor
);

  scg_gate u_scg (
    .d(a), .c(b), .b(1'b1), .a(1'b0),
    .p(o_nand), .q(o_bna), .r(o_xor), .s(o_xnor)
  );

endmodule
