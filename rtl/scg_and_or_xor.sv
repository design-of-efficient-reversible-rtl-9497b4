// One SCG gate computing OR, AND and XOR of two bits at once.
//
// Terminals (D, C, B, A) = (0, a, b, 0) give
//   P = a + b,  Q = a.b,  R = a (a copy),  S = a xor b.
// The AND/OR pair is the generate/propagate pair of a carry-lookahead
// adder. Published configuration; combinational.
module scg_and_or_xor (
  input  logic a,
  input  logic b,
  output logic o_or,
  output logic o_and,
  output logic o_a,
  output logic o_xor
);

  scg_gate u_scg (
    .d(1'b0), .c(a), .b(b), .a(1'b0),
    .p(o_or), .q(o_and), .r(o_a), .s(o_xor)
  );

endmodule
