// Full adder from a single SCG gate.
//
// Terminal assignment (D, C, B, A) = (cin, b, 0, a). The gate then gives
//   Q = (a + b).cin + a.b   carry out
//   R = a xor b xor cin     sum
// and two garbage outputs, P = b.cin' and S = b xor cin, kept as ports so
// the gate stays reversible. One constant input, two garbage outputs.
// This is the published full-adder configuration; combinational.
module scg_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic cout,
  output logic sum,
  output logic g1,
  output logic g2
);

  scg_gate u_scg (
    .d(cin), .c(b), .b(1'b0), .a(a),
    .p(g1), .q(cout), .r(sum), .s(g2)
  );

endmodule
