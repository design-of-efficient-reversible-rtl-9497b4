// Toffoli gate: 3-input, 3-output reversible gate.
//
// P = A, Q = B, R = A.B xor C. With the target C tied to 0 the gate is an
// AND gate whose P and Q outputs pass the operands on, which is how the
// multiplier's partial-product array uses it. Purely combinational.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  always_comb begin
    p = a;
    q = b;
    r = (a & b) ^ c;
  end

endmodule
