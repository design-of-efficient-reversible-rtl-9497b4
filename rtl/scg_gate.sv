// SCG gate: a 4-input, 4-output reversible logic gate.
//
// Inputs are the terminals (D, C, B, A), outputs (P, Q, R, S):
//   P = B.C' + C.D'
//   Q = (A + C).(B xor D) + A.C
//   R = D xor C xor A
//   S = D xor C xor B
// The mapping is a bijection on the 16 input patterns, so the inputs can be
// recovered from the outputs. Tying terminal B to a constant turns the gate
// into a full adder (B = 0: Q = carry, R = sum) or, with the operands placed
// as in scg_full_subtractor, a full subtractor (B = 1).
// The equations are the gate's published definition; the gate is purely
// combinational and has no timing of its own.
module scg_gate (
  input  logic d,  // terminal 1
  input  logic c,  // terminal 2
  input  logic b,  // terminal 3
  input  logic a,  // terminal 4
  output logic p,
  output logic q,
  output logic r,
  output logic s
);

  always_comb begin
    p = (b & ~c) | (c & ~d);
    q = ((a | c) & (b ^ d)) | (a & c);
    r = d ^ c ^ a;
    s = d ^ c ^ b;
  end

endmodule
