// Full subtractor from a single SCG gate: computes a - b - bin.
//
// Terminal assignment (D, C, B, A) = (a, b, 1, bin). The gate then gives
//   Q = (bin + b).a' + bin.b = a'.b + a'.bin + b.bin   borrow out
//   R = a xor b xor bin                                 difference
// plus garbage P = (a.b)' and S = (a xor b)'.
// The constant 1 on terminal 3 and the output roles (borrow on terminal 2,
// difference on terminal 3) follow the published configuration. The
// minuend sits on terminal 1 and the borrow-in on terminal 4; with those
// two exchanged, terminal 2 would be the borrow of bin - a - b instead, so
// this placement is a deliberate choice. Combinational.
module scg_full_subtractor (
  input  logic a,
  input  logic b,
  input  logic bin,
  output logic bout,
  output logic diff,
  output logic g1,
  output logic g2
);

  scg_gate u_scg (
    .d(a), .c(b), .b(1'b1), .a(bin),
    .p(g1), .q(bout), .r(diff), .s(g2)
  );

endmodule
