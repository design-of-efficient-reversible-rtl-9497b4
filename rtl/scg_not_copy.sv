// One SCG gate as an inverter and fan-out (COPY) element.
//
// Reversible circuits allow no direct fan-out; this cell makes two copies
// of a and its complement. Terminals (D, C, B, A) = (0, a, 1, 0) give
//   P = 1,  Q = a,  R = a,  S = a'.
// Published configuration; combinational.
module scg_not_copy (
  input  logic a,
  output logic o_one,
  output logic o_copy1,
  output logic o_copy2,
  output logic o_not
);

  scg_gate u_scg (
    .d(1'b0), .c(a), .b(1'b1), .a(1'b0),
    .p(o_one), .q(o_copy1), .r(o_copy2), .s(o_not)
  );

endmodule
