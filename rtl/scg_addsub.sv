// N-bit parallel adder/subtractor built from N SCG gates.
//
// Gate i receives (D, C, B, A) = (a[i], b[i], mode, k[i]), where k[0] = cin
// and k[i+1] is gate i's Q output. R is result bit i. Because the SCG gate's
// Q output is the majority of (A, C, B xor D):
//   mode = 0: Q = maj(k, b, a)  -> carry,  result = a + b + cin
//   mode = 1: Q = maj(k, b, a') -> borrow, result = a - b - cin
// so the same ripple chain adds or subtracts, with one gate per bit and no
// extra gates. cout is the final carry (add) or borrow (subtract). P and S
// of every gate are garbage outputs and are left unused here.
// That N gates suffice is the published claim; the per-bit wiring and the
// use of the constant terminal as a mode line are this design's choices.
// Combinational; the carry ripples through N gates.
module scg_addsub #(
  parameter int unsigned N = 4
) (
  input  logic         mode,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] result,
  output logic         cout
);

  logic [N:0]   k;
  logic [N-1:0] g_p, g_s;

  assign k[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    scg_gate u_scg (
      .d(a[i]), .c(b[i]), .b(mode), .a(k[i]),
      .p(g_p[i]), .q(k[i+1]), .r(result[i]), .s(g_s[i])
    );
  end

  assign cout = k[N];

endmodule
