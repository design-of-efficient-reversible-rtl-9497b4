// Self-checking testbench for scg_gate.
//
// Applies all 16 input patterns (D, C, B, A), row index = {D,C,B,A}, and
// compares P, Q, R, S with the gate's truth table, held here as minterm
// masks: P = m(2,3,4,5,6,7,10,11), Q = m(3,5,6,7,9,12,13,15),
// R = m(1,3,4,6,8,10,13,15), S = m(2,3,4,5,8,9,14,15). It also checks that
// the 16 output patterns are all different, i.e. that the gate is
// reversible. A time-out counts as a failure.
module tb_scg_gate;

  localparam logic [15:0] P_M = 16'b0000_1100_1111_1100;
  localparam logic [15:0] Q_M = 16'b1011_0010_1110_1000;
  localparam logic [15:0] R_M = 16'b1010_0101_0101_1010;
  localparam logic [15:0] S_M = 16'b1100_0011_0011_1100;

  logic d, c, b, a, p, q, r, s;
  int   checks = 0, failures = 0;
  logic [15:0] seen;

  scg_gate dut (.d(d), .c(c), .b(b), .a(a), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int m = 0; m < 16; m++) begin
      {d, c, b, a} = 4'(m);
      #1;
      checks++;
      if ({p, q, r, s} !== {P_M[m], Q_M[m], R_M[m], S_M[m]}) begin
        failures++;
        $display("row %0d: got PQRS=%b%b%b%b expected %b%b%b%b", m, p, q, r, s,
                 P_M[m], Q_M[m], R_M[m], S_M[m]);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen !== '1) begin
      failures++;
      $display("outputs are not a permutation: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
