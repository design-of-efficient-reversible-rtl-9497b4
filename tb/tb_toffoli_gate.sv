// Self-checking testbench for toffoli_gate: all 8 input patterns against
// P = A, Q = B, R = A.B xor C. A time-out counts as a failure.
module tb_toffoli_gate;

  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;

  toffoli_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 8; m++) begin
      {a, b, c} = 3'(m);
      #1;
      checks++;
      if (p !== a || q !== b || r !== ((a && b) != c)) begin
        failures++;
        $display("a=%b b=%b c=%b: got %b%b%b", a, b, c, p, q, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
