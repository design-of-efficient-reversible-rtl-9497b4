// Self-checking testbench for scg_and_or_xor: the four (a, b) pairs against
// OR, AND, copy of a and XOR. A time-out counts as a failure.
module tb_scg_and_or_xor;

  logic a, b, o_or, o_and, o_a, o_xor;
  int   checks = 0, failures = 0;

  scg_and_or_xor dut (.a(a), .b(b), .o_or(o_or), .o_and(o_and), .o_a(o_a), .o_xor(o_xor));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++) begin
      {a, b} = 2'(m);
      #1;
      checks++;
      if ({o_or, o_and, o_a, o_xor} !== {a | b, a & b, a, a ^ b}) begin
        failures++;
        $display("a=%b b=%b: got %b%b%b%b", a, b, o_or, o_and, o_a, o_xor);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
