// Self-checking testbench for scg_not_copy: both values of a against the
// constant 1, two copies of a and its complement. A time-out counts as a
// failure.
module tb_scg_not_copy;

  logic a, o_one, o_copy1, o_copy2, o_not;
  int   checks = 0, failures = 0;

  scg_not_copy dut (.a(a), .o_one(o_one), .o_copy1(o_copy1), .o_copy2(o_copy2), .o_not(o_not));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      a = 1'(m);
      #1;
      checks++;
      if ({o_one, o_copy1, o_copy2, o_not} !== {1'b1, a, a, ~a}) begin
        failures++;
        $display("a=%b: got %b%b%b%b", a, o_one, o_copy1, o_copy2, o_not);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
