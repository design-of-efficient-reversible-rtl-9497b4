// Self-checking testbench for scg_full_subtractor: all 8 input patterns.
// The integer a - b - bin is formed in the testbench; diff must be its
// low bit and bout must be 1 exactly when it is negative. The garbage
// outputs are compared with (a.b)' and (a xor b)'. A time-out counts as a
// failure.
module tb_scg_full_subtractor;

  logic a, b, bin, bout, diff, g1, g2;
  int   checks = 0, failures = 0;

  scg_full_subtractor dut (.a(a), .b(b), .bin(bin), .bout(bout), .diff(diff), .g1(g1), .g2(g2));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 8; m++) begin
      int d;
      {a, b, bin} = 3'(m);
      d = int'(a) - int'(b) - int'(bin);
      #1;
      checks++;
      if (diff !== d[0] || bout !== (d < 0)) begin
        failures++;
        $display("%b-%b-%b: got bout=%b diff=%b", a, b, bin, bout, diff);
      end
      checks++;
      if (g1 !== ~(a & b) || g2 !== ~(a ^ b)) begin
        failures++;
        $display("%b-%b-%b: garbage %b%b", a, b, bin, g1, g2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
