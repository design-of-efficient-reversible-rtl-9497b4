// Self-checking testbench for scg_full_adder: all 8 input patterns.
// {cout, sum} is compared with the integer a + b + cin, and the garbage
// outputs with b.cin' and b xor cin. A time-out counts as a failure.
module tb_scg_full_adder;

  logic a, b, cin, cout, sum, g1, g2;
  int   checks = 0, failures = 0;

  scg_full_adder dut (.a(a), .b(b), .cin(cin), .cout(cout), .sum(sum), .g1(g1), .g2(g2));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 8; m++) begin
      int total;
      {a, b, cin} = 3'(m);
      total = int'(a) + int'(b) + int'(cin);
      #1;
      checks++;
      if ({cout, sum} !== 2'(total)) begin
        failures++;
        $display("%b+%b+%b: got cout=%b sum=%b", a, b, cin, cout, sum);
      end
      checks++;
      if (g1 !== (b & ~cin) || g2 !== (b ^ cin)) begin
        failures++;
        $display("%b+%b+%b: garbage %b%b", a, b, cin, g1, g2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
