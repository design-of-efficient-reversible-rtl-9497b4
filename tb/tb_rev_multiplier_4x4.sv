// Self-checking testbench for rev_multiplier_4x4.
//
// First the directed case 5 x 5 = 25 (x = y = 0101, p = 00011001), then
// all 256 operand pairs against integer multiplication. A time-out counts
// as a failure.
module tb_rev_multiplier_4x4;

  logic [3:0] x, y;
  logic [7:0] p;
  int         checks = 0, failures = 0;

  rev_multiplier_4x4 dut (.x(x), .y(y), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 4'b0101;
    y = 4'b0101;
    #1;
    checks++;
    if (p !== 8'b0001_1001) begin
      failures++;
      $display("5 x 5: got %b", p);
    end
    for (int m = 0; m < 256; m++) begin
      {x, y} = 8'(m);
      #1;
      checks++;
      if (int'(p) != int'(x) * int'(y)) begin
        failures++;
        $display("%0d x %0d: got %0d", x, y, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
